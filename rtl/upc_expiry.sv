// upc_expiry: the expiry processor of the policer.
//
// TAT values wrap at 2**TAT_W, so a connection that has been silent for a long
// time would have a TAT that looks to be in the future. This block walks the
// connection context memory one entry per granted cycle, cyclically, and sets
// the E (expired) bit of every entry whose TAT lags t by LIMIT or more. An
// expired TAT is then treated by the VSA as lying in the past. The document
// describes the cyclic scan and the valid/expired outcome; the criterion
// "t - TAT >= LIMIT, as a signed difference" and LIMIT = 2**22 (16384 slots,
// leaving another 16384 slots of margin before the difference changes sign)
// are this design's choice.
//
// Interface: when grant is high the entry at scan_idx (rd_entry, read
// combinationally) is examined; set_exp asks the memory to set its E bit in the
// same cycle, and scan_idx advances.
module upc_expiry
  import atm_pkg::*;
#(
  parameter int unsigned IDX_W = CONN_W,
  parameter int unsigned LIMIT = 1 << 22
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              grant,
  input  logic [TIME_W-1:0] t_now,
  output logic [IDX_W-1:0]  scan_idx,
  input  ccm_entry_t        rd_entry,
  output logic              set_exp
);
  logic signed [TAT_W-1:0] lag;

  always_comb begin
    lag     = $signed(t_now - rd_entry.tat);
    set_exp = grant && !rd_entry.exp && (lag >= $signed(TAT_W'(LIMIT)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     scan_idx <= '0;
    else if (grant) scan_idx <= scan_idx + 1'b1;
  end
endmodule
