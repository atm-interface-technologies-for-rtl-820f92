// upc_ccm: connection context memory of the policer.
//
// One entry per connection holds TAT, T, tau, the expiry bit E and the policing
// mode (the document lists these contents). Three ports:
//   cfg : controller write of a whole entry (connection set-up); a new
//         connection should be written with E = 1.
//   a   : policer port; combinational read, write of a new TAT that also
//         clears E.
//   b   : expiry processor port; combinational read, set E.
// On a same-cycle clash on one entry the controller wins over the policer and
// the policer over the expiry processor (this ordering is this design's).
// All entries reset to expired, mode 0, T = tau = 0.
module upc_ccm
  import atm_pkg::*;
#(
  parameter int unsigned IDX_W = CONN_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [IDX_W-1:0]  cfg_idx,
  input  ccm_entry_t        cfg_entry,
  input  logic [IDX_W-1:0]  a_idx,
  output ccm_entry_t        a_entry,
  input  logic              a_we,
  input  logic [TAT_W-1:0]  a_tat,
  input  logic [IDX_W-1:0]  b_idx,
  output ccm_entry_t        b_entry,
  input  logic              b_set_exp
);
  localparam int unsigned N = 1 << IDX_W;
  ccm_entry_t mem [N];

  assign a_entry = mem[a_idx];
  assign b_entry = mem[b_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '{tat: '0, t_inc: '0, tau: '0, exp: 1'b1, mode: POL_CLP01_DISCARD};
    end else begin
      if (b_set_exp && !(a_we && a_idx == b_idx) && !(cfg_we && cfg_idx == b_idx))
        mem[b_idx].exp <= 1'b1;
      if (a_we && !(cfg_we && cfg_idx == a_idx)) begin
        mem[a_idx].tat <= a_tat;
        mem[a_idx].exp <= 1'b0;
      end
      if (cfg_we) mem[cfg_idx] <= cfg_entry;
    end
  end
endmodule
