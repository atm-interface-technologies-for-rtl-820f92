// mux_scheduler: picks the cell that leaves on the output link in each cell
// slot, from the CBR/VBR queue and the ABR stream.
//
// CBR and VBR cells go first, so ABR only uses bandwidth they leave unused,
// except that ABR is guaranteed its minimum cell rate MCR: an MCR credit
// accumulator gains MCR (16-bit fraction of the link cell rate) every slot,
// and while it holds a whole cell of credit a waiting ABR cell is sent ahead
// of CBR/VBR. Both rules are the document's; the credit mechanism is this
// design's.
//
// Interface: cbr_* and abr_* are valid/ready inputs; at each slot_tick at most
// one of them is accepted and the cell appears on out_cell with a one-cycle
// out_valid pulse on the next clock; out_abr tells which queue it came from
// and mcr_turn that the MCR guarantee decided it.
module mux_scheduler
  import atm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic [RATE_W-1:0] mcr,
  input  logic              cbr_valid,
  output logic              cbr_ready,
  input  sw_cell_t          cbr_cell,
  input  logic              abr_valid,
  output logic              abr_ready,
  input  sw_cell_t          abr_cell,
  output logic              out_valid,
  output sw_cell_t          out_cell,
  output logic              out_abr,
  output logic              mcr_turn
);
  localparam logic [RATE_W+1:0] ONE = (RATE_W+2)'(1) << RATE_W;
  localparam logic [RATE_W+1:0] CAP = (ONE << 1) - 1'b1;
  logic [RATE_W+1:0] credit, c_add;
  logic              owed, pick_abr;

  always_comb begin
    c_add    = ((credit + (RATE_W+2)'(mcr)) > CAP) ? CAP : credit + (RATE_W+2)'(mcr);
    owed     = (c_add >= ONE);
    pick_abr = abr_valid && (owed || !cbr_valid);
    abr_ready = slot_tick && pick_abr;
    cbr_ready = slot_tick && !pick_abr && cbr_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit    <= '0;
      out_valid <= 1'b0;
      out_cell  <= '0;
      out_abr   <= 1'b0;
      mcr_turn  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      mcr_turn  <= 1'b0;
      if (slot_tick) begin
        credit <= (abr_ready && owed) ? c_add - ONE : c_add;
        if (abr_ready) begin
          out_valid <= 1'b1; out_cell <= abr_cell; out_abr <= 1'b1;
          mcr_turn  <= owed && cbr_valid;
        end else if (cbr_ready) begin
          out_valid <= 1'b1; out_cell <= cbr_cell; out_abr <= 1'b0;
        end
      end
    end
  end
endmodule
