// abr_vd: virtual destination function of an ABR segment end point.
//
// Every forward RM cell that reaches the end of the segment is turned round:
// its DIR bit is set (backward RM cell) and its CI bit is set while the node is
// congested (ABR buffer over its threshold, or the node congestion indication),
// then it is sent back towards the virtual source upstream. Other fields (ER,
// CCR, MCR) travel back unchanged. The turn-round and the congestion marking
// are the document's; keeping an already-set CI is this design's choice.
//
// Interface: valid/ready in and out, combinational.
module abr_vd
  import atm_pkg::*;
(
  input  logic     congested,
  input  logic     frm_valid,
  output logic     frm_ready,
  input  sw_cell_t frm_cell,
  output logic     brm_valid,
  input  logic     brm_ready,
  output sw_cell_t brm_cell
);
  always_comb begin
    brm_valid    = frm_valid;
    frm_ready    = brm_ready;
    brm_cell     = frm_cell;
    brm_cell.atm = rm_set_ci(rm_set_dir(frm_cell.atm, 1'b1), rm_ci(frm_cell.atm) || congested);
  end
endmodule
