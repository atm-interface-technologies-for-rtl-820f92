// abr_switch_alg: the ABR switch algorithm used when this node is not an ABR
// segment end point; the EFCI (binary) variant.
//
// The congestion state is the ABR buffer's threshold flag or the indication
// from the node's congestion control. Forward RM cells on their way into the
// ABR buffer and backward RM cells on their way back to the source pass
// through here, and while the node is congested their CI bit is set. A cell
// that is not marked keeps the CI bit it already carries: the document says
// the bit is "set or reset" from the congestion state; clearing a mark set by
// an earlier node would hide that node's congestion, so this design only
// sets it. The explicit-rate variant (EPRCA, mean allowed cell rate) is named
// in the document without its formulas and is not built.
//
// Interface: two independent valid/ready streams (frm_* and brm_*), passed
// combinationally; marked counts the cells this block marked (pulse per cell).
module abr_switch_alg
  import atm_pkg::*;
(
  input  logic     congested,
  input  logic     frm_in_valid,
  output logic     frm_in_ready,
  input  sw_cell_t frm_in,
  output logic     frm_out_valid,
  input  logic     frm_out_ready,
  output sw_cell_t frm_out,
  input  logic     brm_in_valid,
  output logic     brm_in_ready,
  input  sw_cell_t brm_in,
  output logic     brm_out_valid,
  input  logic     brm_out_ready,
  output sw_cell_t brm_out,
  output logic [1:0] marked
);
  always_comb begin
    frm_out_valid = frm_in_valid;
    frm_in_ready  = frm_out_ready;
    frm_out       = frm_in;
    frm_out.atm   = rm_set_ci(frm_in.atm, rm_ci(frm_in.atm) || congested);
    brm_out_valid = brm_in_valid;
    brm_in_ready  = brm_out_ready;
    brm_out       = brm_in;
    brm_out.atm   = rm_set_ci(brm_in.atm, rm_ci(brm_in.atm) || congested);
    marked[0]     = frm_in_valid && frm_out_ready && congested;
    marked[1]     = brm_in_valid && brm_out_ready && congested;
  end
endmodule
