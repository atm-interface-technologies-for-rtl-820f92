// rm_extract: separates the resource management (RM) cells of one direction
// from a cell stream.
//
// A cell whose payload type is RM (110) and whose DIR bit equals DIR (0 for
// forward RM cells, 1 for backward RM cells) is steered to rm_*; every other
// cell goes on through pass_*. Used twice in the ABR egress block: FRM cell
// extraction on the cells from the switch fabric, BRM cell extraction on the
// cells coming back from the downstream side. The document shows both
// extraction boxes; the RM cell coding is the ATM Forum one.
//
// Interface: valid/ready on all three ports, purely combinational steering
// (the input waits for whichever output it is steered to).
module rm_extract
  import atm_pkg::*;
#(
  parameter bit DIR = 1'b0
) (
  input  logic     in_valid,
  output logic     in_ready,
  input  sw_cell_t in_cell,
  output logic     rm_valid,
  input  logic     rm_ready,
  output sw_cell_t rm_cell,
  output logic     pass_valid,
  input  logic     pass_ready,
  output sw_cell_t pass_cell
);
  logic sel;
  assign sel        = is_rm(in_cell.atm) && (rm_dir(in_cell.atm) == DIR);
  assign rm_valid   = in_valid && sel;
  assign pass_valid = in_valid && !sel;
  assign rm_cell    = in_cell;
  assign pass_cell  = in_cell;
  assign in_ready   = sel ? rm_ready : pass_ready;
endmodule
