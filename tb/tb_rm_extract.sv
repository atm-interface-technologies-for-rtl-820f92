// tb_rm_extract: random data cells, forward and backward RM cells and
// OAM-like cells with random output stalls, for both DIR settings. Each cell
// must be steered to the right output unchanged and the input must wait
// exactly for that output.
module tb_rm_extract;
  import atm_pkg::*;
  logic in_valid, rm_ready, pass_ready;
  sw_cell_t in_cell;
  logic in_ready0, rm_valid0, pass_valid0, in_ready1, rm_valid1, pass_valid1;
  sw_cell_t rm_cell0, pass_cell0, rm_cell1, pass_cell1;
  int checks = 0, failures = 0, n_f = 0, n_b = 0;

  rm_extract #(.DIR(1'b0)) dut0 (.in_valid, .in_ready(in_ready0), .in_cell,
    .rm_valid(rm_valid0), .rm_ready, .rm_cell(rm_cell0),
    .pass_valid(pass_valid0), .pass_ready, .pass_cell(pass_cell0));
  rm_extract #(.DIR(1'b1)) dut1 (.in_valid, .in_ready(in_ready1), .in_cell,
    .rm_valid(rm_valid1), .rm_ready, .rm_cell(rm_cell1),
    .pass_valid(pass_valid1), .pass_ready, .pass_cell(pass_cell1));

  initial begin
    repeat (3000) begin
      bit f, b;
      in_cell = {$urandom, $urandom, {12{$urandom}}, $urandom};
      in_cell.atm.hdr.pt = 3'($urandom);
      if ($urandom % 2) in_cell.atm.hdr.pt = PT_RM;
      in_valid = $urandom % 4 != 0; rm_ready = $urandom % 2; pass_ready = $urandom % 2;
      #1;
      f = in_cell.atm.hdr.pt == 3'b110 && in_cell.atm.payload[375] == 1'b0;
      b = in_cell.atm.hdr.pt == 3'b110 && in_cell.atm.payload[375] == 1'b1;
      if (in_valid && f) n_f++;
      if (in_valid && b) n_b++;
      checks++;
      if (rm_valid0 !== (in_valid && f) || pass_valid0 !== (in_valid && !f) ||
          in_ready0 !== (f ? rm_ready : pass_ready) || rm_cell0 !== in_cell || pass_cell0 !== in_cell) begin
        failures++; $display("FAIL FRM extraction pt=%b", in_cell.atm.hdr.pt);
      end
      checks++;
      if (rm_valid1 !== (in_valid && b) || pass_valid1 !== (in_valid && !b) ||
          in_ready1 !== (b ? rm_ready : pass_ready) || rm_cell1 !== in_cell || pass_cell1 !== in_cell) begin
        failures++; $display("FAIL BRM extraction pt=%b", in_cell.atm.hdr.pt);
      end
      #1;
    end
    checks++;
    if (n_f == 0 || n_b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
