// tb_abr_switch_alg: random RM cells and congestion states. While congested
// the CI bit of both FRM and BRM cells must come out set; otherwise the cell
// must pass unchanged. All other bits must be untouched, and the handshakes
// must pass straight through.
module tb_abr_switch_alg;
  import atm_pkg::*;
  logic congested, frm_in_valid, frm_in_ready, frm_out_valid, frm_out_ready;
  logic brm_in_valid, brm_in_ready, brm_out_valid, brm_out_ready;
  sw_cell_t frm_in, frm_out, brm_in, brm_out;
  logic [1:0] marked;
  int checks = 0, failures = 0;
  abr_switch_alg dut (.*);

  initial begin
    repeat (3000) begin
      sw_cell_t ef, eb;
      frm_in = {$urandom, $urandom, {12{$urandom}}, $urandom};
      brm_in = {$urandom, $urandom, {12{$urandom}}, $urandom};
      frm_in.atm.hdr.pt = PT_RM; frm_in.atm.payload[375] = 0;
      brm_in.atm.hdr.pt = PT_RM; brm_in.atm.payload[375] = 1;
      congested = $urandom % 2;
      frm_in_valid = $urandom % 2; brm_in_valid = $urandom % 2;
      frm_out_ready = $urandom % 2; brm_out_ready = $urandom % 2;
      #1;
      ef = frm_in; if (congested) ef.atm.payload[373] = 1;
      eb = brm_in; if (congested) eb.atm.payload[373] = 1;
      checks++;
      if (frm_out !== ef || brm_out !== eb) begin failures++; $display("FAIL marking cong=%0b", congested); end
      checks++;
      if (frm_out_valid !== frm_in_valid || frm_in_ready !== frm_out_ready ||
          brm_out_valid !== brm_in_valid || brm_in_ready !== brm_out_ready ||
          marked !== {brm_in_valid && brm_out_ready && congested, frm_in_valid && frm_out_ready && congested}) begin
        failures++; $display("FAIL handshake");
      end
      #1;
    end
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
