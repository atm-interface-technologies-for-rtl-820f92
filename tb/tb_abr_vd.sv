// tb_abr_vd: every forward RM cell must come back as a backward RM cell (DIR
// set) with CI set when congested and kept otherwise, all other bits
// unchanged, handshake passed through.
module tb_abr_vd;
  import atm_pkg::*;
  logic congested, frm_valid, frm_ready, brm_valid, brm_ready;
  sw_cell_t frm_cell, brm_cell;
  int checks = 0, failures = 0;
  abr_vd dut (.*);

  initial begin
    repeat (3000) begin
      sw_cell_t e;
      frm_cell = {$urandom, $urandom, {12{$urandom}}, $urandom};
      frm_cell.atm.hdr.pt = PT_RM; frm_cell.atm.payload[375] = 0;
      congested = $urandom % 2; frm_valid = $urandom % 2; brm_ready = $urandom % 2;
      #1;
      e = frm_cell;
      e.atm.payload[375] = 1;
      e.atm.payload[373] = frm_cell.atm.payload[373] | congested;
      checks++;
      if (brm_cell !== e || brm_valid !== frm_valid || frm_ready !== brm_ready) begin
        failures++; $display("FAIL turn-round cong=%0b", congested);
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
