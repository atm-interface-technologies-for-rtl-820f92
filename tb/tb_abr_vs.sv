// tb_abr_vs: the virtual source with an always-busy ABR buffer.
//  - cell rate: over 2000 slots the number of cells sent must match CCR
//    (fraction of the link rate) to within two cells;
//  - FRM insertion: after every NRM data cells exactly one FRM cell, carrying
//    DIR = 0, the current CCR, MCR and ER = PCR, with the connection's VPI/VCI;
//    data cells in order and unchanged;
//  - CCR update from BRM cells: CI set -> CCR - CCR/8, CI and NI clear ->
//    CCR + PCR/16, NI set -> unchanged, always within [MCR, PCR] (both limits
//    are driven into).
module tb_abr_vs;
  import atm_pkg::*;
  localparam int SLOT = 4, NRM = 8;
  logic clk = 0, rst_n = 0, slot_tick = 0, cfg_load = 0;
  logic [15:0] pcr = 16'h8000, mcr = 16'h1000, icr = 16'h4000, ccr;
  logic [3:0] rif_sh = 4, rdf_sh = 3;
  logic [7:0] nrm = NRM;
  logic in_valid = 1, in_ready, out_valid, out_ready = 1, brm_valid = 0, frm_sent;
  sw_cell_t in_cell, out_cell, brm_cell = '0;
  int checks = 0, failures = 0;
  int seq = 0, exp_seq = 0, data_since = 0, n_data = 0, n_frm = 0;
  longint m_ccr;
  always #5 clk = ~clk;
  abr_vs dut (.*);

  always_comb begin
    in_cell = '0;
    in_cell.atm.hdr.vpi = 8'h12; in_cell.atm.hdr.vci = 16'h0345;
    in_cell.tag.abr = 1;
    in_cell.atm.payload[31:0] = 32'(seq);
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_cell.atm.hdr.pt == PT_RM) begin
      n_frm++;
      if (data_since != NRM || out_cell.atm.payload[375] !== 0 || out_cell.atm.payload[351:336] !== ccr ||
          out_cell.atm.payload[335:320] !== mcr || out_cell.atm.payload[367:352] !== pcr ||
          out_cell.atm.hdr.vpi !== 8'h12 || out_cell.atm.hdr.vci !== 16'h0345) begin
        failures++; $display("FAIL FRM after %0d data cells, ccr field %h/%h", data_since, out_cell.atm.payload[351:336], ccr);
      end
      data_since = 0;
    end else begin
      n_data++;
      if (out_cell.atm.payload[31:0] !== 32'(exp_seq) || data_since >= NRM) begin
        failures++; $display("FAIL data cell %0d (expected %0d) after %0d", out_cell.atm.payload[31:0], exp_seq, data_since);
      end
      exp_seq++; data_since++; seq++;
    end
  end

  task automatic slots(int n);
    repeat (n) begin
      repeat (SLOT - 1) @(negedge clk);
      slot_tick = 1;
      @(negedge clk) slot_tick = 0;
    end
  endtask

  task automatic send_brm(bit ci, bit ni);
    @(negedge clk);
    brm_cell = '0; brm_cell.atm.hdr.pt = PT_RM; brm_cell.atm.payload[375] = 1;
    brm_cell.atm.payload[373] = ci; brm_cell.atm.payload[372] = ni;
    brm_valid = 1;
    @(negedge clk) brm_valid = 0;
    if (ci) m_ccr = m_ccr - (m_ccr >> 3);
    else if (!ni) m_ccr = m_ccr + (longint'(pcr) >> 4);
    if (m_ccr > pcr) m_ccr = pcr;
    if (m_ccr < mcr) m_ccr = mcr;
    checks++;
    if (longint'(ccr) != m_ccr) begin failures++; $display("FAIL CCR %h expected %h", ccr, m_ccr); end
  endtask

  initial begin
    int n0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) cfg_load = 1;
    @(negedge clk) cfg_load = 0;
    m_ccr = icr;
    // rate check at ICR = 1/4 of the link
    n0 = n_data + n_frm;
    slots(2000);
    checks++;
    if ((n_data + n_frm - n0) < 498 || (n_data + n_frm - n0) > 502) begin
      failures++; $display("FAIL %0d cells in 2000 slots at CCR 1/4", n_data + n_frm - n0);
    end
    // CCR updates, driving into both limits
    repeat (10) begin send_brm(0, 0); slots(3); end
    send_brm(0, 1); slots(3);
    repeat (20) begin send_brm(1, 0); slots(3); end
    send_brm(1, 1); slots(3);
    repeat (3) begin send_brm(0, 0); slots(3); end
    // rate check at the resulting CCR
    n0 = n_data + n_frm;
    slots(2000);
    begin
      longint expect_n;
      expect_n = (longint'(ccr) * 2000) >> 16;
      checks++;
      if ((n_data + n_frm - n0) < expect_n - 2 || (n_data + n_frm - n0) > expect_n + 2) begin
        failures++; $display("FAIL %0d cells in 2000 slots, expected %0d", n_data + n_frm - n0, expect_n);
      end
    end
    checks++;
    if (n_frm == 0) failures++;
    $display("data=%0d frm=%0d ccr=%h", n_data, n_frm, ccr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
