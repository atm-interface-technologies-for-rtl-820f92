// tb_abr_egress: the egress ABR structure in both ways of working.
//  Phase A, not a segment end point (seg_end = 0): CBR/VBR cells, ABR data
//   cells and FRM cells from the switch fabric, BRM and other cells on the
//   backward stream, with the node congestion indication toggling. FRM cells
//   must reach the output link in the ABR stream and BRM cells the backward
//   output, with CI set exactly when the node was congested as they passed.
//  Phase B, segment end point (seg_end = 1): FRM cells from the switch fabric
//   must come back on the backward output as BRM cells (virtual destination),
//   with CI set once the ABR buffer is over its threshold; BRM cells from
//   downstream must be absorbed and change CCR (virtual source), and the
//   output must carry the ABR data paced by the virtual source with an FRM
//   cell after every NRM data cells.
//  In both phases every cell must arrive in order within its class, and
//  CBR/VBR cells are never held back by ABR beyond the MCR share.
module tb_abr_egress;
  import atm_pkg::*;
  localparam int SLOT = 6, NRM = 4;
  logic clk = 0, rst_n = 0, slot_tick = 0, seg_end = 0, cong_ind = 0;
  logic fwd_valid = 0, fwd_ready, rev_in_valid = 0, rev_in_ready, rev_out_valid, rev_out_ready = 1;
  sw_cell_t fwd_cell = '0, rev_in_cell = '0, rev_out_cell, out_cell;
  logic out_valid, out_abr, vs_load = 0, congested, mcr_turn, vs_frm_sent;
  logic [15:0] pcr = 16'hC000, mcr = 16'h2000, icr = 16'h8000, ccr;
  logic [3:0] rif_sh = 4, rdf_sh = 3;
  logic [7:0] nrm = NRM;
  logic [6:0] abr_level;
  logic [1:0] sa_marked;
  int checks = 0, failures = 0;
  sw_cell_t fq[$], rq[$];                  // cells to drive
  sw_cell_t exp_cbr[$], exp_abr[$], exp_rev[$], exp_vd[$];
  int n_frm_marked = 0, n_brm_marked = 0, n_vd = 0, n_vs_frm = 0, n_thr_cong = 0, data_since = 0;
  always #5 clk = ~clk;
  abr_egress dut (.*);

  function automatic sw_cell_t mk(bit abr, bit rm, bit dir, int id);
    sw_cell_t c;
    c = '0;
    c.tag.abr = abr;
    c.atm.hdr.vpi = 8'h21; c.atm.hdr.vci = 16'h0100;
    c.atm.payload[31:0] = 32'(id);
    if (rm) begin c.atm.hdr.pt = PT_RM; c.atm.payload[375] = dir; c.atm.payload[351:336] = 16'h1234; end
    return c;
  endfunction

  // drivers
  always_comb begin
    fwd_valid = fq.size() > 0;
    fwd_cell  = fwd_valid ? fq[0] : '0;
    rev_in_valid = rq.size() > 0;
    rev_in_cell  = rev_in_valid ? rq[0] : '0;
  end

  logic cong_exp;
  assign cong_exp = cong_ind || abr_level >= 7'd32;   // threshold of the ABR buffer

  always @(posedge clk) if (rst_n) begin
    if (!cong_ind && abr_level >= 32) n_thr_cong++;
    checks++;
    if (congested !== cong_exp) begin failures++; $display("FAIL congestion state"); end
    if (fwd_valid && fwd_ready) begin
      sw_cell_t c;
      c = fq.pop_front();
      if (!c.tag.abr) exp_cbr.push_back(c);
      else if (c.atm.hdr.pt == PT_RM) begin
        if (!seg_end) begin
          if (cong_exp) begin c.atm.payload[373] = 1; n_frm_marked++; end
          exp_abr.push_back(c);
        end else begin
          c.atm.payload[375] = 1;
          if (cong_exp) c.atm.payload[373] = 1;
          exp_vd.push_back(c);
        end
      end else exp_abr.push_back(c);
    end
    if (rev_in_valid && rev_in_ready) begin
      sw_cell_t c;
      c = rq.pop_front();
      if (c.atm.hdr.pt == PT_RM && c.atm.payload[375]) begin
        if (!seg_end) begin
          if (cong_exp) begin c.atm.payload[373] = 1; n_brm_marked++; end
          exp_rev.push_back(c);
        end
      end else exp_rev.push_back(c);
    end
    // output link
    if (out_valid) begin
      checks++;
      if (!out_cell.tag.abr) begin
        if (exp_cbr.size() == 0 || out_cell !== exp_cbr[0]) begin failures++; $display("FAIL CBR cell %0d", out_cell.atm.payload[31:0]); end
        else void'(exp_cbr.pop_front());
      end else if (seg_end && out_cell.atm.hdr.pt == PT_RM) begin
        n_vs_frm++;
        if (data_since != NRM || out_cell.atm.payload[375] !== 0) begin failures++; $display("FAIL VS FRM after %0d", data_since); end
        data_since = 0;
      end else begin
        if (exp_abr.size() == 0 || out_cell !== exp_abr[0]) begin failures++; $display("FAIL ABR cell %0d", out_cell.atm.payload[31:0]); end
        else void'(exp_abr.pop_front());
        if (seg_end) data_since++;
      end
    end
    // backward output
    if (rev_out_valid && rev_out_ready) begin
      checks++;
      if (rev_out_cell.atm.payload[100]) begin      // made by the virtual destination
        n_vd++;
        if (exp_vd.size() == 0 || rev_out_cell !== exp_vd[0]) begin failures++; $display("FAIL VD BRM %0d", rev_out_cell.atm.payload[31:0]); end
        else void'(exp_vd.pop_front());
      end else begin
        if (exp_rev.size() == 0 || rev_out_cell !== exp_rev[0]) begin failures++; $display("FAIL backward cell %0d", rev_out_cell.atm.payload[31:0]); end
        else void'(exp_rev.pop_front());
      end
    end
  end

  always begin
    repeat (SLOT - 1) @(negedge clk);
    slot_tick = 1;
    @(negedge clk) slot_tick = 0;
  end
  always @(negedge clk) rev_out_ready = ($urandom % 4) != 0;

  initial begin
    int id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) vs_load = 1;
    @(negedge clk) vs_load = 0;
    // ---------------- phase A: switch algorithm
    for (int n = 0; n < 300; n++) begin
      case ($urandom % 4)
        0: fq.push_back(mk(0, 0, 0, id++));
        1: fq.push_back(mk(1, 0, 0, id++));
        2: begin sw_cell_t c; c = mk(1, 1, 0, id++); c.atm.payload[100] = 0; fq.push_back(c); end
        default: ;
      endcase
      if ($urandom % 3 == 0) rq.push_back(mk(1, ($urandom % 2), 1, id++));
      if (n % 50 == 0) cong_ind = !cong_ind;
      repeat (SLOT * 2) @(negedge clk);
    end
    cong_ind = 0;
    repeat (SLOT * 200) @(negedge clk);
    checks++;
    if (exp_cbr.size() || exp_abr.size() || exp_rev.size()) begin
      failures++; $display("FAIL phase A left %0d/%0d/%0d", exp_cbr.size(), exp_abr.size(), exp_rev.size());
    end
    // ---------------- phase B: virtual source and destination
    seg_end = 1;
    data_since = 0;
    // a burst of ABR data fills the buffer over its threshold (CCR 1/2)
    for (int n = 0; n < 48; n++) fq.push_back(mk(1, 0, 0, id++));
    repeat (100) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      case ($urandom % 4)
        0: fq.push_back(mk(0, 0, 0, id++));
        1: fq.push_back(mk(1, 0, 0, id++));
        2: begin sw_cell_t c; c = mk(1, 1, 0, id++); c.atm.payload[100] = 1; fq.push_back(c); end
        default: ;
      endcase
      if ($urandom % 4 == 0) rq.push_back(mk(1, 1, 1, id++));
      if ($urandom % 4 == 0) rq.push_back(mk(1, 0, 0, id++));
      repeat (SLOT * 3) @(negedge clk);
    end
    repeat (SLOT * 400) @(negedge clk);
    checks++;
    if (exp_cbr.size() || exp_abr.size() || exp_rev.size() || exp_vd.size()) begin
      failures++; $display("FAIL phase B left %0d/%0d/%0d/%0d", exp_cbr.size(), exp_abr.size(), exp_rev.size(), exp_vd.size());
    end
    checks++;
    if (n_frm_marked == 0 || n_brm_marked == 0 || n_vd == 0 || n_vs_frm == 0 || n_thr_cong == 0 || ccr == icr) begin
      failures++; $display("FAIL mechanism missing");
    end
    $display("FRM marked=%0d BRM marked=%0d VD turn-rounds=%0d VS FRMs=%0d threshold congestion cycles=%0d ccr=%h",
             n_frm_marked, n_brm_marked, n_vd, n_vs_frm, n_thr_cong, ccr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
