// tb_upc_npc: end-to-end test of the policer.
//  1. Peak-rate cases of the measured device: a connection offered one cell
//     per slot (155 Mbit/s) with negotiated peak rate 155, 155/2, 155/4 and
//     155/8 Mbit/s must pass all, 1/2, 1/4 and 1/8 of its cells.
//  2. Random traffic on several connections with random T, tau, CLP and all
//     four policing modes, cell by cell against a reference VSA model.
//  3. Expiry: after 40000 idle slots the 24-bit time has moved more than half
//     its range past the stored TAT; the next cell must still be conforming.
//  Each conforming cell must leave within 19 clocks of being accepted
//  (850 ns at a 23 MHz master clock).
module tb_upc_npc;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0, slot_tick = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  sw_cell_t in_cell = '0, out_cell;
  logic cfg_we = 0;
  logic [CONN_W-1:0] cfg_idx = 0;
  ccm_entry_t cfg_entry = '0;
  logic nc_pulse, drop_pulse;
  logic [TIME_W-1:0] t_now;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  upc_npc dut (.*);

  // ------------------------------------------------------ reference model
  longint    m_tat [NCONN];
  bit        m_exp [NCONN];
  longint    m_T   [NCONN];
  longint    m_tau [NCONN];
  pol_mode_t m_mode[NCONN];
  longint    slot = 0;            // slots since reset (unwrapped time)
  sw_cell_t  expq[$];             // cells expected at the output
  longint    acc_cyc[$];          // acceptance cycle of expected cells
  longint    cyc = 0;
  int        passed, n_tag, dropped, max_lat = 0;

  always @(posedge clk) cyc++;

  task automatic cfg_conn(int c, longint T, longint tau, pol_mode_t mode);
    @(negedge clk);
    cfg_we = 1; cfg_idx = CONN_W'(c);
    cfg_entry = '{tat: '0, t_inc: T_W'(T), tau: TAU_W'(tau), exp: 1'b1, mode: mode};
    @(negedge clk) cfg_we = 0;
    m_exp[c] = 1; m_T[c] = T; m_tau[c] = tau; m_mode[c] = mode; m_tat[c] = 0;
  endtask

  // policing decision of the model for a cell arriving in the current slot
  task automatic model(sw_cell_t c);
    int k = c.tag.conn;
    longint t = slot * 256;
    bit pol = !(m_mode[k] inside {POL_CLP0_DISCARD, POL_CLP0_TAG}) || !c.atm.hdr.clp;
    bit tagm = m_mode[k] inside {POL_CLP01_TAG, POL_CLP0_TAG};
    if (!pol) begin expq.push_back(c); acc_cyc.push_back(cyc); passed++; return; end
    if (m_exp[k] || m_tat[k] < t) begin
      m_tat[k] = t + m_T[k]; m_exp[k] = 0; expq.push_back(c); acc_cyc.push_back(cyc); passed++;
    end else if (m_tat[k] > t + m_tau[k] * 256) begin
      if (tagm && !c.atm.hdr.clp) begin
        c.atm.hdr.clp = 1; expq.push_back(c); acc_cyc.push_back(cyc); n_tag++;
      end else dropped++;
    end else begin
      m_tat[k] += m_T[k]; expq.push_back(c); acc_cyc.push_back(cyc); passed++;
    end
  endtask

  // one cell slot of SLOT_CLKS clocks, optionally with an arriving cell
  task automatic run_slot(int slot_clks, bit send, int conn, bit clp);
    sw_cell_t c;
    if (send) begin
      c = '0;
      c.tag.conn = CONN_W'(conn);
      c.atm.hdr.vci = 16'($urandom);
      c.atm.hdr.clp = clp;
      c.atm.payload = {12{$urandom}};
      @(negedge clk);
      in_valid = 1; in_cell = c;
      @(posedge clk);
      if (!in_ready) begin failures++; $display("FAIL input not ready"); end
      model(c);
      @(negedge clk) in_valid = 0;
      repeat (slot_clks - 3) @(negedge clk);
    end else begin
      repeat (slot_clks - 1) @(negedge clk);
    end
    slot_tick = 1;
    @(negedge clk) slot_tick = 0;
    slot++;
  endtask

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected cell vci=%h", out_cell.atm.hdr.vci);
    end else begin
      sw_cell_t e;
      longint a;
      e = expq.pop_front();
      a = acc_cyc.pop_front();
      if (cyc - a > max_lat) max_lat = int'(cyc - a);
      if (out_cell !== e) begin
        failures++; $display("FAIL %0t cell mismatch vci=%h/%h clp=%0b/%0b", $time,
                             out_cell.atm.hdr.vci, e.atm.hdr.vci, out_cell.atm.hdr.clp, e.atm.hdr.clp);
      end
    end
  end

  int out_count;
  always @(posedge clk) if (out_valid) out_count++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- 1. the four measured peak-rate cases (tau = 2 slots ~ 5.44 us CDV)
    for (int k = 0; k < 4; k++) begin
      int n0;
      n0 = out_count;
      cfg_conn(k, 256 << k, 0, POL_CLP01_DISCARD);
      for (int n = 0; n < 64; n++) run_slot(63, 1, k, 0);
      repeat (10) @(negedge clk);
      checks++;
      if (out_count - n0 != 64 >> k) begin
        failures++; $display("FAIL rate 155/%0d: passed %0d of 64", 1 << k, out_count - n0);
      end else $display("peak rate 155/%0d Mbit/s: %0d of 64 cells passed", 1 << k, out_count - n0);
    end
    // ---- 2. random traffic, all modes
    for (int k = 8; k < 16; k++)
      cfg_conn(k, 64 + $urandom % 1024, $urandom % 8, pol_mode_t'(k % 4));
    for (int n = 0; n < 3000; n++)
      run_slot(8, $urandom % 2, 8 + $urandom % 8, $urandom % 2);
    // ---- 3. expiry across the wrap of t
    cfg_conn(20, 4 * 256, 0, POL_CLP01_DISCARD);
    run_slot(8, 1, 20, 0);
    for (int n = 0; n < 40000; n++) run_slot(4, 0, 0, 0);
    begin
      int n0;
      n0 = out_count;
      run_slot(8, 1, 20, 0);
      repeat (5) @(negedge clk);
      checks++;
      if (out_count - n0 != 1) begin failures++; $display("FAIL expired connection not conforming"); end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d cells missing", expq.size()); end
    checks++;
    if (max_lat > 19) begin failures++; $display("FAIL decision latency %0d clocks", max_lat); end
    checks++;
    if (n_tag == 0 || dropped == 0) begin failures++; $display("FAIL tag/drop never exercised"); end
    $display("passed=%0d n_tag=%0d dropped=%0d max latency=%0d clocks", passed, n_tag, dropped, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
