// tb_spacer: the heterogeneous CBR case used to evaluate the spacer: ten
// sources multiplexed on one link, one with peak interval PI = 5 slots, three
// with PI = 10 and six with PI = 20 (load 0.8). Each source's cells get a
// random delay of 0..DELTA slots before a one-cell-per-slot multiplexer,
// which clumps them. Checks:
//   - every cell comes out, in order per connection, unchanged;
//   - no two cells of a connection leave closer than its PI (the spacer's
//     guarantee: never faster than the negotiated peak rate);
//   - more than 95 % of the PI = 20 cells that were already waiting in the
//     spacer when they became due leave exactly PI after their predecessor
//     (a cell that arrives late cannot; the rest lose a slot to contention);
//   - the TQ (clumped cells waiting) and output contention both occurred.
// A final phase with a connection re-configured to PI = K-1 checks the
// largest interval the event scheduler can hold.
module tb_spacer;
  import atm_pkg::*;
  localparam int SLOT_CLKS = 10;
  localparam int DELTA = 12;
  localparam int NSRC = 10;
  logic clk = 0, rst_n = 0, slot_tick = 0;
  logic in_valid = 0, in_ready, out_valid, contention;
  sw_cell_t in_cell = '0, out_cell;
  logic cfg_we = 0;
  logic [CONN_W-1:0] cfg_idx = 0;
  logic [7:0] cfg_pi = 1;
  logic [6:0] free_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spacer dut (.*);

  int pi_of [NSRC] = '{5, 10, 10, 10, 20, 20, 20, 20, 20, 20};
  longint slot = 0;
  sw_cell_t pend[$];                 // tb multiplexer queue
  sw_cell_t expq [NSRC][$];          // per connection, in order
  longint   last_out [NSRC];
  int       seq [NSRC];
  int       n_out = 0, n_exact20 = 0, n_gap20 = 0, n_cont = 0, max_tq = 0;
  longint   arr_at [NSRC][$];        // arrival slots at the mux (release times)
  longint   acc_slot [NSRC][int];    // slot in which the spacer took each cell

  always @(posedge clk) if (contention) n_cont++;

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    int c;
    sw_cell_t e;
    c = int'(out_cell.tag.conn);
    checks++;
    if (c >= NSRC || expq[c].size() == 0) begin
      failures++; $display("FAIL unexpected cell conn %0d", c);
    end else begin
      e = expq[c].pop_front();
      if (out_cell !== e) begin failures++; $display("FAIL conn %0d cell out of order", c); end
      if (last_out[c] >= 0) begin
        checks++;
        if (slot - last_out[c] < pi_of[c]) begin
          failures++; $display("FAIL conn %0d left %0d slots after previous (PI %0d)", c, slot - last_out[c], pi_of[c]);
        end
        // count only cells that were already waiting when they became due
        if (pi_of[c] == 20 && acc_slot[c][int'(out_cell.atm.hdr.vci)] < last_out[c] + 20) begin
          n_gap20++;
          if (slot - last_out[c] == 20) n_exact20++;
        end
      end
      last_out[c] = slot;
      n_out++;
    end
  end

  task automatic configure(int c, int p);
    @(negedge clk);
    cfg_we = 1; cfg_idx = CONN_W'(c); cfg_pi = 8'(p);
    @(negedge clk) cfg_we = 0;
  endtask

  // one slot: offer the head of the mux queue, then tick
  task automatic one_slot();
    if (pend.size() > 0) begin
      @(negedge clk);
      in_valid = 1; in_cell = pend[0];
      do @(posedge clk); while (!in_ready);
      acc_slot[int'(pend[0].tag.conn)][int'(pend[0].atm.hdr.vci)] = slot;
      void'(pend.pop_front());
      @(negedge clk) in_valid = 0;
    end
    while ($time % (SLOT_CLKS * 10) != 0) @(negedge clk);
    slot_tick = 1;
    @(negedge clk) slot_tick = 0;
    slot++;
  endtask

  initial begin
    int phase [NSRC];
    longint rel [$];
    for (int i = 0; i < NSRC; i++) begin last_out[i] = -1; seq[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NSRC; i++) begin
      configure(i, pi_of[i]);
      phase[i] = $urandom % pi_of[i];
    end
    // traffic: 4000 slots
    for (int s = 0; s < 4000; s++) begin
      // cells generated now are released after a random delay; collect the
      // ones released in this slot
      for (int i = 0; i < NSRC; i++)
        if ((s - phase[i]) % pi_of[i] == 0 && s >= phase[i])
          arr_at[i].push_back(s + $urandom % (DELTA + 1));
      for (int i = 0; i < NSRC; i++)
        while (arr_at[i].size() > 0 && arr_at[i][0] <= s) begin
          sw_cell_t c;
          void'(arr_at[i].pop_front());
          c = '0;
          c.tag.conn = CONN_W'(i);
          c.atm.hdr.vci = 16'(seq[i]++);
          c.atm.payload = {12{$urandom}};
          pend.push_back(c);
          expq[i].push_back(c);
        end
      if (int'(108 - free_cnt) > max_tq) max_tq = int'(108 - free_cnt);
      one_slot();
    end
    // drain
    for (int s = 0; s < 400; s++) one_slot();
    for (int i = 0; i < NSRC; i++) begin
      checks++;
      if (expq[i].size() != 0) begin failures++; $display("FAIL conn %0d: %0d cells left", i, expq[i].size()); end
    end
    // largest interval the ES table holds: PI = K-1 = 53
    configure(3, 53);
    pi_of[3] = 53;
    for (int n = 0; n < 3; n++) begin
      sw_cell_t c;
      c = '0; c.tag.conn = 3; c.atm.hdr.vci = 16'(seq[3]++);
      pend.push_back(c); expq[3].push_back(c);
    end
    for (int s = 0; s < 200; s++) one_slot();
    checks++;
    if (expq[3].size() != 0) begin failures++; $display("FAIL PI=53 cells not delivered"); end
    checks++;
    if (n_exact20 * 100 <= n_gap20 * 95) begin
      failures++; $display("FAIL only %0d of %0d PI=20 gaps exact", n_exact20, n_gap20);
    end
    checks++;
    if (n_cont == 0) begin failures++; $display("FAIL no output contention happened"); end
    checks++;
    if (free_cnt != 108) begin failures++; $display("FAIL buffers lost: free %0d", free_cnt); end
    $display("cells=%0d PI=20 exact gaps %0d/%0d contention=%0d max occupancy=%0d",
             n_out, n_exact20, n_gap20, n_cont, max_tq);
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
