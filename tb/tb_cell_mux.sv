// tb_cell_mux: links of three speed classes (as in the evaluated multiplexer:
// 2 x 155M, 2 x 44M, 14 x 2M) announce cells at random; the output is stalled
// at times. Checks against a model of per-link queues: every cell that is not
// lost comes out unchanged with its link number, the served link is always
// the lowest-numbered non-empty one, and cells are lost exactly when a
// buffer is full (an overload phase forces losses).
module tb_cell_mux;
  import atm_pkg::*;
  localparam int N = NLINK, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] lk_valid = '0, lk_lost;
  cell_t lk_cell [N];
  logic out_valid, out_ready = 1;
  cell_t out_cell;
  logic [4:0] out_link;
  cell_t q [N][$];
  int checks = 0, failures = 0, n_lost = 0, n_out = 0;
  always #5 clk = ~clk;
  cell_mux dut (.*);

  task automatic cycle(int pct_fast, int pct_slow, int pct_ready);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      int pct;
      pct = (i < 2) ? pct_fast : (i < 4) ? pct_fast / 3 : pct_slow;
      lk_valid[i] = ($urandom % 100) < pct;
      lk_cell[i]  = '0;
      lk_cell[i].hdr.vci = 16'($urandom);
      lk_cell[i].payload = {12{$urandom}};
    end
    out_ready = ($urandom % 100) < pct_ready;
    #1;
    // expected output: lowest non-empty queue of the model
    begin
      int first;
      first = -1;
      for (int i = N - 1; i >= 0; i--) if (q[i].size() > 0) first = i;
      checks++;
      if (out_valid !== (first >= 0) || (first >= 0 && (out_link !== 5'(first) || out_cell !== q[first][0]))) begin
        failures++; $display("FAIL expected link %0d got valid=%0b link=%0d", first, out_valid, out_link);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (lk_lost[i] !== (lk_valid[i] && q[i].size() == DEPTH)) begin
          failures++; $display("FAIL loss flag link %0d", i);
        end
      end
      @(posedge clk);
      // a full buffer refuses a cell even in the cycle it sends one
      for (int i = 0; i < N; i++)
        if (lk_valid[i]) begin
          if (q[i].size() < DEPTH) q[i].push_back(lk_cell[i]); else n_lost++;
        end
      if (first >= 0 && out_ready) begin void'(q[first].pop_front()); n_out++; end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) lk_cell[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) cycle(20, 2, 90);
    repeat (500)  cycle(60, 20, 30);   // overload: buffers fill
    repeat (300)  cycle(0, 0, 100);    // drain
    checks++;
    if (n_lost == 0) begin failures++; $display("FAIL overload produced no loss"); end
    $display("out=%0d lost=%0d", n_out, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
