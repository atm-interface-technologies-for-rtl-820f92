// tb_cell_fifo: random pushes and pops against a queue model; checks data
// order, level, full/empty handshakes and the threshold flag.
module tb_cell_fifo;
  localparam int DEPTH = 5, THRESH = 3;
  typedef logic [15:0] w_t;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, above_thr;
  w_t in_data = 0, out_data;
  logic [2:0] level;
  w_t q[$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cell_fifo #(.data_t(w_t), .DEPTH(DEPTH), .THRESH(THRESH)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5000) begin
      @(negedge clk);
      in_valid = $urandom % 2; in_data = 16'($urandom); out_ready = ($urandom % 3) != 0;
      #1;
      checks++;
      if (level !== 3'(q.size()) || in_ready !== (q.size() < DEPTH) || out_valid !== (q.size() > 0)
          || above_thr !== (q.size() >= THRESH) || (q.size() > 0 && out_data !== q[0])) begin
        failures++; $display("FAIL size=%0d level=%0d", q.size(), level);
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
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
