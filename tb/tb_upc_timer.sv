// tb_upc_timer: t must advance by one slot (256 units) per slot_tick and hold
// otherwise, and wrap at 2**24.
module tb_upc_timer;
  logic clk = 0, rst_n = 0, slot_tick = 0;
  logic [23:0] t;
  int checks = 0, failures = 0;
  longint ticks = 0;
  always #5 clk = ~clk;
  upc_timer dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      slot_tick = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (slot_tick) ticks++;
      checks++;
      if (t !== 24'((ticks * 256) % (1 << 24))) begin
        failures++; $display("FAIL t=%0d ticks=%0d", t, ticks);
      end
    end
    // wrap: 65536 ticks bring t back to the same value
    slot_tick = 1;
    repeat (65536 - (ticks % 65536)) @(posedge clk);
    #1 slot_tick = 0;
    checks++;
    if (t !== 24'd0) begin failures++; $display("FAIL no wrap t=%0d", t); end
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
