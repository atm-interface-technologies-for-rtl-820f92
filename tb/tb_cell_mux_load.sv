// tb_cell_mux_load: the multiplexer under the load of its published
// evaluation: 2 links at 155.52 Mbit/s, 2 at 44.736 Mbit/s and 14 at
// 2.048 Mbit/s onto one 155.52 Mbit/s stream, with Bernoulli arrivals of
// probability 0.2, 0.8 and 0.8 per cell slot of each link. One clock is one output cell slot and the output takes a cell
// every clock. Each link's own cell slot is tracked with a fixed-point phase
// accumulator.
// How a slower link's cell slot falls on the output slots is not given; here
// a 44M slot is 4 output slots and a 2M slot 77.5 (load 0.945).
// The default buffer of 16 cells per link is used. Checks: no cell is lost
// (the published curves give loss below 1e-7 with a buffer of about 8 cells
// or less; 400 000 slots can only show that loss is rare), every cell leaves
// in order per link, and the mean queueing delay grows from the 155M to the
// 44M to the 2M links, which is the unfairness the priority discipline
// accepts (about 1, 3 and 28 slots in the published curves; this design
// measures about 2, 3.7 and 25, counting the cycle into and out of the
// buffer). Measured values are printed.
module tb_cell_mux_load;
  import atm_pkg::*;
  localparam int N = 18, CYCLES = 400000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] lk_valid = '0, lk_lost;
  cell_t lk_cell [N];
  logic out_valid, out_ready = 1;
  cell_t out_cell;
  logic [$clog2(N)-1:0] out_link;
  always #5 clk = ~clk;

  cell_mux #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int slot_len [N], phase [N], prob [N];
  longint arr [N], lost [N], dep [N], dly [N];
  int next_seq [N], exp_seq [N];
  longint now = 0;

  function automatic int cls(int l);
    return l < 2 ? 0 : (l < 4 ? 1 : 2);
  endfunction

  initial begin
    for (int l = 0; l < N; l++) begin
      slot_len[l] = cls(l) == 0 ? 1000 : (cls(l) == 1 ? 4000 : 77500);
      prob[l]     = cls(l) == 0 ? 200 : 800;      // per mille
      phase[l]    = int'($urandom_range(0, slot_len[l] - 1));
      arr[l] = 0; lost[l] = 0; dep[l] = 0; dly[l] = 0; next_seq[l] = 0; exp_seq[l] = 0;
      lk_cell[l] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (CYCLES) begin
      @(negedge clk);
      lk_valid = '0;
      for (int l = 0; l < N; l++) begin
        phase[l] += 1000;
        if (phase[l] >= slot_len[l]) begin
          phase[l] -= slot_len[l];
          if (int'($urandom_range(0, 999)) < prob[l]) begin
            lk_valid[l] = 1;
            lk_cell[l] = '0;
            lk_cell[l].hdr.vci = 16'(l);
            lk_cell[l].payload[63:0]  = 64'(now);
            lk_cell[l].payload[95:64] = 32'(next_seq[l]);
            next_seq[l]++;
            arr[l]++;
          end
        end
      end
    end
    @(negedge clk) lk_valid = '0;
    repeat (200) @(negedge clk);
    begin
      longint d[3], n[3], a[3], lo[3];
      d = '{0, 0, 0}; n = '{0, 0, 0}; a = '{0, 0, 0}; lo = '{0, 0, 0};
      for (int l = 0; l < N; l++) begin
        d[cls(l)] += dly[l]; n[cls(l)] += dep[l]; a[cls(l)] += arr[l]; lo[cls(l)] += lost[l];
        checks++;
        if (dep[l] + lost[l] != arr[l]) begin failures++; $display("FAIL link %0d: %0d in, %0d out, %0d lost", l, arr[l], dep[l], lost[l]); end
      end
      $display("155M: %0d cells, %0d lost, mean delay %0.2f slots", a[0], lo[0], real'(d[0]) / real'(n[0]));
      $display(" 44M: %0d cells, %0d lost, mean delay %0.2f slots", a[1], lo[1], real'(d[1]) / real'(n[1]));
      $display("  2M: %0d cells, %0d lost, mean delay %0.2f slots", a[2], lo[2], real'(d[2]) / real'(n[2]));
      checks++;
      if (lo[0] + lo[1] + lo[2] != 0) begin failures++; $display("FAIL cells lost"); end
      checks++;
      if (!(d[0] * n[1] < d[1] * n[0] && d[1] * n[2] < d[2] * n[1])) begin failures++; $display("FAIL delay order"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    now++;
    for (int l = 0; l < N; l++) if (lk_lost[l]) lost[l]++;
    if (out_valid && out_ready) begin
      int l;
      l = int'(out_link);
      checks++;
      if (int'(out_cell.hdr.vci) != l || int'(out_cell.payload[95:64]) < exp_seq[l]) begin
        failures++; $display("FAIL link %0d: cell %0d out of order (expected at least %0d)", l, out_cell.payload[95:64], exp_seq[l]);
      end
      exp_seq[l] = int'(out_cell.payload[95:64]) + 1;
      dep[l]++;
      dly[l] += now - longint'(out_cell.payload[63:0]);
    end
  end

  initial begin
    repeat (CYCLES + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
