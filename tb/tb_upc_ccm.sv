// tb_upc_ccm: random traffic on the three ports of the context memory against a
// reference array, including same-entry clashes (controller > policer >
// expiry) and the reset state (all entries expired).
module tb_upc_ccm;
  import atm_pkg::*;
  localparam int IW = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, a_we = 0, b_set_exp = 0;
  logic [IW-1:0] cfg_idx = 0, a_idx = 0, b_idx = 0;
  ccm_entry_t cfg_entry = '0, a_entry, b_entry;
  logic [TAT_W-1:0] a_tat = 0;
  ccm_entry_t ref_mem [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  upc_ccm #(.IDX_W(IW)) dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) ref_mem[i] = '{tat: 0, t_inc: 0, tau: 0, exp: 1, mode: POL_CLP01_DISCARD};
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      cfg_we = ($urandom % 4) == 0;  cfg_idx = IW'($urandom); cfg_entry = {$urandom, $urandom};
      a_we   = ($urandom % 2) == 0;  a_idx   = IW'($urandom % 4); a_tat = TAT_W'($urandom);
      b_set_exp = ($urandom % 2) == 0; b_idx = IW'($urandom % 4);
      #1;
      checks++;
      if (a_entry !== ref_mem[a_idx] || b_entry !== ref_mem[b_idx]) begin
        failures++; $display("FAIL read a=%0d b=%0d", a_idx, b_idx);
      end
      @(posedge clk);
      if (b_set_exp && !(a_we && a_idx == b_idx) && !(cfg_we && cfg_idx == b_idx)) ref_mem[b_idx].exp = 1;
      if (a_we && !(cfg_we && cfg_idx == a_idx)) begin ref_mem[a_idx].tat = a_tat; ref_mem[a_idx].exp = 0; end
      if (cfg_we) ref_mem[cfg_idx] = cfg_entry;
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
