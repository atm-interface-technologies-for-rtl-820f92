// tb_upc_expiry: the scan pointer must advance once per granted cycle, and
// set_exp must be raised exactly for live entries whose TAT lags t by 2**22 or
// more (signed difference).
module tb_upc_expiry;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0, grant = 0, set_exp;
  logic [TIME_W-1:0] t_now;
  logic [CONN_W-1:0] scan_idx;
  ccm_entry_t rd_entry;
  int checks = 0, failures = 0;
  logic [CONN_W-1:0] exp_idx = 0;
  always #5 clk = ~clk;
  upc_expiry dut (.*);

  initial begin
    t_now = 0; rd_entry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      grant = $urandom % 2;
      t_now = TIME_W'($urandom);
      rd_entry.exp = ($urandom % 4) == 0;
      case ($urandom % 4)
        0: rd_entry.tat = t_now - 24'h400000;              // exactly the limit
        1: rd_entry.tat = t_now - 24'h3FFFFF;              // just under
        2: rd_entry.tat = t_now + TAT_W'($urandom % 65536); // ahead
        default: rd_entry.tat = TAT_W'($urandom);
      endcase
      #1;
      begin
        logic signed [23:0] lag;
        logic e;
        lag = $signed(t_now - rd_entry.tat);
        e = grant && !rd_entry.exp && lag >= 24'sh400000;
        checks++;
        if (set_exp !== e || scan_idx !== exp_idx) begin
          failures++; $display("FAIL lag=%0d exp=%0b got=%0b idx=%0d/%0d", lag, e, set_exp, scan_idx, exp_idx);
        end
      end
      @(posedge clk);
      if (grant) exp_idx++;
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
