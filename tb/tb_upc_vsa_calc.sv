// tb_upc_vsa_calc: checks the VSA decision and the new TAT against a reference
// computed with unbounded integers (times unwrapped around t), over directed
// corner cases and random draws.
module tb_upc_vsa_calc;
  import atm_pkg::*;
  logic [TAT_W-1:0]  tat, tat_new;
  logic [T_W-1:0]    t_inc;
  logic [TAU_W-1:0]  tau;
  logic              expired, conform;
  logic [TIME_W-1:0] t_now;
  vsa_dec_t          dec;
  int checks = 0, failures = 0;

  upc_vsa_calc dut (.*);

  // ahead = how far TAT lies after t (may be negative), as a plain integer
  task automatic check(input longint ahead);
    longint    exp_tat;
    vsa_dec_t  exp_dec;
    #1;
    if (expired || ahead < 0) begin
      exp_dec = VSA_LATE;  exp_tat = longint'(t_now) + t_inc;
    end else if (ahead > longint'(tau) * 256) begin
      exp_dec = VSA_NC;    exp_tat = longint'(t_now) + ahead;
    end else begin
      exp_dec = VSA_EARLY; exp_tat = longint'(t_now) + ahead + t_inc;
    end
    exp_tat = exp_tat % (longint'(1) << TAT_W);
    checks++;
    if (dec !== exp_dec || longint'(tat_new) !== exp_tat || conform !== (exp_dec != VSA_NC)) begin
      failures++;
      $display("FAIL t=%0d ahead=%0d tau=%0d E=%0b: dec=%s tat_new=%0d exp %s %0d",
               t_now, ahead, tau, expired, dec.name(), tat_new, exp_dec.name(), exp_tat);
    end
  endtask

  task automatic apply(input longint ahead);
    tat = TAT_W'(longint'(t_now) + ahead);
    check(ahead);
  endtask

  initial begin
    // directed: boundaries of the three regions
    t_now = 24'h000100; t_inc = 22'd512; tau = 12'd2; expired = 0;
    apply(-1); apply(0); apply(1); apply(512); apply(513); apply(-100000);
    expired = 1; apply(300); apply(0); expired = 0;
    // around the wrap of the 24-bit time
    t_now = 24'hFFFF80; apply(200); apply(-200); apply(600);
    t_now = 24'h000010; apply(-64);
    // random
    repeat (4000) begin
      t_now   = TIME_W'($urandom);
      t_inc   = T_W'($urandom);
      tau     = TAU_W'($urandom);
      expired = ($urandom % 8) == 0;
      apply(longint'($urandom % (1 << 23)) - (1 << 22));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
