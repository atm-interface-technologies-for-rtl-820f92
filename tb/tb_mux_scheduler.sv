// tb_mux_scheduler: CBR/VBR and ABR sources with on/off phases.
//  - both always waiting: ABR must get its MCR share (1/4 of the slots, to
//    within one cell) and CBR/VBR the rest;
//  - only one class waiting: it gets every slot (ABR uses the unused
//    bandwidth);
//  - one cell per slot at most, the cell one clock after the slot strobe,
//    each class in order and unchanged, out_abr telling the class.
module tb_mux_scheduler;
  import atm_pkg::*;
  localparam int SLOT = 3;
  logic clk = 0, rst_n = 0, slot_tick = 0;
  logic [15:0] mcr = 16'h4000;
  logic cbr_valid = 0, cbr_ready, abr_valid = 0, abr_ready, out_valid, out_abr, mcr_turn;
  sw_cell_t cbr_cell, abr_cell, out_cell;
  int checks = 0, failures = 0;
  int cbr_seq = 0, abr_seq = 0, cbr_exp = 0, abr_exp = 0, n_cbr = 0, n_abr = 0, n_turn = 0;
  bit cbr_on = 0, abr_on = 0, tick_d = 0;
  always #5 clk = ~clk;
  mux_scheduler dut (.*);

  always_comb begin
    cbr_cell = '0; cbr_cell.atm.payload[31:0] = 32'(cbr_seq); cbr_cell.tag.abr = 0;
    abr_cell = '0; abr_cell.atm.payload[31:0] = 32'(abr_seq); abr_cell.tag.abr = 1;
    cbr_valid = cbr_on; abr_valid = abr_on;
  end

  always @(posedge clk) if (rst_n) begin
    if (cbr_valid && cbr_ready) cbr_seq <= cbr_seq + 1;
    if (abr_valid && abr_ready) abr_seq <= abr_seq + 1;
    if (mcr_turn) n_turn++;
    checks++;
    if (out_valid && !tick_d) begin failures++; $display("FAIL cell without a slot"); end
    if (tick_d && (cbr_on || abr_on) && !out_valid) begin failures++; $display("FAIL idle slot with cells waiting"); end
    if (out_valid) begin
      if (out_abr) begin
        n_abr++;
        if (out_cell.atm.payload[31:0] !== 32'(abr_exp) || !out_cell.tag.abr) begin failures++; $display("FAIL ABR order"); end
        abr_exp++;
      end else begin
        n_cbr++;
        if (out_cell.atm.payload[31:0] !== 32'(cbr_exp) || out_cell.tag.abr) begin failures++; $display("FAIL CBR order"); end
        cbr_exp++;
      end
    end
    tick_d <= slot_tick;
  end

  task automatic slots(int n);
    repeat (n) begin
      repeat (SLOT - 1) @(negedge clk);
      slot_tick = 1;
      @(negedge clk) slot_tick = 0;
    end
    @(negedge clk);
  endtask

  initial begin
    int a0, c0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cbr_on = 1; abr_on = 1;
    a0 = n_abr; c0 = n_cbr;
    slots(1000);
    checks++;
    if (n_abr - a0 < 249 || n_abr - a0 > 251 || n_cbr - c0 + n_abr - a0 != 1000) begin
      failures++; $display("FAIL MCR share: abr=%0d cbr=%0d", n_abr - a0, n_cbr - c0);
    end
    cbr_on = 0;
    a0 = n_abr;
    slots(300);
    checks++;
    if (n_abr - a0 != 300) begin failures++; $display("FAIL ABR alone got %0d of 300", n_abr - a0); end
    cbr_on = 1; abr_on = 0;
    c0 = n_cbr;
    slots(300);
    checks++;
    if (n_cbr - c0 != 300) begin failures++; $display("FAIL CBR alone got %0d of 300", n_cbr - c0); end
    checks++;
    if (n_turn == 0) begin failures++; $display("FAIL MCR guarantee never decided a slot"); end
    $display("cbr=%0d abr=%0d mcr turns=%0d", n_cbr, n_abr, n_turn);
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
