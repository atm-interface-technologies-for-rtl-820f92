// upc_timer: the policer's time base t.
//
// t counts cell slots of the 155.52 Mbit/s link (2.726 us each) in fixed point
// with FRAC fraction bits, so that it can be compared directly with TAT and with
// T, whose lowest 8 bits are a fraction of a slot. Each slot_tick adds one slot
// (1 << FRAC). The counter wraps at 2**TIME_W; the expiry processor keeps the
// stored TATs from being misread across the wrap.
//
// The 24-bit width is the document's; driving t from a cell-slot tick rather
// than from the master clock is this design's choice.
//
// Timing: t changes on the clock edge after slot_tick is sampled high.
module upc_timer #(
  parameter int unsigned TIME_W = 24,
  parameter int unsigned FRAC   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  output logic [TIME_W-1:0] t
);
  localparam logic [TIME_W-1:0] ONE_SLOT = TIME_W'(1) << FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         t <= '0;
    else if (slot_tick) t <= t + ONE_SLOT;
  end
endmodule
