// cell_mux: cell multiplexer of many links onto one internal interface, with
// the "interrupt with priority" discipline.
//
// Every link has its own small cell buffer. A link announces a new cell by
// raising lk_valid for one cycle (the interrupt); the cell goes into its
// buffer, or is lost if the buffer is full (lk_lost pulses). Whenever the
// output can take a cell, the non-empty buffer of the highest-priority link is
// served; link 0 has the highest priority, so the fast links are connected to
// the low numbers (the document gives the high-speed interfaces the higher
// priority to reduce the buffer they need). The polling alternative the
// document compares against is not built.
//
// Interface: out_* is valid/ready, out_link tells which link the cell came
// from (header translation needs it). DEPTH, the per-link buffer size, is
// not given in the document, which plots cell loss against buffer size for
// 2 x 155M, 2 x 44M and 14 x 2M links. The default of 16 cells is this
// design's choice: under that load (Bernoulli 0.2 / 0.8 / 0.8 per link slot)
// it lost no cell in 400 000 slots, where 8 cells still lost about 1 in 10^4.
// Timing: a cell can leave one cycle after it was announced; one cell per
// cycle.
module cell_mux
  import atm_pkg::*;
#(
  parameter int unsigned N     = NLINK,
  parameter int unsigned DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          lk_valid,
  input  cell_t                 lk_cell [N],
  output logic [N-1:0]          lk_lost,
  output logic                  out_valid,
  input  logic                  out_ready,
  output cell_t                 out_cell,
  output logic [$clog2(N)-1:0]  out_link
);
  logic [N-1:0] q_ready, q_valid, q_pop;
  cell_t        q_head [N];

  for (genvar i = 0; i < N; i++) begin : g_link
    logic [$clog2(DEPTH+1)-1:0] lvl;
    logic                       thr;
    cell_fifo #(.data_t(cell_t), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid(lk_valid[i]), .in_ready(q_ready[i]), .in_data(lk_cell[i]),
      .out_valid(q_valid[i]), .out_ready(q_pop[i]), .out_data(q_head[i]),
      .level(lvl), .above_thr(thr));
    assign lk_lost[i] = lk_valid[i] && !q_ready[i];
  end

  // priority encoder: lowest-numbered non-empty link
  always_comb begin
    out_valid = 1'b0;
    out_link  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (q_valid[i]) begin
        out_valid = 1'b1;
        out_link  = ($clog2(N))'(i);
      end
    end
    out_cell = q_head[out_link];
    q_pop    = '0;
    q_pop[out_link] = out_valid && out_ready;
  end
endmodule
