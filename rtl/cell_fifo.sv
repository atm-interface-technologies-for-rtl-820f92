// cell_fifo: a cell queue, used for the policer's input and output buffers and
// for the ABR and CBR+VBR buffers of the egress side.
//
// A circular buffer of DEPTH words of type data_t with valid/ready handshakes
// on both sides (a word moves when valid and ready are both high on a clock
// edge). The head word is shown on out_data while out_valid is high. level is
// the number of words held; above_thr is high while level >= THRESH, the
// buffer threshold the ABR congestion control looks at. The document only says
// that the ABR buffer has thresholds; a single threshold is this design's
// choice.
module cell_fifo #(
  parameter type         data_t = atm_pkg::sw_cell_t,
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned THRESH = DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  data_t                    in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output data_t                    out_data,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic                     above_thr
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  data_t          mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;
  logic           push, pop;

  assign in_ready  = (level != DEPTH[$bits(level)-1:0]);
  assign out_valid = (level != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign above_thr = (level >= THRESH[$bits(level)-1:0]);

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= nxt(wr_ptr);
      if (pop)  rd_ptr <= nxt(rd_ptr);
      level <= level + $bits(level)'(push) - $bits(level)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end
endmodule
