// upc_npc: usage/network parameter control (policer) for all connections of a
// multiplexed cell stream, using the Virtual Scheduling Algorithm.
//
// Structure (after the document's block diagram): an input buffer that stores
// each arriving cell with its routing index (the connection number carried in
// the routing tag) and its arrival time t from the timer; the connection
// context memory (upc_ccm); the VSA calculator (upc_vsa_calc), which evaluates
// the VSA tests in parallel and picks one with a priority encoder; the expiry
// processor (upc_expiry), which works on the context memory whenever no cell is
// waiting; and an output buffer for the policed cells.
//
// Policing of one cell takes two clock cycles: cycle 1 reads the connection's
// context into a register together with the cell, cycle 2 runs the VSA, writes
// the new TAT back and sends the cell on (or drops it). The document quotes
// about 850 ns, i.e. under 20 cycles of a 23 MHz master clock; this design is
// well inside that.
//
// Policing modes (per connection, from the context): police all cells or only
// CLP=0 cells (CLP=1 cells then pass unpoliced), and on a non-conforming cell
// either discard it or tag it (set CLP=1; a cell already CLP=1 is discarded).
// The four modes are the document's; this mapping of them is this design's.
// A non-conforming cell does not update TAT. The HEC is left for the
// transmission convergence part to regenerate.
//
// Interface: in_* and out_* are valid/ready; slot_tick marks each cell slot
// (2.726 us) and advances t; cfg_* is the controller's write port for a whole
// context entry; nc_pulse is the "indication of non-compliant" (one cycle per
// non-conforming cell) and drop_pulse marks a discarded cell.
module upc_npc
  import atm_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 4,
  parameter int unsigned OUT_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic              in_valid,
  output logic              in_ready,
  input  sw_cell_t          in_cell,
  output logic              out_valid,
  input  logic              out_ready,
  output sw_cell_t          out_cell,
  input  logic              cfg_we,
  input  logic [CONN_W-1:0] cfg_idx,
  input  ccm_entry_t        cfg_entry,
  output logic              nc_pulse,
  output logic              drop_pulse,
  output logic [TIME_W-1:0] t_now
);
  typedef struct packed {
    logic [TIME_W-1:0] t_arr;
    sw_cell_t          c;
  } arr_cell_t;

  // ---------------------------------------------------------------- timer
  upc_timer #(.TIME_W(TIME_W), .FRAC(T_FRAC)) u_timer (
    .clk, .rst_n, .slot_tick, .t(t_now));

  // --------------------------------------------------------- input buffer
  arr_cell_t ib_in, ib_head;
  logic      ib_valid, ib_pop;
  logic [$clog2(IN_DEPTH+1)-1:0] ib_level;
  logic      ib_thr;
  assign ib_in = '{t_arr: t_now, c: in_cell};

  cell_fifo #(.data_t(arr_cell_t), .DEPTH(IN_DEPTH)) u_ibuf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(ib_in),
    .out_valid(ib_valid), .out_ready(ib_pop), .out_data(ib_head),
    .level(ib_level), .above_thr(ib_thr));

  // ------------------------------------------------------- output buffer
  logic     ob_push, ob_ready;
  sw_cell_t ob_in;
  logic [$clog2(OUT_DEPTH+1)-1:0] ob_level;
  logic     ob_thr;

  cell_fifo #(.data_t(sw_cell_t), .DEPTH(OUT_DEPTH)) u_obuf (
    .clk, .rst_n, .in_valid(ob_push), .in_ready(ob_ready), .in_data(ob_in),
    .out_valid, .out_ready, .out_data(out_cell),
    .level(ob_level), .above_thr(ob_thr));

  // ------------------------------------------------------------------ CCM
  logic [CONN_W-1:0] a_idx, b_idx;
  ccm_entry_t        a_entry, b_entry;
  logic              a_we, b_set_exp;
  logic [TAT_W-1:0]  a_tat;

  upc_ccm #(.IDX_W(CONN_W)) u_ccm (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_entry,
    .a_idx, .a_entry, .a_we, .a_tat,
    .b_idx, .b_entry, .b_set_exp);

  // ------------------------------------------------------------- control
  typedef enum logic {S_READ, S_CALC} state_t;
  state_t     state;
  arr_cell_t  cur;          // cell being policed
  ccm_entry_t ctx;          // its context, as read

  // stage 1 may start when the output buffer can take the cell of stage 2
  assign ib_pop = (state == S_READ) && ib_valid && ob_ready;
  assign a_idx  = (state == S_READ) ? ib_head.c.tag.conn : cur.c.tag.conn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_READ;
      cur   <= '0;
      ctx   <= '0;
    end else begin
      case (state)
        S_READ: if (ib_pop) begin
          cur   <= ib_head;
          ctx   <= a_entry;
          state <= S_CALC;
        end
        S_CALC: state <= S_READ;
        default: state <= S_READ;
      endcase
    end
  end

  // ------------------------------------------------------- VSA calculator
  vsa_dec_t         dec;
  logic             conform;
  logic [TAT_W-1:0] tat_new;

  upc_vsa_calc u_vsa (
    .tat(ctx.tat), .t_inc(ctx.t_inc), .tau(ctx.tau), .expired(ctx.exp),
    .t_now(cur.t_arr), .dec, .conform, .tat_new);

  logic policed, tag_mode;
  always_comb begin
    policed    = !(ctx.mode inside {POL_CLP0_DISCARD, POL_CLP0_TAG}) || !cur.c.atm.hdr.clp;
    tag_mode   = (ctx.mode inside {POL_CLP01_TAG, POL_CLP0_TAG});
    a_we       = 1'b0;
    a_tat      = tat_new;
    ob_push    = 1'b0;
    ob_in      = cur.c;
    nc_pulse   = 1'b0;
    drop_pulse = 1'b0;
    if (state == S_CALC) begin
      if (!policed) begin
        ob_push = 1'b1;
      end else if (conform) begin
        a_we    = 1'b1;
        ob_push = 1'b1;
      end else begin
        nc_pulse = 1'b1;
        if (tag_mode && !cur.c.atm.hdr.clp) begin
          ob_in.atm.hdr.clp = 1'b1;
          ob_push            = 1'b1;
        end else begin
          drop_pulse = 1'b1;
        end
      end
    end
  end

  // ----------------------------------------------------- expiry processor
  // It has the context memory whenever no cell is being policed or waiting.
  logic exp_grant;
  assign exp_grant = (state == S_READ) && !ib_valid && !cfg_we;

  upc_expiry #(.IDX_W(CONN_W)) u_exp (
    .clk, .rst_n, .grant(exp_grant), .t_now, .scan_idx(b_idx),
    .rd_entry(b_entry), .set_exp(b_set_exp));

  // the output buffer always has room for the cell of stage 2
  a_ob_room: assert property (@(posedge clk) disable iff (!rst_n)
                              ob_push |-> ob_ready);
endmodule
