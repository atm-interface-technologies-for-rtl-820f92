// spacer: peak-rate spacer (traffic shaper) shared by all connections of one
// link, built from linked lists in a common cell buffer.
//
// Each connection i has a peak interval PI_i in cell slots. A cell leaves
// the spacer no sooner than PI_i slots after the previous cell of the same
// connection actually left, so clumps produced by cell delay variation are
// spread out and no cell ever departs faster than the negotiated peak rate,
// even when several connections contend for the same output slot.
//
// Data structures (the names are those of the document's structure):
//   cell buffer   NCELL cell words, each with a link field (next[])
//   FL            free list, head FLH / tail FLT
//   VCAT          virtual connection attribute table, per connection: PI,
//                 the temporary queue TQ (head/tail) of cells waiting behind a
//                 scheduled one, the in-flight flag and the last departure
//                 time
//   ES            event scheduler, a circular table of K slots; entry k holds
//                 the cell slot queue CSQ (head CSQH / tail CSQT) of cells due
//                 in that slot
//   OL            output list, head OLH / tail OLT: due cells in departure
//                 order, one leaves per slot
// At most one cell per connection is in ES or OL at a time; the others wait in
// its TQ. When a cell departs, the next cell of its TQ is put into the CSQ PI
// slots ahead. An arriving cell with an empty TQ and nothing in flight is put
// into the CSQ max(1, last_departure + PI - now) slots ahead. The document
// gives these structures; the exact processing order within a slot is this
// design's reading of them.
//
// Every PI must be 1..K-1, the ES table size K; the document sizes K as
// min(delta, max PI + 1). K = 54 (delta) and NCELL = 108 (2 delta) are the
// document's numbers for a 10^-10 CDV quantile of an M/D/1 queue at load 0.8.
//
// A connection's last departure time is an ST_W-bit slot count. So that a
// very old value is never misread after the counter wraps, a background scan
// of the VCAT clears the "recent" flag of every connection whose last
// departure is K or more slots ago (this design's addition).
//
// Timing: per slot_tick the control steps through MOVE (ES entry of the new
// slot appended to OL), DEPART (head of OL leaves on out_*, one-cycle
// out_valid pulse, its buffer returns to FL) and RESCHEDULE; arrivals are
// taken in the idle cycles in between (in_ready high). It needs at least 6
// clocks per cell slot, plus one per arrival.
module spacer
  import atm_pkg::*;
#(
  parameter int unsigned NCELL  = 108,
  parameter int unsigned K      = 54,
  parameter int unsigned IDX_W  = CONN_W,
  parameter int unsigned PI_W   = 8,
  parameter int unsigned ST_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic              in_valid,
  output logic              in_ready,
  input  sw_cell_t          in_cell,
  output logic              out_valid,
  output sw_cell_t          out_cell,
  input  logic              cfg_we,
  input  logic [IDX_W-1:0]  cfg_idx,
  input  logic [PI_W-1:0]   cfg_pi,
  output logic [$clog2(NCELL+1)-1:0] free_cnt,
  output logic              contention      // a due cell had to wait for a later slot
);
  localparam int unsigned NVC = 1 << IDX_W;
  localparam int unsigned CW  = $clog2(NCELL);
  localparam int unsigned KW  = $clog2(K);
  typedef logic [CW-1:0] ptr_t;
  typedef logic [KW-1:0] kidx_t;

  // cell buffer with link fields
  sw_cell_t mem  [NCELL];
  ptr_t     nxt  [NCELL];
  // free list
  ptr_t     flh, flt;
  // VCAT
  logic [PI_W-1:0]   pi      [NVC];
  ptr_t              tqh     [NVC];
  ptr_t              tqt     [NVC];
  logic [ST_W-1:0] lastdep [NVC];
  logic [NVC-1:0]    tq_ne, inflight, recent;
  // event scheduler
  ptr_t              csqh [K];
  ptr_t              csqt [K];
  logic [K-1:0]      es_ne;
  // output list
  ptr_t              olh, olt;
  logic              ol_ne;

  logic [ST_W-1:0] now;
  kidx_t             now_idx;
  logic              tick_pend;
  logic [IDX_W-1:0]  scan_idx, dvc;

  typedef enum logic [2:0] {S_IDLE, S_STEP, S_MOVE, S_DEPART, S_RESCHED} state_t;
  state_t state;

  function automatic kidx_t kadd(kidx_t a, logic [PI_W-1:0] b);
    logic [KW+PI_W:0] s;
    s = (KW+PI_W+1)'(a) + (KW+PI_W+1)'(b);
    return kidx_t'(s % (KW+PI_W+1)'(K));
  endfunction

  // ------------------------------------------------- arrival (idle cycle)
  logic [IDX_W-1:0]  avc;
  logic [ST_W-1:0] since;
  logic [PI_W-1:0]   off;
  kidx_t             atgt;
  logic              take;

  always_comb begin
    avc   = in_cell.tag.conn;
    since = now - lastdep[avc];
    if (recent[avc] && since < ST_W'(pi[avc])) off = pi[avc] - PI_W'(since);
    else                                         off = PI_W'(1);
    atgt     = kadd(now_idx, off);
    in_ready = (state == S_IDLE) && !tick_pend && !slot_tick && (free_cnt != '0);
    take     = in_valid && in_ready;
  end

  // cell buffer words are written on arrival, into the head of FL
  always_ff @(posedge clk) begin
    if (take) mem[flh] <= in_cell;
  end

  // --------------------------------------------------------- departure
  ptr_t  dc;
  kidx_t rtgt;
  assign dc   = olh;
  assign rtgt = kadd(now_idx, pi[dvc]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCELL; i++) nxt[i] <= ptr_t'((i + 1) % NCELL);
      for (int i = 0; i < NVC; i++) begin
        pi[i]      <= PI_W'(1);
        tqh[i]     <= '0;
        tqt[i]     <= '0;
        lastdep[i] <= '0;
      end
      for (int k = 0; k < K; k++) begin
        csqh[k] <= '0;
        csqt[k] <= '0;
      end
      flh <= '0;  flt <= ptr_t'(NCELL - 1);  free_cnt <= ($bits(free_cnt))'(NCELL);
      tq_ne <= '0; inflight <= '0; recent <= '0; es_ne <= '0;
      olh <= '0; olt <= '0; ol_ne <= 1'b0;
      now <= '0; now_idx <= '0; tick_pend <= 1'b0;
      scan_idx <= '0; dvc <= '0;
      state <= S_IDLE;
      out_valid <= 1'b0;
      out_cell  <= '0;
      contention <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      contention <= 1'b0;
      if (slot_tick) tick_pend <= 1'b1;
      if (cfg_we) pi[cfg_idx] <= cfg_pi;

      unique case (state)
        S_IDLE: begin
          if (tick_pend) begin
            tick_pend <= slot_tick;
            state     <= S_STEP;
          end else if (take) begin
            // take a buffer from FL and store the cell
            flh      <= nxt[flh];
            free_cnt <= free_cnt - 1'b1;
            if (!inflight[avc] && !tq_ne[avc]) begin
              // schedule it into the CSQ of its slot
              if (es_ne[atgt]) nxt[csqt[atgt]] <= flh;
              else             csqh[atgt]      <= flh;
              csqt[atgt]     <= flh;
              es_ne[atgt]    <= 1'b1;
              inflight[avc]  <= 1'b1;
            end else begin
              // wait behind in the connection's TQ
              if (tq_ne[avc]) nxt[tqt[avc]] <= flh;
              else            tqh[avc]      <= flh;
              tqt[avc]   <= flh;
              tq_ne[avc] <= 1'b1;
            end
          end else begin
            // background scan of the VCAT
            if (recent[scan_idx] && (now - lastdep[scan_idx]) >= ST_W'(K))
              recent[scan_idx] <= 1'b0;
            scan_idx <= scan_idx + 1'b1;
          end
        end
        S_STEP: begin
          now     <= now + 1'b1;
          now_idx <= (now_idx == kidx_t'(K - 1)) ? '0 : now_idx + 1'b1;
          state   <= S_MOVE;
        end
        S_MOVE: begin
          // the CSQ of the current slot joins the end of OL
          if (es_ne[now_idx]) begin
            if (ol_ne) nxt[olt] <= csqh[now_idx];
            else       olh      <= csqh[now_idx];
            olt             <= csqt[now_idx];
            ol_ne           <= 1'b1;
            es_ne[now_idx]  <= 1'b0;
          end
          state <= S_DEPART;
        end
        S_DEPART: begin
          if (ol_ne) begin
            out_valid <= 1'b1;
            out_cell  <= mem[dc];
            dvc       <= mem[dc].tag.conn;
            lastdep[mem[dc].tag.conn] <= now;
            recent[mem[dc].tag.conn]  <= 1'b1;
            if (olh == olt) ol_ne <= 1'b0;
            else            olh   <= nxt[dc];
            // more cells were due than one slot can carry
            contention <= (olh != olt);
            // return the buffer to FL
            if (free_cnt == '0) flh <= dc;
            else                nxt[flt] <= dc;
            flt      <= dc;
            free_cnt <= free_cnt + 1'b1;
            state    <= S_RESCHED;
          end else begin
            state <= S_IDLE;
          end
        end
        S_RESCHED: begin
          // next cell of the departed connection goes PI slots ahead
          if (tq_ne[dvc]) begin
            if (es_ne[rtgt]) nxt[csqt[rtgt]] <= tqh[dvc];
            else             csqh[rtgt]      <= tqh[dvc];
            csqt[rtgt]  <= tqh[dvc];
            es_ne[rtgt] <= 1'b1;
            if (tqh[dvc] == tqt[dvc]) tq_ne[dvc] <= 1'b0;
            else                      tqh[dvc]   <= nxt[tqh[dvc]];
          end else begin
            inflight[dvc] <= 1'b0;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_pi_range: assert property (@(posedge clk) disable iff (!rst_n)
                               cfg_we |-> (cfg_pi != '0 && cfg_pi < PI_W'(K)));
endmodule
