// abr_egress: the egress side of the interface for the ABR service, with the
// CBR/VBR cells sharing the output link.
//
// The ABR functions sit on the egress side only: ingress passes ABR and RM
// cells to the switch fabric untouched. Cells from the switch fabric are
// split by the class flag of their routing tag: CBR/VBR cells go into the
// CBR+VBR buffer; ABR cells pass FRM cell extraction and the rest go into the
// ABR buffer. The congestion state is the ABR buffer over its threshold or
// the node's congestion indication input. The function selection signal
// seg_end chooses between two ways of working:
//   seg_end = 0 (not a segment end point): only the switch algorithm works.
//     Extracted FRM cells get their CI bit set while congested and go back
//     into the ABR buffer; BRM cells extracted from the backward stream are
//     marked the same way and sent on towards the source. The ABR buffer
//     feeds the scheduler directly.
//   seg_end = 1 (segment end point): the switch algorithm is off. The virtual
//     destination turns each extracted FRM cell into a BRM cell and sends it
//     back; the virtual source takes the BRM cells arriving from downstream to
//     update its CCR, paces the ABR buffer's cells at CCR and inserts its own
//     FRM cells. SEL takes the virtual source's stream to the scheduler.
// The MUX/scheduler then sends one cell per slot, CBR/VBR first with the ABR
// minimum cell rate guaranteed.
// The structure is the document's. Buffer sizes and the threshold are not
// given there and are this design's; the virtual source serves one ABR
// connection.
//
// Interface: fwd_* from the switch fabric and rev_in_* (backward cells from
// downstream) are valid/ready inputs; rev_out_* (backward cells towards the
// switch fabric) is valid/ready; out_* is the output link, one cell per
// slot_tick with a one-cycle valid pulse.
module abr_egress
  import atm_pkg::*;
#(
  parameter int unsigned ABR_DEPTH  = 64,
  parameter int unsigned ABR_THRESH = 32,
  parameter int unsigned CBR_DEPTH  = 32,
  parameter int unsigned REV_DEPTH  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic              seg_end,
  input  logic              cong_ind,
  // forward cells from the switch fabric
  input  logic              fwd_valid,
  output logic              fwd_ready,
  input  sw_cell_t          fwd_cell,
  // backward cells from the downstream side, and towards the switch fabric
  input  logic              rev_in_valid,
  output logic              rev_in_ready,
  input  sw_cell_t          rev_in_cell,
  output logic              rev_out_valid,
  input  logic              rev_out_ready,
  output sw_cell_t          rev_out_cell,
  // output link
  output logic              out_valid,
  output sw_cell_t          out_cell,
  output logic              out_abr,
  // virtual source / scheduler settings
  input  logic              vs_load,
  input  logic [RATE_W-1:0] pcr,
  input  logic [RATE_W-1:0] mcr,
  input  logic [RATE_W-1:0] icr,
  input  logic [3:0]        rif_sh,
  input  logic [3:0]        rdf_sh,
  input  logic [7:0]        nrm,
  // status
  output logic              congested,
  output logic [RATE_W-1:0] ccr,
  output logic [$clog2(ABR_DEPTH+1)-1:0] abr_level,
  output logic              mcr_turn,
  output logic [1:0]        sa_marked,      // switch algorithm marked an FRM / BRM cell
  output logic              vs_frm_sent     // virtual source inserted an FRM cell
);
  // ------------------------------------------------------ class split
  logic     cbr_in_valid, cbr_in_ready, abr_in_valid, abr_in_ready;
  assign cbr_in_valid = fwd_valid && !fwd_cell.tag.abr;
  assign abr_in_valid = fwd_valid &&  fwd_cell.tag.abr;
  assign fwd_ready    = fwd_cell.tag.abr ? abr_in_ready : cbr_in_ready;

  // ------------------------------------------------ FRM cell extraction
  logic     frm_valid, frm_ready, dat_valid, dat_ready;
  sw_cell_t frm_cell, dat_cell;
  rm_extract #(.DIR(1'b0)) u_frm_ext (
    .in_valid(abr_in_valid), .in_ready(abr_in_ready), .in_cell(fwd_cell),
    .rm_valid(frm_valid), .rm_ready(frm_ready), .rm_cell(frm_cell),
    .pass_valid(dat_valid), .pass_ready(dat_ready), .pass_cell(dat_cell));

  // ------------------------------------------------ BRM cell extraction
  logic     brm_valid, brm_ready, rpass_valid, rpass_ready;
  sw_cell_t brm_cell, rpass_cell;
  rm_extract #(.DIR(1'b1)) u_brm_ext (
    .in_valid(rev_in_valid), .in_ready(rev_in_ready), .in_cell(rev_in_cell),
    .rm_valid(brm_valid), .rm_ready(brm_ready), .rm_cell(brm_cell),
    .pass_valid(rpass_valid), .pass_ready(rpass_ready), .pass_cell(rpass_cell));

  // ---------------------------------------------------- switch algorithm
  logic     sa_frm_valid, sa_frm_ready, sa_frmo_valid, sa_frmo_ready;
  logic     sa_brm_valid, sa_brm_ready, sa_brmo_valid, sa_brmo_ready;
  sw_cell_t sa_frmo, sa_brmo;
  assign sa_frm_valid = frm_valid && !seg_end;
  assign sa_brm_valid = brm_valid && !seg_end;
  abr_switch_alg u_sa (
    .congested,
    .frm_in_valid(sa_frm_valid), .frm_in_ready(sa_frm_ready), .frm_in(frm_cell),
    .frm_out_valid(sa_frmo_valid), .frm_out_ready(sa_frmo_ready), .frm_out(sa_frmo),
    .brm_in_valid(sa_brm_valid), .brm_in_ready(sa_brm_ready), .brm_in(brm_cell),
    .brm_out_valid(sa_brmo_valid), .brm_out_ready(sa_brmo_ready), .brm_out(sa_brmo),
    .marked(sa_marked));

  // ------------------------------------------------- virtual destination
  logic     vd_in_valid, vd_in_ready, vd_out_valid, vd_out_ready;
  sw_cell_t vd_out;
  assign vd_in_valid = frm_valid && seg_end;
  abr_vd u_vd (
    .congested, .frm_valid(vd_in_valid), .frm_ready(vd_in_ready), .frm_cell,
    .brm_valid(vd_out_valid), .brm_ready(vd_out_ready), .brm_cell(vd_out));

  assign frm_ready = seg_end ? vd_in_ready : sa_frm_ready;
  // in segment-end mode the virtual source consumes the BRM cells
  assign brm_ready = seg_end ? 1'b1 : sa_brm_ready;

  // ----------------------------------------------------------- ABR buffer
  // its input is the data cells or, in the other cycles, the marked FRM cells
  logic     ab_in_valid, ab_in_ready, ab_out_valid, ab_out_ready, ab_thr;
  sw_cell_t ab_in, ab_out;
  assign ab_in_valid   = dat_valid || sa_frmo_valid;
  assign ab_in         = dat_valid ? dat_cell : sa_frmo;
  assign dat_ready     = ab_in_ready;
  assign sa_frmo_ready = ab_in_ready;
  cell_fifo #(.data_t(sw_cell_t), .DEPTH(ABR_DEPTH), .THRESH(ABR_THRESH)) u_abr_buf (
    .clk, .rst_n, .in_valid(ab_in_valid), .in_ready(ab_in_ready), .in_data(ab_in),
    .out_valid(ab_out_valid), .out_ready(ab_out_ready), .out_data(ab_out),
    .level(abr_level), .above_thr(ab_thr));

  assign congested = ab_thr || cong_ind;

  // ------------------------------------------------------- CBR+VBR buffer
  logic     cb_out_valid, cb_out_ready, cb_thr;
  sw_cell_t cb_out;
  logic [$clog2(CBR_DEPTH+1)-1:0] cb_level;
  cell_fifo #(.data_t(sw_cell_t), .DEPTH(CBR_DEPTH)) u_cbr_buf (
    .clk, .rst_n, .in_valid(cbr_in_valid), .in_ready(cbr_in_ready), .in_data(fwd_cell),
    .out_valid(cb_out_valid), .out_ready(cb_out_ready), .out_data(cb_out),
    .level(cb_level), .above_thr(cb_thr));

  // ------------------------------------------------------ virtual source
  logic     vs_in_valid, vs_in_ready, vs_out_valid, vs_out_ready;
  sw_cell_t vs_out;
  assign vs_in_valid = ab_out_valid && seg_end;
  abr_vs u_vs (
    .clk, .rst_n, .slot_tick, .cfg_load(vs_load), .pcr, .mcr, .icr, .rif_sh, .rdf_sh, .nrm,
    .in_valid(vs_in_valid), .in_ready(vs_in_ready), .in_cell(ab_out),
    .out_valid(vs_out_valid), .out_ready(vs_out_ready), .out_cell(vs_out),
    .brm_valid(brm_valid && seg_end), .brm_cell, .ccr, .frm_sent(vs_frm_sent));

  // ----------------------------------------------------------------- SEL
  logic     sel_valid, sel_ready;
  sw_cell_t sel_cell;
  assign sel_valid    = seg_end ? vs_out_valid : ab_out_valid;
  assign sel_cell     = seg_end ? vs_out : ab_out;
  assign vs_out_ready = seg_end && sel_ready;
  assign ab_out_ready = seg_end ? vs_in_ready : sel_ready;

  // ------------------------------------------------------- MUX/scheduler
  mux_scheduler u_sched (
    .clk, .rst_n, .slot_tick, .mcr,
    .cbr_valid(cb_out_valid), .cbr_ready(cb_out_ready), .cbr_cell(cb_out),
    .abr_valid(sel_valid), .abr_ready(sel_ready), .abr_cell(sel_cell),
    .out_valid, .out_cell, .out_abr, .mcr_turn);

  // ------------------------------------------------- backward stream out
  // BRM cells made by the virtual destination go first, then the backward
  // stream (with the switch algorithm's marking on its BRM cells).
  logic     rv_in_valid, rv_in_ready;
  sw_cell_t rv_in;
  logic [$clog2(REV_DEPTH+1)-1:0] rv_level;
  logic     rv_thr;
  logic     rs_valid;
  sw_cell_t rs_cell;
  assign rs_valid     = sa_brmo_valid || rpass_valid;
  assign rs_cell      = sa_brmo_valid ? sa_brmo : rpass_cell;
  assign rv_in_valid  = vd_out_valid || rs_valid;
  assign rv_in        = vd_out_valid ? vd_out : rs_cell;
  assign vd_out_ready = rv_in_ready;
  assign sa_brmo_ready = rv_in_ready && !vd_out_valid;
  assign rpass_ready   = rv_in_ready && !vd_out_valid;
  cell_fifo #(.data_t(sw_cell_t), .DEPTH(REV_DEPTH)) u_rev_buf (
    .clk, .rst_n, .in_valid(rv_in_valid), .in_ready(rv_in_ready), .in_data(rv_in),
    .out_valid(rev_out_valid), .out_ready(rev_out_ready), .out_data(rev_out_cell),
    .level(rv_level), .above_thr(rv_thr));
endmodule
