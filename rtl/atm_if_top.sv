// atm_if_top: ATM layer part of one UNI/NNI interface module.
//
// Ingress (links -> switch fabric): the cells of NLINK physical links are
// multiplexed with priority to the fast links (cell_mux); header translation
// finds each cell's connection, rewrites VPI/VCI and attaches the routing tag
// (header_xlate); the policer checks every connection's peak cell rate with
// the Virtual Scheduling Algorithm (upc_npc); the peak-rate spacer removes the
// clumping caused by cell delay variation before the cells enter the switch
// fabric (spacer).
// Egress (switch fabric -> links): the ABR block (abr_egress) queues CBR/VBR
// and ABR cells, runs the ABR switch algorithm or the virtual source and
// destination, and schedules one cell per output slot; the demultiplexer
// copies each cell to the links named in its routing-tag bitmap and gives
// each copy its link's VPI/VCI (cell_dmx_copy).
// The physical layer (medium conversion, bit synchronisation, S/P and P/S,
// frame processing), the controller, the switch link interface and the
// switch fabric are outside this module: their cell streams, configuration
// writes and congestion indication are its ports. The document asks for a
// shaper in the UNI block (here on the ingress path in front of the switch
// fabric) and on the transmitting part of an NNI: a second spacer sits after
// the egress scheduler and is switched in by tx_shape (NNI operation) with its
// own peak intervals (tx_sp_*); a cell it cannot take is counted on
// tx_sp_lost. Where exactly each shaper sits is this design's choice.
//
// Clocking: one clock. Three slot strobes mark cell slots: upc_tick for the
// policer's time base (155.52 Mbit/s slots of 2.726 us), sp_tick for the
// spacer's output towards the switch fabric and eg_tick for the egress link.
module atm_if_top
  import atm_pkg::*;
#(
  parameter int unsigned MUX_DEPTH = 16,
  parameter int unsigned SP_NCELL  = 108,
  parameter int unsigned SP_K      = 54
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 upc_tick,
  input  logic                 sp_tick,
  input  logic                 eg_tick,
  // links, receive side
  input  logic [NLINK-1:0]     lk_in_valid,
  input  cell_t                lk_in_cell [NLINK],
  output logic [NLINK-1:0]     lk_lost,
  // to the switch fabric
  output logic                 sf_out_valid,
  output sw_cell_t             sf_out_cell,
  // from the switch fabric
  input  logic                 sf_in_valid,
  output logic                 sf_in_ready,
  input  sw_cell_t             sf_in_cell,
  // links, transmit side
  output logic [NLINK-1:0]     lk_out_valid,
  output cell_t                lk_out_cell [NLINK],
  // ABR backward stream: from downstream, towards the switch fabric
  input  logic                 rev_in_valid,
  output logic                 rev_in_ready,
  input  sw_cell_t             rev_in_cell,
  output logic                 rev_out_valid,
  input  logic                 rev_out_ready,
  output sw_cell_t             rev_out_cell,
  // controller: header translation table
  input  logic                 hx_we,
  input  logic [CONN_W-1:0]    hx_idx,
  input  logic                 hx_used,
  input  logic [LINK_W-1:0]    hx_link,
  input  logic [7:0]           hx_vpi,
  input  logic [15:0]          hx_vci,
  input  logic [7:0]           hx_new_vpi,
  input  logic [15:0]          hx_new_vci,
  input  logic [PORT_W-1:0]    hx_port,
  input  logic [NLINK-1:0]     hx_link_map,
  input  logic                 hx_abr,
  // controller: policer context
  input  logic                 ccm_we,
  input  logic [CONN_W-1:0]    ccm_idx,
  input  ccm_entry_t           ccm_entry,
  // controller: spacer peak intervals
  input  logic                 sp_we,
  input  logic [CONN_W-1:0]    sp_idx,
  input  logic [7:0]           sp_pi,
  // transmit-side spacer (NNI): on/off and peak intervals
  input  logic                 tx_shape,
  input  logic                 tx_sp_we,
  input  logic [CONN_W-1:0]    tx_sp_idx,
  input  logic [7:0]           tx_sp_pi,
  // controller: egress VPI/VCI per link
  input  logic                 dx_we,
  input  logic [LINK_W-1:0]    dx_link,
  input  logic [CONN_W-1:0]    dx_conn,
  input  logic [7:0]           dx_vpi,
  input  logic [15:0]          dx_vci,
  // ABR settings and congestion indication of the switch node
  input  logic                 seg_end,
  input  logic                 cong_ind,
  input  logic                 vs_load,
  input  logic [RATE_W-1:0]    pcr,
  input  logic [RATE_W-1:0]    mcr,
  input  logic [RATE_W-1:0]    icr,
  input  logic [3:0]           rif_sh,
  input  logic [3:0]           rdf_sh,
  input  logic [7:0]           nrm,
  // events and status
  output logic                 hx_miss,
  output logic                 upc_nc,
  output logic                 upc_drop,
  output logic                 sp_contention,
  output logic                 tx_sp_contention,
  output logic                 tx_sp_lost,
  output logic                 abr_congested,
  output logic [RATE_W-1:0]    abr_ccr,
  output logic                 mcr_turn,
  output logic [1:0]           sa_marked,
  output logic                 vs_frm_sent
);
  // ------------------------------------------------------------ ingress
  logic        mx_valid, mx_ready;
  cell_t       mx_cell;
  logic [LINK_W-1:0] mx_link;

  cell_mux #(.N(NLINK), .DEPTH(MUX_DEPTH)) u_mux (
    .clk, .rst_n, .lk_valid(lk_in_valid), .lk_cell(lk_in_cell), .lk_lost,
    .out_valid(mx_valid), .out_ready(mx_ready), .out_cell(mx_cell), .out_link(mx_link));

  logic     hx_valid, hx_ready;
  sw_cell_t hx_cell;
  header_xlate #(.NENT_W(CONN_W)) u_hx (
    .clk, .rst_n, .in_valid(mx_valid), .in_ready(mx_ready), .in_cell(mx_cell), .in_link(mx_link),
    .out_valid(hx_valid), .out_ready(hx_ready), .out_cell(hx_cell), .miss(hx_miss),
    .cfg_we(hx_we), .cfg_idx(hx_idx), .cfg_used(hx_used), .cfg_link(hx_link),
    .cfg_vpi(hx_vpi), .cfg_vci(hx_vci), .cfg_new_vpi(hx_new_vpi), .cfg_new_vci(hx_new_vci),
    .cfg_port(hx_port), .cfg_link_map(hx_link_map), .cfg_abr(hx_abr));

  logic              up_valid, up_ready;
  sw_cell_t          up_cell;
  logic [TIME_W-1:0] t_now;
  upc_npc u_upc (
    .clk, .rst_n, .slot_tick(upc_tick),
    .in_valid(hx_valid), .in_ready(hx_ready), .in_cell(hx_cell),
    .out_valid(up_valid), .out_ready(up_ready), .out_cell(up_cell),
    .cfg_we(ccm_we), .cfg_idx(ccm_idx), .cfg_entry(ccm_entry),
    .nc_pulse(upc_nc), .drop_pulse(upc_drop), .t_now);

  logic [$clog2(SP_NCELL+1)-1:0] sp_free;
  spacer #(.NCELL(SP_NCELL), .K(SP_K)) u_sp (
    .clk, .rst_n, .slot_tick(sp_tick),
    .in_valid(up_valid), .in_ready(up_ready), .in_cell(up_cell),
    .out_valid(sf_out_valid), .out_cell(sf_out_cell),
    .cfg_we(sp_we), .cfg_idx(sp_idx), .cfg_pi(sp_pi),
    .free_cnt(sp_free), .contention(sp_contention));

  // ------------------------------------------------------------- egress
  logic     eg_valid, eg_abr;
  sw_cell_t eg_cell;
  logic [6:0] abr_level;
  abr_egress u_abr (
    .clk, .rst_n, .slot_tick(eg_tick), .seg_end, .cong_ind,
    .fwd_valid(sf_in_valid), .fwd_ready(sf_in_ready), .fwd_cell(sf_in_cell),
    .rev_in_valid, .rev_in_ready, .rev_in_cell,
    .rev_out_valid, .rev_out_ready, .rev_out_cell,
    .out_valid(eg_valid), .out_cell(eg_cell), .out_abr(eg_abr),
    .vs_load, .pcr, .mcr, .icr, .rif_sh, .rdf_sh, .nrm,
    .congested(abr_congested), .ccr(abr_ccr), .abr_level, .mcr_turn,
    .sa_marked, .vs_frm_sent);

  // transmit-side spacer: a small queue takes the scheduler's cell while the
  // spacer is busy with its slot processing; with tx_shape low it is bypassed
  logic     txq_valid, txq_ready, txq_in_ready, txs_valid, tx_thr;
  sw_cell_t txq_cell, txs_cell;
  logic [$clog2(4+1)-1:0]        txq_level;
  logic [$clog2(SP_NCELL+1)-1:0] tx_sp_free;
  cell_fifo #(.data_t(sw_cell_t), .DEPTH(4)) u_txq (
    .clk, .rst_n,
    .in_valid(eg_valid && tx_shape), .in_ready(txq_in_ready), .in_data(eg_cell),
    .out_valid(txq_valid), .out_ready(txq_ready), .out_data(txq_cell),
    .level(txq_level), .above_thr(tx_thr));
  assign tx_sp_lost = eg_valid && tx_shape && !txq_in_ready;

  spacer #(.NCELL(SP_NCELL), .K(SP_K)) u_sp_tx (
    .clk, .rst_n, .slot_tick(eg_tick),
    .in_valid(txq_valid), .in_ready(txq_ready), .in_cell(txq_cell),
    .out_valid(txs_valid), .out_cell(txs_cell),
    .cfg_we(tx_sp_we), .cfg_idx(tx_sp_idx), .cfg_pi(tx_sp_pi),
    .free_cnt(tx_sp_free), .contention(tx_sp_contention));

  logic     dx_in_valid;
  sw_cell_t dx_in_cell;
  always_comb begin
    dx_in_valid = tx_shape ? txs_valid : eg_valid;
    dx_in_cell  = tx_shape ? txs_cell  : eg_cell;
  end

  cell_dmx_copy #(.N(NLINK), .IDX_W(CONN_W)) u_dmx (
    .clk, .rst_n, .in_valid(dx_in_valid), .in_cell(dx_in_cell),
    .lk_valid(lk_out_valid), .lk_cell(lk_out_cell),
    .cfg_we(dx_we), .cfg_link(dx_link), .cfg_conn(dx_conn), .cfg_vpi(dx_vpi), .cfg_vci(dx_vci));
endmodule
