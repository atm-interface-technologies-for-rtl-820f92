// tb_atm_if_top: end-to-end test of the interface module at its default sizes.
// The switch fabric is modelled as a queue that loops the tagged cells leaving
// the ingress side back into the egress side, so each cell travels
//   link -> MUX -> header translation -> UPC -> spacer -> (fabric) ->
//   ABR egress / scheduler -> DMX with cell copy -> link(s).
// Connections:
//   A link 0,  within its contract (T = 4 slots), to link 0
//   B link 5,  eight times over its peak rate, discard mode, to link 5
//   C link 2,  twice over its peak rate, tag mode, multicast to links 1, 3, 7
//   D link 1,  ABR connection to link 4, with its own FRM cells
//   E link 17, within contract, sent as a burst that overflows its buffer
//   and cells with an unknown VPI/VCI on link 9.
// Halfway through the node becomes an ABR segment end point (seg_end), and
// three quarters through the transmit-side spacer is switched in (tx_shape).
// Checks: every output copy carries the VPI/VCI of its link's table entry and
// goes only to links in the connection's bitmap; every cell of A arrives, and
// every cell of E that was not lost; every passed cell of C reaches all three
// links with the tag applied to the excess; B keeps no more than its share;
// the spacer keeps each connection's cells at least PI slots apart on the way
// into the fabric, and so does the transmit-side spacer on the links.
// The mechanisms counted (each must occur): multiplexer loss, header
// translation miss, policing discard, policing tag, spacer contention,
// multicast copy, ABR congestion marking (not a segment end point), virtual
// source FRM insertion and virtual destination turn-round (segment end point),
// the MCR guarantee, and transmit-side shaping with its own contention.
module tb_atm_if_top;
  import atm_pkg::*;
  localparam int SLOT = 16;
  logic clk = 0, rst_n = 0, upc_tick = 0, sp_tick = 0, eg_tick = 0;
  logic [NLINK-1:0] lk_in_valid = '0, lk_lost, lk_out_valid;
  cell_t lk_in_cell [NLINK], lk_out_cell [NLINK];
  logic sf_out_valid, sf_in_valid, sf_in_ready, rev_in_valid = 0, rev_in_ready, rev_out_valid, rev_out_ready = 1;
  sw_cell_t sf_out_cell, sf_in_cell, rev_in_cell = '0, rev_out_cell;
  logic hx_we = 0, hx_used = 0, hx_abr = 0;
  logic [CONN_W-1:0] hx_idx = 0;
  logic [LINK_W-1:0] hx_link = 0;
  logic [7:0] hx_vpi = 0, hx_new_vpi = 0, hx_port = 0;
  logic [15:0] hx_vci = 0, hx_new_vci = 0;
  logic [NLINK-1:0] hx_link_map = 0;
  logic ccm_we = 0;
  logic [CONN_W-1:0] ccm_idx = 0;
  ccm_entry_t ccm_entry = '0;
  logic sp_we = 0;
  logic [CONN_W-1:0] sp_idx = 0;
  logic [7:0] sp_pi = 1;
  logic tx_shape = 0, tx_sp_we = 0, tx_sp_contention, tx_sp_lost;
  logic [CONN_W-1:0] tx_sp_idx = 0;
  logic [7:0] tx_sp_pi = 1;
  logic dx_we = 0;
  logic [LINK_W-1:0] dx_link = 0;
  logic [CONN_W-1:0] dx_conn = 0;
  logic [7:0] dx_vpi = 0;
  logic [15:0] dx_vci = 0;
  logic seg_end = 0, cong_ind = 0, vs_load = 0;
  logic [15:0] pcr = 16'hC000, mcr = 16'h2000, icr = 16'h8000, abr_ccr;
  logic [3:0] rif_sh = 4, rdf_sh = 3;
  logic [7:0] nrm = 4;
  logic hx_miss, upc_nc, upc_drop, sp_contention, abr_congested, mcr_turn, vs_frm_sent;
  logic [1:0] sa_marked;
  always #5 clk = ~clk;

  atm_if_top dut (.*);

  int checks = 0, failures = 0;
  // connections: index, link, VPI/VCI, T, PI, bitmap, mode, abr
  localparam int NCN = 5;
  int c_link [NCN] = '{0, 5, 2, 1, 17};
  int c_T    [NCN] = '{4, 8, 8, 1, 1};
  int c_pi   [NCN] = '{4, 8, 4, 2, 1};
  int c_tau  [NCN] = '{2, 0, 2, 4, 63};
  logic [NLINK-1:0] c_map [NCN] = '{18'h00001, 18'h00020, 18'h0008A, 18'h00010, 18'h20000};
  pol_mode_t c_mode [NCN] = '{POL_CLP01_DISCARD, POL_CLP01_DISCARD, POL_CLP01_TAG, POL_CLP01_DISCARD, POL_CLP01_DISCARD};
  bit c_abr [NCN] = '{0, 0, 0, 1, 0};
  int conn_of_id [int];
  int sent [NCN], arrived [NCN][NLINK];
  int copies_of [int];
  bit lost_id [int];
  longint last_sf [NCN], last_tx [NCN];
  longint slot = 0;
  int n_lost = 0, n_miss = 0, n_drop = 0, n_tag = 0, n_cont = 0, n_multi = 0, n_mark = 0,
      n_vsfrm = 0, n_vd = 0, n_clp = 0, n_txc = 0, n_txshaped = 0, n_mcr = 0, next_id = 1;

  function automatic logic [23:0] dx_of(int l, int c);
    return {8'(8'h40 + l), 16'(16'h2000 + c * 32 + l)};
  endfunction

  // ---------------------------------------------------- switch fabric model
  sw_cell_t fab[$];
  always_comb begin
    sf_in_valid = fab.size() > 0;
    sf_in_cell  = sf_in_valid ? fab[0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (sf_in_valid && sf_in_ready) void'(fab.pop_front());
    if (sf_out_valid) begin
      int c;
      fab.push_back(sf_out_cell);
      c = int'(sf_out_cell.tag.conn);
      if (c < NCN) begin
        checks++;
        if (last_sf[c] >= 0 && slot - last_sf[c] < c_pi[c]) begin
          failures++; $display("FAIL conn %0d spaced %0d < PI %0d", c, slot - last_sf[c], c_pi[c]);
        end
        last_sf[c] = slot;
      end
    end
    if (|lk_lost) n_lost += $countones(lk_lost);
    if (lk_lost[17] && lk_in_valid[17]) lost_id[int'(lk_in_cell[17].payload[31:0])] = 1;
    if (hx_miss) n_miss++;
    if (upc_drop) n_drop++;
    if (upc_nc && !upc_drop) n_tag++;
    if (sp_contention) n_cont++;
    if (|sa_marked) n_mark++;
    if (vs_frm_sent) n_vsfrm++;
    if (mcr_turn) n_mcr++;
    if (tx_sp_contention) n_txc++;
    if (tx_sp_lost) begin failures++; $display("FAIL transmit spacer queue overflow"); end
    if (rev_out_valid && rev_out_ready && rev_out_cell.atm.hdr.pt == PT_RM && rev_out_cell.atm.payload[375]) n_vd++;
    // links, transmit side
    if ($countones(lk_out_valid) > 1) n_multi++;
    for (int l = 0; l < NLINK; l++) if (lk_out_valid[l]) begin
      int id, c;
      id = int'(lk_out_cell[l].payload[31:0]);
      checks++;
      if (lk_out_cell[l].hdr.pt == PT_RM && !lk_out_cell[l].payload[375] && id == 0) begin
        // FRM cell made by the virtual source of connection D
        if (l != c_link[3] + 3) begin failures++; $display("FAIL VS FRM on link %0d", l); end
        if ({lk_out_cell[l].hdr.vpi, lk_out_cell[l].hdr.vci} !== dx_of(l, 3)) begin failures++; $display("FAIL VS FRM header"); end
      end else if (!conn_of_id.exists(id)) begin
        failures++; $display("FAIL unknown cell id %0d on link %0d", id, l);
      end else begin
        c = conn_of_id[id];
        if (!c_map[c][l]) begin failures++; $display("FAIL conn %0d copied to link %0d", c, l); end
        if ({lk_out_cell[l].hdr.vpi, lk_out_cell[l].hdr.vci} !== dx_of(l, c)) begin
          failures++; $display("FAIL conn %0d link %0d header %h", c, l, {lk_out_cell[l].hdr.vpi, lk_out_cell[l].hdr.vci});
        end
        if (c == 2 && l == 1 && lk_out_cell[l].hdr.clp) n_clp++;
        arrived[c][l]++;
        if (tx_shape && (c_map[c] & ((18'(1) << l) - 1)) == 0) begin
          // first link of the connection: transmit-side spacing
          checks++;
          n_txshaped++;
          if (last_tx[c] >= 0 && slot - last_tx[c] < c_pi[c]) begin
            failures++; $display("FAIL conn %0d transmitted %0d slots apart, PI %0d", c, slot - last_tx[c], c_pi[c]);
          end
          last_tx[c] = slot;
        end
        copies_of[id] = copies_of.exists(id) ? copies_of[id] + 1 : 1;
      end
    end
  end

  // ------------------------------------------------------------- stimulus
  task automatic send(int c, bit rm);
    cell_t x;
    x = '0;
    x.hdr.vpi = 8'(1); x.hdr.vci = 16'(100 + c);
    x.payload[31:0] = 32'(next_id);
    if (rm) begin x.hdr.pt = PT_RM; x.payload[351:336] = 16'h4000; end
    conn_of_id[next_id] = c;
    next_id++;
    sent[c]++;
    lk_in_valid[c_link[c]] = 1;
    lk_in_cell[c_link[c]] = x;
  endtask

  task automatic tick_slot();
    @(negedge clk);
    upc_tick = 1; sp_tick = 1; eg_tick = 1;
    @(negedge clk);
    upc_tick = 0; sp_tick = 0; eg_tick = 0;
    slot++;
  endtask

  initial begin
    for (int l = 0; l < NLINK; l++) lk_in_cell[l] = '0;
    for (int c = 0; c < NCN; c++) begin sent[c] = 0; last_sf[c] = -1; last_tx[c] = -1; for (int l = 0; l < NLINK; l++) arrived[c][l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // controller writes
    for (int c = 0; c < NCN; c++) begin
      @(negedge clk);
      hx_we = 1; hx_idx = CONN_W'(c); hx_used = 1; hx_link = LINK_W'(c_link[c]);
      hx_vpi = 1; hx_vci = 16'(100 + c); hx_new_vpi = 8'(10 + c); hx_new_vci = 16'(1000 + c);
      hx_port = 8'(c); hx_link_map = c_map[c]; hx_abr = c_abr[c];
      ccm_we = 1; ccm_idx = CONN_W'(c);
      ccm_entry = '{tat: '0, t_inc: T_W'(c_T[c] * 256), tau: TAU_W'(c_tau[c]), exp: 1'b1, mode: c_mode[c]};
      sp_we = 1; sp_idx = CONN_W'(c); sp_pi = 8'(c_pi[c]);
      tx_sp_we = 1; tx_sp_idx = CONN_W'(c); tx_sp_pi = 8'(c_pi[c]);
    end
    @(negedge clk) hx_we = 0; ccm_we = 0; sp_we = 0; tx_sp_we = 0;
    for (int l = 0; l < NLINK; l++)
      for (int c = 0; c < NCN; c++) begin
        dx_we = 1; dx_link = LINK_W'(l); dx_conn = CONN_W'(c); {dx_vpi, dx_vci} = dx_of(l, c);
        @(negedge clk);
      end
    dx_we = 0;
    vs_load = 1;
    @(negedge clk) vs_load = 0;

    // burst of E: 48 cells back to back on link 17
    for (int n = 0; n < 48; n++) begin
      send(4, 0);
      @(negedge clk) lk_in_valid = '0;
    end
    // main traffic, 1200 slots; seg_end switches half way
    for (int s = 0; s < 1200; s++) begin
      if (s == 600) seg_end = 1;
      if (s == 900) tx_shape = 1;
      cong_ind = (s % 200) < 60;
      @(negedge clk);
      if (s % 4 == 0) send(0, 0);
      send(1, 0);                          // B: every slot, T = 8
      if (s % 4 == 0) send(2, 0);          // C: every 4 slots, T = 8
      if (s % 6 == 0) send(3, s % 24 == 0);// D: ABR, some FRM cells
      if (s % 97 == 0) begin
        lk_in_valid[9] = 1; lk_in_cell[9] = '0; lk_in_cell[9].hdr.vpi = 9;
      end
      @(negedge clk) lk_in_valid = '0;
      repeat (SLOT - 4) @(negedge clk);
      tick_slot();
    end
    for (int s = 0; s < 300; s++) begin
      repeat (SLOT - 2) @(negedge clk);
      tick_slot();
    end
    // ---- end checks
    checks++;
    if (arrived[0][0] != sent[0]) begin failures++; $display("FAIL A: %0d of %0d arrived", arrived[0][0], sent[0]); end
    checks++;
    if (arrived[4][17] + lost_id.size() != sent[4]) begin failures++; $display("FAIL E: %0d + %0d lost of %0d", arrived[4][17], lost_id.size(), sent[4]); end
    checks++;
    if (arrived[2][1] != arrived[2][3] || arrived[2][1] != arrived[2][7] || arrived[2][1] != sent[2]) begin
      failures++; $display("FAIL C copies %0d/%0d/%0d of %0d", arrived[2][1], arrived[2][3], arrived[2][7], sent[2]);
    end
    checks++;
    if (n_clp != n_tag) begin failures++; $display("FAIL C: %0d tagged copies, %0d tagged by the policer", n_clp, n_tag); end
    checks++;
    if (arrived[1][5] > sent[1] / 8 + 2 || arrived[1][5] < sent[1] / 8 - 2) begin
      failures++; $display("FAIL B: %0d of %0d passed (T = 8)", arrived[1][5], sent[1]);
    end
    checks++;
    if (arrived[3][4] != sent[3] - n_vd) begin failures++; $display("FAIL D: %0d of %0d (+%0d turned round)", arrived[3][4], sent[3], n_vd); end
    $display("A %0d/%0d  B %0d/%0d  C %0d/%0d x3  D %0d/%0d  E %0d/%0d",
             arrived[0][0], sent[0], arrived[1][5], sent[1], arrived[2][1], sent[2], arrived[3][4], sent[3], arrived[4][17], sent[4]);
    $display("mux loss=%0d miss=%0d discard=%0d tag=%0d contention=%0d multicast=%0d marked=%0d VS FRM=%0d VD BRM=%0d MCR turns=%0d tx shaped=%0d tx contention=%0d",
             n_lost, n_miss, n_drop, n_tag, n_cont, n_multi, n_mark, n_vsfrm, n_vd, n_mcr, n_txshaped, n_txc);
    checks++;
    if (n_lost == 0 || n_miss == 0 || n_drop == 0 || n_tag == 0 || n_cont == 0 || n_multi == 0 ||
        n_mark == 0 || n_vsfrm == 0 || n_vd == 0 || n_mcr == 0 || n_txc == 0 || n_txshaped == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
