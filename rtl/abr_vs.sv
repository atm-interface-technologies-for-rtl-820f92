// abr_vs: virtual source function of an ABR segment end point, for one ABR
// connection.
//
// Rate: cells are sent at the current cell rate CCR. A credit accumulator
// gains CCR (a 16-bit fraction of the link cell rate) every cell slot and a
// cell may leave when a whole cell of credit (2**16) has built up; unused
// credit is capped at one further cell.
// FRM cell insertion: after every NRM data cells a forward RM cell is sent in
// the next credited slot. It carries the current CCR, the MCR and ER = PCR,
// with the header and routing tag of the connection's last data cell.
// CCR update: when a backward RM cell comes back, CCR is cut by CCR >> RDF_SH
// if its CI bit is set; otherwise, unless its NI bit is set, it grows by
// PCR >> RIF_SH; the result is held between MCR and PCR.
// The document gives the functions (CCR update from CI and NI, FRM insertion
// after Nrm data cells); the increase/decrease rule, the rate format and the
// pacing are this design's, after the usual ABR source behaviour.
//
// Interface: in_* (user cells from the ABR buffer) and out_* are valid/ready;
// brm_valid delivers a returning BRM cell (always accepted); cfg_load loads
// ICR into CCR and clears the counters.
module abr_vs
  import atm_pkg::*;
#(
  parameter int unsigned NRM_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic              cfg_load,
  input  logic [RATE_W-1:0] pcr,
  input  logic [RATE_W-1:0] mcr,
  input  logic [RATE_W-1:0] icr,
  input  logic [3:0]        rif_sh,
  input  logic [3:0]        rdf_sh,
  input  logic [NRM_W-1:0]  nrm,
  input  logic              in_valid,
  output logic              in_ready,
  input  sw_cell_t          in_cell,
  output logic              out_valid,
  input  logic              out_ready,
  output sw_cell_t          out_cell,
  input  logic              brm_valid,
  input  sw_cell_t          brm_cell,
  output logic [RATE_W-1:0] ccr,
  output logic              frm_sent
);
  localparam logic [RATE_W+1:0] ONE  = (RATE_W+2)'(1) << RATE_W;
  localparam logic [RATE_W+1:0] CAP  = (ONE << 1) - 1'b1;

  logic [RATE_W+1:0] credit;
  logic [NRM_W-1:0]  cnt;          // data cells since the last FRM
  logic              frm_due;
  sw_cell_t          last_data;
  logic              can_send, send;

  assign can_send = (credit >= ONE);
  assign frm_due  = (cnt >= nrm);

  always_comb begin
    out_valid = can_send && (frm_due || in_valid);
    in_ready  = can_send && !frm_due && out_ready;
    if (frm_due) begin
      out_cell     = last_data;
      out_cell.atm = make_frm(last_data.atm.hdr.vpi, last_data.atm.hdr.vci, pcr, ccr, mcr);
      out_cell.atm.hdr.gfc = last_data.atm.hdr.gfc;
    end else begin
      out_cell = in_cell;
    end
    send     = out_valid && out_ready;
    frm_sent = send && frm_due;
  end

  // CCR update from a returning BRM cell
  logic [RATE_W:0] dec_r, inc_r, nxt_r;
  always_comb begin
    dec_r = {1'b0, ccr} - {1'b0, (ccr >> rdf_sh)};
    inc_r = {1'b0, ccr} + {1'b0, (pcr >> rif_sh)};
    if (rm_ci(brm_cell.atm))      nxt_r = dec_r;
    else if (!rm_ni(brm_cell.atm)) nxt_r = inc_r;
    else                           nxt_r = {1'b0, ccr};
    if (nxt_r > {1'b0, pcr}) nxt_r = {1'b0, pcr};
    if (nxt_r < {1'b0, mcr}) nxt_r = {1'b0, mcr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ccr       <= '0;
      credit    <= '0;
      cnt       <= '0;
      last_data <= '0;
    end else if (cfg_load) begin
      ccr    <= icr;
      credit <= '0;
      cnt    <= '0;
    end else begin
      if (brm_valid) ccr <= nxt_r[RATE_W-1:0];
      begin
        logic [RATE_W+1:0] c;
        c = credit;
        if (send) c = c - ONE;
        if (slot_tick) c = ((c + (RATE_W+2)'(ccr)) > CAP) ? CAP : c + (RATE_W+2)'(ccr);
        credit <= c;
      end
      if (send) begin
        if (frm_due) cnt <= '0;
        else begin
          cnt       <= cnt + 1'b1;
          last_data <= in_cell;
        end
      end
    end
  end
endmodule
