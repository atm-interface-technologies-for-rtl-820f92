// header_xlate: header translation and routing-tag attachment on the way into
// the switch fabric.
//
// An associative table of NENT entries is searched with (incoming link, VPI,
// VCI). The matching entry's index becomes the connection index used by the
// policer and spacer tables; the entry supplies the new VPI/VCI and the
// routing tag: switch output port, bitmap of egress links (for cell copy at
// the far side) and the ABR class flag. A cell that matches no entry is
// dropped (miss pulses). The document names these functions; the associative
// search and the entry contents are this design's. OAM cell processing, which
// the document places in the same area, is not described there and is not
// built.
//
// Interface: in_* and out_* are valid/ready with a one-entry output register;
// cfg_* writes one table entry. Latency one clock.
module header_xlate
  import atm_pkg::*;
#(
  parameter int unsigned NENT_W = CONN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cell_t                in_cell,
  input  logic [LINK_W-1:0]    in_link,
  output logic                 out_valid,
  input  logic                 out_ready,
  output sw_cell_t             out_cell,
  output logic                 miss,
  input  logic                 cfg_we,
  input  logic [NENT_W-1:0]    cfg_idx,
  input  logic                 cfg_used,
  input  logic [LINK_W-1:0]    cfg_link,
  input  logic [7:0]           cfg_vpi,
  input  logic [15:0]          cfg_vci,
  input  logic [7:0]           cfg_new_vpi,
  input  logic [15:0]          cfg_new_vci,
  input  logic [PORT_W-1:0]    cfg_port,
  input  logic [NLINK-1:0]     cfg_link_map,
  input  logic                 cfg_abr
);
  localparam int unsigned NENT = 1 << NENT_W;
  typedef struct packed {
    logic              used;
    logic [LINK_W-1:0] link;
    logic [7:0]        vpi;
    logic [15:0]       vci;
    logic [7:0]        new_vpi;
    logic [15:0]       new_vci;
    logic [PORT_W-1:0] port;
    logic [NLINK-1:0]  link_map;
    logic              abr;
  } ent_t;

  ent_t tbl [NENT];

  logic              hit;
  logic [NENT_W-1:0] hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = NENT - 1; i >= 0; i--) begin
      if (tbl[i].used && tbl[i].link == in_link &&
          tbl[i].vpi == in_cell.hdr.vpi && tbl[i].vci == in_cell.hdr.vci) begin
        hit     = 1'b1;
        hit_idx = NENT_W'(i);
      end
    end
  end

  assign in_ready = !out_valid || out_ready;
  assign miss     = in_valid && in_ready && !hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NENT; i++) tbl[i].used <= 1'b0;
    end else if (cfg_we) begin
      tbl[cfg_idx] <= '{used: cfg_used, link: cfg_link, vpi: cfg_vpi, vci: cfg_vci,
                        new_vpi: cfg_new_vpi, new_vci: cfg_new_vci, port: cfg_port,
                        link_map: cfg_link_map, abr: cfg_abr};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cell  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid && hit;
      if (in_valid && hit) begin
        out_cell.atm         <= in_cell;
        out_cell.atm.hdr.vpi <= tbl[hit_idx].new_vpi;
        out_cell.atm.hdr.vci <= tbl[hit_idx].new_vci;
        out_cell.tag         <= '{port: tbl[hit_idx].port, link_map: tbl[hit_idx].link_map,
                                  abr: tbl[hit_idx].abr, conn: CONN_W'(hit_idx)};
      end
    end
  end
endmodule
