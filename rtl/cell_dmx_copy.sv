// cell_dmx_copy: demultiplexer with cell copy for the links of one multiplexer.
//
// The routing tag of each cell carries a bitmap with one bit per link. All
// links whose bit is set receive the cell in the same cycle (multicast and
// broadcast copies), and each link replaces the VPI/VCI by the value agreed
// with its user for that connection, read from a per-link translation table
// addressed by the connection index. The bit-mapped tag and the per-link
// VPI/VCI conversion are the document's; the table organisation is this
// design's.
//
// Interface: in_* is valid (the block always accepts, one cell per cycle);
// lk_valid/lk_cell are registered, one cycle after the input. cfg_* writes one
// table entry (link, connection) -> new VPI/VCI.
module cell_dmx_copy
  import atm_pkg::*;
#(
  parameter int unsigned N     = NLINK,
  parameter int unsigned IDX_W = CONN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sw_cell_t             in_cell,
  output logic [N-1:0]         lk_valid,
  output cell_t                lk_cell [N],
  input  logic                 cfg_we,
  input  logic [$clog2(N)-1:0] cfg_link,
  input  logic [IDX_W-1:0]     cfg_conn,
  input  logic [7:0]           cfg_vpi,
  input  logic [15:0]          cfg_vci
);
  localparam int unsigned NC = 1 << IDX_W;
  typedef struct packed {
    logic [7:0]  vpi;
    logic [15:0] vci;
  } vpc_t;

  vpc_t xl [N][NC];

  always_ff @(posedge clk) begin
    if (cfg_we) xl[cfg_link][cfg_conn] <= '{vpi: cfg_vpi, vci: cfg_vci};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lk_valid <= '0;
    else        lk_valid <= in_valid ? in_cell.tag.link_map[N-1:0] : '0;
  end

  for (genvar i = 0; i < N; i++) begin : g_copy
    always_ff @(posedge clk) begin
      if (in_valid && in_cell.tag.link_map[i]) begin
        lk_cell[i]         <= in_cell.atm;
        lk_cell[i].hdr.vpi <= xl[i][in_cell.tag.conn].vpi;
        lk_cell[i].hdr.vci <= xl[i][in_cell.tag.conn].vci;
      end
    end
  end
endmodule
