// atm_pkg: types and constants shared by the ATM-layer blocks of the UNI/NNI
// interface.
//
// A cell moves between blocks as one 424-bit word (53 octets, UNI header
// layout). Inside the switching system a cell also carries a routing tag
// (route_tag_t) added by header translation: the switch output port, a bitmap
// of the egress links that must receive a copy, the ABR class flag and the
// connection index used to address the per-connection tables.
//
// Time and rates of the policer use fixed-point numbers in cell slots of the
// 155.52 Mbit/s link (2.726 us): the timer t and TAT have 24 bits, the peak
// emission interval T has 22 bits of which 14 are the integer part, tau has 12
// bits. These widths follow the document; the placement of the binary point of
// t, TAT and tau is this design's reading of them (see upc_npc).
//
// ABR rates (CCR, MCR, PCR) are unsigned 16-bit fractions of the link cell
// rate, 16'hFFFF being (almost) the full link. The RM cell payload layout
// (protocol id, DIR/BN/CI/NI bits, ER, CCR, MCR fields) follows the ATM Forum
// traffic management layout; the rate fields are used as plain binary
// fractions here rather than the standard's floating-point code.
package atm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NLINK      = 18;  // links on one multiplexer (2+2+14)
  localparam int unsigned CONN_W     = 8;   // connection index width
  localparam int unsigned NCONN      = 1 << CONN_W;
  localparam int unsigned PORT_W     = 8;   // switch fabric output port number
  localparam int unsigned LINK_W     = $clog2(NLINK);

  // ---------------------------------------------------------------- cells
  typedef struct packed {
    logic [3:0]   gfc;
    logic [7:0]   vpi;
    logic [15:0]  vci;
    logic [2:0]   pt;
    logic         clp;
    logic [7:0]   hec;
  } hdr_t;

  typedef struct packed {
    hdr_t         hdr;
    logic [383:0] payload;   // octet 0 of the payload is bits [383:376]
  } cell_t;

  typedef struct packed {
    logic [PORT_W-1:0] port;
    logic [NLINK-1:0]  link_map;
    logic              abr;
    logic [CONN_W-1:0] conn;
  } route_tag_t;

  typedef struct packed {
    route_tag_t tag;
    cell_t      atm;
  } sw_cell_t;

  // Payload type values
  localparam logic [2:0] PT_RM = 3'b110;     // resource management cell (F5 flow)

  // ------------------------------------------------------------ policing
  localparam int unsigned TAT_W   = 24;
  localparam int unsigned T_W     = 22;
  localparam int unsigned T_FRAC  = 8;       // T_W - 14 integer bits
  localparam int unsigned TAU_W   = 12;
  localparam int unsigned TIME_W  = 24;

  // Policing mode: which cells are policed, and what happens to a
  // non-conforming one.
  typedef enum logic [1:0] {
    POL_CLP01_DISCARD = 2'b00,  // police all cells, discard
    POL_CLP01_TAG     = 2'b01,  // police all cells, tag CLP=0 ones (CLP=1 discarded)
    POL_CLP0_DISCARD  = 2'b10,  // police CLP=0 cells only, discard
    POL_CLP0_TAG      = 2'b11   // police CLP=0 cells only, tag
  } pol_mode_t;

  typedef struct packed {
    logic [TAT_W-1:0] tat;
    logic [T_W-1:0]   t_inc;
    logic [TAU_W-1:0] tau;
    logic             exp;
    pol_mode_t        mode;
  } ccm_entry_t;

  // VSA decision selected by the priority encoder
  typedef enum logic [1:0] {
    VSA_LATE  = 2'd0,   // TAT expired or earlier than t: conforming, TAT := t + T
    VSA_NC    = 2'd1,   // TAT beyond t + tau: non-conforming, TAT kept
    VSA_EARLY = 2'd2    // conforming, TAT := TAT + T
  } vsa_dec_t;

  // ----------------------------------------------------------------- ABR
  localparam int unsigned RATE_W = 16;

  function automatic logic is_rm(cell_t c);
    return c.hdr.pt == PT_RM;
  endfunction
  // DIR bit: 0 forward, 1 backward (payload octet 1, bit 7)
  function automatic logic rm_dir(cell_t c);
    return c.payload[375];
  endfunction
  function automatic logic rm_ci(cell_t c);
    return c.payload[373];
  endfunction
  function automatic logic rm_ni(cell_t c);
    return c.payload[372];
  endfunction
  function automatic logic [15:0] rm_ccr(cell_t c);
    return c.payload[351:336];
  endfunction

  function automatic cell_t rm_set_dir(cell_t c, logic v);
    cell_t r = c;
    r.payload[375] = v;
    return r;
  endfunction
  function automatic cell_t rm_set_ci(cell_t c, logic v);
    cell_t r = c;
    r.payload[373] = v;
    return r;
  endfunction

  // Build a forward RM cell
  function automatic cell_t make_frm(logic [7:0] vpi, logic [15:0] vci,
                                     logic [15:0] er, logic [15:0] ccr, logic [15:0] mcr);
    cell_t r;
    r = '0;
    r.hdr.vpi = vpi;
    r.hdr.vci = vci;
    r.hdr.pt  = PT_RM;
    r.payload[383:376] = 8'h01;   // protocol id: ABR
    r.payload[367:352] = er;
    r.payload[351:336] = ccr;
    r.payload[335:320] = mcr;
    return r;
  endfunction

endpackage
