// tb_header_xlate: fills part of the table, then sends cells with known and
// unknown (link, VPI, VCI) keys under random output stalls. A known cell must
// come out once, in order, with the new VPI/VCI and the entry's routing tag
// (connection index = entry number); an unknown one must raise miss and
// vanish.
module tb_header_xlate;
  import atm_pkg::*;
  localparam int IW = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, miss;
  cell_t in_cell = '0;
  logic [4:0] in_link = 0;
  sw_cell_t out_cell;
  logic cfg_we = 0, cfg_used = 0, cfg_abr = 0;
  logic [IW-1:0] cfg_idx = 0;
  logic [4:0] cfg_link = 0;
  logic [7:0] cfg_vpi = 0, cfg_new_vpi = 0, cfg_port = 0;
  logic [15:0] cfg_vci = 0, cfg_new_vci = 0;
  logic [NLINK-1:0] cfg_link_map = 0;
  typedef struct { logic [4:0] link; logic [7:0] vpi; logic [15:0] vci;
                   logic [7:0] nvpi; logic [15:0] nvci; logic [7:0] port;
                   logic [NLINK-1:0] map; logic abr; } ent_t;
  ent_t ents [20];
  sw_cell_t expq[$];
  int checks = 0, failures = 0, n_miss = 0, exp_miss = 0;
  always #5 clk = ~clk;
  header_xlate #(.NENT_W(IW)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (miss) n_miss++;
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_cell !== expq[0]) begin
        failures++; $display("FAIL output cell vci=%h", out_cell.atm.hdr.vci);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      ents[i] = '{link: 5'($urandom % NLINK), vpi: 8'($urandom), vci: 16'(i * 7 + 1),
                  nvpi: 8'($urandom), nvci: 16'($urandom), port: 8'($urandom),
                  map: NLINK'($urandom), abr: 1'($urandom)};
      @(negedge clk);
      cfg_we = 1; cfg_idx = IW'(i + 3); cfg_used = 1; cfg_link = ents[i].link;
      cfg_vpi = ents[i].vpi; cfg_vci = ents[i].vci; cfg_new_vpi = ents[i].nvpi;
      cfg_new_vci = ents[i].nvci; cfg_port = ents[i].port; cfg_link_map = ents[i].map;
      cfg_abr = ents[i].abr;
    end
    @(negedge clk) cfg_we = 0;
    repeat (3000) begin
      int k;
      cell_t c;
      k = $urandom % 24;                      // 20..23: no entry
      c = '0;
      c.payload = {12{$urandom}};
      c.hdr.pt = 3'($urandom);
      if (k < 20) begin
        c.hdr.vpi = ents[k].vpi; c.hdr.vci = ents[k].vci; in_link = ents[k].link;
      end else begin
        c.hdr.vpi = 8'($urandom); c.hdr.vci = 16'hF000 + 16'($urandom % 256); in_link = 5'($urandom % NLINK);
      end
      @(negedge clk);
      in_valid = 1; in_cell = c; out_ready = ($urandom % 4) != 0;
      do begin
        @(posedge clk);
        if (in_ready) break;
        @(negedge clk) out_ready = ($urandom % 4) != 0;
      end while (1);
      if (k < 20) begin
        sw_cell_t e;
        e.atm = c; e.atm.hdr.vpi = ents[k].nvpi; e.atm.hdr.vci = ents[k].nvci;
        e.tag = '{port: ents[k].port, link_map: ents[k].map, abr: ents[k].abr, conn: CONN_W'(k + 3)};
        expq.push_back(e);
      end else exp_miss++;
      @(negedge clk) in_valid = 0; out_ready = 1;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_miss != exp_miss || expq.size() != 0) begin
      failures++; $display("FAIL misses %0d/%0d, %0d cells missing", n_miss, exp_miss, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
