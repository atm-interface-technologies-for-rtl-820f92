// tb_cell_dmx_copy: random connection tables and routing-tag bitmaps (single
// link, multicast, broadcast). Each link must get the cell exactly when its
// bit is set, one cycle later, with the VPI/VCI of its own table entry and
// the rest of the cell unchanged.
module tb_cell_dmx_copy;
  import atm_pkg::*;
  localparam int N = NLINK, IW = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  sw_cell_t in_cell = '0;
  logic [N-1:0] lk_valid;
  cell_t lk_cell [N];
  logic cfg_we = 0;
  logic [4:0] cfg_link = 0;
  logic [IW-1:0] cfg_conn = 0;
  logic [7:0] cfg_vpi = 0;
  logic [15:0] cfg_vci = 0;
  logic [23:0] ref_xl [N][16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cell_dmx_copy #(.IDX_W(IW)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < N; l++)
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        cfg_we = 1; cfg_link = 5'(l); cfg_conn = IW'(c);
        cfg_vpi = 8'($urandom); cfg_vci = 16'($urandom);
        ref_xl[l][c] = {cfg_vpi, cfg_vci};
      end
    @(negedge clk) cfg_we = 0;
    repeat (2000) begin
      sw_cell_t c;
      @(negedge clk);
      c = '0;
      c.tag.conn = CONN_W'($urandom % 16);
      case ($urandom % 3)
        0: c.tag.link_map = NLINK'(1) << ($urandom % N);
        1: c.tag.link_map = NLINK'($urandom);
        default: c.tag.link_map = '1;
      endcase
      c.atm.hdr.pt = 3'($urandom); c.atm.hdr.clp = 1'($urandom);
      c.atm.payload = {12{$urandom}};
      in_valid = ($urandom % 4) != 0; in_cell = c;
      @(posedge clk); #1;
      for (int l = 0; l < N; l++) begin
        checks++;
        if (lk_valid[l] !== (in_valid && c.tag.link_map[l])) begin
          failures++; $display("FAIL link %0d valid", l);
        end else if (lk_valid[l]) begin
          cell_t e;
          e = c.atm;
          {e.hdr.vpi, e.hdr.vci} = ref_xl[l][c.tag.conn[IW-1:0]];
          checks++;
          if (lk_cell[l] !== e) begin failures++; $display("FAIL link %0d cell", l); end
        end
      end
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
