// Self-checking testbench for conv_node at mesh position (2,3).
// The node is configured over SPI (frames for another node are sent too and
// must be ignored) with a 1x1 kernel whose weight reaches the threshold and a
// routing table of three entries. Events addressed to the node enter from
// the west port; each must produce one output event per table entry, on the
// entry's port and stamped with its address and kernel ID. Transit events
// for other nodes must pass straight through on the dimension-order port.
module tb_conv_node;
  import snn_pkg::*;
  logic clk = 0, rst_n = 1;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic in_valid[4], in_ready[4], out_valid[4], out_ready[4];
  event_t in_ev[4], out_ev[4];
  logic st_in_drop, st_out_drop, st_fire, st_suppress, st_leak, st_fanout, busy;
  int checks = 0, failures = 0, fires = 0;
  event_t expq[4][$];

  conv_node #(.PHYS_ROW(2), .PHYS_COL(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic spi(input int tgt, input int idx, input int v);
    logic [31:0] f;
    f = {8'(tgt), 16'(idx), 8'(v)};
    spi_cs_n = 0;
    for (int b = 31; b >= 0; b--) begin
      spi_mosi = f[b];
      repeat (3) @(posedge clk); spi_sclk = 1;
      repeat (3) @(posedge clk); spi_sclk = 0;
    end
    repeat (3) @(posedge clk); spi_cs_n = 1; repeat (3) @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) if (out_valid[p] && out_ready[p]) begin
      checks++;
      if (expq[p].size() == 0 || expq[p][0] != out_ev[p]) begin failures++; $display("FAIL: port %0d %p", p, out_ev[p]); end
      if (expq[p].size() > 0) void'(expq[p].pop_front());
    end
    if (st_fire) fires++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rt[3][4] = '{'{1, 3, 2, 0}, '{2, 4, 5, 1}, '{6, 3, 7, 2}};
    for (int p = 0; p < 4; p++) begin in_valid[p] = 0; in_ev[p] = '0; out_ready[p] = 1; end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    spi(8'h23, 'h000, 2); spi(8'h23, 'h001, 3); spi(8'h23, 'h002, 3);
    for (int e = 0; e < 3; e++) for (int f = 0; f < 4; f++) spi(8'h23, 'h10 + 4 * e + f, rt[e][f]);
    spi(8'h23, 'h040, 10); spi(8'h23, 'h045, 1);
    spi(8'h23, 'h082, 8'h11); spi(8'h23, 'h083, 8'h00); spi(8'h23, 'h100 + 25, 12);
    spi(8'h24, 'h082, 8'h00);                       // other node: ignored
    spi(8'h13, 'h100 + 25, 1);                      // other node: ignored
    for (int n = 0; n < 60; n++) begin
      event_t e;
      bit mine;
      mine = (n % 3 != 2);
      e = '{dst_row: mine ? 8'd2 : 8'(1 + $urandom % 4), dst_col: mine ? 8'd3 : 8'd5, kid: mine ? 8'd1 : 8'd4,
            x: 5'($urandom % 28), y: 5'($urandom % 28), pol: 1'b1};
      if (mine) begin
        for (int r = 0; r < 3; r++)
          expq[rt[r][3]].push_back('{dst_row: 8'(rt[r][0]), dst_col: 8'(rt[r][1]), kid: 8'(rt[r][2]),
                                     x: e.x >> 1, y: e.y >> 1, pol: 1'b1});
      end else expq[DIR_E].push_back(e);
      @(negedge clk);
      in_valid[DIR_W] = 1; in_ev[DIR_W] = e;
      do @(posedge clk); while (!in_ready[DIR_W]);
      @(negedge clk);
      in_valid[DIR_W] = 0;
      repeat (10) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    for (int p = 0; p < 4; p++) begin checks++; if (expq[p].size() != 0) begin failures++; $display("FAIL: port %0d missing %0d", p, expq[p].size()); end end
    checks++; if (fires != 40) begin failures++; $display("FAIL: fires %0d", fires); end
    checks++; if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
