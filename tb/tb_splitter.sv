// Self-checking testbench for splitter: configured over SPI with six copies
// (one of them with a row outside the mesh), it must put one stamped copy of
// each input event on the west port of each addressed row, in order, under
// random back-pressure, discard the copy with the invalid row, and accept
// the input only after the last copy.
module tb_splitter;
  import snn_pkg::*;
  localparam int NR = 6;
  logic clk = 0, rst_n = 1;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic in_valid = 0, in_ready, in_pol = 0;
  logic [4:0] in_x = '0, in_y = '0;
  logic out_valid[NR], out_ready[NR];
  event_t out_ev[NR];
  logic st_copy, st_discard;
  int checks = 0, failures = 0, discards = 0, accepted = 0;
  event_t expq[NR][$];
  int rows[6] = '{1, 2, 3, 9, 5, 6};
  int cols[6] = '{1, 1, 1, 1, 2, 1};

  splitter #(.N_COPIES_MAX(6), .N_ROWS(NR)) dut (.*);
  always #5 clk = ~clk;

  task automatic spi_write(input logic [31:0] f);
    spi_cs_n = 0;
    for (int b = 31; b >= 0; b--) begin
      spi_mosi = f[b];
      repeat (3) @(posedge clk); spi_sclk = 1;
      repeat (3) @(posedge clk); spi_sclk = 0;
    end
    repeat (3) @(posedge clk);
    spi_cs_n = 1;
    repeat (3) @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) if (out_valid[r] && out_ready[r]) begin
      checks++;
      if (expq[r].size() == 0 || out_ev[r] != expq[r][0]) begin
        failures++; $display("FAIL: row %0d got %p", r + 1, out_ev[r]);
      end
      if (expq[r].size() > 0) void'(expq[r].pop_front());
    end
    if (st_discard) discards++;
    if (in_valid && in_ready) accepted++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) out_ready[r] = 1;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // nothing configured yet: input is consumed without copies
    @(negedge clk); in_valid = 1; @(negedge clk);
    checks++; if (accepted != 1) failures++;
    in_valid = 0;
    spi_write({8'h00, 16'h0000, 8'd6});
    spi_write({8'h35, 16'h0000, 8'd2});     // frame for a node, ignored
    for (int c = 0; c < 6; c++) begin
      spi_write({8'h00, 16'(16 + 2 * c), 8'(rows[c])});
      spi_write({8'h00, 16'(17 + 2 * c), 8'(cols[c])});
    end
    accepted = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = 1; in_x = 5'($urandom); in_y = 5'($urandom); in_pol = 1'($urandom);
      for (int c = 0; c < 6; c++)
        if (rows[c] >= 1 && rows[c] <= NR)
          expq[rows[c] - 1].push_back('{dst_row: 8'(rows[c]), dst_col: 8'(cols[c]), kid: 8'd0,
                                        x: in_x, y: in_y, pol: in_pol});
      do begin
        for (int r = 0; r < NR; r++) out_ready[r] = ($urandom % 100) < 60;
        @(posedge clk);
        #1;
      end while (accepted < n + 1);
      @(negedge clk);
      in_valid = 0;
    end
    for (int r = 0; r < NR; r++) out_ready[r] = 1;
    repeat (10) @(negedge clk);
    for (int r = 0; r < NR; r++) begin checks++; if (expq[r].size() != 0) begin failures++; $display("FAIL: row %0d missing %0d", r + 1, expq[r].size()); end end
    checks++; if (accepted != 200) begin failures++; $display("FAIL: accepted %0d", accepted); end
    checks++; if (discards != 200) begin failures++; $display("FAIL: discards %0d", discards); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
