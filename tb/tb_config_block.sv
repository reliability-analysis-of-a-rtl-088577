// Self-checking testbench for config_block: random frames to this node and
// to other targets; checks that only this node's frames produce a write, on
// the right region with the region-local index and value, one clock later.
module tb_config_block;
  import snn_pkg::*;
  localparam int NK = 8, KM = 5;
  logic clk = 0, rst_n = 1;
  logic frame_valid = 0;
  logic [31:0] frame = '0;
  cfg_wr_t rt_wr, np_wr, kp_wr, kw_wr;
  int checks = 0, failures = 0;
  int hits[4];

  config_block #(.PHYS_ROW(3), .PHYS_COL(2), .N_KERNELS(NK), .KMAX(KM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] tgt; logic [15:0] idx; logic [7:0] val;
    int region; logic [15:0] lidx;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      tgt = ($urandom % 3 == 0) ? 8'($urandom) : 8'h32;
      idx = ($urandom % 2) ? 16'($urandom % 16'h200) : 16'($urandom);
      val = 8'($urandom);
      frame_valid = 1;
      frame = {tgt, idx, val};
      region = -1; lidx = '0;
      if (tgt == 8'h32) begin
        if (idx < 16'h40) begin region = 0; lidx = idx; end
        else if (idx < 16'h48) begin region = 1; lidx = idx - 16'h40; end
        else if (idx >= 16'h80 && idx < 16'h80 + 2*NK) begin region = 2; lidx = idx - 16'h80; end
        else if (idx >= 16'h100 && idx < 16'h100 + NK*KM*KM) begin region = 3; lidx = idx - 16'h100; end
      end
      @(negedge clk);
      frame_valid = 0;
      checks++;
      if (rt_wr.en != (region == 0) || np_wr.en != (region == 1) ||
          kp_wr.en != (region == 2) || kw_wr.en != (region == 3)) begin
        failures++;
        $display("FAIL: strobe tgt=%h idx=%h region=%0d", tgt, idx, region);
      end else if (region >= 0) begin
        cfg_wr_t w;
        w = (region == 0) ? rt_wr : (region == 1) ? np_wr : (region == 2) ? kp_wr : kw_wr;
        hits[region]++;
        checks++;
        if (w.idx != lidx || w.data != val) begin
          failures++;
          $display("FAIL: write idx=%h data=%h exp %h %h", w.idx, w.data, lidx, val);
        end
      end
    end
    for (int r = 0; r < 4; r++) begin checks++; if (hits[r] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
