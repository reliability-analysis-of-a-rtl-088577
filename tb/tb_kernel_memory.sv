// Self-checking testbench for kernel_memory: writes random weights and
// kernel parameters through the configuration strobes, reads all back and
// compares with a model array.
module tb_kernel_memory;
  import snn_pkg::*;
  localparam int NK = 8, KM = 5, NW = NK * KM * KM;
  logic clk = 0, rst_n = 1;
  cfg_wr_t kp_wr = '0, kw_wr = '0;
  logic [2:0] rd_kid = '0;
  logic [7:0] rd_size, rd_shift;
  logic [$clog2(NW)-1:0] rd_waddr = '0;
  logic signed [7:0] rd_weight;
  logic [7:0] mw[NW], ms[NK], mh[NK];
  int checks = 0, failures = 0;

  kernel_memory #(.N_KERNELS(NK), .KMAX(KM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < NK; k++) begin
      rd_kid = 3'(k); #1;
      checks++; if (rd_size != 0 || rd_shift != 0) failures++;
      ms[k] = 0; mh[k] = 0;
    end
    @(negedge clk);
    for (int i = 0; i < NW; i++) begin
      mw[i] = 8'($urandom);
      kw_wr = '{en: 1'b1, idx: 16'(i), data: mw[i]};
      @(negedge clk);
    end
    kw_wr = '0;
    for (int n = 0; n < 40; n++) begin
      int k; logic [7:0] v;
      k = $urandom % NK; v = 8'($urandom);
      kp_wr = '{en: 1'b1, idx: 16'(2 * k + (n % 2)), data: v};
      if (n % 2) mh[k] = v; else ms[k] = v;
      @(negedge clk);
    end
    kp_wr = '0;
    for (int i = 0; i < NW; i++) begin
      rd_waddr = 8'(i); #1;
      checks++;
      if (rd_weight != $signed(mw[i])) begin failures++; $display("FAIL: weight %0d got %h exp %h", i, rd_weight, mw[i]); end
    end
    for (int k = 0; k < NK; k++) begin
      rd_kid = 3'(k); #1;
      checks++;
      if (rd_size != ms[k] || rd_shift != mh[k]) begin failures++; $display("FAIL: kpar %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
