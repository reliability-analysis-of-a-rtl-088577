// Self-checking testbench for rate_sat_memory: random {valid, time stamp}
// writes and reads compared with a model array.
module tb_rate_sat_memory;
  localparam int N = 784, TW = 16;
  logic clk = 0;
  logic [9:0] rd_addr = '0, wr_addr = '0;
  logic rd_valid, wr_en = 0, wr_valid = 0;
  logic [TW-1:0] rd_ts, wr_ts = '0;
  logic [TW:0] m[N];
  int checks = 0, failures = 0;

  rate_sat_memory #(.N_NEURONS(N), .TS_W(TW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      wr_en = 1; wr_addr = 10'(i); wr_valid = $urandom % 2; wr_ts = TW'($urandom);
      m[i] = {wr_valid, wr_ts};
      @(negedge clk);
    end
    for (int n = 0; n < 5000; n++) begin
      rd_addr = 10'($urandom % N);
      #1;
      checks++;
      if ({rd_valid, rd_ts} != m[rd_addr]) begin failures++; $display("FAIL: read %0d", rd_addr); end
      wr_en = $urandom % 2; wr_addr = 10'($urandom % N); wr_valid = $urandom % 2; wr_ts = TW'($urandom);
      @(negedge clk);
      if (wr_en) m[wr_addr] = {wr_valid, wr_ts};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
