// Self-checking testbench for spi_slave: sends random 32-bit frames (MSB
// first, mode 0, SCLK = clk/8), including back-to-back frames under one chip
// select and an aborted partial frame, and checks each received frame.
module tb_spi_slave;
  logic clk = 0, rst_n = 1;
  logic sclk = 0, cs_n = 1, mosi = 0;
  logic frame_valid;
  logic [31:0] frame;
  int checks = 0, failures = 0, got = 0;
  logic [31:0] expq[$];

  spi_slave #(.FRAME_W(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic send_bits(input logic [31:0] v, input int n);
    for (int b = n - 1; b >= 0; b--) begin
      mosi = v[b];
      repeat (4) @(posedge clk);
      sclk = 1;
      repeat (4) @(posedge clk);
      sclk = 0;
    end
  endtask

  always @(posedge clk) if (frame_valid) begin
    checks++;
    got++;
    if (expq.size() == 0 || frame != expq[0]) begin
      failures++;
      $display("FAIL: frame %h", frame);
    end
    if (expq.size() > 0) void'(expq.pop_front());
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int f = 0; f < 20; f++) begin
      v = $urandom;
      expq.push_back(v);
      cs_n = 0;
      send_bits(v, 32);
      if (f % 3 == 0) begin
        v = $urandom;
        expq.push_back(v);
        send_bits(v, 32);
      end
      if (f == 5) send_bits(32'hDEAD_BEEF, 13);  // aborted partial frame
      repeat (4) @(posedge clk);
      cs_n = 1;
      repeat (10) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0 || got != 27) begin
      failures++;
      $display("FAIL: %0d frames received, %0d pending", got, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
