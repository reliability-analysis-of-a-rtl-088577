// Self-checking testbench for leak_counter: checks the tick period, the
// time stamp, and that leak requests come every leak_per ticks after each
// acknowledge and never when leakage is disabled (leak_per = 0).
module tb_leak_counter;
  localparam int TICK = 7;
  logic clk = 0, rst_n = 1;
  logic [7:0] leak_per = 0;
  logic leak_ack = 0, leak_req, tick;
  logic [15:0] now;
  int checks = 0, failures = 0;
  int cyc = 0, ticks = 0, last_ack_tick = 0, reqs = 0;

  leak_counter #(.TICK_CYCLES(TICK), .TS_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (leak_ack) last_ack_tick = ticks + (tick ? 1 : 0);
    if (tick) begin
      ticks++;
      checks++;
      if (cyc % TICK != 0) begin failures++; $display("FAIL: tick at cycle %0d", cyc); end
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (200) @(negedge clk);
    checks++; if (leak_req) begin failures++; $display("FAIL: leak while disabled"); end
    checks++; if (now != 16'(ticks)) begin failures++; $display("FAIL: now %0d ticks %0d", now, ticks); end
    for (int p = 1; p <= 5; p++) begin
      leak_per = 8'(p);
      leak_ack = 1; @(negedge clk); leak_ack = 0;
      for (int k = 0; k < 4; k++) begin
        while (!leak_req) @(negedge clk);
        reqs++;
        checks++;
        if (ticks - last_ack_tick != p) begin
          failures++;
          $display("FAIL: period %0d got %0d ticks", p, ticks - last_ack_tick);
        end
        repeat ($urandom % 20) @(negedge clk);
        checks++; if (!leak_req) begin failures++; $display("FAIL: request not held"); end
        leak_ack = 1;
        @(negedge clk);
        leak_ack = 0;
      end
    end
    checks++; if (reqs != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
