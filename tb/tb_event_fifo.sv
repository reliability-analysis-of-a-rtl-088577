// Self-checking testbench for event_fifo: random pushes and pops against a
// queue model; checks order, empty/full flags, count, and that a push into a
// full FIFO is discarded and flagged as a drop.
module tb_event_fifo;
  localparam int DEPTH = 4, W = 12;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, drop;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, drops_seen = 0;
  logic [W-1:0] q[$];

  event_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == DEPTH), "full flag");
      chk(count == q.size(), "count");
      if (q.size() > 0) chk(rd_data == q[0], "head data");
      wr_en   = ($urandom % 100) < ((n / 500) % 2 ? 70 : 40);
      rd_en   = ($urandom % 100) < ((n / 500) % 2 ? 30 : 60);
      wr_data = W'($urandom);
      #1;
      chk(drop == (wr_en && q.size() == DEPTH && !(rd_en && q.size() > 0)), "drop flag");
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) begin
        if (q.size() < DEPTH) q.push_back(wr_data);
        else drops_seen++;
      end
    end
    chk(drops_seen > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
