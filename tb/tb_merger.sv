// Self-checking testbench for merger: six producers with random valid and a
// consumer with random ready; every event must come out exactly once,
// unchanged, in order per producer, and no producer may be starved.
module tb_merger;
  import snn_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 1;
  logic in_valid[N], in_ready[N], out_valid, out_ready;
  event_t in_ev[N], out_ev;
  int checks = 0, failures = 0;
  event_t expq[N][$];
  int sent[N];

  merger #(.N_IN(N)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (in_valid[i] && in_ready[i]) begin
      expq[i].push_back(in_ev[i]);
      sent[i]++;
    end
    if (out_valid && out_ready) begin
      int src; src = int'(out_ev.kid);
      checks++;
      if (src >= N || expq[src].size() == 0 || expq[src][0] != out_ev) begin
        failures++; $display("FAIL: %p", out_ev);
      end else void'(expq[src].pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_ev[i] = '0; end
    out_ready = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) if (!in_valid[i] || in_ready[i]) begin
        in_valid[i] = ($urandom % 100) < 50;
        in_ev[i] = '{dst_row: 8'($urandom), dst_col: 8'($urandom), kid: 8'(i), x: 5'($urandom),
                     y: 5'($urandom), pol: 1'($urandom)};
      end
      out_ready = ($urandom % 100) < 80;
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) in_valid[i] = 0;
    out_ready = 1;
    repeat (20) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (expq[i].size() != 0 || sent[i] < 200) begin failures++; $display("FAIL: input %0d sent %0d left %0d", i, sent[i], expq[i].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
