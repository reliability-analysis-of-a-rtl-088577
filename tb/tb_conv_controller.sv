// Self-checking testbench for conv_controller with testbench-side memories.
// Checks: the clearing sweep after reset covers every neuron in NROWS*NCOLS
// clocks; an event with an R x C kernel takes 1 + R*C clocks; potentials and
// output events follow an integer model (both thresholds, sub-sampling);
// a pending leak request is served before a waiting event and moves every
// potential towards 0; the refractory period, measured on the `now` input,
// holds spikes back; out-of-range kernel IDs are consumed without effect.
module tb_conv_controller;
  import snn_pkg::*;
  localparam int NR = 8, NC = 8, NK = 4, KM = 3, N = NR * NC;
  logic clk = 0, rst_n = 1;
  event_t in_ev; logic in_empty, in_pop;
  neuron_par_t np;
  logic [1:0] k_kid; logic [7:0] k_size, k_shift; logic [5:0] k_waddr; logic signed [7:0] k_weight;
  logic [5:0] n_rd_addr, n_wr_addr, r_rd_addr, r_wr_addr;
  logic signed [15:0] n_rd_data, n_wr_data;
  logic n_wr_en, r_rd_valid, r_wr_en, r_wr_valid;
  logic [15:0] r_rd_ts, r_wr_ts, now = 0;
  logic leak_req = 0, leak_ack, out_wr, st_fire, st_suppress, busy;
  event_t out_ev;

  conv_controller #(.NROWS(NR), .NCOLS(NC), .N_KERNELS(NK), .KMAX(KM)) dut (.*);
  always #5 clk = ~clk;

  // testbench memories
  logic signed [15:0] nmem[N];
  logic [16:0] rmem[N];
  logic signed [7:0] wmem[NK * KM * KM];
  logic [7:0] ksz[NK], ksh[NK];
  assign n_rd_data = nmem[n_rd_addr];
  assign {r_rd_valid, r_rd_ts} = rmem[r_rd_addr];
  assign k_weight = wmem[k_waddr];
  assign k_size = ksz[k_kid];
  assign k_shift = ksh[k_kid];
  int init_writes = 0;
  always @(posedge clk) begin
    if (n_wr_en) nmem[n_wr_addr] <= n_wr_data;
    if (r_wr_en) rmem[r_wr_addr] <= {r_wr_valid, r_wr_ts};
  end

  event_t inq[$];
  function automatic void refresh();
    in_empty = (inq.size() == 0);
    in_ev = in_empty ? '0 : inq[0];
  endfunction
  function automatic void push(input event_t e);
    inq.push_back(e);
    refresh();
  endfunction
  always @(posedge clk) if (in_pop) begin #1; void'(inq.pop_front()); refresh(); end

  int checks = 0, failures = 0, supp = 0;
  int pot[N];
  event_t expq[$];
  always @(posedge clk) begin
    if (out_wr) begin
      checks++;
      if (expq.size() == 0 || out_ev != expq[0]) begin failures++; $display("FAIL: out %p", out_ev); end
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (st_suppress) supp++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic void model(input event_t e);
    int k; k = int'(e.kid);
    if (k >= NK) return;
    for (int i = 0; i < ksz[k][7:4]; i++) for (int j = 0; j < ksz[k][3:0]; j++) begin
      int r, c, v;
      r = int'(e.x) + i - int'(ksh[k][7:4]); c = int'(e.y) + j - int'(ksh[k][3:0]);
      if (r < 0 || c < 0 || r >= NR || c >= NC) continue;
      v = pot[r * NC + c] + (e.pol ? 1 : -1) * int'(wmem[k * KM * KM + i * KM + j]);
      if (v >= int'(np.pos_thr) || v <= -int'(np.neg_thr)) begin
        expq.push_back('{dst_row: 0, dst_col: 0, kid: 0, x: 5'(r >> 1), y: 5'(c >> 1), pol: v >= int'(np.pos_thr)});
        v = 0;
      end
      pot[r * NC + c] = v;
    end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    refresh();
    np = '{pos_thr: 20, neg_thr: 20, leak_amp: 2, leak_per: 0, refract: 0, subsample: 1, map_rows: NR, map_cols: NC};
    for (int i = 0; i < N; i++) begin nmem[i] = 16'(i + 5); rmem[i] = '1; end
    for (int k = 0; k < NK; k++) begin ksz[k] = 8'h33; ksh[k] = 8'h11; end
    ksz[1] = 8'h12; ksz[2] = 8'h00;
    foreach (wmem[i]) wmem[i] = 8'($signed($urandom % 15) - 7);
    #1 rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    t0 = 0;
    while (busy) begin @(negedge clk); t0++; end
    chk(t0 == N, $sformatf("clear sweep took %0d clocks", t0));
    for (int i = 0; i < N; i++) begin
      chk(nmem[i] == 0 && rmem[i][16] == 0, "cleared");
      pot[i] = 0;
    end
    // latency: a 3x3 event takes 10 clocks, a 1x2 event 3 clocks
    for (int k = 0; k < 2; k++) begin
      event_t e;
      e = '{dst_row: 0, dst_col: 0, kid: 8'(k), x: 5'd3, y: 5'd3, pol: 1'b1};
      model(e);
      @(negedge clk); push(e);
      t1 = 0;
      do begin @(negedge clk); t1++; end while (busy);
      chk(t1 == (k == 0 ? 10 : 3), $sformatf("kernel %0d took %0d clocks", k, t1));
    end
    // random events
    for (int n = 0; n < 400; n++) begin
      event_t e;
      e = '{dst_row: 0, dst_col: 0, kid: 8'((n % 37 == 0) ? 5 : $urandom % NK), x: 5'($urandom % 10),
            y: 5'($urandom % 10), pol: 1'($urandom)};
      model(e);
      @(negedge clk); push(e);
      if (n % 4 == 0) while (busy) @(negedge clk);
    end
    while (busy) @(negedge clk);
    chk(expq.size() == 0, "all expected outputs produced");
    for (int i = 0; i < N; i++) chk(int'(nmem[i]) == pot[i], $sformatf("potential %0d", i));
    // leak before a waiting event
    @(negedge clk);
    leak_req = 1;
    push('{dst_row: 0, dst_col: 0, kid: 8'd3, x: 5'd1, y: 5'd1, pol: 1'b1});
    #1;
    chk(leak_ack && !in_pop, "leak served first");
    @(negedge clk);
    leak_req = 0;
    for (int i = 0; i < N; i++) pot[i] = (pot[i] > 2) ? pot[i] - 2 : (pot[i] < -2) ? pot[i] + 2 : 0;
    model('{dst_row: 0, dst_col: 0, kid: 8'd3, x: 5'd1, y: 5'd1, pol: 1'b1});
    while (busy) @(negedge clk);
    for (int i = 0; i < N; i++) chk(int'(nmem[i]) == pot[i], $sformatf("after leak %0d", i));
    // refractory: kernel 0 as 1x1 with a weight above threshold
    ksz[0] = 8'h11; ksh[0] = 8'h00; wmem[0] = 8'sd100; np.refract = 8'd5;
    supp = 0;
    for (int n = 0; n < 12; n++) begin
      @(negedge clk);
      now = 16'(100 + n);
      if (n == 0 || n == 5 || n == 10)
        expq.push_back('{dst_row: 0, dst_col: 0, kid: 0, x: 5'd1, y: 5'd2, pol: 1'b1});
      push('{dst_row: 0, dst_col: 0, kid: 8'd0, x: 5'd2, y: 5'd4, pol: 1'b1});
      @(negedge clk);
      while (busy) @(negedge clk);
    end
    chk(supp == 9 && expq.size() == 0, $sformatf("refractory: %0d held back", supp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
