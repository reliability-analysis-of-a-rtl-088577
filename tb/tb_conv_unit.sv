// Self-checking testbench for conv_unit.
//  A: random events, kernels, sizes, center shifts and thresholds, no leakage
//     and no refractory period; output events and final potentials are
//     compared with an integer model of the event-driven convolution.
//  B: leakage; after a counted number of leak sweeps every potential must
//     equal the model potential leaked that many times.
//  C: rate saturation; one neuron driven hard must keep at least the
//     refractory period between output spikes, and some spikes are held back.
//  D: input overflow with 1x1 kernels; events are dropped while the input
//     FIFO is full, every accepted event fires once, and back-to-back events
//     are processed every 2 clocks.
module tb_conv_unit;
  import snn_pkg::*;
  localparam int NR = 28, NC = 28, NK = 8, KM = 5, TICK = 10, FD = 8;
  logic clk = 0, rst_n = 1;
  cfg_wr_t np_wr = '0, kp_wr = '0, kw_wr = '0;
  logic in_wr = 0; event_t in_ev = '0;
  event_t out_ev; logic out_empty, out_pop;
  logic st_in_drop, st_out_drop, st_fire, st_suppress, st_leak, busy;
  int checks = 0, failures = 0;

  conv_unit #(.NROWS(NR), .NCOLS(NC), .N_KERNELS(NK), .KMAX(KM), .FIFO_DEPTH(FD), .TICK_CYCLES(TICK)) dut (.*);
  always #5 clk = ~clk;
  assign out_pop = !out_empty;

  // model state
  int pot[NR][NC];
  logic signed [7:0] w[NK][KM][KM];
  int ksz_r[NK], ksz_c[NK], ksh_r[NK], ksh_c[NK];
  int pthr, nthr, ss, mr, mc;
  event_t expq[$];
  int outs = 0, leaks = 0, drops = 0, supp = 0;
  int last_out_cyc = -1, cyc = 0, min_gap = 1 << 30;

  always @(posedge clk) begin
    cyc++;
    if (!out_empty) begin
      outs++;
      if (last_out_cyc >= 0 && cyc - last_out_cyc < min_gap) min_gap = cyc - last_out_cyc;
      last_out_cyc = cyc;
      if (expq.size() > 0) begin
        checks++;
        if (out_ev != expq[0]) begin failures++; $display("FAIL: out %p exp %p", out_ev, expq[0]); end
        void'(expq.pop_front());
      end
    end
    if (st_leak) leaks++;
    if (st_in_drop) drops++;
    if (st_suppress) supp++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr_np(input int idx, input int v);
    @(negedge clk); np_wr = '{en: 1'b1, idx: 16'(idx), data: 8'(v)}; @(negedge clk); np_wr = '0;
  endtask
  task automatic wr_kp(input int idx, input int v);
    @(negedge clk); kp_wr = '{en: 1'b1, idx: 16'(idx), data: 8'(v)}; @(negedge clk); kp_wr = '0;
  endtask
  task automatic wr_kw(input int idx, input int v);
    @(negedge clk); kw_wr = '{en: 1'b1, idx: 16'(idx), data: 8'(v)}; @(negedge clk); kw_wr = '0;
  endtask

  task automatic send(input event_t e);
    @(negedge clk); in_wr = 1; in_ev = e; @(negedge clk); in_wr = 0;
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (busy || !out_empty);
    repeat (3) @(negedge clk);
  endtask

  function automatic void model_event(input event_t e);
    int k; k = int'(e.kid);
    if (k >= NK) return;
    for (int i = 0; i < ((ksz_r[k] > KM) ? KM : ksz_r[k]); i++)
      for (int j = 0; j < ((ksz_c[k] > KM) ? KM : ksz_c[k]); j++) begin
        int r, c, v;
        r = int'(e.x) + i - ksh_r[k];
        c = int'(e.y) + j - ksh_c[k];
        if (r < 0 || c < 0 || r >= mr || c >= mc) continue;
        v = pot[r][c] + (e.pol ? int'(w[k][i][j]) : -int'(w[k][i][j]));
        if (v >= pthr || v <= -nthr) begin
          expq.push_back('{dst_row: 0, dst_col: 0, kid: 0, x: 5'(r >> ss), y: 5'(c >> ss), pol: (v >= pthr)});
          v = 0;
        end
        pot[r][c] = v;
      end
  endfunction

  function automatic int leak1(input int v, input int a);
    if (v > a) return v - a;
    if (v < -a) return v + a;
    return 0;
  endfunction

  task automatic check_pots(input string tag);
    int bad; bad = 0;
    for (int r = 0; r < NR; r++) for (int c = 0; c < NC; c++)
      if (int'(dut.u_nmem.mem[r * NC + c]) != pot[r][c]) bad++;
    chk(bad == 0, $sformatf("%s: %0d potentials differ", tag, bad));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_outs0, t0, t1;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (pot[r, c]) pot[r][c] = 0;
    // ---------------- A ----------------
    pthr = 40; nthr = 35; ss = 1; mr = 24; mc = 26;
    wr_np(0, pthr); wr_np(1, nthr); wr_np(2, 0); wr_np(3, 0); wr_np(4, 0); wr_np(5, ss);
    wr_np(6, mr); wr_np(7, mc);
    for (int k = 0; k < NK; k++) begin
      ksz_r[k] = (k == 7) ? 0 : 1 + ($urandom % 5);
      ksz_c[k] = (k == 6) ? 7 : 1 + ($urandom % 5);
      ksh_r[k] = $urandom % 5; ksh_c[k] = $urandom % 5;
      wr_kp(2 * k, (ksz_r[k] << 4) | ksz_c[k]);
      wr_kp(2 * k + 1, (ksh_r[k] << 4) | ksh_c[k]);
      for (int i = 0; i < KM; i++) for (int j = 0; j < KM; j++) begin
        w[k][i][j] = 8'($signed($urandom % 41) - 20);
        wr_kw(k * KM * KM + i * KM + j, w[k][i][j]);
      end
    end
    wait_idle();
    for (int n = 0; n < 600; n++) begin
      event_t e;
      e = '{dst_row: 8'($urandom), dst_col: 8'($urandom), kid: 8'((n % 50 == 0) ? 9 : $urandom % NK),
            x: 5'($urandom), y: 5'($urandom), pol: 1'($urandom)};
      model_event(e);
      send(e);
      repeat (30) @(negedge clk);
    end
    wait_idle();
    chk(expq.size() == 0, $sformatf("A: %0d expected outputs missing", expq.size()));
    chk(outs > 50, "A: enough output events");
    check_pots("A");
    // ---------------- B ----------------
    wr_np(2, 3);                // leak amplitude
    wr_np(3, 1);                // every tick
    wait (leaks >= 4);
    wr_np(3, 0);
    wait_idle();
    for (int l = 0; l < leaks; l++) foreach (pot[r, c]) pot[r][c] = leak1(pot[r][c], 3);
    check_pots("B");
    chk(leaks >= 4, "B: leak sweeps happened");
    // ---------------- C ----------------
    wr_kp(0, 8'h11); wr_kp(1, 8'h00); wr_kw(0, 100);
    wr_np(4, 12);               // refractory period: 12 ticks = 120 clocks
    n_outs0 = outs; last_out_cyc = -1; min_gap = 1 << 30;
    for (int n = 0; n < 100; n++) begin
      send('{dst_row: 0, dst_col: 0, kid: 0, x: 5'd3, y: 5'd4, pol: 1'b1});
      repeat (8) @(negedge clk);
    end
    wait_idle();
    chk(supp > 0, "C: spikes held back by rate saturation");
    chk(outs - n_outs0 >= 5 && outs - n_outs0 <= 12, $sformatf("C: %0d spikes in 1000 clocks", outs - n_outs0));
    chk(min_gap >= 12 * TICK - TICK, $sformatf("C: min gap %0d clocks", min_gap));
    // ---------------- D ----------------
    wr_np(4, 0);
    n_outs0 = outs; last_out_cyc = -1; min_gap = 1 << 30;
    t0 = drops;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk); in_wr = 1; in_ev = '{dst_row: 0, dst_col: 0, kid: 0, x: 5'(n % 20), y: 5'd1, pol: 1'b1};
    end
    @(negedge clk); in_wr = 0;
    wait_idle();
    t1 = drops - t0;
    chk(t1 > 0, "D: input FIFO overflow dropped events");
    chk(outs - n_outs0 == 40 - t1, $sformatf("D: %0d outputs for %0d accepted", outs - n_outs0, 40 - t1));
    chk(min_gap == 2, $sformatf("D: 1x1 events every %0d clocks", min_gap));
    $display("outs=%0d leaks=%0d drops=%0d suppressed=%0d", outs, leaks, drops, supp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
