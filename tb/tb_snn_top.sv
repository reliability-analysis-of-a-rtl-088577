// End-to-end testbench for snn_top at its default size (6 x 4 mesh, 28 x 28
// neuron arrays, 8 kernels of up to 5 x 5 per node).
//
// The mesh is configured over SPI as the poker-card symbol network: C1 in
// column 1 (6 nodes, one kernel each), C2 at (1..4,2) (6 kernels each), C3 at
// (1..4,3), (5,2), (5,3), (6,2), (6,3) (4 kernels each), C4 at (1..4,4)
// (8 kernels each, 1x1), with S1/S2 as sub-sampling by 2 in C1 and C2; the
// splitter copies every input event to the six C1 nodes and C4 sends to the
// merger. Trained weights are not available, so the weights are chosen to
// make the result independent of event order: within a node every non-zero
// weight is equal and only positive events are sent, so a neuron that gets n
// contributions of weight w with threshold T fires exactly floor(n / ceil(T/w))
// times. C1 and C2 kernels have one non-zero element each (a different one per
// kernel), C3 kernels are uniform 5x5 and C4 kernels 1x1.
//
// Phase 1 sends input events one at a time, waiting for the mesh to go idle,
// and compares the number of output events of each C4 node with a layer-by-
// layer count model; every output must carry the expected header, and the
// class with the most spikes is reported. Phase 2 exercises the remaining
// mechanisms: refractory suppression, leakage, FIFO overflow under an input
// flood, and a splitter copy with an invalid row. Each mechanism must occur.
module tb_snn_top;
  import snn_pkg::*;
  logic clk = 0, rst_n = 1;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic in_valid = 0, in_ready, in_pol = 1;
  logic [4:0] in_x = '0, in_y = '0;
  logic out_valid, out_ready = 1;
  event_t out_ev;
  logic [23:0] st_in_drop, st_out_drop, st_fire, st_suppress, st_leak, st_fanout;
  logic st_split_discard, busy;

  snn_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_out[7], n_bad_hdr = 0;
  int c_drop = 0, c_odrop = 0, c_supp = 0, c_leak = 0, c_fan = 0, c_disc = 0, c_fire = 0, c_in = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      if (out_ev.dst_row >= 1 && out_ev.dst_row <= 4 && out_ev.dst_col == 5 && out_ev.kid == 0 &&
          out_ev.x == 0 && out_ev.y == 0 && out_ev.pol == 1)
        n_out[out_ev.dst_row]++;
      else n_bad_hdr++;
    end
    c_drop += $countones(st_in_drop);
    c_odrop += $countones(st_out_drop);
    c_supp += $countones(st_suppress);
    c_leak += $countones(st_leak);
    c_fan  += $countones(st_fanout);
    c_fire += $countones(st_fire);
    c_disc += int'(st_split_discard);
    c_in   += int'(in_valid && in_ready);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic spi(input int r, input int c, input int idx, input int v);
    logic [31:0] f;
    f = {4'(r), 4'(c), 16'(idx), 8'(v)};
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

  // ---------------- network description ----------------
  localparam int T1 = 30, W1 = 10, K1 = 3;     // C1: fires every 3rd contribution
  localparam int T2 = 30, W2 = 10, K2 = 3;
  localparam int T3 = 15, W3 = 5,  K3 = 3;
  localparam int T4 = 12;
  int c3r[8] = '{1, 2, 3, 4, 5, 5, 6, 6};
  int c3c[8] = '{3, 3, 3, 3, 2, 3, 2, 3};

  function automatic int w4(input int c); return 3 + c; endfunction          // C4 node c = 1..4
  function automatic int k4(input int c); return (T4 + w4(c) - 1) / w4(c); endfunction
  function automatic int e1i(input int r); return r % 5; endfunction          // C1 node r = 0..5
  function automatic int e1j(input int r); return (r + 2) % 5; endfunction
  function automatic int e2i(input int q, input int k); return (q + k) % 5; endfunction
  function automatic int e2j(input int q, input int k); return (q + 2 * k) % 5; endfunction

  task automatic cfg_neuron(input int r, input int c, input int pt, input int ss, input int mr, input int mc);
    spi(r, c, 'h40, pt); spi(r, c, 'h41, 255); spi(r, c, 'h42, 0); spi(r, c, 'h43, 0);
    spi(r, c, 'h44, 0); spi(r, c, 'h45, ss); spi(r, c, 'h46, mr); spi(r, c, 'h47, mc);
  endtask
  task automatic cfg_route(input int r, input int c, input int e, input int dr, input int dc, input int kid, input int dir);
    spi(r, c, 'h10 + 4 * e, dr); spi(r, c, 'h11 + 4 * e, dc); spi(r, c, 'h12 + 4 * e, kid); spi(r, c, 'h13 + 4 * e, dir);
  endtask
  task automatic cfg_kernel(input int r, input int c, input int k, input int sz, input int sh, input int ei, input int ej, input int w);
    spi(r, c, 'h80 + 2 * k, sz); spi(r, c, 'h81 + 2 * k, sh);
    for (int i = 0; i < (sz >> 4); i++) for (int j = 0; j < (sz & 15); j++)
      spi(r, c, 'h100 + k * 25 + i * 5 + j, (ei < 0 || (i == ei && j == ej)) ? w : 0);
  endtask

  task automatic configure();
    // splitter: six copies to (r,1)
    spi(0, 0, 'h00, 6);
    for (int r = 1; r <= 6; r++) begin spi(0, 0, 'h10 + 2 * (r - 1), r); spi(0, 0, 'h11 + 2 * (r - 1), 1); end
    for (int r = 1; r <= 6; r++) for (int c = 1; c <= 4; c++) begin
      spi(r, c, 'h00, r); spi(r, c, 'h01, c);
    end
    // C1
    for (int r = 1; r <= 6; r++) begin
      cfg_neuron(r, 1, T1, 1, 28, 28);
      cfg_kernel(r, 1, 0, 'h55, 'h44, e1i(r - 1), e1j(r - 1), W1);
      spi(r, 1, 'h02, 4);
      for (int q = 1; q <= 4; q++) cfg_route(r, 1, q - 1, q, 2, r - 1, DIR_E);
    end
    // C2
    for (int q = 1; q <= 4; q++) begin
      cfg_neuron(q, 2, T2, 1, 10, 10);
      for (int k = 0; k < 6; k++) cfg_kernel(q, 2, k, 'h55, 'h44, e2i(q - 1, k), e2j(q - 1, k), W2);
      spi(q, 2, 'h02, 8);
      for (int m = 0; m < 8; m++)
        cfg_route(q, 2, m, c3r[m], c3c[m], q - 1, (c3c[m] == 2) ? DIR_S : DIR_E);
    end
    // C3
    for (int m = 0; m < 8; m++) begin
      cfg_neuron(c3r[m], c3c[m], T3, 0, 1, 1);
      for (int k = 0; k < 4; k++) cfg_kernel(c3r[m], c3c[m], k, 'h55, 'h44, -1, -1, W3);
      spi(c3r[m], c3c[m], 'h02, 4);
      for (int c = 1; c <= 4; c++) cfg_route(c3r[m], c3c[m], c - 1, c, 4, m, DIR_E);
    end
    // C4
    for (int c = 1; c <= 4; c++) begin
      cfg_neuron(c, 4, T4, 0, 1, 1);
      for (int k = 0; k < 8; k++) cfg_kernel(c, 4, k, 'h11, 'h00, -1, -1, w4(c));
      spi(c, 4, 'h02, 1);
      cfg_route(c, 4, 0, c, 5, 0, DIR_E);
    end
  endtask

  // ---------------- count model ----------------
  int hits1[6][28][28];
  int hits2[4][10][10];
  int exp_out[5];

  task automatic model(input int nin, input int xs[], input int ys[]);
    int s2tot, s3, c4in;
    foreach (hits1[a, b, c]) hits1[a][b][c] = 0;
    foreach (hits2[a, b, c]) hits2[a][b][c] = 0;
    for (int n = 0; n < nin; n++) for (int r = 0; r < 6; r++) begin
      int nr, nc;
      nr = xs[n] + e1i(r) - 4; nc = ys[n] + e1j(r) - 4;
      if (nr >= 0 && nc >= 0 && nr < 28 && nc < 28) hits1[r][nr][nc]++;
    end
    for (int r = 0; r < 6; r++) for (int a = 0; a < 28; a++) for (int b = 0; b < 28; b++) begin
      int s; s = hits1[r][a][b] / K1;
      for (int q = 0; q < 4; q++) begin
        int nr, nc;
        nr = (a >> 1) + e2i(q, r) - 4; nc = (b >> 1) + e2j(q, r) - 4;
        if (nr >= 0 && nc >= 0 && nr < 10 && nc < 10) hits2[q][nr][nc] += s;
      end
    end
    s2tot = 0;
    for (int q = 0; q < 4; q++) for (int a = 0; a < 10; a++) for (int b = 0; b < 10; b++)
      s2tot += hits2[q][a][b] / K2;
    s3 = s2tot / K3;               // each C3 node sees every C2 spike
    c4in = 8 * s3;                 // each C4 node sees every C3 spike
    for (int c = 1; c <= 4; c++) exp_out[c] = c4in / k4(c);
    $display("model: C2 spikes %0d, C3 spikes per node %0d, C4 outputs %0d %0d %0d %0d",
             s2tot, s3, exp_out[1], exp_out[2], exp_out[3], exp_out[4]);
  endtask

  task automatic send_event(input int x, input int y);
    @(negedge clk);
    in_valid = 1; in_x = 5'(x); in_y = 5'(y); in_pol = 1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic wait_idle();
    int q; q = 0;
    while (q < 8) begin @(negedge clk); q = busy ? 0 : q + 1; end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NIN = 150;
  initial begin
    int xs[], ys[]; int best; int fan0, in0;
    #1 rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    configure();
    wait_idle();
    $display("configured at %0t", $time);
    // ---------------- phase 1 ----------------
    xs = new[NIN]; ys = new[NIN];
    for (int n = 0; n < NIN; n++) begin xs[n] = 12 + $urandom % 4; ys[n] = 12 + $urandom % 4; end
    model(NIN, xs, ys);
    fan0 = c_fan;
    for (int n = 0; n < NIN; n++) begin
      send_event(xs[n], ys[n]);
      wait_idle();
    end
    chk(c_drop == 0 && c_odrop == 0, $sformatf("phase 1 without FIFO discards (%0d, %0d)", c_drop, c_odrop));
    for (int c = 1; c <= 4; c++)
      chk(n_out[c] == exp_out[c], $sformatf("C4 node %0d: %0d outputs, model %0d", c, n_out[c], exp_out[c]));
    chk(n_bad_hdr == 0, $sformatf("%0d outputs with a wrong header", n_bad_hdr));
    chk(exp_out[4] > 0, "activity reached the output layer");
    chk(c_fan > fan0, "routing table fan-out");
    best = 1;
    for (int c = 2; c <= 4; c++) if (n_out[c] > n_out[best]) best = c;
    $display("phase 1: outputs per class %0d %0d %0d %0d, winner %0d", n_out[1], n_out[2], n_out[3], n_out[4], best);
    // ---------------- phase 2 ----------------
    spi(1, 4, 'h44, 100);                 // refractory period on C4 node (1,4)
    spi(1, 1, 'h42, 1); spi(1, 1, 'h43, 1); // leakage on C1 node (1,1)
    spi(0, 0, 'h10 + 2 * 5, 0);           // splitter copy 6 to row 0: invalid
    in0 = c_in;
    for (int n = 0; n < 120; n++) begin
      @(negedge clk);
      in_valid = 1; in_x = 5'(12 + $urandom % 4); in_y = 5'(12 + $urandom % 4);
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0;
    spi(1, 1, 'h43, 0);                   // leakage off again so the mesh can settle
    wait_idle();
    chk(c_in - in0 == 120, "flood accepted");
    chk(c_supp > 0, "rate saturation held spikes back");
    chk(c_leak > 0, "leakage sweeps");
    chk(c_drop > 0, "input FIFO discards under flood");
    chk(c_disc > 0, "splitter discarded the invalid copy");
    chk(n_bad_hdr == 0, "headers after phase 2");
    $display("mechanisms: fanout=%0d fire=%0d suppress=%0d leak=%0d in_drop=%0d out_drop=%0d split_discard=%0d",
             c_fan, c_fire, c_supp, c_leak, c_drop, c_odrop, c_disc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
