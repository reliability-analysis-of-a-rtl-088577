// Self-checking testbench for router.
// The router at local address (3,2) gets random transit events on its four
// mesh inputs and output events from a modelled local unit FIFO, while its
// mesh outputs see random back-pressure. Every transit event must leave on
// the dimension-order port (or the local port) unchanged; every local event
// must leave once per routing-table entry, stamped with that entry's
// address and kernel ID, on the entry's port; a table entry with an invalid
// direction is skipped. Per input/output pair the order must be kept.
module tb_router;
  import snn_pkg::*;
  logic clk = 0, rst_n = 1;
  cfg_wr_t rt_wr = '0;
  logic in_valid[4], in_ready[4], out_valid[4], out_ready[4];
  event_t in_ev[4], out_ev[4];
  event_t loc_ev; logic loc_empty, loc_pop, cu_wr, st_fanout, idle;
  event_t cu_ev;
  int checks = 0, failures = 0, fanouts = 0, stalls = 0;

  router #(.N_ROUTES(8), .IN_FIFO_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  event_t locq[$];
  event_t expq[5][5][$];      // [src][dst port]
  int n_seen[5];
  logic [7:0] tr[5][4];       // table: row, col, kid, dir
  assign loc_empty = (locq.size() == 0);
  assign loc_ev = loc_empty ? '0 : locq[0];

  function automatic int xy(input event_t e);
    if (e.dst_col > 2) return 1;
    if (e.dst_col < 2) return 3;
    if (e.dst_row > 3) return 2;
    if (e.dst_row < 3) return 0;
    return 4;
  endfunction

  task automatic match(input int port, input event_t e);
    bit found; found = 0;
    for (int s = 0; s < 5 && !found; s++)
      if (expq[s][port].size() > 0 && expq[s][port][0] == e) begin
        void'(expq[s][port].pop_front());
        found = 1;
      end
    checks++;
    n_seen[port]++;
    if (!found) begin failures++; $display("FAIL: unexpected on port %0d: %p", port, e); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) begin
      if (out_valid[p] && out_ready[p]) match(p, out_ev[p]);
      if (out_valid[p] && !out_ready[p]) stalls++;
      if (in_valid[p] && in_ready[p]) begin
        int d; d = xy(in_ev[p]);
        expq[p][d].push_back(in_ev[p]);
      end
    end
    if (cu_wr) match(4, cu_ev);
    if (st_fanout) fanouts++;
    if (loc_pop) void'(locq.pop_front());
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input int idx, input int v);
    @(negedge clk); rt_wr = '{en: 1'b1, idx: 16'(idx), data: 8'(v)}; @(negedge clk); rt_wr = '0;
  endtask

  function automatic event_t rnd_ev();
    return '{dst_row: 8'(1 + $urandom % 5), dst_col: 8'(1 + $urandom % 4), kid: 8'($urandom % 8),
             x: 5'($urandom), y: 5'($urandom), pol: 1'($urandom)};
  endfunction

  initial begin
    for (int p = 0; p < 4; p++) begin in_valid[p] = 0; in_ev[p] = '0; out_ready[p] = 1; end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg(0, 3); cfg(1, 2); cfg(2, 5);
    // entries: four real destinations in all directions, one invalid direction
    tr[0] = '{8'd1, 8'd3, 8'd0, 8'd1};
    tr[1] = '{8'd4, 8'd3, 8'd1, 8'd2};
    tr[2] = '{8'd3, 8'd2, 8'd2, 8'd4};
    tr[3] = '{8'd9, 8'd9, 8'd3, 8'd7};
    tr[4] = '{8'd2, 8'd1, 8'd4, 8'd0};
    for (int e = 0; e < 5; e++) for (int f = 0; f < 4; f++) cfg(16 + 4 * e + f, tr[e][f]);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        if (!in_valid[p] || in_ready[p]) begin
          in_valid[p] = ($urandom % 100) < 35;
          in_ev[p] = rnd_ev();
        end
        out_ready[p] = ($urandom % 100) < 70;
      end
      if ($urandom % 100 < 15 && locq.size() < 8) begin
        event_t le;
        le = rnd_ev();
        locq.push_back(le);
        for (int e = 0; e < 5; e++)
          if (tr[e][3] <= 4)
            expq[4][tr[e][3]].push_back('{dst_row: tr[e][0], dst_col: tr[e][1], kid: tr[e][2],
                                           x: le.x, y: le.y, pol: le.pol});
      end
    end
    @(negedge clk);
    for (int p = 0; p < 4; p++) begin in_valid[p] = 0; out_ready[p] = 1; end
    repeat (200) @(negedge clk);
    for (int s = 0; s < 5; s++) for (int d = 0; d < 5; d++) begin
      checks++;
      if (expq[s][d].size() != 0) begin failures++; $display("FAIL: %0d events from %0d to %0d lost", expq[s][d].size(), s, d); end
    end
    checks++; if (!idle) failures++;
    for (int d = 0; d < 5; d++) begin checks++; if (n_seen[d] == 0) begin failures++; $display("FAIL: port %0d unused", d); end end
    checks++; if (fanouts == 0 || stalls == 0) failures++;
    $display("fanouts=%0d stalls=%0d", fanouts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
