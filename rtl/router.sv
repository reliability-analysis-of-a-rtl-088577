// Router of a convolutional node: destination-driven event routing in the
// 2-D mesh.
//
// Five inputs (north, east, south, west mesh ports and the local
// convolutional unit) and five outputs (the four mesh ports and the local
// unit). Every event carries the mesh row and column of its destination node.
//  * Transit events, queued in a small FIFO per mesh input, go towards their
//    destination by dimension-order routing on the configured local address:
//    first along the row (east/west) until the column matches, then along the
//    column (north/south); an event whose destination equals the local address
//    is delivered to the local convolutional unit.
//  * Events produced by the local unit are fanned out through the routing
//    table: one copy per table entry, each stamped with the entry's
//    destination row, column and kernel ID and sent out of the entry's
//    direction. The unit's output FIFO is popped after the last copy. With no
//    entries the event is dropped; a copy whose direction code is not a port
//    is skipped.
// Each output has its own round-robin arbiter over the inputs that want it.
// Mesh outputs are registered, valid/ready; the local output is a write
// strobe into the unit's input FIFO, which drops events when full.
// Throughput: one event per output per clock.
//
// Configuration (router parameters, byte index): 0 local row, 1 local column,
// 2 number of table entries, 0x10 + 4*e + {0 row, 1 column, 2 kernel ID,
// 3 direction} for entry e; direction codes are snn_pkg::dir_e.
// The document gives destination-driven addressing, the routing table with
// next-layer addresses, directions and kernel IDs, and the configurable local
// address; the dimension-order rule for transit events, the arbitration and
// the handshake are this design's.
module router #(
  parameter int unsigned N_ROUTES      = 8,
  parameter int unsigned IN_FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  snn_pkg::cfg_wr_t rt_wr,
  // mesh ports, index = snn_pkg::dir_e (N, E, S, W)
  input  logic                in_valid [4],
  input  snn_pkg::event_t     in_ev    [4],
  output logic                in_ready [4],
  output logic                out_valid[4],
  output snn_pkg::event_t     out_ev   [4],
  input  logic                out_ready[4],
  // local convolutional unit
  input  snn_pkg::event_t     loc_ev,
  input  logic                loc_empty,
  output logic                loc_pop,
  output logic                cu_wr,
  output snn_pkg::event_t     cu_ev,
  // status
  output logic                st_fanout,     // one table copy sent this clock
  output logic                idle           // no event queued or held
);
  import snn_pkg::*;

  localparam int unsigned NI = 5;
  localparam int unsigned RI_W = $clog2(N_ROUTES);
  localparam int unsigned TA_W = $clog2(N_ROUTES * 4);

  // ---------------- routing table ----------------
  logic [7:0] local_row, local_col, n_routes;
  logic [7:0] tbl [N_ROUTES*4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      local_row <= '0;
      local_col <= '0;
      n_routes  <= '0;
    end else if (rt_wr.en) begin
      if (rt_wr.idx == CFG_LOCAL_ROW) local_row <= rt_wr.data;
      if (rt_wr.idx == CFG_LOCAL_COL) local_col <= rt_wr.data;
      if (rt_wr.idx == CFG_N_ROUTES)  n_routes  <= rt_wr.data;
    end
  end

  always_ff @(posedge clk) begin
    if (rt_wr.en && rt_wr.idx >= CFG_ROUTE_BASE && rt_wr.idx < CFG_ROUTE_BASE + 16'(4 * N_ROUTES))
      tbl[TA_W'(rt_wr.idx - CFG_ROUTE_BASE)] <= rt_wr.data;
  end

  // ---------------- mesh input FIFOs ----------------
  logic   f_empty [4];
  logic   f_full  [4];
  logic   f_pop   [4];
  event_t f_head  [4];

  for (genvar p = 0; p < 4; p++) begin : g_in
    logic unused_drop;
    logic [$clog2(IN_FIFO_DEPTH+1)-1:0] unused_cnt;
    event_fifo #(.DEPTH(IN_FIFO_DEPTH), .WIDTH(EVENT_W)) u_fifo (
      .clk, .rst_n,
      .wr_en(in_valid[p] && !f_full[p]), .wr_data(in_ev[p]),
      .rd_en(f_pop[p]), .rd_data(f_head[p]),
      .empty(f_empty[p]), .full(f_full[p]), .drop(unused_drop), .count(unused_cnt));
    assign in_ready[p] = !f_full[p];
  end

  function automatic logic [2:0] xy_dir(input event_t e, input logic [7:0] lr, input logic [7:0] lc);
    if (e.dst_col > lc)      return DIR_E;
    else if (e.dst_col < lc) return DIR_W;
    else if (e.dst_row > lr) return DIR_S;
    else if (e.dst_row < lr) return DIR_N;
    else                     return DIR_L;
  endfunction

  // ---------------- local fan-out ----------------
  logic [RI_W-1:0] rt_idx;
  logic [7:0]      n_eff;
  logic [7:0]      e_row, e_col, e_kid, e_dir;
  logic            loc_last, loc_skip;

  assign n_eff    = (n_routes > 8'(N_ROUTES)) ? 8'(N_ROUTES) : n_routes;
  assign e_row    = tbl[{rt_idx, 2'd0}];
  assign e_col    = tbl[{rt_idx, 2'd1}];
  assign e_kid    = tbl[{rt_idx, 2'd2}];
  assign e_dir    = tbl[{rt_idx, 2'd3}];
  assign loc_last = (8'(rt_idx) + 8'd1 >= n_eff);
  assign loc_skip = !loc_empty && (n_eff == 0 || e_dir > 8'(DIR_L));

  // ---------------- requests ----------------
  logic   rq_v   [NI];
  logic [2:0] rq_d [NI];
  event_t rq_ev  [NI];

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      rq_v[p]  = !f_empty[p];
      rq_d[p]  = xy_dir(f_head[p], local_row, local_col);
      rq_ev[p] = f_head[p];
    end
    rq_v[4]  = !loc_empty && !loc_skip;
    rq_d[4]  = e_dir[2:0];
    rq_ev[4] = '{dst_row: e_row, dst_col: e_col, kid: e_kid, x: loc_ev.x, y: loc_ev.y, pol: loc_ev.pol};
  end

  always_comb begin
    idle = 1'b1;
    for (int p = 0; p < 4; p++) if (!f_empty[p] || out_valid[p]) idle = 1'b0;
  end

  // ---------------- arbitration ----------------
  logic [2:0] rr    [NI];
  logic       avail [NI];
  logic       gnt_v [NI];
  logic [2:0] gnt_i [NI];
  logic       granted [NI];

  always_comb begin
    for (int o = 0; o < NI; o++) begin
      avail[o] = (o == 4) ? 1'b1 : (!out_valid[o] || out_ready[o]);
      gnt_v[o] = 1'b0;
      gnt_i[o] = '0;
      for (int k = NI - 1; k >= 0; k--) begin
        int i;
        i = (int'(rr[o]) + k) % NI;
        if (avail[o] && rq_v[i] && rq_d[i] == 3'(o)) begin
          gnt_v[o] = 1'b1;
          gnt_i[o] = 3'(i);
        end
      end
    end
    for (int i = 0; i < NI; i++) granted[i] = 1'b0;
    for (int o = 0; o < NI; o++) if (gnt_v[o]) granted[gnt_i[o]] = 1'b1;
    for (int p = 0; p < 4; p++) f_pop[p] = granted[p];
    loc_pop     = (granted[4] || loc_skip) && (loc_last || n_eff == 0);
    st_fanout   = granted[4];
    cu_wr       = gnt_v[4];
    cu_ev       = rq_ev[gnt_i[4]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_idx <= '0;
      for (int o = 0; o < NI; o++) rr[o] <= '0;
      for (int o = 0; o < 4; o++) begin
        out_valid[o] <= 1'b0;
        out_ev[o]    <= '0;
      end
    end else begin
      if (granted[4] || loc_skip) rt_idx <= (loc_last || n_eff == 0) ? '0 : rt_idx + 1'b1;
      for (int o = 0; o < NI; o++)
        if (gnt_v[o]) rr[o] <= (gnt_i[o] == 3'(NI - 1)) ? 3'd0 : gnt_i[o] + 3'd1;
      for (int o = 0; o < 4; o++) begin
        if (gnt_v[o]) begin
          out_valid[o] <= 1'b1;
          out_ev[o]    <= rq_ev[gnt_i[o]];
        end else if (out_ready[o]) begin
          out_valid[o] <= 1'b0;
        end
      end
    end
  end
endmodule
