// Convolutional unit of a node: the event-driven convolution engine.
//
// Events addressed to this node arrive from the router as write strobes into
// the input FIFO (discarded while it is full). The controller takes them one
// at a time and convolves each with the kernel its kernel ID selects: every
// neuron the kernel covers integrates the weight and is compared with the
// positive and negative thresholds. A neuron that reaches a threshold, and is
// outside its refractory period (rate saturation), writes an output event
// (sub-sampled address and polarity) into the output FIFO, again discarded
// while full; the router reads the output FIFO. The leakage counter triggers
// a global leak of all neurons towards 0 every leakage period.
// Output events carry only x, y and polarity: their header fields
// (destination row/column and kernel ID) are constant 0 here and are filled
// in by the router from its routing table.
//
// Blocks, as in the document's figure of the unit: input FIFO, output FIFO,
// controller (with the neuron array walk, the leakage counter and the address
// calculation), kernel memory (weights and kernel parameters), neuron memory
// and rate-saturation memory. The neuron parameters (thresholds, leakage
// amplitude and period, refractory period; plus this design's sub-sampling
// shift and map size) are registers global to the unit. The SPI slave of the
// figure sits in the node, next to the configuration block that feeds this
// unit's parameter write ports.
//
// Timing: see conv_controller (1 + R*C clocks per event for an R x C kernel).
module conv_unit #(
  parameter int unsigned NROWS       = 28,
  parameter int unsigned NCOLS       = 28,
  parameter int unsigned N_KERNELS   = 8,
  parameter int unsigned KMAX        = 5,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned TICK_CYCLES = 100,
  localparam int unsigned POT_W      = 16,
  localparam int unsigned TS_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  snn_pkg::cfg_wr_t np_wr,
  input  snn_pkg::cfg_wr_t kp_wr,
  input  snn_pkg::cfg_wr_t kw_wr,
  // from router
  input  logic             in_wr,
  input  snn_pkg::event_t  in_ev,
  // to router
  output snn_pkg::event_t  out_ev,
  output logic             out_empty,
  input  logic             out_pop,
  // status
  output logic             st_in_drop,
  output logic             st_out_drop,
  output logic             st_fire,
  output logic             st_suppress,
  output logic             st_leak,
  output logic             busy
);
  import snn_pkg::*;

  localparam int unsigned N_NEURONS = NROWS * NCOLS;
  localparam int unsigned AW   = $clog2(N_NEURONS);
  localparam int unsigned WA_W = $clog2(N_KERNELS * KMAX * KMAX);
  localparam int unsigned KA_W = (N_KERNELS > 1) ? $clog2(N_KERNELS) : 1;
  localparam int unsigned CW   = $clog2(FIFO_DEPTH + 1);

  // neuron parameters, global to the unit
  neuron_par_t np;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      np <= '{pos_thr: 8'hFF, neg_thr: 8'hFF, leak_amp: '0, leak_per: '0, refract: '0,
              subsample: '0, map_rows: 8'(NROWS), map_cols: 8'(NCOLS)};
    end else if (np_wr.en) begin
      unique case (np_wr.idx[2:0])
        3'd0: np.pos_thr   <= np_wr.data;
        3'd1: np.neg_thr   <= np_wr.data;
        3'd2: np.leak_amp  <= np_wr.data;
        3'd3: np.leak_per  <= np_wr.data;
        3'd4: np.refract   <= np_wr.data;
        3'd5: np.subsample <= np_wr.data;
        3'd6: np.map_rows  <= np_wr.data;
        3'd7: np.map_cols  <= np_wr.data;
        default: ;
      endcase
    end
  end

  // input FIFO
  event_t        if_head;
  logic          if_empty, if_full, if_pop;
  logic [CW-1:0] if_cnt;
  event_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(EVENT_W)) u_in_fifo (
    .clk, .rst_n, .wr_en(in_wr), .wr_data(in_ev), .rd_en(if_pop), .rd_data(if_head),
    .empty(if_empty), .full(if_full), .drop(st_in_drop), .count(if_cnt));

  // output FIFO
  event_t        of_wr_ev;
  logic          of_wr, of_full;
  logic [CW-1:0] of_cnt;
  event_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(EVENT_W)) u_out_fifo (
    .clk, .rst_n, .wr_en(of_wr), .wr_data(of_wr_ev), .rd_en(out_pop), .rd_data(out_ev),
    .empty(out_empty), .full(of_full), .drop(st_out_drop), .count(of_cnt));

  // kernel memory
  logic [KA_W-1:0]   k_kid;
  logic [7:0]        k_size, k_shift;
  logic [WA_W-1:0]   k_waddr;
  logic signed [7:0] k_weight;
  kernel_memory #(.N_KERNELS(N_KERNELS), .KMAX(KMAX)) u_kmem (
    .clk, .rst_n, .kp_wr, .kw_wr, .rd_kid(k_kid), .rd_size(k_size), .rd_shift(k_shift),
    .rd_waddr(k_waddr), .rd_weight(k_weight));

  // neuron memory
  logic [AW-1:0]           n_rd_addr, n_wr_addr;
  logic signed [POT_W-1:0] n_rd_data, n_wr_data;
  logic                    n_wr_en;
  neuron_memory #(.N_NEURONS(N_NEURONS), .POT_W(POT_W)) u_nmem (
    .clk, .rd_addr(n_rd_addr), .rd_data(n_rd_data), .wr_en(n_wr_en), .wr_addr(n_wr_addr),
    .wr_data(n_wr_data));

  // rate-saturation memory
  logic [AW-1:0]   r_rd_addr, r_wr_addr;
  logic            r_rd_valid, r_wr_en, r_wr_valid;
  logic [TS_W-1:0] r_rd_ts, r_wr_ts;
  rate_sat_memory #(.N_NEURONS(N_NEURONS), .TS_W(TS_W)) u_rmem (
    .clk, .rd_addr(r_rd_addr), .rd_valid(r_rd_valid), .rd_ts(r_rd_ts), .wr_en(r_wr_en),
    .wr_addr(r_wr_addr), .wr_valid(r_wr_valid), .wr_ts(r_wr_ts));

  // leakage counter
  logic            leak_req, leak_ack, tick;
  logic [TS_W-1:0] now;
  leak_counter #(.TICK_CYCLES(TICK_CYCLES), .TS_W(TS_W)) u_leak (
    .clk, .rst_n, .leak_per(np.leak_per), .leak_ack, .leak_req, .tick, .now);
  assign st_leak = leak_ack;

  conv_controller #(.NROWS(NROWS), .NCOLS(NCOLS), .N_KERNELS(N_KERNELS), .KMAX(KMAX),
                    .POT_W(POT_W), .TS_W(TS_W)) u_ctrl (
    .clk, .rst_n,
    .in_ev(if_head), .in_empty(if_empty), .in_pop(if_pop),
    .np,
    .k_kid, .k_size, .k_shift, .k_waddr, .k_weight,
    .n_rd_addr, .n_rd_data, .n_wr_en, .n_wr_addr, .n_wr_data,
    .r_rd_addr, .r_rd_valid, .r_rd_ts, .r_wr_en, .r_wr_addr, .r_wr_valid, .r_wr_ts,
    .leak_req, .leak_ack, .now,
    .out_wr(of_wr), .out_ev(of_wr_ev),
    .st_fire, .st_suppress, .busy(busy));
endmodule
