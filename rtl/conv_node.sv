// Convolutional node: the generic building block of the SNN mesh.
//
// A node joins three blocks, as the document's figure of the node shows: a
// convolutional unit, a configuration block and a router with four
// bidirectional ports to its north, east, south and west neighbours. Events
// for this node arrive through the router and are convolved by the unit; the
// unit's output events go back to the router, which multicasts them to the
// next-layer nodes in its routing table. An SPI slave receives configuration
// frames on the bus shared by all nodes; the configuration block keeps those
// whose target byte matches this node's fixed position (PHYS_ROW, PHYS_COL)
// and writes each value into the router, neuron, kernel-parameter or weight
// storage. Mesh ports use valid/ready, indexed by snn_pkg::dir_e (N, E, S, W).
module conv_node #(
  parameter int unsigned PHYS_ROW      = 1,
  parameter int unsigned PHYS_COL      = 1,
  parameter int unsigned NROWS         = 28,
  parameter int unsigned NCOLS         = 28,
  parameter int unsigned N_KERNELS     = 8,
  parameter int unsigned KMAX          = 5,
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter int unsigned TICK_CYCLES   = 100,
  parameter int unsigned N_ROUTES      = 8,
  parameter int unsigned IN_FIFO_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            spi_sclk,
  input  logic            spi_cs_n,
  input  logic            spi_mosi,
  input  logic            in_valid [4],
  input  snn_pkg::event_t in_ev    [4],
  output logic            in_ready [4],
  output logic            out_valid[4],
  output snn_pkg::event_t out_ev   [4],
  input  logic            out_ready[4],
  // status pulses / levels
  output logic            st_in_drop,
  output logic            st_out_drop,
  output logic            st_fire,
  output logic            st_suppress,
  output logic            st_leak,
  output logic            st_fanout,
  output logic            busy
);
  import snn_pkg::*;

  logic        frame_valid;
  logic [31:0] frame;
  cfg_wr_t     rt_wr, np_wr, kp_wr, kw_wr;

  spi_slave #(.FRAME_W(SPI_FRAME_W)) u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .frame_valid, .frame);

  config_block #(.PHYS_ROW(PHYS_ROW), .PHYS_COL(PHYS_COL), .N_KERNELS(N_KERNELS), .KMAX(KMAX)) u_cfg (
    .clk, .rst_n, .frame_valid, .frame, .rt_wr, .np_wr, .kp_wr, .kw_wr);

  event_t cu_in_ev, cu_out_ev;
  logic   cu_in_wr, cu_out_empty, cu_out_pop, cu_busy, rt_idle;

  conv_unit #(.NROWS(NROWS), .NCOLS(NCOLS), .N_KERNELS(N_KERNELS), .KMAX(KMAX),
              .FIFO_DEPTH(FIFO_DEPTH), .TICK_CYCLES(TICK_CYCLES)) u_cu (
    .clk, .rst_n, .np_wr, .kp_wr, .kw_wr,
    .in_wr(cu_in_wr), .in_ev(cu_in_ev),
    .out_ev(cu_out_ev), .out_empty(cu_out_empty), .out_pop(cu_out_pop),
    .st_in_drop, .st_out_drop, .st_fire, .st_suppress, .st_leak, .busy(cu_busy));

  router #(.N_ROUTES(N_ROUTES), .IN_FIFO_DEPTH(IN_FIFO_DEPTH)) u_rt (
    .clk, .rst_n, .rt_wr,
    .in_valid, .in_ev, .in_ready, .out_valid, .out_ev, .out_ready,
    .loc_ev(cu_out_ev), .loc_empty(cu_out_empty), .loc_pop(cu_out_pop),
    .cu_wr(cu_in_wr), .cu_ev(cu_in_ev), .st_fanout, .idle(rt_idle));

  assign busy = cu_busy || !cu_out_empty || !rt_idle;
endmodule
