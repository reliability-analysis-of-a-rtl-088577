// Top level: a convolutional spiking neural network built as a 2-D mesh of
// identical, configurable convolutional nodes.
//
// MESH_ROWS x MESH_COLS nodes (6 x 4) sit in a grid; node (r, c) has its
// router linked to its immediate neighbours with a bidirectional valid/ready
// link in each direction. Input events (x, y, polarity) enter through the
// splitter, which copies each one to the configured first-layer nodes via the
// west ports of the first column. Events that leave through the east ports of
// the last column are collected by the merger into the single output stream;
// an output event still carries the routing header it had on its last hop,
// so the producing output-layer node can be told from it. Events routed off
// the north, south or west edge of the mesh are dropped there.
//
// All parameters (network connectivity, kernels, thresholds, leakage,
// refractory period, sub-sampling, splitter copies) are written before
// operation through one SPI bus shared by the splitter and every node; each
// frame carries the target position, see snn_pkg. With the configuration of
// the poker-card symbol network, columns 1..4 hold layers C1..C4 (C3 also uses
// positions (5,2), (5,3), (6,2), (6,3); (5,4) and (6,4) only route).
//
// Status outputs are per-node pulses (index (r-1)*MESH_COLS + (c-1)) for
// observing the mechanisms: input-FIFO and output-FIFO discards, neuron
// firing, spikes held back by rate saturation, leakage sweeps and routing
// table fan-out, plus the splitter's discarded copies and an overall busy.
module snn_top #(
  parameter int unsigned MESH_ROWS     = 6,
  parameter int unsigned MESH_COLS     = 4,
  parameter int unsigned NROWS         = 28,
  parameter int unsigned NCOLS         = 28,
  parameter int unsigned N_KERNELS     = 8,
  parameter int unsigned KMAX          = 5,
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter int unsigned TICK_CYCLES   = 100,
  parameter int unsigned N_ROUTES      = 8,
  parameter int unsigned IN_FIFO_DEPTH = 4,
  parameter int unsigned N_COPIES_MAX  = 6,
  localparam int unsigned NN           = MESH_ROWS * MESH_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            spi_sclk,
  input  logic            spi_cs_n,
  input  logic            spi_mosi,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [4:0]      in_x,
  input  logic [4:0]      in_y,
  input  logic            in_pol,
  output logic            out_valid,
  output snn_pkg::event_t out_ev,
  input  logic            out_ready,
  output logic [NN-1:0]   st_in_drop,
  output logic [NN-1:0]   st_out_drop,
  output logic [NN-1:0]   st_fire,
  output logic [NN-1:0]   st_suppress,
  output logic [NN-1:0]   st_leak,
  output logic [NN-1:0]   st_fanout,
  output logic            st_split_discard,
  output logic            busy
);
  import snn_pkg::*;

  // mesh port indices (snn_pkg::dir_e values)
  localparam int PN = 0, PE = 1, PS = 2, PW = 3;

  // per node, per port
  logic   n_in_valid  [MESH_ROWS][MESH_COLS][4];
  event_t n_in_ev     [MESH_ROWS][MESH_COLS][4];
  logic   n_in_ready  [MESH_ROWS][MESH_COLS][4];
  logic   n_out_valid [MESH_ROWS][MESH_COLS][4];
  event_t n_out_ev    [MESH_ROWS][MESH_COLS][4];
  logic   n_out_ready [MESH_ROWS][MESH_COLS][4];
  logic   n_busy      [MESH_ROWS][MESH_COLS];

  logic   s_valid [MESH_ROWS];
  event_t s_ev    [MESH_ROWS];
  logic   s_ready [MESH_ROWS];
  logic   m_valid [MESH_ROWS];
  event_t m_ev    [MESH_ROWS];
  logic   m_ready [MESH_ROWS];
  logic   unused_copy;

  splitter #(.N_COPIES_MAX(N_COPIES_MAX), .N_ROWS(MESH_ROWS)) u_splitter (
    .clk, .rst_n, .spi_sclk, .spi_cs_n, .spi_mosi,
    .in_valid, .in_ready, .in_x, .in_y, .in_pol,
    .out_valid(s_valid), .out_ev(s_ev), .out_ready(s_ready),
    .st_copy(unused_copy), .st_discard(st_split_discard));

  merger #(.N_IN(MESH_ROWS)) u_merger (
    .clk, .rst_n, .in_valid(m_valid), .in_ev(m_ev), .in_ready(m_ready),
    .out_valid, .out_ev, .out_ready);

  for (genvar r = 0; r < MESH_ROWS; r++) begin : g_row
    for (genvar c = 0; c < MESH_COLS; c++) begin : g_col
      localparam int unsigned ID = r * MESH_COLS + c;

      // north input / output
      if (r > 0) begin : g_n
        assign n_in_valid[r][c][PN]  = n_out_valid[r-1][c][PS];
        assign n_in_ev[r][c][PN]     = n_out_ev[r-1][c][PS];
        assign n_out_ready[r][c][PN] = n_in_ready[r-1][c][PS];
      end else begin : g_n_edge
        assign n_in_valid[r][c][PN]  = 1'b0;
        assign n_in_ev[r][c][PN]     = '0;
        assign n_out_ready[r][c][PN] = 1'b1;
      end
      // south
      if (r < MESH_ROWS - 1) begin : g_s
        assign n_in_valid[r][c][PS]  = n_out_valid[r+1][c][PN];
        assign n_in_ev[r][c][PS]     = n_out_ev[r+1][c][PN];
        assign n_out_ready[r][c][PS] = n_in_ready[r+1][c][PN];
      end else begin : g_s_edge
        assign n_in_valid[r][c][PS]  = 1'b0;
        assign n_in_ev[r][c][PS]     = '0;
        assign n_out_ready[r][c][PS] = 1'b1;
      end
      // west: splitter on the first column
      if (c > 0) begin : g_w
        assign n_in_valid[r][c][PW]  = n_out_valid[r][c-1][PE];
        assign n_in_ev[r][c][PW]     = n_out_ev[r][c-1][PE];
        assign n_out_ready[r][c][PW] = n_in_ready[r][c-1][PE];
      end else begin : g_w_edge
        assign n_in_valid[r][c][PW]  = s_valid[r];
        assign n_in_ev[r][c][PW]     = s_ev[r];
        assign s_ready[r]               = n_in_ready[r][c][PW];
        assign n_out_ready[r][c][PW] = 1'b1;
      end
      // east: merger after the last column
      if (c < MESH_COLS - 1) begin : g_e
        assign n_in_valid[r][c][PE]  = n_out_valid[r][c+1][PW];
        assign n_in_ev[r][c][PE]     = n_out_ev[r][c+1][PW];
        assign n_out_ready[r][c][PE] = n_in_ready[r][c+1][PW];
      end else begin : g_e_edge
        assign n_in_valid[r][c][PE]  = 1'b0;
        assign n_in_ev[r][c][PE]     = '0;
        assign m_valid[r]               = n_out_valid[r][c][PE];
        assign m_ev[r]                  = n_out_ev[r][c][PE];
        assign n_out_ready[r][c][PE] = m_ready[r];
      end

      conv_node #(
        .PHYS_ROW(r + 1), .PHYS_COL(c + 1), .NROWS(NROWS), .NCOLS(NCOLS),
        .N_KERNELS(N_KERNELS), .KMAX(KMAX), .FIFO_DEPTH(FIFO_DEPTH),
        .TICK_CYCLES(TICK_CYCLES), .N_ROUTES(N_ROUTES), .IN_FIFO_DEPTH(IN_FIFO_DEPTH)
      ) u_node (
        .clk, .rst_n, .spi_sclk, .spi_cs_n, .spi_mosi,
        .in_valid(n_in_valid[r][c]), .in_ev(n_in_ev[r][c]), .in_ready(n_in_ready[r][c]),
        .out_valid(n_out_valid[r][c]), .out_ev(n_out_ev[r][c]), .out_ready(n_out_ready[r][c]),
        .st_in_drop(st_in_drop[ID]), .st_out_drop(st_out_drop[ID]), .st_fire(st_fire[ID]),
        .st_suppress(st_suppress[ID]), .st_leak(st_leak[ID]), .st_fanout(st_fanout[ID]),
        .busy(n_busy[r][c]));
    end
  end

  always_comb begin
    busy = in_valid || out_valid;
    for (int r = 0; r < MESH_ROWS; r++)
      for (int c = 0; c < MESH_COLS; c++)
        if (n_busy[r][c]) busy = 1'b1;
  end
endmodule
