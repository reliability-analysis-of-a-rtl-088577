// Shared types and constants of the event-driven convolutional SNN mesh.
//
// An event travelling through the mesh carries a destination-driven routing
// header (row and column of the destination node, one byte each, like every
// configuration parameter), the kernel ID to apply at the destination, the
// pixel address (x = row, y = column, 5 bits each for the 32x32 input) and the
// polarity. The header widths follow the 8-bit parameter format; the field
// order and the direction encoding are this design's own.
//
// The configuration index map (one byte per index) is also defined here; it
// is this design's own layout of the parameter groups the node holds:
// router parameters, neuron parameters, kernel parameters and kernel weights.
package snn_pkg;

  localparam int unsigned PIX_W   = 5;   // pixel coordinate width (32x32)
  localparam int unsigned COORD_W = 8;   // mesh coordinate width
  localparam int unsigned KID_W   = 8;   // kernel ID width

  typedef struct packed {
    logic [COORD_W-1:0] dst_row;  // destination node row (1-based)
    logic [COORD_W-1:0] dst_col;  // destination node column (1-based)
    logic [KID_W-1:0]   kid;      // kernel ID at the destination
    logic [PIX_W-1:0]   x;        // pixel row
    logic [PIX_W-1:0]   y;        // pixel column
    logic               pol;      // polarity: 1 = positive, 0 = negative
  } event_t;

  localparam int unsigned EVENT_W = $bits(event_t);

  // Router port / direction numbering.
  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  // One configuration write: parameter index and 8-bit value.
  typedef struct packed {
    logic        en;
    logic [15:0] idx;
    logic [7:0]  data;
  } cfg_wr_t;

  // SPI frame: target {row[3:0], col[3:0]}, index[15:0], value[7:0].
  localparam int unsigned SPI_FRAME_W = 32;
  localparam logic [7:0]  SPLITTER_TARGET = 8'h00;

  // Node configuration index map.
  localparam logic [15:0] CFG_LOCAL_ROW  = 16'h000;
  localparam logic [15:0] CFG_LOCAL_COL  = 16'h001;
  localparam logic [15:0] CFG_N_ROUTES   = 16'h002;
  localparam logic [15:0] CFG_ROUTE_BASE = 16'h010; // + 4*entry + {row,col,kid,dir}
  localparam logic [15:0] CFG_POS_THR    = 16'h040;
  localparam logic [15:0] CFG_NEG_THR    = 16'h041;
  localparam logic [15:0] CFG_LEAK_AMP   = 16'h042;
  localparam logic [15:0] CFG_LEAK_PER   = 16'h043;
  localparam logic [15:0] CFG_REFRACT    = 16'h044;
  localparam logic [15:0] CFG_SUBSAMPLE  = 16'h045;
  localparam logic [15:0] CFG_MAP_ROWS   = 16'h046;
  localparam logic [15:0] CFG_MAP_COLS   = 16'h047;
  localparam logic [15:0] CFG_KPAR_BASE  = 16'h080; // + 2*kernel + {size, shift}
  localparam logic [15:0] CFG_WEIGHT_BASE= 16'h100; // + kernel*KMAX*KMAX + i*KMAX + j

  // Splitter configuration index map.
  localparam logic [15:0] CFG_SPL_N_COPIES = 16'h000;
  localparam logic [15:0] CFG_SPL_BASE     = 16'h010; // + 2*copy + {row,col}

  // Global neuron parameters of a node.
  typedef struct packed {
    logic [7:0] pos_thr;    // positive threshold
    logic [7:0] neg_thr;    // negative threshold magnitude
    logic [7:0] leak_amp;   // leakage pulse amplitude
    logic [7:0] leak_per;   // leakage period in ticks, 0 = no leakage
    logic [7:0] refract;    // refractory period in ticks
    logic [7:0] subsample;  // output address right shift (sub-sampling)
    logic [7:0] map_rows;   // neuron array rows in use
    logic [7:0] map_cols;   // neuron array columns in use
  } neuron_par_t;

endpackage
