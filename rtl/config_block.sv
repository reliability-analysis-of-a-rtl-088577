// Configuration block of a convolutional node.
//
// Takes the frames received by the node's SPI slave, keeps those addressed to
// this node (target byte equal to the node's fixed mesh position, row in the
// high nibble and column in the low nibble) and sorts each parameter by its
// index into one of the node's parameter stores, as the document describes:
// router parameters (local address, routing table), neuron parameters
// (thresholds, leakage, refractory period, plus this design's sub-sampling
// shift and map size), kernel parameters (size, center shift) and kernel
// weights. Each output is a one-cycle write strobe with a region-local
// address and the byte value, one clock after `frame_valid`. Indices outside
// every region are ignored. The index map itself (snn_pkg) is this design's.
module config_block #(
  parameter int unsigned PHYS_ROW  = 1,
  parameter int unsigned PHYS_COL  = 1,
  parameter int unsigned N_KERNELS = 8,
  parameter int unsigned KMAX      = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_valid,
  input  logic [31:0] frame,
  output snn_pkg::cfg_wr_t rt_wr,    // router: idx 0x000..0x03F
  output snn_pkg::cfg_wr_t np_wr,    // neuron parameters: idx 0..7
  output snn_pkg::cfg_wr_t kp_wr,    // kernel parameters: idx 2*k + {0 size,1 shift}
  output snn_pkg::cfg_wr_t kw_wr     // kernel weights: idx k*KMAX*KMAX + i*KMAX + j
);
  import snn_pkg::*;

  localparam int unsigned N_WEIGHTS = N_KERNELS * KMAX * KMAX;
  localparam logic [7:0] MY_TARGET = {PHYS_ROW[3:0], PHYS_COL[3:0]};

  logic [7:0]  tgt;
  logic [15:0] idx;
  logic [7:0]  val;
  logic        mine;

  assign tgt  = frame[31:24];
  assign idx  = frame[23:8];
  assign val  = frame[7:0];
  assign mine = frame_valid && (tgt == MY_TARGET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_wr <= '0;
      np_wr <= '0;
      kp_wr <= '0;
      kw_wr <= '0;
    end else begin
      rt_wr <= '0;
      np_wr <= '0;
      kp_wr <= '0;
      kw_wr <= '0;
      if (mine) begin
        if (idx < CFG_POS_THR) begin
          rt_wr <= '{en: 1'b1, idx: idx, data: val};
        end else if (idx < CFG_POS_THR + 16'd8) begin
          np_wr <= '{en: 1'b1, idx: idx - CFG_POS_THR, data: val};
        end else if (idx >= CFG_KPAR_BASE && idx < CFG_KPAR_BASE + 16'(2 * N_KERNELS)) begin
          kp_wr <= '{en: 1'b1, idx: idx - CFG_KPAR_BASE, data: val};
        end else if (idx >= CFG_WEIGHT_BASE && idx < CFG_WEIGHT_BASE + 16'(N_WEIGHTS)) begin
          kw_wr <= '{en: 1'b1, idx: idx - CFG_WEIGHT_BASE, data: val};
        end
      end
    end
  end
endmodule
