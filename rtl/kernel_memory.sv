// Kernel memory of the convolutional unit: kernel weights and kernel
// parameters.
//
// Holds N_KERNELS kernels of up to KMAX x KMAX signed 8-bit weights, stored
// at k*KMAX*KMAX + i*KMAX + j, and two parameter bytes per kernel: the size
// (rows in bits 7:4, columns in bits 3:0) and the center shift (row shift in
// bits 7:4, column shift in bits 3:0). Both are written one byte at a time by
// the configuration block and read combinationally by the controller. The two
// parameter kinds and the 8-bit format follow the document; the nibble
// packing and the reset to zero (size 0 = kernel unused) are this design's.
module kernel_memory #(
  parameter int unsigned N_KERNELS = 8,
  parameter int unsigned KMAX      = 5,
  localparam int unsigned N_WEIGHTS = N_KERNELS * KMAX * KMAX,
  localparam int unsigned WA_W      = $clog2(N_WEIGHTS),
  localparam int unsigned KA_W      = (N_KERNELS > 1) ? $clog2(N_KERNELS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  snn_pkg::cfg_wr_t kp_wr,
  input  snn_pkg::cfg_wr_t kw_wr,
  input  logic [KA_W-1:0]  rd_kid,
  output logic [7:0]       rd_size,
  output logic [7:0]       rd_shift,
  input  logic [WA_W-1:0]  rd_waddr,
  output logic signed [7:0] rd_weight
);
  logic [7:0] weights [N_WEIGHTS];
  logic [7:0] ksize   [N_KERNELS];
  logic [7:0] kshift  [N_KERNELS];

  always_ff @(posedge clk) begin
    if (kw_wr.en) weights[kw_wr.idx[WA_W-1:0]] <= kw_wr.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_KERNELS; k++) begin
        ksize[k]  <= '0;
        kshift[k] <= '0;
      end
    end else if (kp_wr.en) begin
      if (kp_wr.idx[0]) kshift[kp_wr.idx[KA_W:1]] <= kp_wr.data;
      else              ksize [kp_wr.idx[KA_W:1]] <= kp_wr.data;
    end
  end

  assign rd_size   = ksize[rd_kid];
  assign rd_shift  = kshift[rd_kid];
  assign rd_weight = signed'(weights[rd_waddr]);
endmodule
