// Neuron memory: the membrane potential of every neuron (pixel) of the
// convolutional unit's neuron array.
//
// N_NEURONS signed words of POT_W bits with one combinational read port and
// one synchronous write port, so the controller can read, integrate and write
// back one neuron per clock. The document names the memory; its word width
// is this design's choice (16 bits, far more than the 8-bit thresholds need).
// The memory is not reset: the controller clears it with a sweep after reset.
module neuron_memory #(
  parameter int unsigned N_NEURONS = 784,
  parameter int unsigned POT_W     = 16,
  localparam int unsigned AW       = $clog2(N_NEURONS)
) (
  input  logic                    clk,
  input  logic [AW-1:0]           rd_addr,
  output logic signed [POT_W-1:0] rd_data,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic signed [POT_W-1:0] wr_data
);
  logic signed [POT_W-1:0] mem [N_NEURONS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
