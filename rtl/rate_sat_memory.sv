// Rate-saturation memory: for each neuron, whether it has spiked and the time
// stamp (in leakage-counter ticks) of its last output spike.
//
// The controller compares this time stamp with the current time to enforce
// the refractory period, the minimum time between two output spikes of a
// neuron. One combinational read port and one synchronous write port, one
// word per neuron: {valid, time stamp}. The document names the memory and its
// purpose; storing a time stamp is this design's way of doing it. Time stamps
// are TS_W bits and wrap; a neuron silent for 2**TS_W ticks may be treated as
// recent once. The memory is cleared by the controller's sweep after reset.
module rate_sat_memory #(
  parameter int unsigned N_NEURONS = 784,
  parameter int unsigned TS_W      = 16,
  localparam int unsigned AW       = $clog2(N_NEURONS)
) (
  input  logic            clk,
  input  logic [AW-1:0]   rd_addr,
  output logic            rd_valid,
  output logic [TS_W-1:0] rd_ts,
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  logic            wr_valid,
  input  logic [TS_W-1:0] wr_ts
);
  logic [TS_W:0] mem [N_NEURONS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= {wr_valid, wr_ts};
  end

  assign {rd_valid, rd_ts} = mem[rd_addr];
endmodule
