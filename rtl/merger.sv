// Merger: the output stage of the SNN mesh.
//
// Collects the events that leave the mesh through the east ports of the last
// column and forwards them, unchanged, on one output stream. A round-robin
// arbiter picks one waiting input per clock into a registered valid/ready
// output, so it sustains one event per clock. The document gives the function
// (forward the output-layer events without altering them); the arbitration is
// this design's.
module merger #(
  parameter int unsigned N_IN = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid [N_IN],
  input  snn_pkg::event_t in_ev    [N_IN],
  output logic            in_ready [N_IN],
  output logic            out_valid,
  output snn_pkg::event_t out_ev,
  input  logic            out_ready
);
  import snn_pkg::*;

  localparam int unsigned IW = $clog2(N_IN);
  logic [IW-1:0] rr, sel;
  logic          any, load;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int k = N_IN - 1; k >= 0; k--) begin
      int i;
      i = (int'(rr) + k) % N_IN;
      if (in_valid[i]) begin
        any = 1'b1;
        sel = IW'(i);
      end
    end
    load = any && (!out_valid || out_ready);
    for (int i = 0; i < N_IN; i++) in_ready[i] = load && (sel == IW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr        <= '0;
      out_valid <= 1'b0;
      out_ev    <= '0;
    end else begin
      if (load) begin
        out_valid <= 1'b1;
        out_ev    <= in_ev[sel];
        rr        <= (sel == IW'(N_IN - 1)) ? '0 : sel + 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
