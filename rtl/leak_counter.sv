// Leakage counter: the global time base of a convolutional unit.
//
// A prescaler divides the clock by TICK_CYCLES into ticks. Each tick advances
// the time stamp `now` used for the refractory check, and counts towards the
// leakage period: when `leak_per` ticks have passed (leak_per = 0 disables
// leakage), `leak_req` is raised and held until the controller acknowledges
// it with `leak_ack`, starting the next period at that moment. The document
// gives the global counter and the configurable period; the tick length is
// this design's choice.
module leak_counter #(
  parameter int unsigned TICK_CYCLES = 100,
  parameter int unsigned TS_W        = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      leak_per,
  input  logic            leak_ack,
  output logic            leak_req,
  output logic            tick,
  output logic [TS_W-1:0] now
);
  localparam int unsigned PW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;
  logic [PW-1:0] pre;
  logic [7:0]    lcnt;

  assign tick = (pre == PW'(TICK_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre      <= '0;
      now      <= '0;
      lcnt     <= '0;
      leak_req <= 1'b0;
    end else begin
      pre <= tick ? '0 : pre + 1'b1;
      if (tick) now <= now + 1'b1;
      if (leak_ack) begin
        leak_req <= 1'b0;
        lcnt     <= '0;
      end else if (leak_per == 8'd0) begin
        leak_req <= 1'b0;
        lcnt     <= '0;
      end else if (tick && !leak_req) begin
        if (lcnt + 8'd1 >= leak_per) begin
          leak_req <= 1'b1;
          lcnt     <= '0;
        end else begin
          lcnt <= lcnt + 8'd1;
        end
      end
    end
  end
endmodule
