// Event FIFO register, used as the input and output FIFO of the convolutional
// unit and as the port buffers of the router.
//
// A circular buffer of DEPTH entries. A write while the FIFO is full is not
// stored: the event is discarded and `drop` pulses for that cycle, which is
// how the document describes traffic control (incoming events are thrown away
// until there is room again). `full` doubles as the "register full" signal and
// `!full` as a ready for link handshakes. Reads are first-word-fall-through:
// `rd_data` shows the head while `empty` is low, and `rd_en` pops it.
// A write and a read in the same cycle on a full FIFO: the read frees the slot
// first, so the write is kept. DEPTH and the reset (empty) are this design's
// choices; the document gives no FIFO depth.
module event_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = snn_pkg::EVENT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             drop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_rd, do_wr;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign drop    = wr_en && !do_wr;
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH);
`endif
endmodule
