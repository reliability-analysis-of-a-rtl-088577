// SPI slave that receives configuration frames (write-only, SPI mode 0).
//
// SCLK, CS_N and MOSI are synchronised into the system clock with two flops
// each, so SCLK must be slower than a quarter of the system clock. MOSI is
// sampled on each rising SCLK edge while CS_N is low, MSB first. When
// FRAME_W bits have been shifted in, `frame_valid` pulses for one clock with
// the frame on `frame`; further bits start the next frame. Raising CS_N
// discards a partial frame. The document names an SPI slave that carries each
// parameter with an index; the frame format (see snn_pkg) and the mode are
// this design's own.
module spi_slave #(
  parameter int unsigned FRAME_W = snn_pkg::SPI_FRAME_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sclk,
  input  logic               cs_n,
  input  logic               mosi,
  output logic               frame_valid,
  output logic [FRAME_W-1:0] frame
);
  logic [2:0] sclk_s;
  logic [1:0] cs_s, mosi_s;
  logic [FRAME_W-1:0] shreg;
  logic [$clog2(FRAME_W+1)-1:0] nbits;
  logic rise;

  assign rise = sclk_s[1] && !sclk_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s      <= '0;
      cs_s        <= '1;
      mosi_s      <= '0;
      shreg       <= '0;
      nbits       <= '0;
      frame_valid <= 1'b0;
      frame       <= '0;
    end else begin
      sclk_s      <= {sclk_s[1:0], sclk};
      cs_s        <= {cs_s[0], cs_n};
      mosi_s      <= {mosi_s[0], mosi};
      frame_valid <= 1'b0;
      if (cs_s[1]) begin
        nbits <= '0;
      end else if (rise) begin
        shreg <= {shreg[FRAME_W-2:0], mosi_s[1]};
        if (nbits == FRAME_W[$clog2(FRAME_W+1)-1:0] - 1'b1) begin
          nbits       <= '0;
          frame_valid <= 1'b1;
          frame       <= {shreg[FRAME_W-2:0], mosi_s[1]};
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end
endmodule
