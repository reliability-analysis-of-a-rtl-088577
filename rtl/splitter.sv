// Splitter: the input stage of the SNN mesh.
//
// Input events carry no destination, yet every first-layer node must see
// each of them. For every input event (x, y, polarity) the splitter makes
// n_copies copies, stamps copy c with the configured node address (row_c,
// col_c) and kernel ID 0, and hands it to the mesh on the west port of row
// row_c, one copy per clock (the copy waits while that port is not ready).
// A copy whose row is not a row of the mesh (0 or above N_ROWS) cannot enter
// the mesh and is discarded, as are copies beyond N_COPIES_MAX. The input is
// accepted (in_ready) when the last copy has left.
//
// Configuration arrives over its own SPI slave on the shared bus with target
// byte 0x00: index 0 = number of copies, 0x10 + 2*c + {0 row, 1 column}.
// The document gives the function, the copy count and per-copy node address
// as parameters, and six copies in its network; delivery through the west
// ports of the first column and the one-copy-per-clock pace are this
// design's. Reset leaves zero copies configured.
module splitter #(
  parameter int unsigned N_COPIES_MAX = 6,
  parameter int unsigned N_ROWS       = 6
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
  output logic            out_valid [N_ROWS],
  output snn_pkg::event_t out_ev    [N_ROWS],
  input  logic            out_ready [N_ROWS],
  output logic            st_copy,      // a copy entered the mesh
  output logic            st_discard    // a copy had no valid row
);
  import snn_pkg::*;

  localparam int unsigned CI_W = $clog2(N_COPIES_MAX + 1);
  localparam int unsigned RW   = (N_ROWS > 1) ? $clog2(N_ROWS) : 1;

  logic        frame_valid;
  logic [31:0] frame;
  spi_slave #(.FRAME_W(SPI_FRAME_W)) u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .frame_valid, .frame);

  logic [7:0] n_copies;
  logic [7:0] dst_row [N_COPIES_MAX];
  logic [7:0] dst_col [N_COPIES_MAX];
  logic       cfg_hit;
  logic [15:0] cfg_idx;

  assign cfg_hit = frame_valid && frame[31:24] == SPLITTER_TARGET;
  assign cfg_idx = frame[23:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_copies <= '0;
      for (int c = 0; c < N_COPIES_MAX; c++) begin
        dst_row[c] <= '0;
        dst_col[c] <= '0;
      end
    end else if (cfg_hit) begin
      if (cfg_idx == CFG_SPL_N_COPIES) n_copies <= frame[7:0];
      for (int c = 0; c < N_COPIES_MAX; c++) begin
        if (cfg_idx == CFG_SPL_BASE + 16'(2 * c))     dst_row[c] <= frame[7:0];
        if (cfg_idx == CFG_SPL_BASE + 16'(2 * c + 1)) dst_col[c] <= frame[7:0];
      end
    end
  end

  logic [CI_W-1:0] cidx;
  logic [7:0]      n_eff;
  logic [7:0]      row;
  logic            row_ok, last, advance;
  event_t          cp;

  assign n_eff  = (n_copies > 8'(N_COPIES_MAX)) ? 8'(N_COPIES_MAX) : n_copies;
  assign row    = dst_row[cidx];
  assign row_ok = (row >= 8'd1) && (row <= 8'(N_ROWS));
  assign last   = (8'(cidx) + 8'd1 >= n_eff);
  assign cp     = '{dst_row: row, dst_col: dst_col[cidx], kid: '0, x: in_x, y: in_y, pol: in_pol};

  always_comb begin
    for (int r = 0; r < N_ROWS; r++) begin
      out_valid[r] = in_valid && n_eff != 0 && row_ok && (row == 8'(r + 1));
      out_ev[r]    = cp;
    end
    st_copy    = 1'b0;
    st_discard = 1'b0;
    advance    = 1'b0;
    if (in_valid && n_eff != 0) begin
      if (!row_ok) begin
        advance    = 1'b1;
        st_discard = 1'b1;
      end else if (out_ready[RW'(row - 8'd1)]) begin
        advance = 1'b1;
        st_copy = 1'b1;
      end
    end
    in_ready = (in_valid && n_eff == 0) || (advance && last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cidx <= '0;
    else if (advance) cidx <= last ? '0 : cidx + 1'b1;
  end
endmodule
