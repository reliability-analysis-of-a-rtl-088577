// Address calculation block of the convolutional unit (combinational).
//
// For an input event at pixel (x, y) and kernel element (i, j), the neuron
// updated is (x + i - shift_row, y + j - shift_col), where the shifts are the
// kernel's center shift. With the shift equal to the kernel size minus one a
// kernel stored flipped gives a "valid" convolution (32x32 -> 28x28 for 5x5);
// with half the size it is centred on the event. `in_range` tells whether that
// neuron lies inside the map in use (map_rows x map_cols, at most
// NROWS x NCOLS); `naddr` is its linear address row*NCOLS + col. The output
// event address of a neuron is its coordinates shifted right by the
// sub-sampling amount, which is how the sub-sampling layers are folded into
// the node. The document gives the center-shift idea; the exact formula is
// this design's.
module addr_calc #(
  parameter int unsigned NROWS = 28,
  parameter int unsigned NCOLS = 28,
  localparam int unsigned AW   = $clog2(NROWS * NCOLS)
) (
  input  logic [4:0] ev_x,
  input  logic [4:0] ev_y,
  input  logic [3:0] ki,
  input  logic [3:0] kj,
  input  logic [3:0] shift_row,
  input  logic [3:0] shift_col,
  input  logic [7:0] map_rows,
  input  logic [7:0] map_cols,
  input  logic [2:0] subsample,
  output logic          in_range,
  output logic [AW-1:0] naddr,
  output logic [4:0]    nrow,
  output logic [4:0]    ncol,
  output logic [4:0]    out_x,
  output logic [4:0]    out_y
);
  logic signed [7:0] r, c;
  logic [7:0] rows_eff, cols_eff;

  always_comb begin
    r = $signed({3'b0, ev_x}) + $signed({4'b0, ki}) - $signed({4'b0, shift_row});
    c = $signed({3'b0, ev_y}) + $signed({4'b0, kj}) - $signed({4'b0, shift_col});
    rows_eff = (map_rows > 8'(NROWS)) ? 8'(NROWS) : map_rows;
    cols_eff = (map_cols > 8'(NCOLS)) ? 8'(NCOLS) : map_cols;
    in_range = (r >= 0) && (c >= 0) && (r < $signed(rows_eff)) && (c < $signed(cols_eff));
    nrow  = r[4:0];
    ncol  = c[4:0];
    naddr = in_range ? AW'(nrow * NCOLS + ncol) : '0;
    out_x = nrow >> subsample;
    out_y = ncol >> subsample;
  end
endmodule
