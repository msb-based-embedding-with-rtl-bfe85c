// integrity_gen: integrity nibbles for the last row and column of an image.
//
// Pixels enter in raster order, one per `valid` strobe, N x N per image
// (`start` restarts at pixel (0,0)). For every plane separately:
//   - each pixel of rows 0..N-2 in the last column gets, in its 4 LSBs, the
//     XOR of the 4 LSBs of the pixels to its left;
//   - each pixel of columns 0..N-2 in the last row gets the XOR of the 4 LSBs
//     of the pixels above it;
//   - the corner pixel gets the XOR of all those row and column results.
// The upper nibble of the border pixels is left as it came in. This is the
// mechanism of the article, checked against its 4x4 worked example: there
// the corner result is the XOR of the six row and column results, which
// this block reproduces. The per-plane treatment of R, G and B is this
// design's reading (the example shows one plane).
//
// The block also reports the raster position of the pixel now waiting, so
// the controller can disable embedding on the border (last_row/last_col).
// `pix_out` is combinational from `pix_in` and the accumulators; all state
// updates on the clock edge of a `valid` cycle. Column results are kept in
// an N-entry array of 12 bits (three nibbles), written without reset: the
// first row writes instead of XOR-ing.
module integrity_gen
  import stego_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 valid,
  input  rgb_t                 pix_in,
  output rgb_t                 pix_out,
  output logic [$clog2(N)-1:0] row,
  output logic [$clog2(N)-1:0] col,
  output logic                 last_row,
  output logic                 last_col,
  output logic                 last_pixel
);

  localparam int unsigned AW = $clog2(N);

  logic [AW-1:0] row_q, col_q;
  logic [11:0]   row_acc;      // XOR across the current row, R,G,B nibbles
  logic [11:0]   corner_acc;   // XOR of the results already written
  logic [11:0]   col_acc [N];  // XOR down each column
  logic [11:0]   nib_in, nib_out, col_rd;

  assign row        = row_q;
  assign col        = col_q;
  assign last_row   = (row_q == AW'(N - 1));
  assign last_col   = (col_q == AW'(N - 1));
  assign last_pixel = last_row && last_col;

  assign nib_in = {pix_in.r[3:0], pix_in.g[3:0], pix_in.b[3:0]};
  assign col_rd = col_acc[col_q];

  always_comb begin
    if (last_row && last_col)  nib_out = corner_acc;
    else if (last_col)         nib_out = row_acc;
    else if (last_row)         nib_out = col_rd;
    else                       nib_out = nib_in;
    pix_out   = pix_in;
    pix_out.r = {pix_in.r[7:4], nib_out[11:8]};
    pix_out.g = {pix_in.g[7:4], nib_out[7:4]};
    pix_out.b = {pix_in.b[7:4], nib_out[3:0]};
  end

  // raster position
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q <= '0;
      col_q <= '0;
    end else if (start) begin
      row_q <= '0;
      col_q <= '0;
    end else if (valid) begin
      if (last_col) begin
        col_q <= '0;
        row_q <= last_row ? '0 : row_q + 1'b1;
      end else begin
        col_q <= col_q + 1'b1;
      end
    end
  end

  // row and corner accumulators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_acc    <= '0;
      corner_acc <= '0;
    end else if (start) begin
      row_acc    <= '0;
      corner_acc <= '0;
    end else if (valid) begin
      if (!last_row && !last_col)
        row_acc <= (col_q == '0) ? nib_in : (row_acc ^ nib_in);
      if (last_row && last_col)
        corner_acc <= '0;
      else if (last_col || last_row)
        corner_acc <= ((row_q == '0) && last_col) ? nib_out : (corner_acc ^ nib_out);
    end
  end

  // column accumulators (memory array, no reset)
  always_ff @(posedge clk) begin
    if (valid && !start && !last_row && !last_col)
      col_acc[col_q] <= (row_q == '0) ? nib_in : (col_rd ^ nib_in);
  end

endmodule
