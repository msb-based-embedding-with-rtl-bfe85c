// integrity_check: receiver-side check of the integrity nibbles written by
// integrity_gen, locating a modified pixel.
//
// Pixels of an N x N stego image enter in raster order, one per `valid`
// strobe (`start` restarts at (0,0)). The block recomputes, per plane, the
// XOR of the 4 LSBs along each row and down each column of the inner
// (N-1) x (N-1) pixels and compares them with the nibbles stored in the
// last column and last row; the corner is compared with the XOR of the
// received row and column nibbles. A mismatching row and a mismatching
// column cross at the altered pixel, which is how the article says the
// mechanism pinpoints a change. After the last pixel `done` rises and stays
// high until the next start:
//   ok        no row, column or corner mismatch;
//   bad_rows / bad_cols  number of rows / columns that mismatch;
//   err_row / err_col    first mismatching row / column;
//   located   exactly one row and one column mismatch, so (err_row,
//             err_col) is the altered inner pixel.
// A change to a border pixel shows as a single row or column mismatch (or
// a corner mismatch) with no partner. The counting and reporting format is
// this design's choice. last_row/last_col describe the pixel now expected.
module integrity_check
  import stego_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 valid,
  input  rgb_t                 pix,
  output logic                 last_row,
  output logic                 last_col,
  output logic                 done,
  output logic                 ok,
  output logic                 corner_bad,
  output logic [$clog2(N):0]   bad_rows,
  output logic [$clog2(N):0]   bad_cols,
  output logic [$clog2(N)-1:0] err_row,
  output logic [$clog2(N)-1:0] err_col,
  output logic                 located
);

  localparam int unsigned AW = $clog2(N);

  logic [AW-1:0] row_q, col_q;
  logic [11:0]   row_acc, corner_acc;
  logic [11:0]   col_acc [N];
  logic [11:0]   nib, col_rd;

  assign nib      = {pix.r[3:0], pix.g[3:0], pix.b[3:0]};
  assign col_rd   = col_acc[col_q];
  assign last_row = (row_q == AW'(N - 1));
  assign last_col = (col_q == AW'(N - 1));
  assign ok       = (bad_rows == '0) && (bad_cols == '0) && !corner_bad;
  assign located  = (bad_rows == 1) && (bad_cols == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q      <= '0;
      col_q      <= '0;
      row_acc    <= '0;
      corner_acc <= '0;
      done       <= 1'b0;
      corner_bad <= 1'b0;
      bad_rows   <= '0;
      bad_cols   <= '0;
      err_row    <= '0;
      err_col    <= '0;
    end else if (start) begin
      row_q      <= '0;
      col_q      <= '0;
      row_acc    <= '0;
      corner_acc <= '0;
      done       <= 1'b0;
      corner_bad <= 1'b0;
      bad_rows   <= '0;
      bad_cols   <= '0;
      err_row    <= '0;
      err_col    <= '0;
    end else if (valid && !done) begin
      // position
      if (last_col) begin
        col_q <= '0;
        row_q <= last_row ? '0 : row_q + 1'b1;
      end else begin
        col_q <= col_q + 1'b1;
      end
      // inner pixels accumulate
      if (!last_row && !last_col)
        row_acc <= (col_q == '0) ? nib : (row_acc ^ nib);
      // border pixels compare
      if (last_col && !last_row) begin
        corner_acc <= (row_q == '0) ? nib : (corner_acc ^ nib);
        if (nib != row_acc) begin
          if (bad_rows == '0) err_row <= row_q;
          bad_rows <= bad_rows + 1'b1;
        end
      end
      if (last_row && !last_col) begin
        corner_acc <= corner_acc ^ nib;
        if (nib != col_rd) begin
          if (bad_cols == '0) err_col <= col_q;
          bad_cols <= bad_cols + 1'b1;
        end
      end
      if (last_row && last_col) begin
        corner_bad <= (nib != corner_acc);
        done       <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (valid && !start && !done && !last_row && !last_col)
      col_acc[col_q] <= (row_q == '0) ? nib : (col_rd ^ nib);
  end

endmodule
