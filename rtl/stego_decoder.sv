// stego_decoder: the receiving side. From the stego image, sent pixel by
// pixel in raster order, it recovers the message bits and checks the
// integrity nibbles.
//
// Each pixel passes through pixel_extractor with the indicator plane given
// by indicator_sel (the same method and user selection as at the sender);
// the last row and column hold no message and are only checked. For each
// accepted pixel the recovered bits appear in the next cycle on `bits`
// (oldest bit in bits[7]) with their count in `nbits` and `bits_valid`
// high. The integrity verdict comes from integrity_check and is valid while
// `done` is high. `start` (pulse) begins an image; `valid` accepts `pix`.
// Nothing is accepted unless `enable` (the board key) is high. Decoding is
// shown in the article's overall flow; the stream interface is this
// design's choice.
module stego_decoder
  import stego_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 start,
  input  method_e              method,
  input  plane_e               user_sel,
  input  logic                 valid,
  input  rgb_t                 pix,
  output logic                 bits_valid,
  output logic [7:0]           bits,
  output logic [3:0]           nbits,
  output logic                 done,
  output logic                 ok,
  output logic                 corner_bad,
  output logic [$clog2(N):0]   bad_rows,
  output logic [$clog2(N):0]   bad_cols,
  output logic [$clog2(N)-1:0] err_row,
  output logic [$clog2(N)-1:0] err_col,
  output logic                 located
);

  plane_e     ind;
  logic       last_row, last_col, take;
  logic [7:0] x_bits;
  logic [3:0] x_nbits;

  assign take = enable && valid && !done;

  indicator_sel u_ind (
    .clk, .rst_n, .restart(enable && start), .advance(take),
    .method, .user_sel, .ind
  );

  pixel_extractor u_ext (
    .en(!(last_row || last_col)), .stego(pix), .ind,
    .bits(x_bits), .nbits(x_nbits)
  );

  integrity_check #(.N(N)) u_chk (
    .clk, .rst_n, .start(enable && start), .valid(take), .pix,
    .last_row, .last_col, .done, .ok, .corner_bad,
    .bad_rows, .bad_cols, .err_row, .err_col, .located
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_valid <= 1'b0;
      bits       <= '0;
      nbits      <= '0;
    end else begin
      bits_valid <= take && !(enable && start);
      bits       <= x_bits;
      nbits      <= x_nbits;
    end
  end

endmodule
