// pixel_embedder: the "logic for data embedding" of one pixel.
//
// An adder forms K = MSB(R) + MSB(G) + MSB(B) + 1. The two LSBs of the
// indicator plane are compared against 00, 01, 10 and 11:
//   00  nothing is embedded,
//   01  the K LSBs of the second data plane are replaced by message bits,
//   10  the K LSBs of the first data plane are replaced,
//   11  both data planes take K bits each (first plane first).
// For red as indicator the first data plane is green and the second blue,
// as the article gives; for the other indicators the pair keeps R,G,B
// order (this design's choice). Substitution never touches bit 7 of any
// plane (K <= 4), so a receiver recomputes the same K from the stego pixel.
//
// Message bits arrive on `msg`, oldest bit in msg[7]. The first data plane
// used takes the oldest K bits, the most significant of them landing in
// bit K-1 of the plane (this bit order is this design's choice). `nbits`
// says how many message bits were used, 0 to 8. With en = 0 the pixel
// passes unchanged and nbits = 0 (used for the last row and column, which
// hold the integrity nibbles). Purely combinational.
module pixel_embedder
  import stego_pkg::*;
(
  input  logic       en,
  input  rgb_t       cvr,
  input  plane_e     ind,
  input  logic [7:0] msg,
  output rgb_t       stego,
  output logic [2:0] k,
  output logic [3:0] nbits
);

  logic [1:0] code;
  logic       use_first, use_second;
  logic [7:0] mask, bits_a, bits_b, first_in, second_in, first_out, second_out;
  plane_e     pf, ps;

  always_comb begin
    k          = k_of(cvr);
    mask       = k_mask(k);
    code       = plane_of(cvr, ind)[1:0];
    pf         = first_data(ind);
    ps         = second_data(ind);
    use_first  = en && (code == 2'b10 || code == 2'b11);
    use_second = en && (code == 2'b01 || code == 2'b11);

    // Oldest K bits, then the next K bits, right-aligned.
    bits_a     = 8'(msg >> (4'd8 - 4'(k)));
    bits_b     = 8'(msg >> (4'd8 - 4'(k) - (use_first ? 4'(k) : 4'd0)));

    first_in   = plane_of(cvr, pf);
    second_in  = plane_of(cvr, ps);
    first_out  = use_first  ? ((first_in  & ~mask) | (bits_a & mask)) : first_in;
    second_out = use_second ? ((second_in & ~mask) | (bits_b & mask)) : second_in;

    stego = cvr;
    unique case (pf)
      PL_R:    stego.r = first_out;
      PL_G:    stego.g = first_out;
      default: stego.b = first_out;
    endcase
    unique case (ps)
      PL_R:    stego.r = second_out;
      PL_G:    stego.g = second_out;
      default: stego.b = second_out;
    endcase

    nbits = (use_first ? 4'(k) : 4'd0) + (use_second ? 4'(k) : 4'd0);
  end

endmodule
