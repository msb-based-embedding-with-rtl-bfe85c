// pixel_extractor: receiver-side inverse of pixel_embedder.
//
// From a stego pixel it recomputes K from the three plane MSBs (which the
// embedding never changes) and reads the indicator code from the two LSBs
// of the indicator plane, then gathers the K LSBs of the first and/or
// second data plane. The recovered bits are returned oldest-first in
// bits[7:...], left-aligned, with their count in nbits, exactly the order in
// which pixel_embedder consumed them. With en = 0 nothing is extracted.
// Purely combinational.
module pixel_extractor
  import stego_pkg::*;
(
  input  logic       en,
  input  rgb_t       stego,
  input  plane_e     ind,
  output logic [7:0] bits,
  output logic [3:0] nbits
);

  logic [2:0] k;
  logic [1:0] code;
  logic       use_first, use_second;
  logic [7:0] mask;
  logic [15:0] acc;

  always_comb begin
    k          = k_of(stego);
    mask       = k_mask(k);
    code       = plane_of(stego, ind)[1:0];
    use_first  = en && (code == 2'b10 || code == 2'b11);
    use_second = en && (code == 2'b01 || code == 2'b11);
    acc   = '0;
    nbits = '0;
    if (use_first) begin
      acc   = {8'd0, plane_of(stego, first_data(ind)) & mask};
      nbits = 4'(k);
    end
    if (use_second) begin
      acc   = (acc << k) | {8'd0, plane_of(stego, second_data(ind)) & mask};
      nbits = nbits + 4'(k);
    end
    // left-align: oldest bit in bits[7]
    bits = 8'(acc << (4'd8 - nbits));
  end

endmodule
