// stego_pkg: types and constants shared by the adaptive RGB pixel-indicator
// steganography engine, its display path and its receiver.
//
// A pixel is 24 bits, 8 bits per colour plane. One plane of every pixel acts
// as the indicator: its two LSBs pick which of the other two planes (the data
// planes) get message bits, and the sum of the three plane MSBs plus one
// gives K, the number of message bits written into each chosen data plane.
// Three methods choose the indicator plane: always red, chosen by the user,
// or cycling red, green, blue from one pixel to the next.
//
// The ordering of the two data planes ("first" and "second") for an
// indicator other than red, and the method encoding, are this design's own
// choices; see indicator_sel and pixel_embedder.
package stego_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Indicator / plane identifiers. PL_NONE is never used as an indicator.
  typedef enum logic [1:0] {
    PL_R    = 2'd0,
    PL_G    = 2'd1,
    PL_B    = 2'd2,
    PL_NONE = 2'd3
  } plane_e;

  // Method 1: red is always the indicator. Method 2: the user picks it.
  // Method 3: the indicator cycles red, green, blue over successive pixels.
  typedef enum logic [1:0] {
    M_FIXED_RED = 2'd0,
    M_USER      = 2'd1,
    M_CYCLIC    = 2'd2
  } method_e;

  // Read one plane of a pixel.
  function automatic logic [7:0] plane_of(rgb_t p, plane_e pl);
    case (pl)
      PL_R:    return p.r;
      PL_G:    return p.g;
      default: return p.b;
    endcase
  endfunction

  // The two data planes for an indicator, in R,G,B order: the first is the
  // one selected by indicator code 2'b10, the second by 2'b01. For red this
  // gives green/blue, as the article describes.
  function automatic plane_e first_data(plane_e ind);
    return (ind == PL_R) ? PL_G : PL_R;
  endfunction

  function automatic plane_e second_data(plane_e ind);
    return (ind == PL_B) ? PL_G : PL_B;
  endfunction

  // K = MSB(R) + MSB(G) + MSB(B) + 1, from 1 to 4.
  function automatic logic [2:0] k_of(rgb_t p);
    return 3'(p.r[7]) + 3'(p.g[7]) + 3'(p.b[7]) + 3'd1;
  endfunction

  // Mask of the K low bits of a plane.
  function automatic logic [7:0] k_mask(logic [2:0] k);
    return 8'((9'd1 << k) - 9'd1);
  endfunction

endpackage
