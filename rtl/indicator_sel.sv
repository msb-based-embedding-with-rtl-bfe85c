// indicator_sel: picks the indicator plane of the current pixel.
//
// Method 1 (M_FIXED_RED) always returns red. Method 2 (M_USER) returns the
// plane given on user_sel (a value of 3 is treated as red). Method 3
// (M_CYCLIC) returns red for the first pixel of an image, green for the
// second, blue for the third, then red again: a modulo-3 counter that is
// cleared by `restart` and advanced by `advance`, once per pixel in raster
// order. The three methods follow the article; counting every pixel of the
// image, including the last row and column that hold no message, is this
// design's choice.
//
// Timing: `ind` is combinational from the inputs and the counter; the
// counter updates on the clock edge after `advance` or `restart`.
module indicator_sel
  import stego_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    restart,   // start of an image: next pixel is pixel 0
  input  logic    advance,   // the current pixel is done
  input  method_e method,
  input  plane_e  user_sel,
  output plane_e  ind
);

  logic [1:0] phase;  // pixel index modulo 3

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            phase <= 2'd0;
    else if (restart)      phase <= 2'd0;
    else if (advance)      phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
  end

  always_comb begin
    unique case (method)
      M_USER:   ind = (user_sel == PL_NONE) ? PL_R : user_sel;
      M_CYCLIC: ind = plane_e'(phase);
      default:  ind = PL_R;
    endcase
  end

endmodule
