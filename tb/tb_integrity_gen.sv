// tb_integrity_gen: the 4x4 worked example (same values in all three
// planes), then random 8x8 images against the reference; also checks the
// reported raster position.
module tb_integrity_gen;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  localparam int N4 = 4, N8 = 8;
  logic clk = 0, rst_n = 0;
  logic s4 = 0, v4 = 0, s8 = 0, v8 = 0;
  rgb_t i4, o4, i8, o8;
  logic lr4, lc4, lp4, lr8, lc8, lp8;
  logic [1:0] r4, c4;
  logic [2:0] r8, c8;
  int checks = 0, failures = 0;

  integrity_gen #(.N(N4)) dut4 (.clk, .rst_n, .start(s4), .valid(v4), .pix_in(i4), .pix_out(o4),
    .row(r4), .col(c4), .last_row(lr4), .last_col(lc4), .last_pixel(lp4));
  integrity_gen #(.N(N8)) dut8 (.clk, .rst_n, .start(s8), .valid(v8), .pix_in(i8), .pix_out(o8),
    .row(r8), .col(c8), .last_row(lr8), .last_col(lc8), .last_pixel(lp8));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the example: stego block in, expected block out
  int ex_in [16] = '{147, 142, 167, 193, 155, 138, 127, 145, 205, 151, 135, 137, 188, 135, 169, 185};
  int ex_out[16] = '{147, 142, 167, 202, 155, 138, 127, 158, 205, 151, 135, 141, 181, 131, 175, 176};

  initial begin
    i4 = '0; i8 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); s4 = 1; @(negedge clk); s4 = 0;
    for (int p = 0; p < 16; p++) begin
      i4 = '{r: 8'(ex_in[p]), g: 8'(ex_in[p]), b: 8'(ex_in[p])};
      v4 = 1; #1;
      checks++;
      if (o4 !== '{r: 8'(ex_out[p]), g: 8'(ex_out[p]), b: 8'(ex_out[p])} ||
          r4 != 2'(p / 4) || c4 != 2'(p % 4) || lp4 != (p == 15)) begin
        failures++;
        $display("example pixel %0d: got %0d exp %0d", p, o4.r, ex_out[p]);
      end
      @(negedge clk); v4 = 0;
      if ($urandom_range(0, 1)) @(negedge clk);   // gaps between pixels
    end
    // random 8x8 images, two in a row without restart in between
    for (int img_i = 0; img_i < 6; img_i++) begin
      logic [23:0] img [];
      logic [23:0] exp [];
      img = new[N8*N8];
      for (int p = 0; p < N8*N8; p++) img[p] = 24'($urandom);
      exp = img;
      integrity(N8, exp);
      if (img_i == 0 || img_i == 3) begin
        @(negedge clk); s8 = 1; @(negedge clk); s8 = 0;
      end
      for (int p = 0; p < N8*N8; p++) begin
        i8 = rgb_t'(img[p]);
        v8 = 1; #1;
        checks++;
        if (o8 !== rgb_t'(exp[p]) || lr8 != (p / N8 == N8 - 1) || lc8 != (p % N8 == N8 - 1)) begin
          failures++;
          if (failures < 10) $display("img %0d pixel %0d: got %h exp %h", img_i, p, o8, exp[p]);
        end
        @(negedge clk); v8 = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
