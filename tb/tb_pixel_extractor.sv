// tb_pixel_extractor: embeds random bits with the reference model and checks
// that the extractor returns the same bits, in order, with the right count.
module tb_pixel_extractor;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  logic       en;
  rgb_t       stego;
  plane_e     ind;
  logic [7:0] bits;
  logic [3:0] nbits;
  int checks = 0, failures = 0;

  pixel_extractor dut (.en, .stego, .ind, .bits, .nbits);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] words[];
    words = new[1];
    for (int t = 0; t < 4000; t++) begin
      int pos, i;
      logic [7:0] m;
      i = $urandom_range(0, 2);
      m = 8'($urandom);
      words[0] = {m, 8'h00};
      pos = 0;
      stego = rgb_t'(embed(24'($urandom), i, words, pos));
      ind = plane_e'(i);
      en  = ($urandom_range(0, 9) != 0);
      #1;
      checks++;
      if (!en) begin
        if (nbits != 0) failures++;
      end else if (nbits != 4'(pos) || (pos > 0 && (bits >> (8 - pos)) != (m >> (8 - pos)))) begin
        failures++;
        if (failures < 10) $display("mismatch: stego=%h ind=%0d m=%h got %h/%0d exp %0d bits",
                                    stego, i, m, bits, nbits, pos);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
