// tb_pixel_embedder: random pixels, indicators and message bytes against the
// reference model; checks the stego pixel, K and the number of bits used,
// and that every indicator code and every K value occurs.
module tb_pixel_embedder;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  logic       en;
  rgb_t       cvr, stego;
  plane_e     ind;
  logic [7:0] msg;
  logic [2:0] k;
  logic [3:0] nbits;
  int checks = 0, failures = 0;
  int seen_code[4], seen_k[5];

  pixel_embedder dut (.en, .cvr, .ind, .msg, .stego, .k, .nbits);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] words[];
    words = new[1];
    for (int t = 0; t < 4000; t++) begin
      int pos, i, expn;
      logic [23:0] exp;
      cvr = rgb_t'($urandom);
      i   = $urandom_range(0, 2);
      ind = plane_e'(i);
      msg = 8'($urandom);
      en  = ($urandom_range(0, 9) != 0);
      #1;
      words[0] = {msg, 8'h00};
      pos = 0;
      exp = en ? embed(cvr, i, words, pos) : cvr;
      expn = en ? pos : 0;
      checks++;
      if (stego !== exp || nbits != 4'(expn) || k != 3'(kval(cvr))) begin
        failures++;
        if (failures < 10)
          $display("mismatch: cvr=%h ind=%0d msg=%h got %h/%0d/%0d exp %h/%0d/%0d",
                   cvr, i, msg, stego, nbits, k, exp, expn, kval(cvr));
      end
      if (en) begin
        seen_code[pl(cvr, i)[1:0]]++;
        seen_k[kval(cvr)]++;
      end
      #1;
    end
    // the article's Method 1 cases explicitly: R indicator, K = 4 (all MSBs set)
    en = 1; ind = PL_R; msg = 8'b1011_0110;
    cvr = '{r: 8'h80, g: 8'hF0, b: 8'hFF}; #1;   // code 00: untouched
    checks++; if (stego !== cvr || nbits != 0) failures++;
    cvr = '{r: 8'h81, g: 8'hF0, b: 8'hFF}; #1;   // code 01: blue only
    checks++; if (stego !== '{r: 8'h81, g: 8'hF0, b: 8'hFB} || nbits != 4) failures++;
    cvr = '{r: 8'h82, g: 8'hF0, b: 8'hFF}; #1;   // code 10: green only
    checks++; if (stego !== '{r: 8'h82, g: 8'hFB, b: 8'hFF} || nbits != 4) failures++;
    cvr = '{r: 8'h83, g: 8'hF0, b: 8'hFF}; #1;   // code 11: green then blue
    checks++; if (stego !== '{r: 8'h83, g: 8'hFB, b: 8'hF6} || nbits != 8) failures++;
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen_code[c] == 0) begin failures++; $display("code %0d never seen", c); end
    end
    for (int kk = 1; kk <= 4; kk++) begin
      checks++;
      if (seen_k[kk] == 0) begin failures++; $display("K=%0d never seen", kk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
