// tb_stego_decoder: reference stego images (all three methods) streamed in;
// the recovered bit stream must equal the message prefix the reference
// embedded, and the integrity verdict must be clean, then must locate one
// tampered pixel. Also checks that nothing is accepted without the key.
module tb_stego_decoder;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst_n = 0, enable = 0, start = 0, valid = 0;
  method_e method;
  plane_e  user_sel;
  rgb_t pix;
  logic bits_valid, done, ok, corner_bad, located;
  logic [7:0] bits;
  logic [3:0] nbits;
  logic [4:0] bad_rows, bad_cols;
  logic [3:0] err_row, err_col;
  int checks = 0, failures = 0;
  bit got[$];

  stego_decoder #(.N(N)) dut (.clk, .rst_n, .enable, .start, .method, .user_sel, .valid, .pix,
    .bits_valid, .bits, .nbits, .done, .ok, .corner_bad, .bad_rows, .bad_cols,
    .err_row, .err_col, .located);

  always #5 clk = !clk;

  always @(posedge clk)
    if (bits_valid)
      for (int b = 0; b < nbits; b++) got.push_back(bits[7 - b]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix = '0; method = M_FIXED_RED; user_sel = PL_R;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      logic [23:0] img [];
      logic [15:0] words [];
      int nb, m, u, tr, tc;
      img = new[N*N];
      words = new[N*N/2];
      for (int p = 0; p < N*N; p++) img[p] = 24'($urandom);
      for (int w = 0; w < N*N/2; w++) words[w] = 16'($urandom);
      m = t % 3; u = $urandom_range(0, 2);
      stego_image(N, m, u, img, words, nb);
      tr = $urandom_range(0, N - 2); tc = $urandom_range(0, N - 2);
      if (t >= 4) img[tr*N + tc] ^= 24'h010000;
      method = method_e'(m); user_sel = plane_e'(u);
      enable = 1;
      got.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int p = 0; p < N*N; p++) begin
        pix = rgb_t'(img[p]); valid = 1;
        @(negedge clk); valid = 0;
      end
      @(negedge clk);
      checks++;
      if (t < 4) begin
        if (got.size() != nb) begin failures++; $display("got %0d bits, exp %0d", got.size(), nb); end
        else for (int i = 0; i < nb; i++)
          if (got[i] != msg_bit(words, i)) begin failures++; $display("bit %0d wrong", i); break; end
        checks++;
        if (!done || !ok) begin failures++; $display("clean image not ok"); end
      end else begin
        if (!done || ok || !located || err_row != 4'(tr) || err_col != 4'(tc)) begin
          failures++; $display("tamper at %0d,%0d not located", tr, tc);
        end
      end
    end
    // without the key nothing happens
    enable = 0; got.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < 10; p++) begin pix = rgb_t'(24'hFFFFFF); valid = 1; @(negedge clk); end
    valid = 0; @(negedge clk);
    checks++;
    if (got.size() != 0) begin failures++; $display("decoded without key"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
