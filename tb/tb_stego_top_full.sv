// tb_stego_top_full: the whole design at its default size, 256x256 pixels, memory map and key as built.
// Flow: a wrong key must block the engine; then, with the right key, the
// cover image and message in the SRAM model are embedded with each
// indicator method in turn and every stego word, the message-bit count and
// the clock count (9 per pixel pair) are checked against the reference
// model. After the last run the VGA output is compared with the expected
// cover | stego picture over one frame, and the stego image is sent through
// the receiver, which must return the message and a clean verdict, then
// locate one altered pixel. Each mechanism is counted and must occur.
module tb_stego_top_full;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 256;
  localparam logic [17:0] CB = 18'h00000, MB = 18'h18000, SB = 18'h20000;
  localparam logic [3:0] KEY = 4'b1011;
  localparam int MSGW = 32768;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] key_sw;
  logic [1:0] method_sw, ind_sw;
  logic auth_ok, busy, done;
  logic [31:0] embed_bits;
  logic [17:0] sa;
  logic [15:0] dq_o, dq_i;
  logic dq_oe, we_n, oe_n, ce_n, lb_n, ub_n;
  logic vga_clk, hs, vs, blank_n, sync_n;
  logic [9:0] vr, vg, vb;
  logic rx_start = 0, rx_valid = 0;
  rgb_t rx_pix;
  logic rx_bits_valid, rx_done, rx_ok, rx_corner_bad, rx_located;
  logic [7:0] rx_bits;
  logic [3:0] rx_nbits;
  logic [$clog2(N):0] rx_bad_rows, rx_bad_cols;
  logic [$clog2(N)-1:0] rx_err_row, rx_err_col;
  int checks = 0, failures = 0;

  stego_top  dut (
    .clk, .rst_n, .key_sw, .start, .method_sw, .ind_sw, .auth_ok, .busy, .done, .embed_bits,
    .sram_addr(sa), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ce_n(ce_n), .sram_lb_n(lb_n), .sram_ub_n(ub_n),
    .vga_clk, .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs(hs), .vga_vs(vs),
    .vga_blank_n(blank_n), .vga_sync_n(sync_n),
    .rx_start, .rx_valid, .rx_pix, .rx_bits_valid, .rx_bits, .rx_nbits, .rx_done, .rx_ok,
    .rx_corner_bad, .rx_bad_rows, .rx_bad_cols, .rx_err_row, .rx_err_col, .rx_located);
  sram_model mem (.addr(sa), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i),
    .we_n, .oe_n, .ce_n, .lb_n, .ub_n);

  always #10 clk = !clk;   // 50 MHz

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_auth_block = 0, n_method[3], n_user[3], n_code[4], n_k[5], n_msg_reads = 0;
  int n_border = 0, n_shown = 0, n_located = 0, n_clean = 0;

  // message words read by the engine, seen on the SRAM pins
  always @(posedge clk)
    if (!ce_n && !oe_n && sa >= MB && sa < MB + 18'(MSGW)) n_msg_reads++;

  // receiver output collection
  bit got[$];
  always @(posedge clk)
    if (rx_bits_valid) for (int b = 0; b < rx_nbits; b++) got.push_back(rx_bits[7 - b]);

  // display checker, armed for one frame
  logic [23:0] cimg [], simg [];
  logic disp_arm = 0;
  int frame = 0;
  logic [9:0] hc, vc, sh, sv;
  logic sact, schk = 0;
  // pixel position mirrored from the syncs: the design's counters are internal
  always @(posedge clk) begin
    schk <= dut.pix_en && disp_arm;
    if (dut.pix_en) begin
      sh <= dut.hcnt; sv <= dut.vcnt; sact <= dut.active;
      if (dut.hcnt == 0 && dut.vcnt == 0 && disp_arm) frame <= frame + 1;
    end
  end
  always @(negedge clk) if (schk && frame == 2) begin
    logic [23:0] p;
    p = 24'h0;
    if (sact && sv < N && sh < 2 * N) begin
      p = (sh < N) ? cimg[sv * N + sh] : simg[sv * N + sh - N];
      n_shown++;
    end
    if ({vr[9:2], vg[9:2], vb[9:2]} !== p || blank_n !== sact) begin
      failures++;
      if (failures < 20) $display("FAIL: screen %0d,%0d got %h exp %h", sh, sv, {vr[9:2], vg[9:2], vb[9:2]}, p);
    end
    checks++;
  end

  initial begin
    logic [15:0] words [];
    int nb;
    cimg = new[N*N];
    words = new[MSGW];
    for (int p = 0; p < N*N; p++) cimg[p] = 24'($urandom);
    for (int w = 0; w < MSGW; w++) words[w] = 16'($urandom);
    for (int w = 0; w < 3*N*N/2; w++) mem.mem[CB + 18'(w)] = packed_word(cimg, w);
    for (int w = 0; w < MSGW; w++) mem.mem[MB + 18'(w)] = words[w];
    key_sw = 4'b0100; method_sw = 2'd0; ind_sw = 2'd0; rx_pix = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // wrong key: start is ignored
    repeat (5) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
    chk(!busy && !done && !auth_ok, "engine ran without the key");
    if (!busy && !done) n_auth_block++;

    key_sw = KEY;
    repeat (5) @(negedge clk);
    chk(auth_ok, "key not accepted");

    // one run per method; method 2 (user) with a non-red indicator
    for (int run = 0; run < 3; run++) begin
      int m, u, clocks;
      m = run % 3;
      u = (run / 3) % 2 + 1;
      simg = cimg;
      stego_image(N, m, u, simg, words, nb);
      for (int r = 0; r < N - 1; r++)
        for (int c = 0; c < N - 1; c++) begin
          n_code[pl(cimg[r*N + c], ind_of(m, u, r*N + c))[1:0]]++;
          n_k[kval(cimg[r*N + c])]++;
        end
      method_sw = 2'(m); ind_sw = 2'(u);
      n_msg_reads = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      // clocks from the edge that takes start to the edge that raises done
      clocks = 0;
      while (!done) begin @(negedge clk); clocks++; end
      chk(clocks == 9 * N * N / 2, $sformatf("run took %0d clocks, exp %0d", clocks, 9 * N * N / 2));
      chk(embed_bits == 32'(nb), $sformatf("embedded %0d bits, exp %0d", embed_bits, nb));
      chk(n_msg_reads >= (nb + 15) / 16 && n_msg_reads <= nb / 16 + 2, "message words read");
      begin
        int bad = 0;
        for (int w = 0; w < 3*N*N/2; w++)
          if (mem.mem[SB + 18'(w)] !== packed_word(simg, w)) bad++;
        chk(bad == 0, $sformatf("method %0d: %0d stego words differ", m, bad));
        if (bad == 0) begin
          n_method[m]++;
          if (m == 1) n_user[u]++;
          n_border += 2 * N - 1;
        end
      end
      if (m == 0) n_user[0]++;
    end

    // display: the stego image of the last run beside the cover
    disp_arm = 1;
    wait (frame == 3);
    disp_arm = 0;
    chk(n_shown == 2 * N * N, $sformatf("%0d image pixels on screen", n_shown));

    // receiver: clean image, then one altered pixel
    for (int pass = 0; pass < 2; pass++) begin
      int tr, tc;
      logic [23:0] rimg [];
      rimg = simg;
      tr = $urandom_range(0, N - 2); tc = $urandom_range(0, N - 2);
      if (pass == 1) rimg[tr*N + tc] ^= 24'h000100;
      got.delete();
      @(negedge clk); rx_start = 1; @(negedge clk); rx_start = 0;
      for (int p = 0; p < N*N; p++) begin
        rx_pix = rgb_t'(rimg[p]); rx_valid = 1; @(negedge clk);
      end
      rx_valid = 0;
      repeat (2) @(negedge clk);
      if (pass == 0) begin
        int bad = (got.size() != nb);
        for (int i = 0; i < nb && !bad; i++) if (got[i] != msg_bit(words, i)) bad = 1;
        chk(!bad, "receiver message differs");
        chk(rx_done && rx_ok, "receiver flags the clean image");
        if (!bad && rx_ok) n_clean++;
      end else begin
        chk(rx_done && !rx_ok && rx_located && rx_err_row == tr && rx_err_col == tc,
            $sformatf("altered pixel %0d,%0d not located", tr, tc));
        if (rx_located) n_located++;
      end
    end

    // every mechanism must have happened
    chk(n_auth_block > 0, "wrong key never blocked");
    for (int i = 0; i < 3; i++) chk(n_method[i] > 0, $sformatf("method %0d never ran", i + 1));
    for (int i = 0; i < 4; i++) chk(n_code[i] > 0, $sformatf("indicator code %0d never seen", i));
    for (int i = 1; i <= 4; i++) chk(n_k[i] > 0, $sformatf("K=%0d never seen", i));
    chk(n_border > 0 && n_clean > 0, "integrity nibbles never verified");
    chk(n_located > 0, "tamper never located");
    chk(n_shown > 0, "nothing displayed");
    $display("mechanisms: auth_block=%0d methods=%0d/%0d/%0d user G/B=%0d/%0d codes=%0d/%0d/%0d/%0d K1-4=%0d/%0d/%0d/%0d border=%0d shown=%0d clean=%0d located=%0d",
             n_auth_block, n_method[0], n_method[1], n_method[2], n_user[1], n_user[2],
             n_code[0], n_code[1], n_code[2], n_code[3], n_k[1], n_k[2], n_k[3], n_k[4],
             n_border, n_shown, n_clean, n_located);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
