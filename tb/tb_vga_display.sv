// tb_vga_display: a 16x16 cover and stego image in the SRAM model, real
// VGA timing; over the second frame every pixel on the screen, the sync and
// the blank outputs are compared with the expected picture (cover at the
// left, stego beside it, black elsewhere).
module tb_vga_display;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam logic [17:0] CB = 18'h00100, SB = 18'h02000;
  logic clk = 0, rst_n = 0, enable = 0;
  logic pix_en, vga_clk, hsync_n, vsync_n, active;
  logic [9:0] hcnt, vcnt, vr, vg, vb;
  logic hs, vs, blank_n, sync_n;
  logic req, rvalid;
  logic [17:0] addr, sa;
  logic [15:0] rdata, dq_o, dq_i;
  logic dq_oe, we_n, oe_n, ce_n, lb_n, ub_n;
  int checks = 0, failures = 0, shown = 0;
  logic [23:0] cimg [], simg [];

  vga_timing u_t (.clk, .rst_n, .pix_en, .vga_clk, .hcnt, .vcnt, .hsync_n, .vsync_n, .active);
  vga_display #(.N(N), .COVER_BASE(CB), .STEGO_BASE(SB)) dut (
    .clk, .rst_n, .enable, .pix_en, .hcnt, .vcnt, .hsync_n, .vsync_n, .active,
    .mem_req(req), .mem_addr(addr), .mem_rdata(rdata), .mem_rvalid(rvalid),
    .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs(hs), .vga_vs(vs), .vga_blank_n(blank_n),
    .vga_sync_n(sync_n));
  sram_ctrl u_sc (.clk, .rst_n, .req, .we(1'b0), .addr, .wdata(16'h0), .rdata, .rvalid,
    .sram_addr(sa), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ce_n(ce_n), .sram_lb_n(lb_n), .sram_ub_n(ub_n));
  sram_model mem (.addr(sa), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i),
    .we_n, .oe_n, .ce_n, .lb_n, .ub_n);

  always #10 clk = !clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int frame = 0;
  logic [9:0] sh, sv;
  logic sact, shs, svs, chk = 0;
  always @(posedge clk) begin
    chk <= pix_en && rst_n;
    if (pix_en) begin
      sh <= hcnt; sv <= vcnt; sact <= active; shs <= hsync_n; svs <= vsync_n;
      if (hcnt == 0 && vcnt == 0 && rst_n) frame <= frame + 1;
    end
  end

  always @(negedge clk) if (chk && frame == 2) begin
    logic [23:0] p;
    logic [29:0] e;
    p = 24'h0;
    if (sact && sv < N && sh < 2 * N) begin
      p = (sh < N) ? cimg[sv * N + sh] : simg[sv * N + sh - N];
      shown++;
    end
    e = {p[23:16], p[23:22], p[15:8], p[15:14], p[7:0], p[7:6]};
    checks++;
    if ({vr, vg, vb} !== e || hs !== shs || vs !== svs || blank_n !== sact || sync_n !== 1'b0) begin
      failures++;
      if (failures < 10) $display("pixel %0d,%0d: got %h exp %h", sh, sv, {vr, vg, vb}, e);
    end
  end

  initial begin
    cimg = new[N*N]; simg = new[N*N];
    for (int p = 0; p < N*N; p++) begin cimg[p] = 24'($urandom); simg[p] = 24'($urandom); end
    for (int w = 0; w < 3*N*N/2; w++) begin
      mem.mem[CB + 18'(w)] = packed_word(cimg, w);
      mem.mem[SB + 18'(w)] = packed_word(simg, w);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    enable = 1;
    wait (frame == 3);
    checks++;
    if (shown != 2 * N * N) begin failures++; $display("shown %0d image pixels", shown); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
