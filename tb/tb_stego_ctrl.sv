// tb_stego_ctrl: the embedding engine on a 16x16 image in the SRAM model,
// for each of the three methods. Checks every stego word against the
// reference model, the message-bit count, that the cover region is left
// as it was, and the rate: exactly 9 busy clocks per pair of pixels.
module tb_stego_ctrl;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam logic [17:0] CB = 18'h00000, MB = 18'h00400, SB = 18'h00800;
  logic clk = 0, rst_n = 0, start = 0;
  method_e method;
  plane_e  user_sel;
  logic busy, done, req, we, rvalid;
  logic [31:0] embed_bits;
  logic [17:0] addr, sa;
  logic [15:0] wdata, rdata, dq_o, dq_i;
  logic dq_oe, we_n, oe_n, ce_n, lb_n, ub_n;
  int checks = 0, failures = 0;

  stego_ctrl #(.N(N), .COVER_BASE(CB), .MSG_BASE(MB), .STEGO_BASE(SB)) dut (
    .clk, .rst_n, .start, .method, .user_sel, .busy, .done, .embed_bits,
    .mem_req(req), .mem_we(we), .mem_addr(addr), .mem_wdata(wdata), .mem_rdata(rdata));
  sram_ctrl u_sc (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .rvalid,
    .sram_addr(sa), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ce_n(ce_n), .sram_lb_n(lb_n), .sram_ub_n(ub_n));
  sram_model mem (.addr(sa), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i),
    .we_n, .oe_n, .ce_n, .lb_n, .ub_n);

  always #10 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    method = M_FIXED_RED; user_sel = PL_R;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      logic [23:0] img [], ref_img [];
      logic [15:0] words [];
      int nb, m, u, busy_cycles;
      img = new[N*N];
      words = new[128];
      for (int p = 0; p < N*N; p++) img[p] = 24'($urandom);
      for (int w = 0; w < 128; w++) words[w] = 16'($urandom);
      for (int w = 0; w < 3*N*N/2; w++) begin
        mem.mem[CB + 18'(w)] = packed_word(img, w);
        mem.mem[SB + 18'(w)] = 16'hDEAD;
      end
      for (int w = 0; w < 128; w++) mem.mem[MB + 18'(w)] = words[w];
      m = t % 3; u = $urandom_range(0, 2);
      ref_img = img;
      stego_image(N, m, u, ref_img, words, nb);
      method = method_e'(m); user_sel = plane_e'(u);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      busy_cycles = 1;   // clocks from the start edge until done is seen
      while (!done) begin @(negedge clk); if (busy) busy_cycles++; end
      checks++;
      if (busy_cycles != 9 * N * N / 2) begin
        failures++; $display("busy for %0d clocks, exp %0d", busy_cycles, 9 * N * N / 2);
      end
      checks++;
      if (embed_bits != 32'(nb)) begin failures++; $display("embedded %0d bits exp %0d", embed_bits, nb); end
      for (int w = 0; w < 3*N*N/2; w++) begin
        checks++;
        if (mem.mem[SB + 18'(w)] !== packed_word(ref_img, w) || mem.mem[CB + 18'(w)] !== packed_word(img, w)) begin
          failures++;
          if (failures < 10) $display("method %0d word %0d: got %h exp %h", m, w,
                                      mem.mem[SB + 18'(w)], packed_word(ref_img, w));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
