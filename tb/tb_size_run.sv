// tb_size_run: one embedding engine of side N with its own SRAM model, used
// by tb_table2_sizes. On `go` it loads a random cover image and message,
// runs methods 1 and 3, compares every stego word with the reference model
// and checks that the run takes 9*N*N/2 clocks and that this time at 50 MHz,
// truncated to whole microseconds, equals T_US.
module tb_size_run #(
  parameter int N    = 16,
  parameter int T_US = 23
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic fin,
  output int   checks,
  output int   failures
);
  import stego_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [17:0] CB = 18'd0, MB = 18'(3 * N * N / 2), SB = 18'(2 * N * N);
  localparam int MSGW = N * N / 2;

  logic start = 0, busy, done, req, we, rvalid;
  method_e method;
  logic [31:0] embed_bits;
  logic [17:0] addr, sa;
  logic [15:0] wdata, rdata, dq_o, dq_i;
  logic dq_oe, we_n, oe_n, ce_n, lb_n, ub_n;

  stego_ctrl #(.N(N), .COVER_BASE(CB), .MSG_BASE(MB), .STEGO_BASE(SB)) dut (
    .clk, .rst_n, .start, .method, .user_sel(PL_R), .busy, .done, .embed_bits,
    .mem_req(req), .mem_we(we), .mem_addr(addr), .mem_wdata(wdata), .mem_rdata(rdata));
  sram_ctrl u_sc (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .rvalid,
    .sram_addr(sa), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ce_n(ce_n), .sram_lb_n(lb_n), .sram_ub_n(ub_n));
  sram_model mem (.addr(sa), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i),
    .we_n, .oe_n, .ce_n, .lb_n, .ub_n);

  initial begin
    logic [23:0] img [], simg [];
    logic [15:0] words [];
    checks = 0; failures = 0; fin = 0; method = M_FIXED_RED;
    img = new[N*N]; words = new[MSGW];
    for (int p = 0; p < N*N; p++) img[p] = 24'($urandom);
    for (int w = 0; w < MSGW; w++) words[w] = 16'($urandom);
    for (int w = 0; w < 3*N*N/2; w++) mem.mem[CB + 18'(w)] = packed_word(img, w);
    for (int w = 0; w < MSGW; w++) mem.mem[MB + 18'(w)] = words[w];
    wait (go);
    for (int m = 0; m < 3; m += 2) begin
      int clocks, nb;
      simg = img;
      stego_image(N, m, 0, simg, words, nb);
      method = method_e'(m);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      clocks = 0;
      while (!done) begin @(negedge clk); clocks++; end
      checks++;
      if (clocks != 9 * N * N / 2 || (clocks * 20) / 1000 != T_US) begin
        failures++;
        $display("N=%0d: %0d clocks = %0d us, published %0d us", N, clocks, (clocks * 20) / 1000, T_US);
      end
      checks++;
      if (embed_bits != 32'(nb)) begin failures++; $display("N=%0d: %0d bits, exp %0d", N, embed_bits, nb); end
      begin
        int bad = 0;
        for (int w = 0; w < 3*N*N/2; w++) if (mem.mem[SB + 18'(w)] !== packed_word(simg, w)) bad++;
        checks++;
        if (bad) begin failures++; $display("N=%0d method %0d: %0d words differ", N, m, bad); end
      end
    end
    fin = 1;
  end
endmodule
