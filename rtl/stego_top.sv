// stego_top: adaptive RGB pixel-indicator steganography on an FPGA board
// with an external 256K x 16 SRAM and a VGA output.
//
// Sender side: when the four key switches match the board key (auth_key)
// and `start` is pulsed, stego_ctrl reads the N x N cover image and the
// message from the SRAM, hides message bits in each inner pixel (K bits per
// data plane, K = sum of the three plane MSBs + 1, data planes chosen by the
// indicator plane's two LSBs), writes integrity nibbles into the last row
// and column, and stores the stego image in the third SRAM region. It takes
// 9 clocks per two pixels: 294,912 clocks (5.9 ms at 50 MHz) for 256 x 256.
// Afterwards vga_display shows the cover and stego images side by side at
// 640 x 480, 60 Hz. Both share one sram_ctrl: the engine owns the SRAM while
// busy, the display otherwise.
//
// Receiver side: stego_decoder takes a stego image as a pixel stream
// (rx_* ports), returns the message bits and the integrity verdict,
// including the row and column of a modified pixel. It stands beside the
// sender, as the far end of the channel, and uses the same key.
//
// The method switches select the indicator: 0 = red always, 1 = the plane
// on ind_sw (0 R, 1 G, 2 B), 2 = cyclic R,G,B; 3 behaves as 0.
// The SRAM data bus is split into dq_o/dq_oe/dq_i for the board tristate.
// The video DAC takes vga_r/g/b, vga_blank_n, vga_sync_n and vga_clk.
module stego_top
  import stego_pkg::*;
#(
  parameter int unsigned   N          = 256,
  parameter logic [3:0]    KEY        = 4'b1011,
  parameter logic [17:0]   COVER_BASE = 18'h00000,
  parameter logic [17:0]   MSG_BASE   = 18'h18000,
  parameter logic [17:0]   STEGO_BASE = 18'h20000
) (
  input  logic        clk,          // 50 MHz
  input  logic        rst_n,        // reset switch
  input  logic [3:0]  key_sw,
  input  logic        start,
  input  logic [1:0]  method_sw,
  input  logic [1:0]  ind_sw,
  output logic        auth_ok,
  output logic        busy,
  output logic        done,
  output logic [31:0] embed_bits,
  // external SRAM
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  output logic        sram_ce_n,
  output logic        sram_lb_n,
  output logic        sram_ub_n,
  // VGA DAC
  output logic        vga_clk,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  // receiver
  input  logic        rx_start,
  input  logic        rx_valid,
  input  rgb_t        rx_pix,
  output logic        rx_bits_valid,
  output logic [7:0]  rx_bits,
  output logic [3:0]  rx_nbits,
  output logic        rx_done,
  output logic        rx_ok,
  output logic        rx_corner_bad,
  output logic [$clog2(N):0]   rx_bad_rows,
  output logic [$clog2(N):0]   rx_bad_cols,
  output logic [$clog2(N)-1:0] rx_err_row,
  output logic [$clog2(N)-1:0] rx_err_col,
  output logic        rx_located
);

  method_e method;
  plane_e  user_sel;
  assign method   = method_e'(method_sw);
  assign user_sel = plane_e'(ind_sw);

  auth_key #(.KEY(KEY)) u_auth (.clk, .rst_n, .key_sw, .auth(auth_ok));

  // sender
  logic        e_req, e_we;
  logic [17:0] e_addr;
  logic [15:0] e_wdata;
  logic        d_req;
  logic [17:0] d_addr;
  logic        m_req, m_we, m_rvalid;
  logic [17:0] m_addr;
  logic [15:0] m_wdata, m_rdata;

  stego_ctrl #(
    .N(N), .AW(18), .COVER_BASE(COVER_BASE), .MSG_BASE(MSG_BASE), .STEGO_BASE(STEGO_BASE)
  ) u_ctrl (
    .clk, .rst_n, .start(start && auth_ok), .method, .user_sel,
    .busy, .done, .embed_bits,
    .mem_req(e_req), .mem_we(e_we), .mem_addr(e_addr), .mem_wdata(e_wdata),
    .mem_rdata(m_rdata)
  );

  // SRAM owner: the engine while busy, the display otherwise
  always_comb begin
    if (busy) begin
      m_req = e_req;  m_we = e_we;  m_addr = e_addr;  m_wdata = e_wdata;
    end else begin
      m_req = d_req;  m_we = 1'b0;  m_addr = d_addr;  m_wdata = '0;
    end
  end

  sram_ctrl #(.AW(18), .DW(16)) u_sram (
    .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .rdata(m_rdata), .rvalid(m_rvalid),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_we_n, .sram_oe_n, .sram_ce_n, .sram_lb_n, .sram_ub_n
  );

  // display
  logic       pix_en, hsync_n, vsync_n, active;
  logic [9:0] hcnt, vcnt;

  vga_timing u_vtim (
    .clk, .rst_n, .pix_en, .vga_clk, .hcnt, .vcnt, .hsync_n, .vsync_n, .active
  );

  vga_display #(
    .N(N), .AW(18), .COVER_BASE(COVER_BASE), .STEGO_BASE(STEGO_BASE)
  ) u_disp (
    .clk, .rst_n, .enable(done && auth_ok && !busy),
    .pix_en, .hcnt, .vcnt, .hsync_n, .vsync_n, .active,
    .mem_req(d_req), .mem_addr(d_addr), .mem_rdata(m_rdata), .mem_rvalid(m_rvalid && !busy),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n
  );

  // receiver
  stego_decoder #(.N(N)) u_rx (
    .clk, .rst_n, .enable(auth_ok), .start(rx_start), .method, .user_sel,
    .valid(rx_valid), .pix(rx_pix),
    .bits_valid(rx_bits_valid), .bits(rx_bits), .nbits(rx_nbits),
    .done(rx_done), .ok(rx_ok), .corner_bad(rx_corner_bad),
    .bad_rows(rx_bad_rows), .bad_cols(rx_bad_cols),
    .err_row(rx_err_row), .err_col(rx_err_col), .located(rx_located)
  );

endmodule
