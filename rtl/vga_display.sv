// vga_display: shows the cover image and the stego image side by side on a
// 640 x 480 VGA screen, reading both from the external SRAM.
//
// The article displays cover and stego once embedding has finished; the
// layout here (cover at columns 0..N-1, stego at N..2N-1, rows 0..N-1,
// black elsewhere) and the fetch scheme are this design's choices.
// At the start of each line (first pixel clock of hcnt = 0) a fetch engine
// reads the next line of the cover and then of the stego image, 3N words in
// back-to-back single-cycle reads, unpacks the R,G,B byte stream into
// pixels and stores them in one half of a ping-pong line buffer of 2 x 2N
// pixels. The other half, filled during the previous line, is read out to
// the screen. A line is 1600 clocks long, so the 3N+2 clocks of fetching
// always finish in time. The SRAM must be free for this block while
// `enable` is high.
//
// Outputs: 10-bit colour per channel for the video DAC (the 8-bit value with
// its top two bits repeated), blank and sync strobes, all one pixel clock
// behind hcnt/vcnt: the line buffer is read into a register on the pixel
// enable (a block-RAM style synchronous read) and the colour is gated to
// black outside the images after that register.
module vga_display
  import stego_pkg::*;
#(
  parameter int unsigned N          = 256,
  parameter int unsigned AW         = 18,
  parameter logic [AW-1:0] COVER_BASE = AW'(0),
  parameter logic [AW-1:0] STEGO_BASE = AW'(32'h20000),
  parameter int unsigned V_TOT      = 525
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  // from vga_timing
  input  logic          pix_en,
  input  logic [9:0]    hcnt,
  input  logic [9:0]    vcnt,
  input  logic          hsync_n,
  input  logic          vsync_n,
  input  logic          active,
  // SRAM request port (to sram_ctrl), reads only
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  input  logic [15:0]   mem_rdata,
  input  logic          mem_rvalid,
  // to the video DAC
  output logic [9:0]    vga_r,
  output logic [9:0]    vga_g,
  output logic [9:0]    vga_b,
  output logic          vga_hs,
  output logic          vga_vs,
  output logic          vga_blank_n,
  output logic          vga_sync_n
);

  localparam int unsigned ROW_WORDS = 3 * N / 2;
  localparam int unsigned LINE_W    = 2 * ROW_WORDS;
  localparam int unsigned WBITS     = $clog2(LINE_W + 1);
  localparam int unsigned PBITS     = $clog2(2 * N);

  rgb_t lbuf [4*N];   // {bank, column}: two lines of 2N pixels

  // fetch engine
  logic             fetching;
  logic [WBITS-1:0] widx;
  logic [9:0]       ny;     // line to fetch: the one after vcnt
  logic [AW-1:0]    cov_row, stg_row;
  logic [1:0]       rph;
  logic [PBITS-1:0] rpix;
  logic [7:0]       t_r0, t_g0, t_r1;
  logic             wbank;
  logic             line_start;

  assign line_start = pix_en && (hcnt == '0);
  assign ny         = (vcnt == 10'(V_TOT - 1)) ? 10'd0 : vcnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetching <= 1'b0;
      widx     <= '0;
      cov_row  <= '0;
      stg_row  <= '0;
      rph      <= '0;
      rpix     <= '0;
      wbank    <= 1'b0;
      t_r0     <= '0;
      t_g0     <= '0;
      t_r1     <= '0;
    end else begin
      if (line_start && !fetching) begin
        if (enable && (ny < 10'(N))) begin
          fetching <= 1'b1;
          widx     <= '0;
          cov_row  <= COVER_BASE + AW'(32'(ny) * ROW_WORDS);
          stg_row  <= STEGO_BASE + AW'(32'(ny) * ROW_WORDS);
          wbank    <= ny[0];
          rph      <= '0;
          rpix     <= '0;
        end
      end else if (fetching) begin
        if (widx == WBITS'(LINE_W - 1)) fetching <= 1'b0;
        widx <= widx + 1'b1;
      end
      // returned words: w0 = {G0,R0}, w1 = {R1,B0}, w2 = {B1,G1}
      if (mem_rvalid) begin
        unique case (rph)
          2'd0: begin
            t_r0 <= mem_rdata[7:0];
            t_g0 <= mem_rdata[15:8];
            rph  <= 2'd1;
          end
          2'd1: begin
            t_r1 <= mem_rdata[15:8];
            rph  <= 2'd2;
          end
          default: begin
            rph  <= 2'd0;
            rpix <= rpix + PBITS'(2);
          end
        endcase
      end
    end
  end

  // line buffer writes (array, no reset)
  always_ff @(posedge clk) begin
    if (mem_rvalid) begin
      if (rph == 2'd1) lbuf[{wbank, rpix}]        <= '{r: t_r0, g: t_g0, b: mem_rdata[7:0]};
      if (rph == 2'd2) lbuf[{wbank, rpix + 1'b1}] <= '{r: t_r1, g: mem_rdata[7:0], b: mem_rdata[15:8]};
    end
  end

  assign mem_req  = fetching;
  assign mem_addr = (widx < WBITS'(ROW_WORDS)) ? cov_row + AW'(widx)
                                               : stg_row + AW'(widx - WBITS'(ROW_WORDS));

  // screen side: registered line-buffer read, then colour gating
  logic in_img, in_img_q;
  rgb_t pix_q;
  assign in_img = enable && active && (vcnt < 10'(N)) && (hcnt < 10'(2 * N));

  always_ff @(posedge clk) begin
    if (pix_en) pix_q <= lbuf[{vcnt[0], hcnt[PBITS-1:0]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_img_q    <= 1'b0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else if (pix_en) begin
      in_img_q    <= in_img;
      vga_hs      <= hsync_n;
      vga_vs      <= vsync_n;
      vga_blank_n <= active;
    end
  end

  assign vga_r = in_img_q ? {pix_q.r, pix_q.r[7:6]} : '0;
  assign vga_g = in_img_q ? {pix_q.g, pix_q.g[7:6]} : '0;
  assign vga_b = in_img_q ? {pix_q.b, pix_q.b[7:6]} : '0;

  assign vga_sync_n = 1'b0;

endmodule
