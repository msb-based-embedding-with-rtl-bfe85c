// vga_timing: 640 x 480, 60 Hz VGA timing from the 50 MHz system clock.
//
// The 50 MHz clock is divided by two into a 25 MHz pixel clock, as the
// article describes; inside the design the division is a clock enable
// (`pix_en`, high every other cycle) and the divided clock is also driven
// out on `vga_clk` for the video DAC. Per pixel clock the horizontal counter
// runs over 800 pixels (640 visible, 16 front porch, 96 sync, 48 back porch)
// and the vertical counter over 525 lines (480, 10, 2, 33); both syncs are
// active low. These porch and sync figures are the standard VESA 640x480@60
// values, not from the article. `hcnt`/`vcnt` give the pixel now being
// sent; `active` is high inside the visible 640 x 480 area; all outputs
// change on a clock edge where pix_en was high.
module vga_timing #(
  parameter int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       pix_en,
  output logic       vga_clk,
  output logic [9:0] hcnt,
  output logic [9:0] vcnt,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       active
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= 1'b0;
    else        div <= !div;
  end

  assign pix_en  = div;
  assign vga_clk = div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (pix_en) begin
      if (hcnt == 10'(H_TOT - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == 10'(V_TOT - 1)) ? '0 : vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

  assign hsync_n = !((hcnt >= 10'(H_VIS + H_FP)) && (hcnt < 10'(H_VIS + H_FP + H_SYNC)));
  assign vsync_n = !((vcnt >= 10'(V_VIS + V_FP)) && (vcnt < 10'(V_VIS + V_FP + V_SYNC)));
  assign active  = (hcnt < 10'(H_VIS)) && (vcnt < 10'(V_VIS));

endmodule
