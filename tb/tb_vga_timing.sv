// tb_vga_timing: counts clocks per line and per frame, sync pulse widths
// and positions, and the 25 MHz pixel enable, over two frames.
module tb_vga_timing;
  logic clk = 0, rst_n = 0;
  logic pix_en, vga_clk, hsync_n, vsync_n, active;
  logic [9:0] hcnt, vcnt;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst_n, .pix_en, .vga_clk, .hcnt, .vcnt, .hsync_n, .vsync_n, .active);

  always #10 clk = !clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  initial begin
    int clocks = 0, pix = 0, hs_low = 0, vs_lines = 0, act = 0, frames = 0;
    int line_start_clk = 0, frame_start_clk = 0;
    logic prev_hs = 1, prev_vs = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (frames < 2) begin
      @(posedge clk); #1;
      clocks++;
      // pixel enable every other clock
      if (pix_en) pix++;
      if (pix_en && hcnt == 0 && vcnt == 0) begin
        if (frames > 0 || frame_start_clk > 0) chk(clocks - frame_start_clk == 800 * 525 * 2, "frame length");
        frame_start_clk = clocks;
        if (clocks > 2) frames++;
      end
      if (pix_en && hcnt == 0) begin
        if (line_start_clk > 0) chk(clocks - line_start_clk == 1600, "line length");
        line_start_clk = clocks;
      end
      if (pix_en) begin
        if (!hsync_n) hs_low++;
        if (hsync_n && !prev_hs) begin chk(hs_low == 96, "hsync width"); hs_low = 0; end
        if (!hsync_n && prev_hs) chk(hcnt == 656, "hsync start");
        if (!vsync_n && prev_vs) chk(vcnt == 490 && hcnt == 0, "vsync start");
        if (active) act++;
        prev_hs = hsync_n; prev_vs = vsync_n;
      end
    end
    chk(act == 2 * 640 * 480, "active pixels per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
