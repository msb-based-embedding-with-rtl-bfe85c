// tb_table2_sizes: the embedding engine at the image sizes of the published
// timing table, 16x16 to 128x128 (256x256 is run by tb_stego_top_full).
// Each size must produce the reference stego image and finish in the
// published time: 23, 92, 368 and 1474 microseconds at 50 MHz.
module tb_table2_sizes;
  logic clk = 0, rst_n = 0, go = 0;
  logic fin [4];
  int   c [4], f [4];
  int checks = 0, failures = 0;

  always #10 clk = !clk;

  tb_size_run #(.N(16),  .T_US(23))   r16  (.clk, .rst_n, .go, .fin(fin[0]), .checks(c[0]), .failures(f[0]));
  tb_size_run #(.N(32),  .T_US(92))   r32  (.clk, .rst_n, .go, .fin(fin[1]), .checks(c[1]), .failures(f[1]));
  tb_size_run #(.N(64),  .T_US(368))  r64  (.clk, .rst_n, .go, .fin(fin[2]), .checks(c[2]), .failures(f[2]));
  tb_size_run #(.N(128), .T_US(1474)) r128 (.clk, .rst_n, .go, .fin(fin[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
