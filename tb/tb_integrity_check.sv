// tb_integrity_check: clean 8x8 images pass; a change to one inner pixel is
// located at its row and column; a change to a border pixel is detected.
module tb_integrity_check;
  import stego_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, valid = 0;
  rgb_t pix;
  logic last_row, last_col, done, ok, corner_bad, located;
  logic [3:0] bad_rows, bad_cols;
  logic [2:0] err_row, err_col;
  int checks = 0, failures = 0;

  integrity_check #(.N(N)) dut (.clk, .rst_n, .start, .valid, .pix, .last_row, .last_col,
    .done, .ok, .corner_bad, .bad_rows, .bad_cols, .err_row, .err_col, .located);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(ref logic [23:0] img[]);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < N*N; p++) begin
      pix = rgb_t'(img[p]); valid = 1;
      @(negedge clk); valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    @(negedge clk);
  endtask

  initial begin
    pix = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [23:0] img [];
      int r, c, kind;
      img = new[N*N];
      for (int p = 0; p < N*N; p++) img[p] = 24'($urandom);
      integrity(N, img);
      kind = t % 4;   // 0 clean, 1/2 inner change, 3 border change
      r = $urandom_range(0, N - 2);
      c = $urandom_range(0, N - 2);
      if (kind == 1 || kind == 2) img[r*N + c] ^= (24'(1) << $urandom_range(0, 3)) << (8 * $urandom_range(0, 2));
      if (kind == 3) img[r*N + N - 1] ^= 24'h000001;
      send(img);
      checks++;
      if (!done) failures++;
      checks++;
      case (kind)
        0: if (!ok || located) begin failures++; $display("clean image flagged"); end
        1, 2: if (ok || !located || err_row != 3'(r) || err_col != 3'(c)) begin
             failures++;
             $display("inner change at %0d,%0d: located=%0d at %0d,%0d", r, c, located, err_row, err_col);
           end
        default: if (ok || located || bad_rows != 1 || bad_cols != 0 || !corner_bad) begin
             failures++;
             $display("border change not reported as one row");
           end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
