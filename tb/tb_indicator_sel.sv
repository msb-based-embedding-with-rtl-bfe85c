// tb_indicator_sel: the three indicator methods, including the R,G,B,R...
// cycle of method 3 and its restart.
module tb_indicator_sel;
  import stego_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, advance = 0;
  method_e method;
  plane_e  user_sel, ind;
  int checks = 0, failures = 0;

  indicator_sel dut (.clk, .rst_n, .restart, .advance, .method, .user_sel, .ind);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ind(plane_e e);
    checks++;
    if (ind !== e) begin
      failures++;
      $display("method %0d user %0d: got %0d exp %0d", method, user_sel, ind, e);
    end
  endtask

  initial begin
    method = M_FIXED_RED; user_sel = PL_B;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      expect_ind(PL_R);
      advance = 1; @(negedge clk); advance = 0;
    end
    method = M_USER;
    for (int u = 0; u < 4; u++) begin
      user_sel = plane_e'(u); #1;
      expect_ind(u == 3 ? PL_R : plane_e'(u));
    end
    method = M_CYCLIC;
    restart = 1; @(negedge clk); restart = 0;
    for (int i = 0; i < 20; i++) begin
      expect_ind(plane_e'(i % 3));
      if ($urandom_range(0, 1)) begin
        // holding advance low keeps the indicator
        @(negedge clk); expect_ind(plane_e'(i % 3));
      end
      advance = 1; @(negedge clk); advance = 0;
    end
    restart = 1; @(negedge clk); restart = 0;
    expect_ind(PL_R);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
