// tb_auth_key: only the stored key enables the board; the result follows
// the switches within three clocks.
module tb_auth_key;
  logic clk = 0, rst_n = 0;
  logic [3:0] key_sw;
  logic auth;
  int checks = 0, failures = 0;

  auth_key #(.KEY(4'b0110)) dut (.clk, .rst_n, .key_sw, .auth);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_sw = 4'b0110;
    repeat (2) @(posedge clk);
    checks++;
    if (auth) begin failures++; $display("auth during reset"); end
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      key_sw = (t % 3 == 0) ? 4'b0110 : 4'($urandom);
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (auth) begin failures++; $display("auth too early"); end
      @(negedge clk);
      checks++;
      if (auth != (key_sw == 4'b0110)) begin failures++; $display("key %b auth %0d", key_sw, auth); end
      // back to a wrong key so the next step starts from auth = 0
      key_sw = 4'b0000;
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
