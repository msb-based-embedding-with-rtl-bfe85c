// tb_msg_buffer: random pushes and takes against a bit-queue reference;
// checks head bits, count and the refill request.
module tb_msg_buffer;
  logic        clk = 0, rst_n = 0, clear = 0, push = 0, take = 0;
  logic [15:0] word;
  logic [3:0]  ntake;
  logic [7:0]  head;
  logic [5:0]  count;
  logic        want;
  int checks = 0, failures = 0;
  bit q[$];

  msg_buffer dut (.clk, .rst_n, .clear, .push, .word, .take, .ntake, .head, .count, .want);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word = '0; ntake = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (count != 6'(q.size()) || want != (q.size() <= 16)) begin
        failures++;
        if (failures < 10) $display("count %0d exp %0d", count, q.size());
      end
      for (int b = 0; b < 8 && b < q.size(); b++)
        if (head[7 - b] != q[b]) begin
          failures++;
          if (failures < 10) $display("head bit %0d wrong", b);
          break;
        end
      // next operation
      take  = (q.size() > 0) && $urandom_range(0, 1);
      ntake = take ? 4'($urandom_range(0, (q.size() < 8) ? q.size() : 8)) : 4'd0;
      push  = (q.size() - ntake <= 16) && $urandom_range(0, 2) == 0;
      word  = 16'($urandom);
      @(posedge clk); #1;
      if (take) repeat (ntake) void'(q.pop_front());
      if (push) for (int b = 15; b >= 0; b--) q.push_back(word[b]);
      push = 0; take = 0;
      if (t == 2500) begin
        clear = 1; @(posedge clk); #1; clear = 0; q.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
