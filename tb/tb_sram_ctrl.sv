// tb_sram_ctrl: random back-to-back reads and writes through the pin driver
// into the SRAM model; checks read data and its two-cycle latency, and that
// the SRAM is deselected when idle.
module tb_sram_ctrl;
  logic clk = 0, rst_n = 0, req = 0, we = 0;
  logic [17:0] addr;
  logic [15:0] wdata, rdata, dq_o, dq_i;
  logic rvalid, dq_oe, we_n, oe_n, ce_n, lb_n, ub_n;
  logic [17:0] sa;
  int checks = 0, failures = 0;
  logic [15:0] shadow [16];
  logic [15:0] expq [$];
  int pend [$];

  sram_ctrl dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .rvalid,
    .sram_addr(sa), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_we_n(we_n), .sram_oe_n(oe_n), .sram_ce_n(ce_n), .sram_lb_n(lb_n), .sram_ub_n(ub_n));

  sram_model mem (.addr(sa), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i),
    .we_n, .oe_n, .ce_n, .lb_n, .ub_n);

  always #10 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read data must arrive exactly two cycles after the request
  int cyc = 0;
  int req_cyc [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && rvalid) begin
      checks++;
      if (expq.size() == 0 || rdata !== expq[0] || cyc - req_cyc[0] != 2) begin
        failures++;
        if (failures < 10) $display("read: got %h exp %h latency %0d", rdata,
                                    expq.size() ? expq[0] : 16'hx, cyc - req_cyc[0]);
      end
      if (expq.size()) begin void'(expq.pop_front()); void'(req_cyc.pop_front()); end
    end
    if (req && !we) begin expq.push_back(shadow[addr[3:0]]); req_cyc.push_back(cyc); end
    if (req && we) shadow[addr[3:0]] = wdata;
  end

  initial begin
    addr = '0; wdata = '0;
    for (int i = 0; i < 16; i++) begin shadow[i] = 16'(i * 977); mem.mem[18'h3A000 + i] = 16'(i * 977); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!ce_n || !we_n || !oe_n || dq_oe) begin failures++; $display("not idle after reset"); end
    for (int t = 0; t < 2000; t++) begin
      req   = ($urandom_range(0, 3) != 0);
      we    = $urandom_range(0, 1);
      addr  = 18'h3A000 + 18'($urandom_range(0, 15));
      wdata = 16'($urandom);
      @(negedge clk);
    end
    req = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (!ce_n || expq.size() != 0) begin failures++; $display("reads lost or SRAM selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
