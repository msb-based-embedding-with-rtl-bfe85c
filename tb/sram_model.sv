// sram_model: behavioural model of a 256K x 16 asynchronous SRAM
// (IS61LV25616-style pins, active-low CE, OE, WE, LB, UB) for simulation.
// Reads are combinational; a write stores the bus into the addressed word
// while CE and WE are low, evaluated 2 ns after any pin change so that pins
// switched on the same clock edge have settled. The testbench reaches the
// array `mem` hierarchically to load and inspect images.
module sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic [AW-1:0] addr,
  input  logic [15:0]   dq_in,     // bus as driven by the FPGA
  input  logic          dq_in_en,  // FPGA drives the bus
  output logic [15:0]   dq_out,    // bus as seen by the FPGA
  input  logic          we_n,
  input  logic          oe_n,
  input  logic          ce_n,
  input  logic          lb_n,
  input  logic          ub_n
);

  logic [15:0] mem [2**AW];

  assign dq_out = (!ce_n && !oe_n && we_n) ? mem[addr] : 16'h0000;

  always @(addr or dq_in or we_n or ce_n or lb_n or ub_n) begin
    #2;
    if (!ce_n && !we_n) begin
      if (!dq_in_en) $error("sram_model: write with the bus not driven");
      if (!lb_n) mem[addr][7:0]  = dq_in[7:0];
      if (!ub_n) mem[addr][15:8] = dq_in[15:8];
    end
  end

endmodule
