// sram_ctrl: pin driver for a 16-bit asynchronous SRAM (WE, OE, CE, LB, UB,
// all active low), one access per clock.
//
// A request (req, we, addr, wdata) presented in cycle t is registered onto
// the pins for cycle t+1. For a read, the data the SRAM returns during t+1
// is captured at the end of that cycle, so `rdata` is valid, with `rvalid`
// high, in cycle t+2. For a write, WE is low and the data bus is driven for
// cycle t+1. Between accesses CE, OE and WE are high and the bus is not
// driven. Both byte lanes are always enabled (the design only makes 16-bit
// accesses). The article names the control signals; the registered,
// single-cycle timing is this design's choice for a 50 MHz clock and a
// 10 ns SRAM. The bidirectional data bus is split into dq_o, dq_oe and dq_i;
// the board-level tristate buffer is outside this block.
module sram_ctrl #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic          rvalid,
  // SRAM pins
  output logic [AW-1:0] sram_addr,
  output logic [DW-1:0] sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [DW-1:0] sram_dq_i,
  output logic          sram_we_n,
  output logic          sram_oe_n,
  output logic          sram_ce_n,
  output logic          sram_lb_n,
  output logic          sram_ub_n
);

  logic rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr  <= '0;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      sram_we_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_ce_n  <= 1'b1;
      sram_lb_n  <= 1'b1;
      sram_ub_n  <= 1'b1;
      rd_q       <= 1'b0;
      rdata      <= '0;
      rvalid     <= 1'b0;
    end else begin
      sram_addr  <= addr;
      sram_dq_o  <= wdata;
      sram_dq_oe <= req && we;
      sram_we_n  <= !(req && we);
      sram_oe_n  <= !(req && !we);
      sram_ce_n  <= !req;
      sram_lb_n  <= !req;
      sram_ub_n  <= !req;
      rd_q       <= req && !we;
      rvalid     <= rd_q;
      if (rd_q) rdata <= sram_dq_i;
    end
  end

  // pin rules: never read and write at once, drive the bus only while
  // writing, and keep the part selected whenever WE or OE is active
  a_we_oe_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(!sram_we_n && !sram_oe_n));
  a_bus_only_on_write: assert property (@(posedge clk) disable iff (!rst_n)
    sram_dq_oe |-> !sram_we_n);
  a_selected: assert property (@(posedge clk) disable iff (!rst_n)
    (!sram_we_n || !sram_oe_n) |-> !sram_ce_n);

endmodule
