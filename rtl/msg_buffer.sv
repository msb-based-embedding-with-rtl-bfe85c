// msg_buffer: message bit buffer between the 16-bit message words read from
// SRAM and the pixel embedder.
//
// The article only says that message bits are sent to the embedding logic
// as it demands them; this buffer is the simplest way to do that with a
// variable number of bits per pixel (0 to 8). It holds up to 32 bits,
// left-aligned: the oldest bit is in bits_q[31] and appears as head[7].
// `take` removes `ntake` bits from the head; `push` appends a 16-bit word
// (its bit 15 is the oldest). Both may happen in the same cycle; the take is
// applied first. `want` is high while 16 or fewer bits are held, i.e. when a
// word can be pushed without overflow. `count` is the number of bits held.
// A push while more than 16 bits are held, or a take of more bits than are
// held, is a usage error flagged by assertions.
module msg_buffer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        push,
  input  logic [15:0] word,
  input  logic        take,
  input  logic [3:0]  ntake,
  output logic [7:0]  head,
  output logic [5:0]  count,
  output logic        want
);

  logic [31:0] bits_q;
  logic [5:0]  cnt_q;
  logic [31:0] bits_t;
  logic [5:0]  cnt_t;

  always_comb begin
    bits_t = take ? (bits_q << ntake) : bits_q;
    cnt_t  = take ? (cnt_q - 6'(ntake)) : cnt_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q <= '0;
      cnt_q  <= '0;
    end else if (clear) begin
      bits_q <= '0;
      cnt_q  <= '0;
    end else if (push) begin
      bits_q <= bits_t | ({word, 16'd0} >> cnt_t);
      cnt_q  <= cnt_t + 6'd16;
    end else begin
      bits_q <= bits_t;
      cnt_q  <= cnt_t;
    end
  end

  assign head  = bits_q[31:24];
  assign count = cnt_q;
  assign want  = (cnt_q <= 6'd16);

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) (push && !clear) |-> (cnt_t <= 6'd16);
  endproperty
  a_no_overflow: assert property (p_no_overflow);

  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) (take && !clear) |-> (6'(ntake) <= cnt_q);
  endproperty
  a_no_underflow: assert property (p_no_underflow);

endmodule
