// auth_key: board access key. Four toggle switches form a 4-bit key; the
// design may embed, display or decode only while they match KEY.
//
// The switches are asynchronous to the clock, so they pass through a
// two-flop synchronizer before the comparison; `auth` is registered and
// follows the switches two to three clocks later. The use of four switches
// as a key is the article's; the key value (KEY) and the synchronizer are
// this design's choices.
module auth_key #(
  parameter logic [3:0] KEY = 4'b1011
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] key_sw,
  output logic       auth
);

  logic [3:0] sync1, sync2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      auth  <= 1'b0;
    end else begin
      sync1 <= key_sw;
      sync2 <= sync1;
      auth  <= (sync2 == KEY);
    end
  end

endmodule
