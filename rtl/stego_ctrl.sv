// stego_ctrl: the embedding engine. It streams an N x N RGB cover image and
// the message out of an external 16-bit SRAM, embeds, adds the integrity
// nibbles and writes the stego image to a third SRAM region.
//
// Memory map (16-bit words): the cover image at COVER_BASE, the message at
// MSG_BASE, the stego image at STEGO_BASE. Pixels are packed as a byte
// stream R,G,B,R,G,B,... two bytes per word, the earlier byte in bits 7:0,
// so an N x N image takes 1.5*N*N words (the SRAM word counts of the
// article's synthesis table). Message words are consumed from MSG_BASE
// upwards, bit 15 of each word first; the engine reads as many as the image
// takes (at most 8 bits per pixel, fewer on average), so the message region
// must hold at least 8*(N-1)^2 bits. The packing, bit order and map are this
// design's choices; the three regions follow the article.
//
// Schedule: two pixels (three cover words) are handled in a fixed 9-cycle
// slot, 4.5 clocks per pixel, which is the rate implied by the article's
// embedding times (about 294,900 clocks of 50 MHz for 256 x 256):
//   S0 read a message word if the bit buffer has room   S5 embed pixel 0
//   S1..S3 read the three cover words                   S6 embed pixel 1
//   S6..S8 write the three stego words
// SRAM reads return two cycles after the request (see sram_ctrl).
// A whole image takes 9*N*N/2 clocks from `start` to `done`.
//
// Interface: `start` (a pulse, ignored while busy) begins an image; `busy`
// is high until the last stego word is written, then `done` stays high
// until the next start. `embed_bits` counts the message bits hidden.
module stego_ctrl
  import stego_pkg::*;
#(
  parameter int unsigned N          = 256,
  parameter int unsigned AW         = 18,
  parameter logic [AW-1:0] COVER_BASE = AW'(0),
  parameter logic [AW-1:0] MSG_BASE   = AW'(32'h18000),
  parameter logic [AW-1:0] STEGO_BASE = AW'(32'h20000)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  method_e       method,
  input  plane_e        user_sel,
  output logic          busy,
  output logic          done,
  output logic [31:0]   embed_bits,
  // SRAM request port (to sram_ctrl)
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [15:0]   mem_wdata,
  input  logic [15:0]   mem_rdata
);

  typedef enum logic [3:0] {
    S_IDLE, S0, S1, S2, S3, S4, S5, S6, S7, S8
  } state_e;

  state_e        state;
  logic [AW-1:0] cov_ptr, msg_ptr, stg_ptr;
  logic          msg_pend;
  rgb_t          cov0, cov1, stg0, stg1;
  logic          last_seen;

  // datapath
  plane_e        ind;
  rgb_t          emb_in, emb_out, int_out;
  logic [3:0]    nbits;
  logic [7:0]    head;
  logic          mwant, pix_step;
  logic          last_row, last_col, last_pixel;

  assign pix_step = (state == S5) || (state == S6);
  assign emb_in   = (state == S6) ? cov1 : cov0;

  indicator_sel u_ind (
    .clk, .rst_n, .restart(start && !busy), .advance(pix_step),
    .method, .user_sel, .ind
  );

  pixel_embedder u_emb (
    .en(!(last_row || last_col)), .cvr(emb_in), .ind, .msg(head),
    .stego(emb_out), .k(), .nbits
  );

  msg_buffer u_msg (
    .clk, .rst_n, .clear(start && !busy),
    .push(msg_pend && state == S2), .word(mem_rdata),
    .take(pix_step), .ntake(nbits),
    .head, .count(), .want(mwant)
  );

  integrity_gen #(.N(N)) u_int (
    .clk, .rst_n, .start(start && !busy), .valid(pix_step),
    .pix_in(emb_out), .pix_out(int_out),
    .row(), .col(), .last_row, .last_col, .last_pixel
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      cov_ptr    <= '0;
      msg_ptr    <= '0;
      stg_ptr    <= '0;
      msg_pend   <= 1'b0;
      cov0       <= '0;
      cov1       <= '0;
      stg0       <= '0;
      stg1       <= '0;
      last_seen  <= 1'b0;
      embed_bits <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S0;
          done       <= 1'b0;
          cov_ptr    <= COVER_BASE;
          msg_ptr    <= MSG_BASE;
          stg_ptr    <= STEGO_BASE;
          last_seen  <= 1'b0;
          embed_bits <= '0;
        end
        S0: begin
          msg_pend <= mwant;
          if (mwant) msg_ptr <= msg_ptr + 1'b1;
          state <= S1;
        end
        S1: begin cov_ptr <= cov_ptr + 1'b1; state <= S2; end
        S2: begin cov_ptr <= cov_ptr + 1'b1; state <= S3; end
        S3: begin
          cov_ptr <= cov_ptr + 1'b1;
          cov0.r  <= mem_rdata[7:0];
          cov0.g  <= mem_rdata[15:8];
          state   <= S4;
        end
        S4: begin
          cov0.b <= mem_rdata[7:0];
          cov1.r <= mem_rdata[15:8];
          state  <= S5;
        end
        S5: begin
          cov1.g     <= mem_rdata[7:0];
          cov1.b     <= mem_rdata[15:8];
          stg0       <= int_out;
          embed_bits <= embed_bits + 32'(nbits);
          state      <= S6;
        end
        S6: begin
          stg1       <= int_out;
          embed_bits <= embed_bits + 32'(nbits);
          last_seen  <= last_pixel;
          stg_ptr    <= stg_ptr + 1'b1;
          state      <= S7;
        end
        S7: begin stg_ptr <= stg_ptr + 1'b1; state <= S8; end
        S8: begin
          stg_ptr <= stg_ptr + 1'b1;
          if (last_seen) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // SRAM requests
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = cov_ptr;
    mem_wdata = '0;
    unique case (state)
      S0:       begin mem_req = mwant; mem_addr = msg_ptr; end
      S1, S2, S3: begin mem_req = 1'b1; mem_addr = cov_ptr; end
      S6:       begin mem_req = 1'b1; mem_we = 1'b1; mem_addr = stg_ptr; mem_wdata = {stg0.g, stg0.r}; end
      S7:       begin mem_req = 1'b1; mem_we = 1'b1; mem_addr = stg_ptr; mem_wdata = {stg1.r, stg0.b}; end
      S8:       begin mem_req = 1'b1; mem_we = 1'b1; mem_addr = stg_ptr; mem_wdata = {stg1.b, stg1.g}; end
      default:  ;
    endcase
  end

  // the two pixels of a slot are always in the same row (N is even)
  initial assert (N % 2 == 0 && N >= 4) else $error("N must be even and at least 4");

endmodule
