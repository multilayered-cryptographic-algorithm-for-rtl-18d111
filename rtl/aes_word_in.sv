// aes_word_in - collects four consecutive 32-bit words into a 128-bit block.
//
// The encryptor takes its 128-bit plaintext and key as four 32-bit words
// each, first word = bytes 0..3 (column 0). Words are accepted on cycles with
// in_valid && in_ready and shifted in from the right; after the fourth,
// full rises and block_out holds the whole block until the consumer pulses
// take. While full, in_ready is low unless take is high in the same cycle,
// so the next block can start arriving as soon as the current one is taken
// (the block is read in the cycle of take, before the edge shifts in a new
// word). This lets the next block load while the current one is encrypted.
//
// Word-serial input follows the design; the valid/ready handshake and the
// word order are this implementation's choice.
module aes_word_in
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  word_t  in_word,
  output logic   in_ready,
  output logic   full,      // block_out holds four words
  output block_t block_out,
  input  logic   take       // consumer takes block_out (only while full)
);

  logic [1:0] cnt_q;
  logic       accept;

  assign in_ready = !full || take;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      full      <= 1'b0;
      block_out <= '0;
    end else begin
      if (accept) begin
        block_out <= {block_out[95:0], in_word};
        cnt_q     <= cnt_q + 2'd1;
      end
      if (accept && cnt_q == 2'd3) full <= 1'b1;
      else if (take)               full <= 1'b0;
    end
  end

  // take is only meaningful while a whole block is held.
  a_take_when_full: assert property (@(posedge clk) disable iff (!rst_n) take |-> full);

endmodule
