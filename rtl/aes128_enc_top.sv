// aes128_enc_top - AES-128 encryptor with 32-bit word ports.
//
// Plaintext and key each arrive as four consecutive 32-bit words on
// pt_word/key_word (one word of each per accepted cycle, in_valid &&
// in_ready, column 0 first). Once all four are in, the controller loads
// plaintext ^ key into the 128-bit state register and the key into the key
// expansion, then runs one round per enabled cycle: rounds 1-9 through four
// parallel 32-bit packet units and the state register, round 10 without
// MixColumn. The round keys are generated in step with the rounds. The
// cipher text leaves as four consecutive 32-bit words on ct_word with
// ct_valid, ct_last on the fourth.
//
// Timing: the next block's words may be accepted while a block is being
// encrypted, so with words supplied without gaps and en held high a block
// completes every 10 cycles. The cipher text's first word appears 11 cycles
// after the cycle in which the block was loaded. en low freezes the
// datapath (the input may still fill and the output still drains).
//
// The word-serial ports, the 128-bit register with four 32-bit packets, the
// key expansion running alongside and the en input follow the design; the
// handshakes and the one-round-per-cycle schedule are this implementation's
// choices.
module aes128_enc_top
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  word_t pt_word,
  input  word_t key_word,
  output logic  in_ready,
  output logic  ct_valid,
  output word_t ct_word,
  output logic  ct_last,
  output logic  busy,
  output round_t round    // round in progress, 1..10 while busy
);

  logic   pt_full, key_full, pt_ready, key_ready;
  block_t pt_blk, key_blk, rk, round_out;
  logic   load, step, last, done;

  assign in_ready = pt_ready && key_ready;

  aes_word_in u_pt_in (
    .clk, .rst_n,
    .in_valid (in_valid && in_ready),
    .in_word  (pt_word),
    .in_ready (pt_ready),
    .full     (pt_full),
    .block_out(pt_blk),
    .take     (load)
  );

  aes_word_in u_key_in (
    .clk, .rst_n,
    .in_valid (in_valid && in_ready),
    .in_word  (key_word),
    .in_ready (key_ready),
    .full     (key_full),
    .block_out(key_blk),
    .take     (load)
  );

  aes_ctrl u_ctrl (
    .clk, .rst_n, .en,
    .blk_ready(pt_full && key_full),
    .load, .step, .last, .done, .busy, .round
  );

  aes_key_expand u_key (
    .clk, .rst_n,
    .load   (load),
    .key_in (key_blk),
    .step   (step),
    .rk_next(rk)
  );

  aes_state_path u_state (
    .clk, .rst_n,
    .load, .pt_in(pt_blk), .key_in(key_blk),
    .step, .last, .rk,
    .round_out
  );

  aes_word_out u_out (
    .clk, .rst_n,
    .load     (done),
    .block_in (round_out),
    .out_valid(ct_valid),
    .out_word (ct_word),
    .out_last (ct_last)
  );

endmodule
