// aes_key_expand - AES-128 key expansion, one round key per step.
//
// The round keys are produced in parallel with the encryption rather than
// precomputed: rk_q holds round key i-1 (the cipher key after load), and
// rk_next is round key i, computed combinationally from it:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   n0 = w0 ^ t,  n1 = w1 ^ n0,  n2 = w2 ^ n1,  n3 = w3 ^ n2
// rk_next is the round key that the round datapath uses in the current
// cycle, i.e. "round key selection" is simply the register's current step.
// On step the register moves to rk_next and rcon to xtime(rcon), so rcon
// runs 01, 02, 04, ..., 80, 1b, 36 over the ten rounds.
//
// Timing: load (the start of a block) takes key_in into rk_q and sets rcon to
// 01; in the next cycle rk_next is round key 1. load wins over step.
// Generating keys alongside the rounds follows the design; the four
// additional S-box tables used by SubWord and the register layout are this
// implementation's choice.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,     // take key_in as round key 0
  input  block_t key_in,
  input  logic   step,     // advance to the next round key
  output block_t rk_next   // round key for the round now being computed
);

  block_t rk_q;
  byte_t  rcon_q;
  word_t  w0, w1, w2, w3;
  word_t  rot, sub, t;

  assign {w0, w1, w2, w3} = rk_q;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in_byte (rot[31 - 8*i -: 8]),
      .out_byte(sub[31 - 8*i -: 8])
    );
  end

  always_comb begin
    word_t n0, n1, n2, n3;
    t  = sub ^ {rcon_q, 24'h0};
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    rk_next = {n0, n1, n2, n3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk_q   <= '0;
      rcon_q <= 8'h01;
    end else if (load) begin
      rk_q   <= key_in;
      rcon_q <= 8'h01;
    end else if (step) begin
      rk_q   <= rk_next;
      rcon_q <= xtime(rcon_q);
    end
  end

endmodule
