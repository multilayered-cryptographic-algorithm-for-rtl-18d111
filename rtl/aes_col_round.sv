// aes_col_round - round transformation of one 32-bit packet (one column).
//
// The packet arrives already row-rotated: its bytes are s(0,c), s(1,c+1),
// s(2,c+2), s(3,c+3) of the state, which is ShiftRows done by choosing
// which bytes form the packet (the "ByteRotation" of the round). This unit
// then applies SubBytes through four S-box tables, MixColumn, and XORs the
// packet's round-key word (AddRoundKey). In the last round MixColumn is left
// out (last = 1), as AES specifies.
//
// Combinational; the 128-bit state register that closes the round loop is
// in aes_state_path, which holds four of these units side by side. Splitting
// the round into four 32-bit packet units follows the design; doing the
// whole round in one clock cycle is this implementation's choice.
module aes_col_round
  import aes_pkg::*;
(
  input  word_t packet_in,  // row-rotated column, s(0,c) in bits [31:24]
  input  word_t rk_word,    // round-key word c
  input  logic  last,       // 1: last round, no MixColumn
  output word_t packet_out
);

  word_t sub;

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in_byte (packet_in[31 - 8*i -: 8]),
      .out_byte(sub[31 - 8*i -: 8])
    );
  end

  always_comb begin
    packet_out = (last ? sub : mix_column(sub)) ^ rk_word;
  end

endmodule
