// aes_state_path - 128-bit state register and the round transformation.
//
// load writes plaintext ^ key (the initial AddRoundKey) into the 128-bit
// state register. In every round the register is split into four 32-bit
// packets; packet c takes bytes s(0,c), s(1,c+1), s(2,c+2), s(3,c+3) (column
// indices mod 4), which performs ShiftRows, and goes through its own
// aes_col_round unit with round-key word c. The four results form round_out.
// On step the register takes round_out, closing the loop for rounds 1..9;
// in the last round (last = 1) MixColumn is skipped and round_out is the
// cipher text, which the caller takes in that same cycle.
//
// Timing: round_out is combinational from the state register, the round
// key and last. load wins over step.
//
// The 128-bit register, the four parallel 32-bit packet units and the
// separate last round follow the design; forming packets from the rotated
// diagonals is this implementation's way of doing the row rotation.
module aes_state_path
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t pt_in,
  input  block_t key_in,
  input  logic   step,
  input  logic   last,
  input  block_t rk,         // round key for the round being computed
  output block_t round_out
);

  block_t state_q;
  word_t  packet [NB];
  word_t  result [NB];

  for (genvar c = 0; c < NB; c++) begin : g_packet
    assign packet[c] = {sbyte(state_q, 0, c),
                        sbyte(state_q, 1, (c + 1) % NB),
                        sbyte(state_q, 2, (c + 2) % NB),
                        sbyte(state_q, 3, (c + 3) % NB)};

    aes_col_round u_col (
      .packet_in (packet[c]),
      .rk_word   (col(rk, c)),
      .last      (last),
      .packet_out(result[c])
    );

    assign round_out[127 - 32*c -: 32] = result[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= '0;
    else if (load) state_q <= pt_in ^ key_in;
    else if (step) state_q <= round_out;
  end

endmodule
