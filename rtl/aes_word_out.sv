// aes_word_out - sends a 128-bit cipher text as four consecutive 32-bit words.
//
// load captures block_in; in each of the next four cycles out_valid is high
// and out_word carries one column, column 0 (bytes 0..3) first; out_last
// marks the fourth word. There is no back-pressure: the encryptor finishes
// at most one block per ten cycles, so the four words always drain before
// the next load. A load may arrive in the cycle of the fourth word.
//
// Replacing the 128-bit output by four 32-bit words follows the design; the
// valid/last signalling is this implementation's choice.
module aes_word_out
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t block_in,
  output logic   out_valid,
  output word_t  out_word,
  output logic   out_last
);

  block_t     buf_q;
  logic [2:0] left_q;  // words still to send

  assign out_valid = left_q != 3'd0;
  assign out_word  = buf_q[127:96];
  assign out_last  = left_q == 3'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q  <= '0;
      left_q <= '0;
    end else if (load) begin
      buf_q  <= block_in;
      left_q <= 3'd4;
    end else if (out_valid) begin
      buf_q  <= {buf_q[95:0], 32'h0};
      left_q <= left_q - 3'd1;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) load |-> left_q <= 3'd1);

endmodule
