// aes_ctrl - enable and round sequencing of the AES-128 encryptor.
//
// A block starts (load) when the input holds a whole plaintext/key pair and
// the datapath is idle or in its last round; load puts plaintext ^ key (the
// initial round) into the state register and the key into the key
// expansion. Each following enabled cycle is one round (step): rounds 1..9
// loop back through the state register, round 10 is the last round
// (last = 1), whose result is handed to the output (done) while the next
// block may load in that same cycle. So a block takes ten enabled cycles
// after load, and back-to-back blocks start every ten enabled cycles.
//
// en is the global enable: while it is low no block starts and no round
// advances; the state and round keys hold.
//
// The enable block and the 1-9 round loop follow the design; the
// one-round-per-cycle schedule and the overlap of load with the last round
// are this implementation's choice.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   blk_ready,  // a whole plaintext/key pair is waiting
  output logic   load,       // start a block (takes the input)
  output logic   step,       // compute one round this cycle
  output logic   last,       // the round being computed is round NR
  output logic   done,       // cipher text is ready this cycle
  output logic   busy,
  output round_t round       // round being computed, 1..NR while busy
);

  logic   busy_q;
  round_t rnd_q;

  assign busy  = busy_q;
  assign round = rnd_q;
  assign last  = busy_q && rnd_q == round_t'(NR);
  assign step  = en && busy_q;
  assign done  = step && last;
  assign load  = en && blk_ready && (!busy_q || last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      rnd_q  <= '0;
    end else if (load) begin
      busy_q <= 1'b1;
      rnd_q  <= round_t'(1);
    end else if (step) begin
      if (last) begin
        busy_q <= 1'b0;
        rnd_q  <= '0;
      end else begin
        rnd_q  <= rnd_q + round_t'(1);
      end
    end
  end

  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy_q |-> (rnd_q >= 1 && rnd_q <= round_t'(NR)));

endmodule
