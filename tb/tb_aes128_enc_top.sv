// tb_aes128_enc_top - end-to-end test of the AES-128 encryptor at its
// default (and only) configuration.
//
// Plaintext/key pairs are sent as four 32-bit words each; every cipher text
// that comes out as four 32-bit words is compared with a reference AES-128
// computed in the testbench. Three phases:
//   1. the two FIPS-197 vectors, one at a time, checking the latency
//      (12 cycles from the last input word to the first cipher text word);
//   2. a gap-free stream of blocks with en held high, checking that blocks
//      complete every 10 cycles;
//   3. random blocks and keys with random input gaps and random en stalls.
// It counts how often each mechanism happened and fails if one never did:
// input back-pressure, en stalls, a block loaded during the previous
// block's last round, the last round (no MixColumn), key changes between
// blocks.
module tb_aes128_enc_top;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [31:0] pt_word = '0, key_word = '0;
  logic        in_ready, ct_valid, ct_last, busy;
  logic [31:0] ct_word;
  logic [3:0]  round;

  aes128_enc_top dut (.clk, .rst_n, .en, .in_valid, .pt_word, .key_word, .in_ready,
                      .ct_valid, .ct_word, .ct_last, .busy, .round);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_en_stall = 0, n_b2b = 0, n_last = 0, n_key_change = 0;
  int blocks_in = 0, blocks_out = 0;
  longint cyc = 0;

  u128    expq [$];
  longint lastword_cyc [$];
  longint last_out_cyc = -1;
  int     out_idx = 0;
  u128    got = '0;
  u128    prev_key = '0;

  // Phase controls.
  bit check_latency = 1'b0, check_rate = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Output monitor and scoreboard.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_in_stall++;
    if (!en && busy) n_en_stall++;
    if (en && busy && round == 4'd10) n_last++;
    if (ct_valid) begin
      got[127 - 32*out_idx -: 32] = ct_word;
      check(ct_last == (out_idx == 3), "ct_last position");
      if (out_idx == 0) begin
        automatic longint t0 = lastword_cyc.pop_front();
        if (check_latency)
          check(cyc - t0 == 12, $sformatf("latency %0d cycles, expected 12", cyc - t0));
        if (check_rate && last_out_cyc >= 0)
          check(cyc - last_out_cyc == 10, $sformatf("block spacing %0d cycles, expected 10",
                                                    cyc - last_out_cyc));
        // Blocks 10 cycles apart: the next block was loaded in the cycle
        // of the previous block's last round.
        if (last_out_cyc >= 0 && cyc - last_out_cyc == 10) n_b2b++;
        last_out_cyc = cyc;
      end
      if (out_idx == 3) begin
        automatic u128 e = expq.pop_front();
        check(got === e, $sformatf("block %0d: got %032x expected %032x", blocks_out, got, e));
        blocks_out++;
        out_idx = 0;
      end else begin
        out_idx++;
      end
    end
  end

  // Send one block; gaps: probability (in %) of an idle cycle before a word.
  task automatic send_block(u128 pt, u128 key, int gap_pct);
    if (key != prev_key) n_key_change++;
    prev_key = key;
    expq.push_back(ref_encrypt(pt, key));
    for (int i = 0; i < 4; i++) begin
      while (gap_pct > 0 && int'($urandom % 100) < gap_pct) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      pt_word  = pt[127 - 32*i -: 32];
      key_word = key[127 - 32*i -: 32];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (i == 3) lastword_cyc.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 1'b0;
    pt_word  = $urandom;
    key_word = $urandom;
    blocks_in++;
  endtask

  task automatic drain();
    while (blocks_out != blocks_in) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  // Random en stalls in phase 3.
  bit en_random = 1'b0;
  always @(negedge clk) if (en_random) en <= ($urandom % 4) != 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en    = 1'b1;
    @(negedge clk);

    // Phase 1: known answers, latency.
    check_latency = 1'b1;
    send_block(KAT_B_PT, KAT_B_KEY, 0);
    drain();
    send_block(KAT_C_PT, KAT_C_KEY, 0);
    drain();
    check_latency = 1'b0;

    // Phase 2: gap-free stream, one block per 10 cycles.
    last_out_cyc = -1;
    check_rate = 1'b1;
    for (int n = 0; n < 20; n++) send_block(rand128(), (n < 10) ? KAT_C_KEY : rand128(), 0);
    drain();
    check_rate = 1'b0;

    // Phase 3: random gaps, keys and en.
    en_random = 1'b1;
    for (int n = 0; n < 100; n++) send_block(rand128(), (n % 3 == 0) ? prev_key : rand128(), 30);
    en_random = 1'b0;
    en = 1'b1;
    drain();

    check(blocks_out == 122, $sformatf("%0d blocks out, expected 122", blocks_out));
    check(n_in_stall > 0,   "input back-pressure never happened");
    check(n_en_stall > 0,   "en stall never happened");
    check(n_b2b > 0,        "load during last round never happened");
    check(n_last == 122,    $sformatf("last round ran %0d times", n_last));
    check(n_key_change > 0, "key change never happened");
    $display("mechanisms: in_stall=%0d en_stall=%0d back_to_back=%0d last_round=%0d key_change=%0d",
             n_in_stall, n_en_stall, n_b2b, n_last, n_key_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
