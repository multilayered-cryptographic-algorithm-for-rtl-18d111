// tb_aes_state_path - the state register and its four packet units over a
// whole encryption.
//
// The testbench plays controller and key schedule: it loads plaintext and
// key, then supplies reference round keys 1..10 with step, sometimes
// pausing a cycle with step low. After every round round_out must equal the
// reference round applied to the previous state; in round 10 (last) it
// must be the reference cipher text. FIPS-197 vectors plus random blocks.
module tb_aes_state_path;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0, last = 1'b0;
  u128  pt_in = '0, key_in = '0, rk = '0, round_out;
  int   checks = 0, failures = 0;

  aes_state_path dut (.clk, .rst_n, .load, .pt_in, .key_in, .step, .last, .rk, .round_out);

  always #5 clk = ~clk;

  task automatic check(u128 got, u128 exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032x expected %032x", what, got, exp);
    end
  endtask

  task automatic run_block(u128 pt, u128 key, bit pauses);
    rk_array_t rks = ref_key_schedule(key);
    automatic u128 s = pt ^ key;
    @(negedge clk);
    pt_in = pt; key_in = key; load = 1'b1; step = 1'b1;  // load wins
    @(negedge clk);
    load = 1'b0; pt_in = rand128(); key_in = rand128();
    for (int r = 1; r <= 10; r++) begin
      rk   = rks[r];
      last = (r == 10);
      step = 1'b0;
      if (pauses && ($urandom % 2)) @(negedge clk);
      s = ref_round(s, rks[r], r == 10);
      #1;
      check(round_out, s, $sformatf("round %0d", r));
      step = 1'b1;
      @(negedge clk);
    end
    step = 1'b0; last = 1'b0;
    check(s, ref_encrypt(pt, key), "cipher text vs reference");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Reference model self-check.
    checks += 2;
    if (ref_encrypt(KAT_B_PT, KAT_B_KEY) !== KAT_B_CT) begin failures++; $display("FAIL model B"); end
    if (ref_encrypt(KAT_C_PT, KAT_C_KEY) !== KAT_C_CT) begin failures++; $display("FAIL model C"); end
    run_block(KAT_B_PT, KAT_B_KEY, 1'b0);
    run_block(KAT_C_PT, KAT_C_KEY, 1'b1);
    for (int n = 0; n < 30; n++) run_block(rand128(), rand128(), n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
