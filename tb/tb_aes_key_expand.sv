// tb_aes_key_expand - round keys 1..10 against the reference key schedule.
//
// After load, rk_next must be round key 1, and after each step the next
// round key; a step-less cycle must hold the key. Covers the FIPS-197
// Appendix A.1 key (round key 10 known) and random keys, and checks that a
// load in the same cycle as a step wins.
module tb_aes_key_expand;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  u128  key_in = '0, rk_next;
  int   checks = 0, failures = 0;

  aes_key_expand dut (.clk, .rst_n, .load, .key_in, .step, .rk_next);

  always #5 clk = ~clk;

  task automatic check(u128 got, u128 exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032x expected %032x", what, got, exp);
    end
  endtask

  task automatic run_key(u128 key, bit stall);
    rk_array_t rk = ref_key_schedule(key);
    @(negedge clk);
    key_in = key; load = 1'b1; step = 1'b1;  // load must win over step
    @(negedge clk);
    load = 1'b0; key_in = rand128();
    for (int r = 1; r <= 10; r++) begin
      check(rk_next, rk[r], $sformatf("round key %0d", r));
      if (stall) begin
        step = 1'b0;
        @(negedge clk);
        check(rk_next, rk[r], $sformatf("held round key %0d", r));
      end
      step = 1'b1;
      @(negedge clk);
    end
    step = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_key(KAT_B_KEY, 1'b0);
    // Model self-check against the published last round key.
    checks++;
    if (ref_key_schedule(KAT_B_KEY)[10] !== KAT_B_RK10) begin
      failures++;
      $display("FAIL reference key schedule");
    end
    run_key(KAT_C_KEY, 1'b1);
    for (int n = 0; n < 20; n++) run_key(rand128(), n[0]);
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
