// tb_aes_word_in - word collection and the in_ready/take handshake.
//
// Random words are offered with random gaps; a random consumer takes full
// blocks after random delays. Every taken block must equal the four words
// accepted for it, in order; in_ready must be low while full without take,
// and words offered then must not be lost.
module tb_aes_word_in;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_ready, full, take;
  logic [31:0] in_word = '0;
  u128         block_out;
  int checks = 0, failures = 0, blocks = 0, stalls = 0, overlaps = 0;

  logic [31:0] sent [$];
  logic        take_en = 1'b0;

  aes_word_in dut (.clk, .rst_n, .in_valid, .in_word, .in_ready, .full,
                   .block_out, .take);

  assign take = full && take_en;

  always #5 clk = ~clk;

  // Producer.
  always @(negedge clk) if (rst_n) begin
    if (!in_valid || in_ready) begin
      in_valid <= ($urandom % 4) != 0;
      in_word  <= $urandom;
    end
  end

  // Scoreboard and consumer.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready && take) overlaps++;
    if (in_valid && in_ready) sent.push_back(in_word);
    if (take) begin
      automatic u128 exp = {sent[0], sent[1], sent[2], sent[3]};
      checks++;
      if (block_out !== exp) begin
        failures++;
        $display("FAIL block %0d: got %032x expected %032x", blocks, block_out, exp);
      end
      repeat (4) void'(sent.pop_front());
      blocks++;
    end
    if (full && !take) begin
      checks++;
      if (in_ready) begin
        failures++;
        $display("FAIL in_ready high while full");
      end
    end
  end

  always @(negedge clk) take_en <= ($urandom % 3) == 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (blocks == 200);
    checks++;
    if (stalls == 0 || overlaps == 0) begin
      failures++;
      $display("FAIL coverage: stalls=%0d overlaps=%0d", stalls, overlaps);
    end
    $display("blocks=%0d stalls=%0d overlaps=%0d", blocks, stalls, overlaps);
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
