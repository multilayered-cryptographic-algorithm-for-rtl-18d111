// tb_aes_word_out - serialisation of a block into four 32-bit words.
//
// Loads random blocks at random spacings (never less than the four cycles
// a block needs, sometimes exactly in the cycle of the fourth word) and
// checks that each block comes out as four consecutive valid words, column
// 0 first, with out_last on the fourth, and nothing in between blocks.
module tb_aes_word_out;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  u128         block_in = '0;
  logic        out_valid, out_last;
  logic [31:0] out_word;
  int checks = 0, failures = 0;

  logic [31:0] expq [$];
  logic        lastq [$];

  aes_word_out dut (.clk, .rst_n, .load, .block_in, .out_valid, .out_word, .out_last);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== (expq.size() != 0)) begin
      failures++;
      $display("FAIL out_valid=%0d with %0d words expected", out_valid, expq.size());
    end else if (out_valid) begin
      automatic logic [31:0] w = expq.pop_front();
      automatic logic        l = lastq.pop_front();
      if (out_word !== w || out_last !== l) begin
        failures++;
        $display("FAIL word %08x last %0d, expected %08x last %0d", out_word, out_last, w, l);
      end
    end
    if (load)
      for (int i = 0; i < 4; i++) begin
        expq.push_back(block_in[127 - 32*i -: 32]);
        lastq.push_back(i == 3);
      end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      block_in = rand128();
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      repeat (3 + $urandom % 4) @(negedge clk);
    end
    repeat (6) @(negedge clk);
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
