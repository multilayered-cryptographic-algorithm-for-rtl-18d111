// tb_aes_ctrl - round sequencing against a cycle-level model.
//
// blk_ready and en are driven at random. A separate model tracks whether a
// block is in flight and how many enabled rounds it has had; the
// controller's load, step, last, done, busy and round must match it every
// cycle. Also checks that each block gets exactly ten rounds and that
// back-to-back loads (load in the last round) and en stalls both occur.
module tb_aes_ctrl;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, blk_ready = 1'b0;
  logic       load, step, last, done, busy;
  logic [3:0] round;
  int checks = 0, failures = 0, blocks = 0, b2b = 0, en_stalls = 0;

  // model state
  bit m_busy = 0;
  int m_rnd = 0;
  int steps_in_block = 0;

  aes_ctrl dut (.clk, .rst_n, .en, .blk_ready, .load, .step, .last, .done, .busy, .round);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    en        <= ($urandom % 5) != 0;
    blk_ready <= ($urandom % 3) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    automatic bit e_last  = m_busy && m_rnd == 10;
    automatic bit e_step  = en && m_busy;
    automatic bit e_done  = e_step && e_last;
    automatic bit e_load  = en && blk_ready && (!m_busy || e_last);
    checks++;
    if (load !== e_load || step !== e_step || last !== e_last || done !== e_done ||
        busy !== m_busy || (m_busy && round !== 4'(m_rnd))) begin
      failures++;
      $display("FAIL t=%0t load %0d/%0d step %0d/%0d last %0d/%0d done %0d/%0d busy %0d/%0d round %0d/%0d",
               $time, load, e_load, step, e_step, last, e_last, done, e_done, busy, m_busy, round, m_rnd);
    end
    if (m_busy && !en) en_stalls++;
    if (e_step) steps_in_block++;
    if (e_done) begin
      checks++;
      if (steps_in_block != 10) begin
        failures++;
        $display("FAIL block had %0d rounds", steps_in_block);
      end
      blocks++;
    end
    if (e_load && e_done) b2b++;
    if (e_load) begin
      m_busy = 1; m_rnd = 1; steps_in_block = 0;
    end else if (e_step) begin
      if (e_last) begin m_busy = 0; m_rnd = 0; end
      else m_rnd++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (blocks == 300);
    @(negedge clk);
    checks++;
    if (b2b == 0 || en_stalls == 0) begin
      failures++;
      $display("FAIL coverage b2b=%0d en_stalls=%0d", b2b, en_stalls);
    end
    $display("blocks=%0d back_to_back=%0d en_stalls=%0d", blocks, b2b, en_stalls);
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
