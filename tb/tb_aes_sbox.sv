// tb_aes_sbox - checks all 256 entries of the S-box table against the
// S-box computed from its definition (GF(2^8) inverse and affine map).
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte, .out_byte);

  initial begin
    for (int i = 0; i < 256; i++) begin
      in_byte = 8'(i);
      #1;
      checks++;
      if (out_byte !== ref_sbox(8'(i))) begin
        failures++;
        $display("FAIL S(%02x) = %02x, expected %02x", i, out_byte, ref_sbox(8'(i)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
