// tb_aes_col_round - one packet unit against the reference round.
//
// A random state and round key go through the reference round; each of the
// four row-rotated packets of the state is fed to the unit and its output
// is compared with the matching column of the reference result, for normal
// and last rounds. Also the FIPS-197 MixColumns example column.
module tb_aes_col_round;
  import aes_ref_pkg::*;

  logic [31:0] packet_in, rk_word, packet_out;
  logic        last;
  int checks = 0, failures = 0;

  aes_col_round dut (.packet_in, .rk_word, .last, .packet_out);

  function automatic logic [7:0] byte_of(u128 b, int r, int c);
    return b[127 - 8*(4*c + r) -: 8];
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08x expected %08x", what, got, exp);
    end
  endtask

  initial begin
    // Inverse S-box images of the FIPS-197 MixColumns example db 13 53 45
    // -> 8e 4d a1 bc, so SubBytes yields exactly that column.
    packet_in = 32'h9f82_50_68;  // S(9f)=db, S(82)=13, S(50)=53, S(68)=45
    rk_word   = 32'h0;
    last      = 1'b0;
    #1;
    check(packet_out, 32'h8e4da1bc, "MixColumn example");

    for (int n = 0; n < 200; n++) begin
      automatic u128 s  = rand128();
      automatic u128 rk = rand128();
      automatic bit  l  = n[0];
      automatic u128 e  = ref_round(s, rk, l);
      for (int c = 0; c < 4; c++) begin
        packet_in = {byte_of(s, 0, c), byte_of(s, 1, (c + 1) % 4),
                     byte_of(s, 2, (c + 2) % 4), byte_of(s, 3, (c + 3) % 4)};
        rk_word   = rk[127 - 32*c -: 32];
        last      = l;
        #1;
        check(packet_out, e[127 - 32*c -: 32], $sformatf("round n=%0d col=%0d last=%0d", n, c, l));
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
