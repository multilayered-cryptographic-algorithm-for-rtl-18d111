// aes_ref_pkg - reference model of AES-128 encryption for the testbenches.
//
// Written independently of the RTL: the S-box is computed from its
// definition (inverse in GF(2^8) by exponentiation, a^254, then the affine
// map), not read from a table, and the cipher works on a 4x4 byte array.
// Known-answer vectors from FIPS-197 (Appendix B and C.1) are provided to
// check the model itself.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;

  function automatic u8 gmul(u8 a, u8 b);
    u8 r = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic u8 ginv(u8 a);
    u8 r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);  // a^254 = a^-1, 0 -> 0
    return r;
  endfunction

  function automatic u8 rotl8(u8 b, int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic u8 ref_sbox(u8 a);
    u8 b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Round keys 0..10 of a 128-bit key.
  typedef u128 rk_array_t [11];

  function automatic rk_array_t ref_key_schedule(u128 key);
    logic [31:0] w [44];
    rk_array_t   rk;
    u8           rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  // One round on a 4x4 byte array s[row][col].
  typedef u8 st_t [4][4];

  function automatic st_t to_st(u128 b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic u128 from_st(st_t s);
    u128 b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic u128 ref_round(u128 in, u128 rk, bit last);
    st_t s = to_st(in), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][c] = ref_sbox(s[r][(c + r) % 4]);
    if (!last)
      for (int c = 0; c < 4; c++) begin
        u8 a0 = t[0][c], a1 = t[1][c], a2 = t[2][c], a3 = t[3][c];
        t[0][c] = gmul(a0, 2) ^ gmul(a1, 3) ^ a2 ^ a3;
        t[1][c] = a0 ^ gmul(a1, 2) ^ gmul(a2, 3) ^ a3;
        t[2][c] = a0 ^ a1 ^ gmul(a2, 2) ^ gmul(a3, 3);
        t[3][c] = gmul(a0, 3) ^ a1 ^ a2 ^ gmul(a3, 2);
      end
    return from_st(t) ^ rk;
  endfunction

  function automatic u128 ref_encrypt(u128 pt, u128 key);
    rk_array_t rk = ref_key_schedule(key);
    u128 s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = ref_round(s, rk[r], r == 10);
    return s;
  endfunction

  // FIPS-197 known answers.
  localparam u128 KAT_B_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam u128 KAT_B_PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam u128 KAT_B_CT  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam u128 KAT_C_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam u128 KAT_C_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam u128 KAT_C_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  // Round key 10 of KAT_B_KEY (FIPS-197 Appendix A.1, w[40..43]).
  localparam u128 KAT_B_RK10 = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
