// aes_pkg - constants, types and small GF(2^8) helpers shared by the
// AES-128 encryptor.
//
// Byte order follows FIPS-197: in a 128-bit block, byte n sits in bits
// [127-8n -: 8], and state byte s(r,c) is byte 4c+r, so column c is the
// 32-bit word in bits [127-32c -: 32]. A "packet" is one such 32-bit column.
// The round count (10) and the 128-bit block and key are AES-128's; the
// 32-bit packet width is the width of the encryptor's word ports.
package aes_pkg;

  localparam int unsigned NB = 4;   // 32-bit words per block
  localparam int unsigned NR = 10;  // rounds for a 128-bit key

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [3:0]   round_t;    // holds 0..NR

  // Multiplication by x (i.e. by 2) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // MixColumn of one column {s0,s1,s2,s3} (s0 in the top byte): the
  // column is multiplied by the fixed polynomial {03}x^3+{01}x^2+{01}x+{02}.
  function automatic word_t mix_column(word_t c);
    byte_t s0, s1, s2, s3;
    {s0, s1, s2, s3} = c;
    return {xtime(s0) ^ xtime(s1) ^ s1 ^ s2 ^ s3,
            s0 ^ xtime(s1) ^ xtime(s2) ^ s2 ^ s3,
            s0 ^ s1 ^ xtime(s2) ^ xtime(s3) ^ s3,
            xtime(s0) ^ s0 ^ s1 ^ s2 ^ xtime(s3)};
  endfunction

  // Column c of a block.
  function automatic word_t col(block_t b, int unsigned c);
    return b[127 - 32*c -: 32];
  endfunction

  // Byte s(r,c) of a block.
  function automatic byte_t sbyte(block_t b, int unsigned r, int unsigned c);
    return b[127 - 8*(4*c + r) -: 8];
  endfunction

endpackage
