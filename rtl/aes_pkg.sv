// aes_pkg: types and constants shared by the AES-256 modules.
//
// The 128-bit state travels as one vector. Byte 0 of a block (the first
// byte of the plaintext) is bits [127:120]; byte i sits in row i%4 and
// column i/4 of the 4x4 state, the column-major order of the AES standard.
// AES_NR = 14 rounds and AES_NK = 8 key words are the AES-256 figures; the helper
// functions do the GF(2^8) arithmetic (modulo x^8+x^4+x^3+x+1) that
// MixColumns, InvMixColumns and the round constants need.
package aes_pkg;

  localparam int unsigned AES_NB = 4;  // block size in 32-bit words
  localparam int unsigned AES_NK = 8;  // key size in 32-bit words (256 bits)
  localparam int unsigned AES_NR = 14;  // number of rounds for a 256-bit key

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0] key_t;

  // Byte i of a block, i = 4*column + row.
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127-8*i -: 8];
  endfunction

  // Multiply by x (02) in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Multiply by a small constant (up to 0x0f) in GF(2^8).
  function automatic byte_t gmul(byte_t a, logic [3:0] c);
    byte_t a2, a4, a8;
    a2 = xtime(a);
    a4 = xtime(a2);
    a8 = xtime(a4);
    return (c[0] ? a : 8'h00) ^ (c[1] ? a2 : 8'h00) ^
           (c[2] ? a4 : 8'h00) ^ (c[3] ? a8 : 8'h00);
  endfunction

endpackage
