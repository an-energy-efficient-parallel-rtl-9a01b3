// aes_pkg - types, constants and GF(2^8) helpers shared by the AES-128 cores.
//
// The state is a 128-bit vector holding the 16 state bytes in FIPS-197 input
// order: byte 0 in bits 127:120, byte 15 in bits 7:0. Bytes 4c..4c+3 form
// column c, so byte (r + 4c) sits in row r of column c.
//
// The S-box is not written out as a table. sbox_table() builds it at
// elaboration from its definition: the multiplicative inverse in GF(2^8)
// (modulo x^8 + x^4 + x^3 + x + 1, with 0 mapped to 0) followed by the affine
// map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63. The result is a
// constant that synthesis turns into a 256 x 8 lookup per byte.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  // Round keys 0..10, packed so that they can pass through ports.
  typedef block_t [NR:0] round_keys_t;

  // Multiply by x (xtime) in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General product in GF(2^8), shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Inverse as a^254 (a^-1 = a^(2^8 - 2)); 0 maps to 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 1; i < 8; i++) begin  // 254 = 0b11111110
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Entry i is in bits 8*i+7 : 8*i.
  function automatic logic [2047:0] sbox_table();
    logic [2047:0] t;
    for (int i = 0; i < 256; i++) t[8*i +: 8] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  localparam logic [2047:0] SBOX = sbox_table();

  function automatic byte_t sbox(byte_t a);
    return SBOX[8*a +: 8];
  endfunction

  // Byte n (0..15) of a state.
  function automatic byte_t get_byte(block_t s, int unsigned n);
    return s[127 - 8*n -: 8];
  endfunction

endpackage
