// aes_ref_pkg - behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the state is a 4x4 byte matrix, the
// S-box is found by searching for the multiplicative inverse (the y with
// x*y = 1 in GF(2^8)) and applying the affine map bit by bit
// (b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63), and the
// key schedule works on 44 words. It is checked against FIPS-197 vectors by
// the testbenches that use it.
package aes_ref_pkg;

  typedef bit [7:0] u8;
  typedef u8 mat_t [4][4];   // [row][col]

  u8  sbox_tab [256];
  bit sbox_done = 0;

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic void build_sbox();
    for (int x = 0; x < 256; x++) begin
      u8 inv = 0;
      u8 s;
      for (int y = 1; y < 256; y++)
        if (x != 0 && mul(u8'(x), u8'(y)) == 8'h01) inv = u8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ (8'h63 >> i);
      sbox_tab[x] = s;
    end
    sbox_done = 1;
  endfunction

  function automatic u8 sb(u8 x);
    if (!sbox_done) build_sbox();
    return sbox_tab[x];
  endfunction

  function automatic mat_t to_mat(bit [127:0] v);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[r][c] = v[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic bit [127:0] from_mat(mat_t m);
    bit [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        v[127 - 8*(4*c + r) -: 8] = m[r][c];
    return v;
  endfunction

  function automatic bit [127:0] sub_bytes(bit [127:0] v);
    mat_t m = to_mat(v);
    foreach (m[r, c]) m[r][c] = sb(m[r][c]);
    return from_mat(m);
  endfunction

  function automatic bit [127:0] shift_rows(bit [127:0] v);
    mat_t m = to_mat(v);
    mat_t o;
    foreach (m[r, c]) o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic bit [127:0] mix_columns(bit [127:0] v);
    mat_t m = to_mat(v);
    mat_t o;
    for (int c = 0; c < 4; c++) begin
      o[0][c] = mul(2, m[0][c]) ^ mul(3, m[1][c]) ^ m[2][c] ^ m[3][c];
      o[1][c] = m[0][c] ^ mul(2, m[1][c]) ^ mul(3, m[2][c]) ^ m[3][c];
      o[2][c] = m[0][c] ^ m[1][c] ^ mul(2, m[2][c]) ^ mul(3, m[3][c]);
      o[3][c] = mul(3, m[0][c]) ^ m[1][c] ^ m[2][c] ^ mul(2, m[3][c]);
    end
    return from_mat(o);
  endfunction

  // Round key k (0..10) of a 128-bit cipher key.
  function automatic bit [127:0] round_key(bit [127:0] key, int k);
    bit [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      bit [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])};
        t[31:24] ^= rc;
        rc = mul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  function automatic bit [127:0] encrypt(bit [127:0] key, bit [127:0] pt);
    bit [127:0] s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s ^= round_key(key, r);
    end
    return s;
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
