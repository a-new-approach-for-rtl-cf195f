// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// Written from the FIPS-197 definitions and kept independent of the RTL: the
// S-box is computed from the GF(2^8) inverse (a^254, by square-and-multiply
// with a generic shift-and-add multiplier) and the affine transformation bit
// by bit, ShiftRows and MixColumns work on a 4x4 byte matrix, and the key
// schedule works on 32-bit words.  Byte 0 of a 128-bit vector is bits 127:120.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef u8 mat_t [4][4];   // [row][column]

  function automatic u8 gmul(input u8 a, input u8 b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic u8 ginv(input u8 a);
    u8 r, base;
    int unsigned e;
    r = 8'h01; base = a; e = 254;
    while (e != 0) begin
      if (e[0]) r = gmul(r, base);
      base = gmul(base, base);
      e >>= 1;
    end
    return r;  // 0 maps to 0
  endfunction

  function automatic u8 sbox(input u8 x);
    u8 b, s;
    u8 c = 8'h63;
    b = ginv(x);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return s;
  endfunction

  function automatic mat_t to_mat(input u128 v);
    mat_t m;
    for (int i = 0; i < 16; i++) m[i%4][i/4] = v[127-8*i -: 8];
    return m;
  endfunction

  function automatic u128 from_mat(input mat_t m);
    u128 v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = m[i%4][i/4];
    return v;
  endfunction

  function automatic u128 sub_bytes(input u128 v);
    u128 o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = sbox(v[127-8*i -: 8]);
    return o;
  endfunction

  function automatic u128 shift_rows(input u128 v);
    mat_t m, o;
    m = to_mat(v);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[r][c] = m[r][(c+r)%4];
    return from_mat(o);
  endfunction

  function automatic u128 mix_columns(input u128 v);
    mat_t m, o;
    u8 coef [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    m = to_mat(v);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) o[r][c] ^= gmul(coef[(k - r + 4) % 4], m[k][c]);
      end
    return from_mat(o);
  endfunction

  function automatic u8 rcon(input int unsigned i);
    u8 r;
    r = 8'h01;
    for (int unsigned k = 1; k < i; k++) r = gmul(r, 8'h02);
    return r;
  endfunction

  // Round key i+1 from round key i (step = i+1).
  function automatic u128 next_key(input u128 k, input int unsigned step);
    logic [31:0] w [8];
    logic [31:0] t;
    for (int j = 0; j < 4; j++) w[j] = k[127-32*j -: 32];
    t = {w[3][23:0], w[3][31:24]};
    t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
    t ^= {rcon(step), 24'h0};
    w[4] = w[0] ^ t;
    for (int j = 5; j < 8; j++) w[j] = w[j-4] ^ w[j-1];
    return {w[4], w[5], w[6], w[7]};
  endfunction

  function automatic u128 encrypt(input u128 pt, input u128 key);
    u128 s, k;
    s = pt ^ key; k = key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, r);
      s = shift_rows(sub_bytes(s));
      if (r < 10) s = mix_columns(s);
      s ^= k;
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
