// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-box is built by searching, for
// every byte, the GF(2^8) element whose product with it is 1, and the
// cipher works on a 4x4 byte array in row/column form. The block
// convention matches the RTL (byte 0 in bits [127:120], column-major).
package aes_ref_pkg;

  bit [7:0] sb_tab [256];
  bit [7:0] isb_tab [256];
  bit       ready = 0;

  function automatic bit [7:0] mul(bit [7:0] a, bit [7:0] b);
    bit [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic void build();
    bit [7:0] inv, s;
    if (ready) return;
    for (int x = 0; x < 256; x++) begin
      inv = 0;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = 8'h63;
      for (int bit_i = 0; bit_i < 8; bit_i++)
        s[bit_i] ^= inv[bit_i] ^ inv[(bit_i + 4) % 8] ^ inv[(bit_i + 5) % 8] ^
                    inv[(bit_i + 6) % 8] ^ inv[(bit_i + 7) % 8];
      sb_tab[x] = s;
      isb_tab[s] = 8'(x);
    end
    ready = 1;
  endfunction

  function automatic bit [7:0] sbox(bit [7:0] x);
    build();
    return sb_tab[x];
  endfunction

  function automatic bit [7:0] inv_sbox(bit [7:0] x);
    build();
    return isb_tab[x];
  endfunction

  typedef bit [7:0] st_t [4][4];  // [row][col]

  function automatic st_t to_st(bit [127:0] b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic bit [127:0] from_st(st_t s);
    bit [127:0] b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  // All 11 round keys, rk[0] = cipher key.
  function automatic void expand(bit [127:0] key, output bit [127:0] rk [11]);
    bit [31:0] w [44];
    bit [31:0] t;
    bit [7:0]  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic st_t mix(st_t s, bit [7:0] m0, bit [7:0] m1, bit [7:0] m2, bit [7:0] m3);
    st_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r][c] = mul(s[r][c], m0) ^ mul(s[(r+1)%4][c], m1) ^
                  mul(s[(r+2)%4][c], m2) ^ mul(s[(r+3)%4][c], m3);
    return o;
  endfunction

  function automatic bit [127:0] encrypt(bit [127:0] key, bit [127:0] pt);
    bit [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(pt ^ rk[0]);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][c] = sbox(s[r][(c + r) % 4]);
      if (rnd != 10) t = mix(t, 8'h02, 8'h03, 8'h01, 8'h01);
      s = to_st(from_st(t) ^ rk[rnd]);
    end
    return from_st(s);
  endfunction

  function automatic bit [127:0] decrypt(bit [127:0] key, bit [127:0] ct);
    bit [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(ct ^ rk[10]);
    for (int rnd = 9; rnd >= 0; rnd--) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = inv_sbox(s[r][c]);
      s = to_st(from_st(t) ^ rk[rnd]);
      if (rnd != 0) s = mix(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
    end
    return from_st(s);
  endfunction

endpackage
