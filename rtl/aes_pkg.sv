// aes_pkg: types and GF(2^8) arithmetic shared by the AES encryption and
// decryption datapaths.
//
// The S-box is not stored as a table. It is computed the way FIPS-197
// defines it: the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (taken as x^254, with 0 mapping to 0), followed by the
// affine transform b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// The inverse S-box undoes the affine transform
// (rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05) and then inverts.
//
// Block convention used everywhere: a 128-bit block holds byte 0 in bits
// [127:120] and byte 15 in bits [7:0]; byte i sits in row i%4, column i/4
// of the AES state, as in FIPS-197.
//
// Origin: the arithmetic is that of FIPS-197; computing the S-box instead of
// storing it is this design's choice.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Byte-serial key register operating modes.
  typedef enum logic [1:0] {
    KEY_HOLD   = 2'd0,
    KEY_LOAD   = 2'd1,  // shift in the cipher key byte by byte
    KEY_EXPAND = 2'd2,  // shift in the next round key byte by byte
    KEY_ROTATE = 2'd3   // recirculate, presenting one round key byte per cycle
  } key_mode_e;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply (shift-and-add).
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (a^2 * a^4 * ... * a^128).
  function automatic byte_t ginv(byte_t a);
    byte_t sq = a;
    byte_t r  = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq = gmul(sq, sq);
      r  = gmul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox(byte_t a);
    byte_t b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(byte_t a);
    byte_t b = rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
    return ginv(b);
  endfunction

  // Multiply by x^-1, used to step the round constant backwards.
  function automatic byte_t xtime_inv(byte_t a);
    return a[0] ? ({1'b0, a[7:1]} ^ 8'h8d) : {1'b0, a[7:1]};
  endfunction

  // One column of MixColumns: b_i = 2a_i ^ 3a_(i+1) ^ a_(i+2) ^ a_(i+3).
  function automatic word_t mix_column(byte_t a0, byte_t a1, byte_t a2, byte_t a3);
    byte_t b0 = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
    byte_t b1 = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
    byte_t b2 = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
    byte_t b3 = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    return {b0, b1, b2, b3};
  endfunction

  // One column of InvMixColumns (coefficients 0e, 0b, 0d, 09).
  function automatic word_t inv_mix_column(word_t w);
    byte_t a0 = w[31:24];
    byte_t a1 = w[23:16];
    byte_t a2 = w[15:8];
    byte_t a3 = w[7:0];
    return {gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09),
            gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d),
            gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b),
            gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e)};
  endfunction

  function automatic word_t sub_word(word_t w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

endpackage
