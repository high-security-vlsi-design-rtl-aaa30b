// dec_sub_bytes: the decryptor's single shared S-box, forward or inverse.
//
// Both directions are built around one GF(2^8) inverter: the forward S-box
// is affine(inverse(x)) and the inverse S-box is inverse(inv_affine(x)), so
// an input multiplexer picks what enters the inverter and an output
// multiplexer picks what leaves. The decryptor uses the forward direction
// (inv = 0) for key expansion and the inverse direction (inv = 1) for
// InvSubBytes on the state.
//
// Purely combinational. Ports: din, inv, dout.
//
// Origin: one S-box shared between key expansion and the data path follows
// the original architecture; sharing the inverter between the two
// directions is this design's choice.
module dec_sub_bytes
  import aes_pkg::*;
(
  input  byte_t din,
  input  logic  inv,
  output byte_t dout
);

  byte_t g_in, g_out, fwd;

  assign g_in  = inv ? (rotl8(din, 1) ^ rotl8(din, 3) ^ rotl8(din, 6) ^ 8'h05) : din;
  assign g_out = ginv(g_in);
  assign fwd   = g_out ^ rotl8(g_out, 1) ^ rotl8(g_out, 2) ^ rotl8(g_out, 3) ^
                 rotl8(g_out, 4) ^ 8'h63;
  assign dout  = inv ? g_out : fwd;

endmodule
