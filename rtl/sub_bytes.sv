// sub_bytes: the single 8-bit S-box shared by key expansion and encryption.
//
// The encryption state travels masked: every byte carries the same random
// mask m. The S-box therefore maps a masked byte x^m to S(x)^m, so the
// mask survives SubBytes unchanged. During key expansion the control unit
// sets mask to zero and the block is a plain S-box on the key byte.
// The S-box itself is computed from its definition (GF(2^8) inverse plus
// affine transform) in aes_pkg.
//
// Purely combinational: dout follows din and mask in the same cycle.
// Note that the remove-mask / substitute / add-mask sequence is evaluated
// in one combinational cone, so the unmasked value exists on internal nets;
// the registers and the byte bus around the S-box only ever carry masked
// data.
//
// Origin: one S-box shared by key expansion and encryption is part of the
// original architecture; the masked form and the computed S-box are this
// design's choices.
module sub_bytes
  import aes_pkg::*;
(
  input  byte_t din,
  input  byte_t mask,
  output byte_t dout
);

  assign dout = sbox(din ^ mask) ^ mask;

endmodule
