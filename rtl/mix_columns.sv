// mix_columns: byte-serial MixColumns with four internal 8-bit registers,
// one byte in and one byte out per cycle.
//
// Bytes a0..a3 of a column arrive on consecutive cycles, with idx giving
// their row (0..3). Three registers r[0..2] hold the first three bytes of
// the column while it arrives; when a3 arrives the full column is known,
// b0..b3 are computed, b0 goes to the output register and b1..b3 replace
// a0..a2 in r[0..2]. While the next column's a0..a2 arrive, b1..b3 leave
// through the output register and their slots take the new bytes. The
// fourth register is that output register. So the unit streams without a
// stall and every output byte appears exactly 4 cycles after the input byte
// of the same position.
//
// With bypass high the column function is replaced by the identity, which
// turns the unit into a 4-cycle delay line; the last AES round uses that, so
// it has the same timing as the others.
// The state is uniformly masked (all bytes XOR the same m); since
// 2^3^1^1 = 1 in GF(2^8), MixColumns of a uniformly masked column is the
// result masked by the same m, so no mask correction is needed here.
//
// With INVERSE set the same structure computes InvMixColumns; the
// decryptor uses it that way (InvMixColumns does not preserve a uniform
// mask, but the decryptor is unmasked).
//
// Ports: clk (gated Mix-Columns clock), idx, bypass, din, dout (registered).
//
// Origin: an 8-bit-in, 8-bit-out MixColumns with four internal registers
// is part of the original architecture; how the registers are used and the
// bypass are this design's.
module mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0  // 1: InvMixColumns (coefficients 0e 0b 0d 09)
) (
  input  logic       clk,
  input  logic [1:0] idx,
  input  logic       bypass,
  input  byte_t      din,
  output byte_t      dout
);

  byte_t r [3];
  byte_t out_q;
  word_t col;

  always_comb begin
    if (bypass)       col = {r[0], r[1], r[2], din};
    else if (INVERSE) col = inv_mix_column({r[0], r[1], r[2], din});
    else              col = mix_column(r[0], r[1], r[2], din);
  end

  always_ff @(posedge clk) begin
    if (idx == 2'd3) begin
      out_q <= col[31:24];
      r[0]  <= col[23:16];
      r[1]  <= col[15:8];
      r[2]  <= col[7:0];
    end else begin
      out_q    <= r[idx];
      r[idx]   <= din;
    end
  end

  assign dout = out_q;

endmodule
