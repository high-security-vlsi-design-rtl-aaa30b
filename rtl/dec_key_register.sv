// dec_key_register: the decryptor's 16-byte key register, able to step the
// AES-128 key schedule forwards and backwards one byte per cycle.
//
// Like key_register it is a byte shift chain (in at position 15, Out 1 at
// position 0) that shifts on every clocked edge, and KEY_LOAD, KEY_EXPAND
// and KEY_ROTATE behave exactly as there. The extra mode KEY_INVERT
// replaces round key K(r) by K(r-1) in 16 cycles. In cycle j, with k_j at
// Out 1, the new byte is
//   p_j = k_j ^ S(k_(12+(j+1)%4) ^ k_(8+(j+1)%4)) ^ (j==0 ? rcon : 0), j<4
//   p_j = k_j ^ k_(j-4),                                             j>=4
// The S-box input (Out 2) is position 13 XOR position 9 for j=0..2 and
// position 9 XOR position 5 for j=3. k_(j-4) has already been replaced in
// the chain, so the last four bytes leaving Out 1 are kept in a 4-byte
// history buffer (old), whose oldest entry is k_(j-4).
//
// Ports: clk (gated clock), mode, inverse (selects KEY_INVERT behaviour
// for the expand mode), j, key_in, sbox_out, rcon, out1, out2.
//
// Origin: the key register with Out 1 and Out 2 follows the original
// architecture (for encryption); the backward byte-serial schedule and the
// history buffer are this design's.
module dec_key_register
  import aes_pkg::*;
(
  input  logic       clk,
  input  key_mode_e  mode,
  input  logic       inverse,
  input  logic [3:0] j,
  input  byte_t      key_in,
  input  byte_t      sbox_out,
  input  byte_t      rcon,
  output byte_t      out1,
  output byte_t      out2
);

  byte_t k [16];
  byte_t old [4];
  byte_t din, fwd_tap, inv_tap;

  assign out1    = k[0];
  assign fwd_tap = (j == 4'd3) ? k[9] : k[13];
  assign inv_tap = (j == 4'd3) ? (k[9] ^ k[5]) : (k[13] ^ k[9]);
  assign out2    = inverse ? inv_tap : fwd_tap;

  always_comb begin
    unique case (mode)
      KEY_LOAD:   din = key_in;
      KEY_EXPAND: begin
        if (j < 4'd4) din = k[0] ^ sbox_out ^ ((j == 4'd0) ? rcon : 8'h00);
        else          din = k[0] ^ (inverse ? old[0] : k[12]);
      end
      default:    din = k[0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (mode != KEY_HOLD) begin
      for (int i = 0; i < 15; i++) k[i] <= k[i+1];
      k[15] <= din;
      for (int i = 0; i < 3; i++) old[i] <= old[i+1];
      old[3] <= k[0];
    end
  end

endmodule
