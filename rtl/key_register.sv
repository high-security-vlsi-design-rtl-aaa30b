// key_register: 16-byte key register with byte-serial, on-the-fly AES-128
// key expansion.
//
// The register is a byte shift chain: bytes enter at position 15 and leave
// from position 0 (Out 1). It is clocked only while mode is not KEY_HOLD
// (the surrounding clock gate enforces that), and every clocked edge shifts.
//   KEY_LOAD   : din = key_in; 16 cycles load the cipher key.
//   KEY_EXPAND : 16 cycles replace round key K(r-1) by K(r). In cycle j
//                (0..15) byte j of the old key is at Out 1, and the new byte
//                k'_j = k_j ^ S(k_(12+(j+1)%4)) ^ (j==0 ? rcon : 0) for j<4,
//                k'_j = k_j ^ k'_(j-4)                             for j>=4.
//                k'_(j-4) is always at position 12. The S-box input is
//                Out 2, which is position 13 for j=0..2 and position 9 for
//                j=3 (where k_12 sits at that moment); sbox_out is the
//                shared S-box's answer for Out 2.
//   KEY_ROTATE : din = Out 1; 16 cycles present K(r) byte by byte on Out 1
//                for AddRoundKey and leave the register as it was.
//
// Ports: clk (gated Key-Register clock), mode, j (byte counter), key_in,
// sbox_out, rcon, out1, out2. Data bytes have no reset: every byte is
// loaded before it is used.
//
// Origin: the key register with two outputs (Out 1 to AddRoundKey, Out 2
// to the S-box) is part of the original architecture; the byte taps and the
// 16-cycle expansion schedule are this design's.
module key_register
  import aes_pkg::*;
(
  input  logic      clk,
  input  key_mode_e mode,
  input  logic [3:0] j,
  input  byte_t     key_in,
  input  byte_t     sbox_out,
  input  byte_t     rcon,
  output byte_t     out1,
  output byte_t     out2
);

  byte_t k [16];
  byte_t din;

  assign out1 = k[0];
  assign out2 = (j == 4'd3) ? k[9] : k[13];

  always_comb begin
    unique case (mode)
      KEY_LOAD:   din = key_in;
      KEY_EXPAND: din = (j < 4'd4) ? (k[0] ^ sbox_out ^ ((j == 4'd0) ? rcon : 8'h00))
                                   : (k[0] ^ k[12]);
      default:    din = k[0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (mode != KEY_HOLD) begin
      for (int i = 0; i < 15; i++) k[i] <= k[i+1];
      k[15] <= din;
    end
  end

endmodule
