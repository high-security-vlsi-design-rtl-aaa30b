// state_register: 16-byte AES state held as a byte shift register, with
// ShiftRows performed inside the register.
//
// Bytes enter at position 15 and leave from position 0, one per rising
// edge of clk while shift is high, so after 16 shifts position i holds
// state byte i (row i%4, column i/4). When shift_rows is high together with
// shift, the register stores the ShiftRows permutation of the shifted
// contents in that same edge: the byte at row r, column c is taken from
// row r, column (c+r) mod 4. No separate ShiftRows logic or extra cycle is
// needed, which is how the state register absorbs that step. With INVERSE
// set, the permutation is InvShiftRows (column (c-r) mod 4), for the
// decryptor.
//
// Ports: clk (the gated State-Register clock), shift, shift_rows,
// din (byte in), dout (byte at position 0, combinational from the register).
// Timing: one byte per cycle; dout changes after each shifting edge.
// Data registers have no reset: every byte is written before it is read.
//
// Origin: doing ShiftRows inside the state register is part of the
// original architecture; the permuted-load mechanism is this design's.
module state_register
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0  // 1: InvShiftRows (row r rotated right by r)
) (
  input  logic  clk,
  input  logic  shift,
  input  logic  shift_rows,
  input  byte_t din,
  output byte_t dout
);

  byte_t st [16];
  byte_t shifted [16];
  byte_t permuted [16];

  always_comb begin
    for (int i = 0; i < 15; i++) shifted[i] = st[i+1];
    shifted[15] = din;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        permuted[4*c + r] = INVERSE ? shifted[4*((c + 4 - r) % 4) + r]
                                    : shifted[4*((c + r) % 4) + r];
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = 0; i < 16; i++) st[i] <= shift_rows ? permuted[i] : shifted[i];
    end
  end

  assign dout = st[0];

endmodule
