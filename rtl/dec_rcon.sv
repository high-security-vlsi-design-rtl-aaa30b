// dec_rcon: round-constant register of the decryptor, stepping both ways.
//
// On a clocked edge: init loads 0x01; otherwise the constant is multiplied
// by x (back = 0, forward key expansion) or by x^-1 (back = 1, backward key
// schedule). It sits behind its own clock gate and sees an edge only when
// it must change.
//
// Ports: clk (gated clock), init, back, rcon_o.
//
// Origin: a separately gated RCON follows the original architecture; the
// backward step is this design's, needed for byte-serial decryption.
module dec_rcon
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  init,
  input  logic  back,
  output byte_t rcon_o
);

  byte_t rc;

  always_ff @(posedge clk) begin
    if (init)      rc <= 8'h01;
    else if (back) rc <= xtime_inv(rc);
    else           rc <= xtime(rc);
  end

  assign rcon_o = rc;

endmodule
