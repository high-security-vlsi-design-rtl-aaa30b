// rcon: AES round-constant register.
//
// On a clocked edge with init high it loads 0x01 (the constant of round 1);
// on any other clocked edge it steps to the next constant, rcon * x in
// GF(2^8) (01, 02, 04, ..., 80, 1b, 36). It is meant to sit behind its own
// clock gate, so that it only sees an edge when it must step; the control
// unit opens that gate once at load time and once at the end of every key
// expansion phase.
//
// Ports: clk (gated RCON clock), init, rcon_o.
//
// Origin: a separately clock-gated RCON register is part of the original
// architecture; its circuit is this design's.
module rcon
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  init,
  output byte_t rcon_o
);

  byte_t rc;

  always_ff @(posedge clk) begin
    rc <= init ? 8'h01 : xtime(rc);
  end

  assign rcon_o = rc;

endmodule
