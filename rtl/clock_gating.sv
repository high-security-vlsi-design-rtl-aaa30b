// clock_gating: latch-based integrated clock gate.
//
// The enable is captured by a latch that is transparent while clk is low,
// and the gated clock is clk AND the latched enable. Because the latch is
// closed while clk is high, a change of en during the high phase cannot
// cut a pulse short or create a glitch; en sampled before a rising edge
// decides whether that edge reaches gclk. This is the standard glitch-free
// gate; the design uses one in front of the whole encryptor and one each in
// front of the State-Register, the MixColumns registers, the Key-Register
// and the round-constant register, so that a block that is idle in a phase
// does not toggle.
//
// Ports: clk (free-running), en (active high, from logic clocked by clk),
// gclk (gated clock).
// The latch is intended: it is the storage element of the clock gate, and a
// latch warning on en_latched stands for that reason.
//
// Origin: gating each register bank is part of the original architecture;
// the latch-based gate circuit is this design's choice.
module clock_gating (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
