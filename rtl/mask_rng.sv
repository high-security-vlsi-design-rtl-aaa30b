// mask_rng: pseudo-random source for the data mask.
//
// A 16-bit Galois LFSR with feedback polynomial x^16+x^14+x^13+x^11+1
// (maximal length: it visits all 65535 non-zero states). It steps on every
// clock edge; rnd is the full state. A reset loads
// SEED (which must be non-zero). This is a deterministic generator: a
// physical noise source would replace it in a hardened implementation.
//
// Origin: the original architecture uses a random mask but does not say
// how it is generated; this LFSR is this design's choice.
module mask_rng #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rnd
);

  logic [15:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= SEED;
    else        lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  assign rnd = lfsr;

endmodule
