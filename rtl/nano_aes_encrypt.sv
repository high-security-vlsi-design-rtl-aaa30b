// nano_aes_encrypt: masked AES-128 encryptor with a global clock gate.
//
// The plaintext is masked before it reaches the core: a random byte m
// (the two halves of the mask_rng state XORed together) is captured when
// an encryption is accepted, and the core is fed
// text_in XOR {16{m}} together with m. The core encrypts the masked data
// with the secret key and returns the ciphertext XOR {16{m}}, which this
// wrapper unmasks. The key is not masked.
//
// A clock gate (clock_gating) in front of everything stops the encryptor's
// clock while en is low; the core then holds all its state.
//
// Interface: ld starts an encryption when busy is low (and en is high);
// key and text_in must stay stable for the 16 cycles after ld. done pulses
// 377 cycles after ld, and text_out holds the ciphertext from then until
// the last round of the next block.
//
// Origin: masking the plaintext before the core, feeding the core mask and
// masked data, and unmasking its result follow the original architecture,
// as does the global clock gate; the one-byte uniform mask is this design's.
module nano_aes_encrypt
  import aes_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic   clk,
  input  logic   en,
  input  logic   rst_n,
  input  logic   ld,
  input  block_t key,
  input  block_t text_in,
  output block_t text_out,
  output logic   done,
  output logic   busy
);

  logic   gclk;
  logic [15:0] rnd;
  byte_t  mask_q, out_mask_q;
  block_t masked_ct;

  clock_gating m1 (.clk, .en, .gclk);

  mask_rng #(.SEED(SEED)) u_rng (.clk(gclk), .rst_n, .rnd);

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q     <= '0;
      out_mask_q <= '0;
    end else begin
      if (ld && !busy) mask_q     <= rnd[15:8] ^ rnd[7:0];
      if (done)        out_mask_q <= mask_q;
    end
  end

  aes_encrypt m0 (
    .clk(gclk), .rst_n, .ld, .key_in(key),
    .text_in(text_in ^ {16{mask_q}}), .mask(mask_q),
    .text_out(masked_ct), .done, .busy
  );

  // The masked ciphertext register keeps the previous result until the
  // last round of the next block, while mask_q already holds the next
  // block's mask; the result's own mask is therefore kept in out_mask_q.
  assign text_out = masked_ct ^ {16{done ? mask_q : out_mask_q}};

endmodule
