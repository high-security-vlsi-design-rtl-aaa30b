// aes_crypto_top: AES-128 crypto processor for block-wise image encryption.
//
// A host turns an image into a stream of 128-bit blocks. Blocks are
// encrypted by the masked, byte-serial, clock-gated encryptor
// (nano_aes_encrypt) and decrypted by the byte-serial decryptor
// (aes_decrypt). Both share the 128-bit secret key port and run
// independently, each with its own start/done handshake, so a block can be
// encrypted while another is decrypted.
//
// Ports: clk, rst_n (asynchronous, active low), enc_en (clock enable of the
// encryptor), key; encryptor: enc_ld, plain_in, cipher_out, enc_done,
// enc_busy; decryptor: dec_ld, cipher_in, plain_out, dec_done, dec_busy.
// Timing: see nano_aes_encrypt (377 cycles per block) and aes_decrypt
// (553 cycles per block).
//
// Origin: an encryptor and a decryptor for images processed block by block
// follow the original application; sharing the key port and running the two
// units independently are this design's choices.
module aes_crypto_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enc_en,
  input  block_t key,
  input  logic   enc_ld,
  input  block_t plain_in,
  output block_t cipher_out,
  output logic   enc_done,
  output logic   enc_busy,
  input  logic   dec_ld,
  input  block_t cipher_in,
  output block_t plain_out,
  output logic   dec_done,
  output logic   dec_busy
);

  nano_aes_encrypt u_enc (
    .clk, .en(enc_en), .rst_n, .ld(enc_ld), .key, .text_in(plain_in),
    .text_out(cipher_out), .done(enc_done), .busy(enc_busy)
  );

  aes_decrypt u_dec (
    .clk, .rst_n, .ld(dec_ld), .key_in(key), .text_in(cipher_in),
    .text_out(plain_out), .done(dec_done), .busy(dec_busy)
  );

endmodule
