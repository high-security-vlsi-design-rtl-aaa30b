// aes_decrypt: AES-128 decryption on the same 8-bit architecture as the
// encryptor.
//
// One byte-wide loop carries the inverse cipher: a state byte leaves the
// state register (which applies InvShiftRows as a permuted load), passes
// the shared S-box in its inverse direction, is XORed with the matching
// round-key byte (key register Out 1), passes the byte-serial
// InvMixColumns and re-enters the state register. Before the rounds the key
// register runs the key schedule forward to round key 10, and ciphertext
// XOR round key 10 is loaded; before each round it steps the schedule back
// by one round key, using the same S-box in its forward direction. The last
// round bypasses InvMixColumns, and its output is collected into text_out.
// The state register, InvMixColumns, key register and RCON each run on a
// gated clock, opened only in the phases where they work.
//
// Interface: a one-cycle ld while busy is low starts a decryption. key_in
// is read byte by byte in cycles 1..16 after ld and text_in in cycles
// 177..192; both must be held until busy has been high for 192 cycles.
// done is high 553 cycles after ld; text_out then holds the plaintext until
// the last round of the next decryption.
//
// Origin: the source architecture gives decryption as the FIPS-197
// inverse-cipher algorithm and says it is based on the encryption scheme;
// this byte-serial realisation is this design's. The decryptor is not
// masked.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld,
  input  block_t key_in,
  input  block_t text_in,
  output block_t text_out,
  output logic   done,
  output logic   busy
);

  logic       dload_phase, key_phase, sbox_inv;
  logic [3:0] byte_idx, key_j;
  logic       ce_state, state_sr, ce_mc, mc_bypass, ce_key, key_inverse;
  logic       ce_rcon, rcon_init, rcon_back, out_valid;
  logic [1:0] mc_idx;
  key_mode_e  key_mode;

  logic  gclk_state, gclk_mc, gclk_key, gclk_rcon;
  byte_t ct_byte, key_byte, state_out, state_in, mc_out, key_out1, key_out2, rcon_val;
  byte_t sbox_in, sbox_out, ark_out;
  block_t pt_q;

  dec_control_unit u_ctrl (
    .clk, .rst_n, .start(ld), .busy, .done, .byte_idx, .dload_phase, .key_phase,
    .sbox_inv, .ce_state, .state_sr, .ce_mc, .mc_idx, .mc_bypass, .ce_key, .key_mode,
    .key_inverse, .key_j, .ce_rcon, .rcon_init, .rcon_back, .out_valid
  );

  clock_gating u_cg_state (.clk, .en(ce_state), .gclk(gclk_state));
  clock_gating u_cg_mc    (.clk, .en(ce_mc),    .gclk(gclk_mc));
  clock_gating u_cg_key   (.clk, .en(ce_key),   .gclk(gclk_key));
  clock_gating u_cg_rcon  (.clk, .en(ce_rcon),  .gclk(gclk_rcon));

  assign ct_byte  = text_in[8*(15 - byte_idx) +: 8];
  assign key_byte = key_in[8*(15 - byte_idx) +: 8];

  assign sbox_in = key_phase ? key_out2 : state_out;

  dec_sub_bytes u_sbox (.din(sbox_in), .inv(sbox_inv), .dout(sbox_out));

  // AddRoundKey after InvSubBytes.
  assign ark_out  = sbox_out ^ key_out1;
  assign state_in = dload_phase ? (ct_byte ^ key_out1) : mc_out;

  state_register #(.INVERSE(1'b1)) u_state (
    .clk(gclk_state), .shift(1'b1), .shift_rows(state_sr),
    .din(state_in), .dout(state_out)
  );

  mix_columns #(.INVERSE(1'b1)) u_imc (
    .clk(gclk_mc), .idx(mc_idx), .bypass(mc_bypass),
    .din(ark_out), .dout(mc_out)
  );

  dec_key_register u_key (
    .clk(gclk_key), .mode(key_mode), .inverse(key_inverse), .j(key_j),
    .key_in(key_byte), .sbox_out, .rcon(rcon_val), .out1(key_out1), .out2(key_out2)
  );

  dec_rcon u_rcon (.clk(gclk_rcon), .init(rcon_init), .back(rcon_back), .rcon_o(rcon_val));

  // Plaintext collector: the 16 last-round bytes, byte 0 first.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pt_q <= '0;
    else if (out_valid) pt_q <= {pt_q[119:0], mc_out};
  end

  assign text_out = pt_q;

endmodule
