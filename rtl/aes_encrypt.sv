// aes_encrypt: AES-128 encryption core with an 8-bit datapath.
//
// Five blocks share one byte-wide loop: the shared S-box (sub_bytes), the
// State-Register with built-in ShiftRows, the byte-serial Mix-Columns,
// the Key-Register with on-the-fly key expansion, and the RCON register,
// all sequenced by control_unit. Per round, a state byte leaves the
// State-Register, passes Mix-Columns, is XORed with the matching round-key
// byte from Key-Register Out 1 (AddRoundKey), goes through the S-box and
// re-enters the State-Register. The S-box input multiplexer selects
//   plaintext byte XOR key byte  in the load phase (initial AddRoundKey),
//   Key-Register Out 2           in the key-expansion phase (mask forced 0),
//   AddRoundKey output           in the round phase.
// In the last round Mix-Columns is bypassed and the AddRoundKey output is
// collected, byte 0 first, into the 128-bit text_out register.
//
// The State-Register, the Mix-Columns registers, the Key-Register and RCON
// each run on their own gated clock (clock_gating), opened only in the
// phases where the block works: in key expansion neither the state nor
// Mix-Columns is clocked.
//
// Masking: text_in is the plaintext XOR a byte mask repeated in all 16
// bytes, and mask is that byte. Every stage keeps that mask (see sub_bytes
// and mix_columns), so text_out is the ciphertext XOR the same mask.
//
// Interface: a one-cycle ld starts an encryption when busy is low. key_in,
// text_in and mask are read byte by byte during the 16 cycles after ld and
// must be held until busy has been high for 16 cycles. done is high for one
// cycle, 377 cycles after ld; text_out is valid from then until the next
// encryption's last round.
//
// Origin: the 8-bit datapath, the five blocks and the per-block clock
// gating follow the original architecture; the schedule and handshake are
// this design's. The original also states one round per cycle, which an
// 8-bit datapath cannot do; the 8-bit datapath was kept.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld,
  input  block_t key_in,
  input  block_t text_in,
  input  byte_t  mask,
  output block_t text_out,
  output logic   done,
  output logic   busy
);

  logic       load_phase, key_phase;
  logic [3:0] byte_idx, key_j;
  logic       ce_state, state_sr, ce_mc, mc_bypass, ce_key, ce_rcon, rcon_init;
  logic [1:0] mc_idx;
  key_mode_e  key_mode;
  logic       out_valid;

  logic  gclk_state, gclk_mc, gclk_key, gclk_rcon;
  byte_t pt_byte, key_byte, state_out, mc_out, key_out1, key_out2, rcon_val;
  byte_t ark_out, sbox_in, sbox_mask, sbox_out;
  block_t ct_q;

  control_unit u_ctrl (
    .clk, .rst_n, .start(ld), .busy, .done, .byte_idx, .load_phase, .key_phase,
    .ce_state, .state_sr, .ce_mc, .mc_idx, .mc_bypass, .ce_key, .key_mode, .key_j,
    .ce_rcon, .rcon_init, .out_valid
  );

  clock_gating u_cg_state (.clk, .en(ce_state), .gclk(gclk_state));
  clock_gating u_cg_mc    (.clk, .en(ce_mc),    .gclk(gclk_mc));
  clock_gating u_cg_key   (.clk, .en(ce_key),   .gclk(gclk_key));
  clock_gating u_cg_rcon  (.clk, .en(ce_rcon),  .gclk(gclk_rcon));

  assign pt_byte  = text_in[8*(15 - byte_idx) +: 8];
  assign key_byte = key_in[8*(15 - byte_idx) +: 8];

  // AddRoundKey on the Mix-Columns output.
  assign ark_out = mc_out ^ key_out1;

  always_comb begin
    if (load_phase)     sbox_in = pt_byte ^ key_byte;
    else if (key_phase) sbox_in = key_out2;
    else                sbox_in = ark_out;
    sbox_mask = key_phase ? 8'h00 : mask;
  end

  sub_bytes u_sbox (.din(sbox_in), .mask(sbox_mask), .dout(sbox_out));

  state_register u_state (
    .clk(gclk_state), .shift(1'b1), .shift_rows(state_sr),
    .din(sbox_out), .dout(state_out)
  );

  mix_columns u_mc (
    .clk(gclk_mc), .idx(mc_idx), .bypass(mc_bypass),
    .din(state_out), .dout(mc_out)
  );

  key_register u_key (
    .clk(gclk_key), .mode(key_mode), .j(key_j), .key_in(key_byte),
    .sbox_out, .rcon(rcon_val), .out1(key_out1), .out2(key_out2)
  );

  rcon u_rcon (.clk(gclk_rcon), .init(rcon_init), .rcon_o(rcon_val));

  // Ciphertext collector: the 16 last-round AddRoundKey bytes, byte 0 first.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ct_q <= '0;
    else if (out_valid) ct_q <= {ct_q[119:0], ark_out};
  end

  assign text_out = ct_q;

endmodule
