// tb_aes_crypto_top: end-to-end test of the crypto processor at its
// default parameters, on a small generated "image".
//
// A 32x32 8-bit grayscale test image (a gradient with a bright square,
// 1024 bytes = 64 blocks) is built in the testbench. Each block goes
// through the encryptor; each ciphertext is compared with the reference
// cipher and then fed to the decryptor, which must return the original
// block. The decryptor works on block n-1 while the encryptor works on
// block n (it takes longer, so the next block waits for both). The clock enable of the encryptor is dropped at random.
//
// Mechanisms counted (each must occur): key-expansion phases with the
// State-Register and Mix-Columns clocks stopped, Mix-Columns bypass in the
// last round, ShiftRows inside the State-Register, stalls from the global
// clock gate, non-zero data masks, ld ignored while busy, and decryptions
// overlapping an encryption.
module tb_aes_crypto_top;
  import aes_ref_pkg::*;
  localparam int W = 32, H = 32, NBLK = W*H/16;

  logic clk = 0, rst_n = 0, enc_en = 1, enc_ld = 0, dec_ld = 0;
  logic [127:0] key = 0, plain_in = 0, cipher_in = 0, cipher_out, plain_out;
  logic enc_done, enc_busy, dec_done, dec_busy;
  int checks = 0, failures = 0;

  logic [7:0]   img [W*H];
  logic [127:0] blk [NBLK];
  logic [127:0] ct  [NBLK];

  int n_keyexp_gated = 0, n_bypass = 0, n_shiftrows = 0, n_stall = 0;
  int n_masked = 0, n_ld_ignored = 0, n_overlap = 0;
  int state_edges_in_keyexp = 0;

  aes_crypto_top dut (
    .clk, .rst_n, .enc_en, .key, .enc_ld, .plain_in, .cipher_out, .enc_done, .enc_busy,
    .dec_ld, .cipher_in, .plain_out, .dec_done, .dec_busy
  );

  always #5 clk = ~clk;

  // Observe the internal clock gates and controls.
  always @(posedge dut.u_enc.m0.gclk_state or posedge dut.u_enc.m0.gclk_mc)
    if (dut.u_enc.m0.key_phase) state_edges_in_keyexp++;
  always @(posedge dut.u_enc.m0.gclk_key)
    if (dut.u_enc.m0.key_phase && dut.u_enc.m0.u_ctrl.cnt == 5'd15) n_keyexp_gated++;
  always @(posedge dut.u_enc.m0.gclk_mc)
    if (dut.u_enc.m0.mc_bypass) n_bypass++;
  always @(posedge dut.u_enc.m0.gclk_state)
    if (dut.u_enc.m0.state_sr) n_shiftrows++;
  always @(posedge clk)
    if (!enc_en && enc_busy) n_stall++;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Start a decryption of block idx (the decryptor is idle).
  task automatic start_dec(input int idx);
    @(negedge clk);
    cipher_in = ct[idx]; dec_ld = 1;
    @(negedge clk);
    dec_ld = 0;
  endtask

  int both_busy = 0;
  bit enc_seen_done, dec_seen_done;

  initial begin
    int dec_pending;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y*W + x] = (x >= 10 && x < 20 && y >= 10 && y < 20) ? 8'hf0 : 8'(4*x + 2*y);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 16; i++) blk[b][127 - 8*i -: 8] = img[16*b + i];
    repeat (3) @(negedge clk);
    rst_n = 1;
    dec_pending = -1;
    for (int b = 0; b < NBLK; b++) begin
      int cyc;
      @(negedge clk);
      enc_en = 1; plain_in = blk[b]; enc_ld = 1;
      @(negedge clk);
      enc_ld = 0;
      if (dut.u_enc.mask_q != 8'h00) n_masked++;
      // try to start again while busy: must be ignored
      enc_ld = 1;
      @(negedge clk);
      enc_ld = 0;
      if (enc_busy) n_ld_ignored++;
      // decrypt the previous block while this one is encrypted
      if (dec_pending >= 0) begin
        @(negedge clk);
        cipher_in = ct[dec_pending]; dec_ld = 1;
      end
      cyc = 0;
      dec_seen_done = (dec_pending < 0);
      enc_seen_done = 0;
      while (!(enc_seen_done && dec_seen_done)) begin
        @(negedge clk);
        dec_ld = 0;
        cyc++;
        if (enc_busy && dec_busy) both_busy++;
        if (dec_done) begin
          dec_seen_done = 1;
          chk(plain_out == blk[dec_pending], $sformatf("block %0d decrypts to %h, expected %h",
                                                      dec_pending, plain_out, blk[dec_pending]));
        end
        if (enc_done) begin
          enc_seen_done = 1;
          enc_en = 1;
          ct[b] = cipher_out;
          chk(cipher_out == encrypt(key, blk[b]), $sformatf("block %0d cipher %h, expected %h",
                                                           b, cipher_out, encrypt(key, blk[b])));
        end
        if (!enc_seen_done && cyc > 20 && b % 3 == 1) enc_en = ($urandom_range(0, 4) != 0);
        else enc_en = 1;
      end
      if (both_busy > 0) n_overlap++;
      both_busy = 0;
      dec_pending = b;
    end
    start_dec(dec_pending);
    while (!dec_done) @(negedge clk);
    chk(plain_out == blk[dec_pending], "last block decrypts");

    chk(state_edges_in_keyexp == 0, $sformatf("state/mc clocked %0d times in key expansion",
                                             state_edges_in_keyexp));
    chk(n_keyexp_gated == 10*NBLK, $sformatf("key expansion phases %0d", n_keyexp_gated));
    chk(n_bypass == 20*NBLK, $sformatf("mix-columns bypass cycles %0d", n_bypass));
    chk(n_shiftrows == 10*NBLK, $sformatf("in-register shiftrows %0d", n_shiftrows));
    chk(n_stall > 0, "no clock-gate stall happened");
    chk(n_masked > 0, "no non-zero mask happened");
    chk(n_ld_ignored == NBLK, $sformatf("ld ignored while busy %0d", n_ld_ignored));
    chk(n_overlap == NBLK - 1, $sformatf("overlapped decryptions %0d", n_overlap));
    $display("mechanisms: keyexp=%0d bypass=%0d shiftrows=%0d stalls=%0d masked=%0d ld_ignored=%0d overlap=%0d",
             n_keyexp_gated, n_bypass, n_shiftrows, n_stall, n_masked, n_ld_ignored, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
