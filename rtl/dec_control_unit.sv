// dec_control_unit: sequencer of the byte-serial AES-128 decryptor.
//
// Phases after a start pulse:
//   KLOAD  16 cycles      the cipher key is shifted into the key register.
//   KFWD   16 cycles x10  forward key expansion to round key 10 (forward
//                         S-box); RCON steps after each of the first nine.
//   DLOAD  16 cycles      ciphertext byte i XOR round-key-10 byte i enters
//                         the state register; the key register rotates; the
//                         last edge applies InvShiftRows.
//   KBACK  16 cycles      the key register steps back one round key
//                         (K(r+1) -> K(r)); RCON steps back at the end.
//   ROUND  20 cycles      state byte i leaves, passes the inverse S-box,
//                         AddRoundKey (key rotating in cycles 0..15) and
//                         InvMixColumns (4 cycles latency), and re-enters;
//                         the last edge applies InvShiftRows. In the tenth
//                         round InvMixColumns is bypassed and its output in
//                         cycles 4..19 is the plaintext.
//   FINISH  1 cycle       done.
// KBACK and ROUND repeat 10 times (round keys 9 down to 0). Total
// 16 + 160 + 16 + 10*(16+20) = 552 working cycles; done is high in cycle 553
// after start. Outputs are combinational from phase and counters. A start
// while busy is ignored.
//
// Origin: the phase structure mirrors the encryptor's; everything here is
// this design's own, since decryption is given only as an algorithm.
module dec_control_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic [3:0] byte_idx,
  output logic       dload_phase,  // state takes ciphertext XOR key
  output logic       key_phase,    // S-box takes key Out 2
  output logic       sbox_inv,     // inverse S-box
  output logic       ce_state,
  output logic       state_sr,
  output logic       ce_mc,
  output logic [1:0] mc_idx,
  output logic       mc_bypass,
  output logic       ce_key,
  output key_mode_e  key_mode,
  output logic       key_inverse,
  output logic [3:0] key_j,
  output logic       ce_rcon,
  output logic       rcon_init,
  output logic       rcon_back,
  output logic       out_valid
);

  typedef enum logic [2:0] {IDLE, KLOAD, KFWD, DLOAD, KBACK, ROUND, FINISH} phase_e;

  phase_e     phase;
  logic [4:0] cnt;
  logic [3:0] n;        // KFWD: forward step 0..9; KBACK/ROUND: round 0..9
  logic       last_round;

  assign last_round = (n == 4'd9);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= IDLE;
      cnt   <= '0;
      n     <= '0;
    end else begin
      unique case (phase)
        IDLE: if (start) begin
          phase <= KLOAD;
          cnt   <= '0;
          n     <= '0;
        end
        KLOAD: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin phase <= KFWD; cnt <= '0; end
        end
        KFWD: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin
            cnt <= '0;
            if (last_round) begin phase <= DLOAD; n <= '0; end
            else n <= n + 4'd1;
          end
        end
        DLOAD: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin phase <= KBACK; cnt <= '0; end
        end
        KBACK: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin phase <= ROUND; cnt <= '0; end
        end
        ROUND: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd19) begin
            cnt <= '0;
            if (last_round) phase <= FINISH;
            else begin
              phase <= KBACK;
              n     <= n + 4'd1;
            end
          end
        end
        FINISH: phase <= IDLE;
        default: phase <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (phase != IDLE);
    done        = (phase == FINISH);
    byte_idx    = cnt[3:0];
    dload_phase = (phase == DLOAD);
    key_phase   = (phase == KFWD) || (phase == KBACK);
    sbox_inv    = (phase == ROUND);
    ce_state    = (phase == DLOAD) ||
                  ((phase == ROUND) && !(last_round && cnt >= 5'd16));
    state_sr    = ((phase == DLOAD) && cnt == 5'd15) ||
                  ((phase == ROUND) && cnt == 5'd19);
    ce_mc       = (phase == ROUND);
    mc_idx      = cnt[1:0];
    mc_bypass   = last_round;
    ce_key      = (phase == KLOAD) || (phase == KFWD) || (phase == DLOAD) ||
                  (phase == KBACK) || ((phase == ROUND) && cnt < 5'd16);
    unique case (phase)
      KLOAD:        key_mode = KEY_LOAD;
      KFWD, KBACK:  key_mode = KEY_EXPAND;
      DLOAD:        key_mode = KEY_ROTATE;
      ROUND:        key_mode = (cnt < 5'd16) ? KEY_ROTATE : KEY_HOLD;
      default:      key_mode = KEY_HOLD;
    endcase
    key_inverse = (phase == KBACK);
    key_j       = cnt[3:0];
    ce_rcon     = ((phase == KLOAD) && cnt == 5'd0) ||
                  ((phase == KFWD) && cnt == 5'd15 && !last_round) ||
                  ((phase == KBACK) && cnt == 5'd15);
    rcon_init   = (phase == KLOAD);
    rcon_back   = (phase == KBACK);
    out_valid   = (phase == ROUND) && last_round && (cnt >= 5'd4);
  end

endmodule
