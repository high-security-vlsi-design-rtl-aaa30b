// control_unit: sequencer of the byte-serial AES-128 encryptor.
//
// One encryption runs through four phases after a start pulse:
//   LOAD   16 cycles  plaintext byte i XOR key byte i goes through the
//                     S-box into the State-Register while the key byte is
//                     shifted into the Key-Register; the last edge also
//                     applies ShiftRows. RCON is set to 0x01.
//   KEYEXP 16 cycles  the Key-Register computes the next round key, using
//                     the shared S-box; State-Register and Mix-Columns are
//                     not clocked. RCON steps on the last edge.
//   ROUND  20 cycles  the state streams out of the State-Register, through
//                     Mix-Columns (4 cycles latency), AddRoundKey and the
//                     S-box and back in. The Key-Register rotates in cycles
//                     4..19 so that round-key byte i meets state byte i.
//                     The last edge applies ShiftRows. In round 10
//                     Mix-Columns is bypassed and the AddRoundKey output in
//                     cycles 4..19 is the ciphertext.
//   FINISH  1 cycle   done is high.
// KEYEXP and ROUND repeat for rounds 1..10, so an encryption takes
// 16 + 10*(16+20) = 376 cycles from the cycle after start to the last
// ciphertext byte, and done is high in cycle 377.
//
// Outputs are combinational functions of the phase and counters, including
// the clock-gate enables (ce_*) that decide whether the next rising edge
// reaches each register bank. A start while busy is ignored.
//
// Origin: the original architecture names a control unit only; the whole
// schedule, including the 20-cycle round, is this design's.
module control_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic [3:0] byte_idx,    // byte of the 128-bit inputs being loaded
  output logic       load_phase,  // S-box takes plaintext XOR key
  output logic       key_phase,   // S-box takes Key-Register Out 2, unmasked
  output logic       ce_state,
  output logic       state_sr,
  output logic       ce_mc,
  output logic [1:0] mc_idx,
  output logic       mc_bypass,
  output logic       ce_key,
  output key_mode_e  key_mode,
  output logic [3:0] key_j,
  output logic       ce_rcon,
  output logic       rcon_init,
  output logic       out_valid    // ciphertext byte on the AddRoundKey output
);

  typedef enum logic [2:0] {IDLE, LOAD, KEYEXP, ROUND, FINISH} phase_e;

  phase_e     phase;
  logic [4:0] cnt;
  logic [3:0] round;        // current round, 1..10
  logic       last_round;

  assign last_round = (round == 4'd10);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= IDLE;
      cnt   <= '0;
      round <= '0;
    end else begin
      unique case (phase)
        IDLE: if (start) begin
          phase <= LOAD;
          cnt   <= '0;
          round <= '0;
        end
        LOAD: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin
            phase <= KEYEXP;
            cnt   <= '0;
            round <= 4'd1;
          end
        end
        KEYEXP: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin
            phase <= ROUND;
            cnt   <= '0;
          end
        end
        ROUND: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd19) begin
            cnt <= '0;
            if (last_round) phase <= FINISH;
            else begin
              phase <= KEYEXP;
              round <= round + 4'd1;
            end
          end
        end
        FINISH: phase <= IDLE;
        default: phase <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy       = (phase != IDLE);
    done       = (phase == FINISH);
    byte_idx   = cnt[3:0];
    load_phase = (phase == LOAD);
    key_phase  = (phase == KEYEXP);
    // State-Register: loads in LOAD, streams in ROUND; in the last round
    // only its 16 output bytes are needed.
    ce_state   = (phase == LOAD) ||
                 ((phase == ROUND) && !(last_round && cnt >= 5'd16));
    state_sr   = ((phase == LOAD) && cnt == 5'd15) ||
                 ((phase == ROUND) && cnt == 5'd19);
    ce_mc      = (phase == ROUND);
    mc_idx     = cnt[1:0];
    mc_bypass  = last_round;
    ce_key     = (phase == LOAD) || (phase == KEYEXP) ||
                 ((phase == ROUND) && cnt >= 5'd4);
    unique case (phase)
      LOAD:    key_mode = KEY_LOAD;
      KEYEXP:  key_mode = KEY_EXPAND;
      ROUND:   key_mode = (cnt >= 5'd4) ? KEY_ROTATE : KEY_HOLD;
      default: key_mode = KEY_HOLD;
    endcase
    key_j      = cnt[3:0];
    ce_rcon    = ((phase == LOAD) && cnt == 5'd0) ||
                 ((phase == KEYEXP) && cnt == 5'd15);
    rcon_init  = (phase == LOAD);
    out_valid  = (phase == ROUND) && last_round && (cnt >= 5'd4);
  end

endmodule
