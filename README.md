# Compact masked AES-128 crypto processor for block-wise image encryption

This is an AES-128 encryptor built to be as small as possible. All the work
goes through one byte-wide loop that holds a single S-box, and that S-box
also serves the key expansion. Three things keep the loop small:

- ShiftRows happens inside the state register as a permuted load.
- MixColumns takes one byte and gives out one byte per cycle, using four
  8-bit registers.
- Round keys are computed one byte at a time in a 16-byte key shift
  register.

Every register bank has its own clock gate, so a bank gets no clock edges in
phases where it does nothing. The data is also masked: the plaintext enters
XORed with a random byte, the whole computation runs on masked values, and
the mask is removed only from the finished ciphertext.

A second unit decrypts on the same kind of 8-bit datapath. Together the two form a
crypto processor for images. A host splits an image into 128-bit blocks,
encrypts them, and later decrypts them to get the image back.

```
                 +------------------------- aes_crypto_top ---------------------------+
 key[127:0] -----+--------------------------+                                         |
                 |  nano_aes_encrypt        |            aes_decrypt                  |
 enc_en -------->| clock_gating (global)    |   key -> 10 fwd key steps, then per     |
 plain_in ------>| mask_rng -> mask byte m  |   round: 1 back key step + 20-cycle     |
                 | pt ^ {16{m}} -> aes_encrypt -> ^ {16{m}} -> cipher_out   byte round -> plain_out
                 +--------------------------+-----------------------------------------+

 aes_encrypt (8-bit loop):
           +-----------------------------------------------------------+
           |                                                           |
 pt^key -->[mux]--> sub_bytes --> state_register --> mix_columns --> (+)--> ciphertext bytes
           ^        (masked)      (ShiftRows inside)  (4 regs)        ^    (last round)
           |            |                                             | Out 1
           | Out 2      +--> (+) <-- rcon                             |
           +------- key_register <-------------------------------------+
                    (16-byte shift chain, on-the-fly expansion)
```

## The byte loop and its schedule

The hardest part of the design is how one byte stream carries a whole round.
A state byte leaves the state register and passes MixColumns. It is then
XORed with the matching round-key byte (AddRoundKey), goes through the S-box,
and enters the state register again. In this order the loop runs SubBytes
and ShiftRows of round r+1 right after MixColumns and AddRoundKey of round r,
which is exactly AES.

`control_unit` runs each encryption in these phases:

| phase   | cycles | what happens |
|---------|--------|--------------|
| LOAD    | 16     | Plaintext byte *i* XOR key byte *i* (the initial AddRoundKey) goes through the S-box into the state register. Key byte *i* is shifted into the key register. The last edge applies ShiftRows. RCON is set to 01. |
| KEYEXP  | 16     | The key register replaces round key r-1 with round key r, using the S-box in its first 4 cycles. The state register and MixColumns get no clock edges. |
| ROUND   | 20     | 16 bytes stream out of the state register and 16 processed bytes stream back in. The last edge applies ShiftRows. |
| FINISH  | 1      | `done` is high. |

KEYEXP and ROUND repeat for rounds 1 to 10. An encryption therefore takes
16 + 10·(16+20) = 376 working cycles, and `done` rises in the 377th cycle
after `ld`.

**Why a round takes 20 cycles.** MixColumns outputs each byte exactly 4
cycles after the matching input byte, so the loop holds 16 + 4 bytes. The
state register shifts every cycle of a ROUND:

- In cycles 0–3, bytes 0–3 leave the register. The bytes that enter are not
  used.
- In cycles 4–15, processed bytes 0–11 enter while bytes 4–15 leave.
- In cycles 16–19, the 4 unused bytes leave (they flush MixColumns) and
  processed bytes 12–15 enter.

After 20 shifts, position *i* holds processed byte *i* again. The key
register is clocked only in cycles 4–19. It rotates once around, so round-key
byte *i* is at Out 1 exactly when state byte *i* reaches AddRoundKey.

**ShiftRows in the state register.** Byte *i* of the state is row *i* mod 4
and column *i*/4. On the edge that shifts in the 16th byte, the register
stores the ShiftRows permutation of its new contents instead of the plain
shift: row *r* of column *c* is taken from column (*c*+*r*) mod 4. This costs
no logic beyond a 16-byte multiplexer and no extra cycle. In the last round
the register is not clocked in cycles 16–19, because nothing reads it
afterwards.

**MixColumns with four registers.** Three registers collect bytes a0–a2 of a
column. When a3 arrives, all four results b0–b3 are computed at once:

- b0 goes to the output register, the fourth register.
- b1–b3 overwrite a0–a2.
- In the next three cycles b1–b3 leave one at a time. Each slot they free
  takes a byte of the next column.

So the unit never stalls. In the last round, `bypass` replaces the column
function with the identity. The unit is then a 4-cycle delay, and the last
round keeps the same timing as the others.

**Key expansion, byte by byte.** In KEYEXP cycle *j*, old key byte *k_j* is
at Out 1 (position 0). The new byte *k'_j* is shifted in at position 15:

- *j* < 4: *k'_j* = *k_j* ^ S(*k*_(12+(*j*+1) mod 4)) ^ (RCON if *j*=0).
- *j* ≥ 4: *k'_j* = *k_j* ^ *k'_(j−4)*. *k'_(j−4)* is always at position 12.

Out 2 feeds the S-box from position 13 in cycles 0–2 and from position 9 in
cycle 3, which is where the bytes of RotWord(w3) are at those times. RCON
steps (×x in GF(2⁸)) once at the end of each KEYEXP.

## Masking

`nano_aes_encrypt` takes one mask byte *m* per block. *m* is the XOR of the
two bytes of a 16-bit LFSR state, captured when the block is accepted. The
core is fed plaintext ^ {16{*m*}} together with *m*. All 16 state bytes carry
the same mask, and each step keeps it:

- AddRoundKey and ShiftRows keep it trivially.
- MixColumns keeps it, because each output is 2a⊕3b⊕c⊕d and 2⊕3⊕1⊕1 = 1 in
  GF(2⁸).
- The S-box computes S(*x*⊕*m*)⊕*m*. In key expansion the mask input is 0,
  because the key is not masked.

The core's result is therefore ciphertext ^ {16{*m*}}, and the wrapper
removes the mask.

Limits you should know about:

- The S-box removes and re-adds the mask inside one combinational cone, so
  unmasked values exist on internal nets.
- One mask byte covers the whole block.
- The key is not masked.
- The LFSR is deterministic.

So this masking keeps plain data out of the registers and the byte bus. It
is not a proven countermeasure against power analysis. A hardened version
would need a masked S-box circuit and a true random source.

## Clock gating

`clock_gating` is the standard latch-based gate: the enable is latched while
the clock is low, and the output is clk AND the latched enable. It is used:

- once in front of the whole encryptor (`enc_en`), and
- once each for the state register, the MixColumns registers, the key
  register and RCON.

The control unit opens each gate only in the phases where its block works:

| clock          | open in |
|----------------|---------|
| state register | LOAD and ROUND |
| MixColumns     | ROUND |
| key register   | LOAD, KEYEXP, and ROUND cycles 4–19 |
| RCON           | 11 single cycles per block |

The latch is the gate's storage element and is intended. Dropping `enc_en`
freezes the encryptor; it continues where it stopped once `enc_en` returns.

## Decryptor

`aes_decrypt` mirrors the encryptor's byte loop, running the inverse cipher.
Its parts:

- `dec_sub_bytes`: one S-box with a forward/inverse select. Both directions
  share the GF(2⁸) inverter.
- `state_register` with `INVERSE=1`: the permuted load applies
  InvShiftRows.
- `mix_columns` with `INVERSE=1`: the same four-register unit, computing
  InvMixColumns.
- `dec_key_register`: the key shift register, able to step the schedule
  forward or backward by one round key.
- `dec_rcon`: the round constant, stepped by ×x forward or ×x⁻¹ backward.
- `dec_control_unit`: the sequencer.

Per round, a byte leaves the state register (InvShiftRows already applied),
goes through the inverse S-box, is XORed with the round-key byte, passes
InvMixColumns and re-enters the state register. The last round bypasses
InvMixColumns.

| phase  | cycles | what happens |
|--------|--------|--------------|
| KLOAD  | 16     | Key byte *i* is shifted into the key register. RCON is set to 01. |
| KFWD   | 10 × 16 | The key is expanded forward to round key 10, as in the encryptor. |
| DLOAD  | 16     | Ciphertext byte *i* XOR round-key-10 byte *i* enters the state register. The last edge applies InvShiftRows. |
| KBACK  | 16     | The key register steps back one round key. |
| ROUND  | 20     | One inverse round, with the same 20-cycle stream as the encryptor. |
| FINISH | 1      | `done` is high. |

KBACK and ROUND repeat 10 times. `done` rises 553 cycles after `ld`.

**Backward key step.** From round key *r* (words w0–w3), round key *r*−1 is:

- w3' = w3^w2, w2' = w2^w1, w1' = w1^w0
- w0' = w0 ^ SubWord(RotWord(w3')) ^ rcon

In byte form, bytes 4–15 are each XORed with the byte four places earlier in
the old key. Those bytes have already left the shift chain, so a 4-byte
history register keeps them. Bytes 0–3 use the S-box on w3', which is taken
from taps 13 and 9 XORed together.

Like the encryptor, the state register, InvMixColumns, the key register and
RCON each have their own clock gate, opened only in the phases where they
work. The decryptor is not masked; the source describes masking for the
encryptor only.

## Interfaces and timing

All units share `clk` and an asynchronous active-low `rst_n`. Blocks use the
FIPS-197 byte order: byte 0 is bits [127:120], and bytes are numbered column
by column.

| unit | start | inputs | result |
|------|-------|--------|--------|
| encryptor (`enc_*`) | `enc_ld` pulse while `enc_busy` is low | `key` and `plain_in` must stay stable for the 16 cycles after `enc_ld` | `enc_done` pulses after 377 cycles (plus any cycles with `enc_en` low); `cipher_out` then holds the ciphertext until the last round of the next block |
| decryptor (`dec_*`) | `dec_ld` pulse while `dec_busy` is low | `key` is read in cycles 1–16 after `dec_ld` and `cipher_in` in cycles 177–192; hold both for 192 cycles | `dec_done` pulses after 553 cycles; `plain_out` then holds the plaintext until the next decryption's last round |

A start while busy is ignored. Both units can work at the same time.

## Where this departs from the description it is based on

- **Round timing.** The source describes an 8-bit datapath with byte-serial
  MixColumns, and it also says one round is computed per cycle. Both cannot
  hold for one datapath. Both units follow the 8-bit architecture: 377
  cycles per block to encrypt and 553 to decrypt. The source describes the
  decryptor only as an algorithm, so its datapath and schedule are this
  design's.
- **Insides chosen by this design.** The source names the blocks and gives
  their roles. These details are this design's own:
  - the internal organisation of MixColumns,
  - the state-register permutation,
  - the key-register taps and the 16+20-cycle schedule,
  - the control encoding,
  - the handshake,
  - the reset,
  - the S-box computed from its definition,
  - the mask scheme: one uniform byte from an LFSR.
- **Reported FPGA resources are not reproduced.** Examples: the single latch,
  the 7 block RAMs, 283 slice registers. This RTL has five clock-gate
  latches and about 470 storage bits in the encryptor path: 256 bits of
  state and key, the 32 MixColumns bits, 128 output bits, mask, RNG and
  control.
- **Not included.** Image-to-text conversion, which runs on the host, and
  any device-specific I/O.

## Simulating

Every testbench checks its outputs against `tb/aes_ref_pkg.sv`. That is an
independent behavioural AES whose S-box is built by a brute-force search for
inverses. Every testbench ends by printing
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_crypto_top.sv --top-module tb_aes_crypto_top
./obj_dir/Vtb_aes_crypto_top
```

To run another testbench, replace the testbench file and the top module
name.

| testbench | what it checks |
|-----------|----------------|
| `tb_aes_crypto_top` | End to end at default parameters. Builds a 32×32 test image (64 blocks), encrypts every block and checks it against the reference, and decrypts it while the next block is being encrypted. Drops `enc_en` at random. Counts each mechanism: clock-stopped key expansions, MixColumns bypass, in-register ShiftRows, clock-gate stalls, non-zero masks, ignored starts, overlapped decryptions. |
| `tb_nano_aes_encrypt` | FIPS-197 vectors and random blocks through the masked encryptor, with and without stalls. Latency = 377 enabled cycles. |
| `tb_aes_encrypt` | The core with random masks. Latency is 377 cycles, and starts while busy are ignored. |
| `tb_aes_decrypt` | FIPS-197 and random decryptions; latency 553; inputs changed after the read window. |
| `tb_dec_control_unit` | The decryptor schedule: enable counts per phase, inverse S-box only in rounds, bypass only in round 10. |
| `tb_dec_sub_bytes` | All 256 inputs in both directions. |
| `tb_dec_key_register` | All round keys forward and then backward, for 4 keys. |
| `tb_dec_rcon` | The round constants forward and backward. |
| `tb_control_unit` | How many cycles each clock gate is open, ShiftRows and output strobes, bypass only in round 10. |
| `tb_sub_bytes` | All 256 inputs under four masks. |
| `tb_state_register` | In-register ShiftRows against a computed permutation. |
| `tb_mix_columns` | Gap-free streaming, the exact 4-cycle latency, the FIPS column example, bypass. |
| `tb_key_register` | All 10 round keys for 4 keys. |
| `tb_rcon` | The 10 round constants. |
| `tb_clock_gating` | Gating with no glitch while the enable changes during the high phase. |
| `tb_mask_rng` | Maximal period 65535 and the step equations. |

`tb_aes_crypto_top` reads internal signals by hierarchical name to count the
mechanisms. It takes about a minute to build and under a second to run.

## Files

- `rtl/aes_pkg.sv`: types, GF(2⁸) arithmetic, the S-box and its inverse, and
  the MixColumns column functions.
- `rtl/aes_crypto_top.sv`: the top.
- `rtl/nano_aes_encrypt.sv`: mask wrapper and global clock gate.
- `rtl/aes_encrypt.sv`: the byte-serial core.
- The core's parts: `control_unit`, `sub_bytes`, `state_register`,
  `mix_columns`, `key_register`, `rcon`, `clock_gating` and `mask_rng`, each
  in `rtl/<name>.sv`.
- `rtl/aes_decrypt.sv`: the decryptor, with its parts `dec_control_unit`,
  `dec_sub_bytes`, `dec_key_register` and `dec_rcon`.
- `tb/`: one testbench per module plus the reference package.
