# Trusted virtual sensor in SystemVerilog

A virtual sensor estimates a quantity that is hard to measure, such as a
vehicle's yaw rate, from quantities that are easy to measure, such as speed,
steering angle and lateral acceleration. This design computes that estimate
in hardware. It then encrypts and authenticates the result, so that a
receiver can trust both the value and the chip that produced it:

* **Estimate.** The estimate is a piecewise-affine function over a
  hyper-rectangular partition of the input space (a *PWAR* model). Each
  input axis is cut into 2^p_k equal intervals. Each hyper-rectangle has its
  own affine function `y = f0 + f1*x1 + ... + f4*x4`.
* **Encrypt and authenticate.** The result goes through AEGIS-128, an
  authenticated cipher built from AES rounds. The sensor outputs the nonce,
  the ciphertext and a 128-bit tag.
* **Key that is never stored.** The AEGIS key is rebuilt at every power-up
  from the power-up contents of the sensor's own SRAM, used as an SRAM PUF
  (Physical Unclonable Function), together with public Helper Data. A copied
  chip has different SRAM cells, so it cannot rebuild the key. The nonce
  seed also comes from the SRAM, from its noisy cells, and a counter advances
  it for each measurement.

The same 4096 × 60-bit SRAM does two jobs. After power-up it is the PUF.
After configuration it holds the PWAR coefficients.

## Block structure

```
            +------------------ trusted_virtual_sensor ------------------+
 nvm_addr <-|                                                            |
 nvm_data ->|  control_unit  (FSM, NVM addressing, SRAM port multiplexer) |
 x_valid  ->|      |            |              |             |           |
 x_data   ->|      v            v              v             v           |
            |    hda  -> key -> aegis128 <- nonce_counter <- seed (hda)  |
            |      ^                ^                                     |
            |      | start-up       | y                                  |
            |   sram_puf  --f_i-->  arithmetic <-- x                     |
            |      ^ address                                             |
            |   address_generator <-- x                                  |
            +----------------------> nonce, ct, tag, out_valid, ready ---+
```

| Module | Role |
|---|---|
| `tvs_pkg` | Sizes, the NVM word map, FSM state and phase enums, AEGIS constants, GF(2^8) and S-box functions |
| `address_generator` | Concatenates the p_k most significant bits of each input (x1 leftmost) into the SRAM address. Registered, 1 clock |
| `arithmetic` | Four signed 12×12 multipliers and an adder: `y = (f0 << frac) + Σ fj·xj`, 26 bits. Registered, 1 clock |
| `sram_puf` | Behavioural model of the 4096 × 60 dual-port SRAM macro, including its power-up behaviour |
| `hda` | Helper Data Algorithm: seed extraction, ID-bit extraction, Helper Data xor, and a majority decoder for the 29-bit repetition code |
| `nonce_counter` | 128-bit counter. Loaded with the seed, +1 per measurement |
| `aes_round` | SubBytes, ShiftRows and MixColumns, without key addition |
| `aegis_state_update` | Five parallel AES rounds: one StateUpdate per clock |
| `aegis128` | Sequencer around one StateUpdate: initialisation, ciphertext, finalisation, tag |
| `control_unit` | FSM OFF-ON → CONF1 → CONF2 → CONF3 → IDLE → TS1…TS6 → IDLE |
| `trusted_virtual_sensor` | Top level |

## Rebuilding the key from the SRAM

This is the least obvious part of the design.

**Enrolment (off-chip, once per chip).** The SRAM is powered up many times.
Cells that always start with the same value are *ID cells*. Cells that start
at random are *RND cells*. The enrolment produces:

* an ID mask over SRAM words 31..102 (4320 cells);
* an RND mask over SRAM words 0..30 (1860 cells);
* Helper Data `H = key_r ⊕ R`. Here `key_r` is the 128-bit key with each bit
  repeated 29 times, and `R` is the first 3712 ID cells in cell order.

The masks and `H` are stored in the NVM. None of them reveals the key.

**At every power-up** the configuration streams the NVM one 12-bit word per
clock. The HDA uses these words in three phases:

1. **RND mask (155 words).** Every fifth clock the control unit reads one
   start-up word (60 bits) of SRAM words 0..30. The HDA pairs each mask word
   with a 12-bit slice of that SRAM word. Mask word `5w+s` covers bits
   `12s+11..12s` of SRAM word `w`. Each set mask bit appends one start-up bit
   to the seed, first bit in seed bit 0, until 128 bits are collected.
2. **ID mask (360 words).** The same pairing runs over SRAM words 31..102.
   The selected bits (`R'`, the new reading of the ID cells) cannot be used
   yet, because the Helper Data come later in the NVM. The HDA packs them
   into 60-bit words and writes them through the second SRAM port into SRAM
   words 103 and up. This region is overwritten later by the coefficients.
3. **Helper Data (310 words).** The packed `R'` words are read back, 12 bits
   per clock, and xored with `H`. This gives `key_r ⊕ R ⊕ R'`: the repeated
   key with a few bit errors where ID cells flipped. A running count of ones
   over each group of 29 bits decides each key bit by majority (15 or more
   ones). Up to 14 flipped cells per key bit are corrected. The key is
   complete one clock after the last Helper Data word.

Because the HDA works on 12 bits per clock, in step with the NVM, seed and
key are ready when the Helper Data end. A bit-serial HDA would need another
1860 + 4320 clocks, run in parallel with the coefficient load.

## Computing the estimate

Each SRAM word holds one affine function: `f0` in bits 11:0, `f1` in 23:12,
and so on up to `f4` in 59:48. Inputs and coefficients are 12-bit two's
complement. Three configuration registers are loaded from the NVM:

* the number of inputs in use (inputs above it count as 0);
* `p_1..p_4`, 3 bits each: input k is split into 2^p_k intervals, with
  Σp_k ≤ 12 and each p_k ≤ 7;
* `frac`, 0..12: the binary point of the offset relative to the products.
  `f0` is shifted left by `frac` before it is added.

With `frac` capped at 12, four full-scale products plus the shifted offset
always fit the 26-bit output. No overflow is possible.

Example: the yaw-rate partition splits speed into 4 intervals, steering
angle into 16 and lateral acceleration into 2, so `p = 2,4,1,0`. The
address is then `{x1[11:10], x2[11:8], x3[11]}`, which selects one of 128
words.

## AEGIS-128 as used here

`aegis128` reuses one `aegis_state_update`, which is five AES rounds in
parallel, once per clock:

| Step | Clocks | Operation |
|---|---|---|
| start | – | `S = {K⊕N, C1, C2, K⊕C1, K⊕C2}` |
| nonce processing | 10 | `S = Update(S, m)`, where m alternates `K` and `K⊕N` |
| ciphertext | 1 | `C = y ⊕ S1 ⊕ S4 ⊕ (S2 & S3)`; `S = Update(S, y)`; `tmp = S3 ⊕ 128` |
| finalisation | 6 | `S = Update(S, tmp)` |
| tag | 1 | `tag = S0 ⊕ S1 ⊕ S2 ⊕ S3 ⊕ S4` |

Constants: `C1 = 000101020305080d1522375990e97962` and
`C2 = db3d18556dc22ff12011314273b528dd`. The plaintext is the 26-bit `y`,
zero-extended to 128 bits. AES byte 0 is bits 127:120.

**Not standard AEGIS-128.** This sequence is a simplified form of
AEGIS-128, and it differs from the published cipher in four ways:

* the places of the constants in the initial state;
* six finalisation updates instead of seven (parameter `FINAL_ROUNDS`);
* the length block is the integer 128, not the little-endian encoded length;
* there is no associated data.

Standard AEGIS-128 test vectors therefore do not apply. A receiver must
implement the same sequence. `FINAL_ROUNDS = 7` gives the standard number
of finalisation updates.

## Control FSM and timing

| State | What happens |
|---|---|
| OFF-ON | After `por_n` is released |
| CONF1 | NVM words 0..824 (masks, Helper Data); HDA works in parallel |
| CONF2 | Wait for the last key bit |
| CONF3 | Load the nonce counter with the seed; read 3 configuration words and 20,480 coefficient words (5 per SRAM word, `f0` first) |
| IDLE | `ready = 1` |
| TS1 | 4 input words on `x_data`, one per clock with `x_valid`. The nonce advances in the first clock; AEGIS starts in the second |
| TS2 / TS3 / TS4 | Address generation / SRAM read / affine function (1 clock each) |
| TS5 | Ciphertext, as soon as AEGIS has finished the nonce |
| TS6 | Tag; `out_valid` pulses and `nonce`, `ct`, `tag` are held |

Configuration takes 21,308 NVM reads plus a few pipeline clocks. A
measurement takes 20 clocks from the first `x_valid` to `out_valid`:
1 nonce update + 10 nonce processing + 1 ciphertext + 7 tag, plus 1 output
register. The PWAR path (7 clocks) is hidden under the nonce processing.
The original prototype reports 21 clocks, with 9 for the tag. With
`FINAL_ROUNDS = 7` this design also takes 21.

### NVM image (12-bit words, data one clock after the address)

| Words | Contents |
|---|---|
| 0–154 | RND mask. Bit b of word i is cell 12i+b of SRAM words 0..30 |
| 155–514 | ID mask over SRAM words 31..102, same bit order |
| 515–824 | Helper Data, 3712 bits used, bit j in word 515 + j/12, bit j mod 12 |
| 825 | bits 2:0 = number of inputs |
| 826 | `{p1, p2, p3, p4}`, 3 bits each, `p1` in bits 11:9 |
| 827 | bits 3:0 = `frac` |
| 828 + 5a + s | coefficient `f_s` of hyper-rectangle `a` |

## Top-level ports

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `por_n` | in | 1 | power-on reset, active low. In simulation a low pulse is also a power cycle of the SRAM |
| `nvm_addr` / `nvm_data` | out / in | 15 / 12 | external NVM |
| `x_valid` / `x_data` | in | 1 / 12 | four input words, x1 first |
| `ready` | out | 1 | IDLE: configured, a measurement can start |
| `out_valid` | out | 1 | one-clock pulse: results valid |
| `nonce`, `ct`, `tag` | out | 128 each | nonce used, ciphertext, authentication tag |
| `state` | out | 4 | FSM state (`tvs_pkg::ctrl_state_e`) |

## The SRAM model

`sram_puf` is a simulation model of a foundry memory, not logic to be
synthesized. At power-up (`por_n` low) each cell takes a preferred value
given by a hash of `DEVICE_ID` and the cell position:

* `RND_PCT` (7) percent of cells start at random instead;
* the remaining cells flip with probability `FLIP_PERMIL` (5) per mille.

Two instances with the same `DEVICE_ID` behave like the same chip. The
top level passes its `PUF_DEVICE_ID` and `PUF_FLIP_PERMIL` parameters to
the model; they have no effect on synthesized logic. For
synthesis, replace the model with the memory macro; its ports are one read
port and one write port, with read data one clock after the address.

## Departures and choices to be aware of

* Mask and Helper Data are handled 12 bits per clock. The ID bits are
  parked in the SRAM. The original prototype uses a bit-serial HDA (1860
  and 4320 clocks) overlapped with the coefficient load, and does not say
  where intermediate data are kept.
* The separate 4-clock "process the key" step and 5-clock decode step of
  the original are not separate here. AEGIS takes the key directly at each
  start, and the decoding runs while the Helper Data stream in.
* Signedness, the word layout, the meaning of `frac`, the NVM map, the
  configuration word formats and the input handshake are this design's
  own choices.
* If fewer than 3712 ID cells or 128 RND cells are marked, the key or seed
  is incomplete. Enrolment must guarantee enough cells; with typical cell
  statistics (about 87% ID, 7% RND) there are about 3770 and 132.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. For example, the full-size end-to-end
test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/tvs_pkg.sv tb/aegis_ref_pkg.sv tb/tb_trusted_virtual_sensor.sv \
  --top-module tb_trusted_virtual_sensor -o sim
./obj_dir/sim
```

The end-to-end test runs in a few seconds. It:

* enrols a chip with a second SRAM model;
* builds the NVM image with the yaw-rate partition and random coefficients;
* takes 24 measurements, power-cycles, and takes 24 more;
* checks each result against an independent model of the interval lookup,
  the affine function and AEGIS (`tb/aegis_ref_pkg.sv`);
* checks the latencies, that the nonce advances by one, that the seed
  changes after a power cycle, that every FSM state is visited, and that
  PUF bit errors occurred and were corrected.

| Testbench | What it checks |
|---|---|
| `tb_aes_round` | FIPS-197 worked example and random states against the reference model |
| `tb_aegis_state_update` | random states against the reference model |
| `tb_aegis128` | random keys, nonces and messages; 10 / 1 / 7 clock phases; the 7-round variant |
| `tb_hda` | seed, key with 0..14 errors per codeword, and a 15-error codeword that must fail |
| `tb_nonce_counter` | load, count and carry across all 128 bits |
| `tb_address_generator` | random partitions against a mixed-radix model |
| `tb_arithmetic` | random and extreme operands; `n_used` and `frac` |
| `tb_sram_puf` | read/write behaviour; noise share; difference between devices |
| `tb_control_unit` | NVM order, HDA stream, SRAM reads and writes, state order and enables |
| `tb_puf_stress` | two full-size sensors from one NVM image: the enrolled chip with about 10% start-up flips (the worst measured operating-condition change for such SRAMs) must recover its key every time; a different chip must never produce a valid tag |

Warnings from `verilator -Wall` that remain are unused package constants,
deliberately unconnected debug outputs and the reset used in an assertion's
`disable iff`.
