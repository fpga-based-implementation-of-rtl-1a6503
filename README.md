# Iterative AES-128 encryptor and decryptor

This is a small-area AES-128 block cipher for FPGAs or ASICs, written in
SystemVerilog. Instead of unrolling the ten AES rounds into ten pipeline
stages, it builds **one** round as combinational logic, puts a 128-bit
register in front of it and loops the data through ten times. The round keys
are not stored: the key schedule is built the same way, one round of it next
to a 128-bit key register, and it makes each sub-key in the clock in which
the data needs it. A core takes a 128-bit block and a 128-bit key. Ten clocks
later it gives the result, so it moves 12.8 bits per clock. At the 172 MHz
(Spartan-6) and 294 MHz (Artix-7) reported for the original VHDL
implementation, that is 2.2 and 3.77 Gbit/s.

There are two cores:

* `aes_enc` encrypts. It takes a plaintext and the cipher key.
* `aes_dec` decrypts. It takes a ciphertext and the **last** round key
  (round 10 of the key schedule), and runs the key schedule backwards.

`aes_top` places them side by side. They share only the clock.

## The controller is the round constant

The most unusual part of the design is that neither core has a round counter.
Each AES key-schedule round needs a round constant RC, and these constants are
the successive powers of x in GF(2^8): 01, 02, 04, 08, 10, 20, 40, 80, 1b, 36.
The controller is an 8-bit register that holds RC. It sends RC to the key
schedule, and two comparators on RC stand in for a counter.

| clock after load | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  | 10 | 11 (done) |
|------------------|----|----|----|----|----|----|----|----|----|----|-----------|
| encryptor RC     | 01 | 02 | 04 | 08 | 10 | 20 | 40 | 80 | 1b | 36 | 6c        |
| decryptor RC     | 36 | 1b | 80 | 40 | 20 | 10 | 08 | 04 | 02 | 01 | 00        |

* **Encryptor (`aes_enc_ctrl`).** A load sets RC to 0x01. Every later clock
  multiplies it by x (`xtime`). RC = 0x36 marks the final round, which skips
  MixColumns. RC = 0x6c, the next power of x, is `done`.
* **Decryptor (`aes_dec_ctrl`).** A load sets RC to 0x36. Every later clock
  steps it back: 0x1b goes to 0x80, and any other value is shifted right by one
  bit. So 0x01 goes to 0x00, which is `done`. A one-bit flag marks the first
  round, which skips InvMixColumns.

When `done` is reached, the controller and all data registers stop. The
result and `done` then stay put until the next load.

## Encryptor datapath

```
 datain ─┐                         key ─┐
         ▼                               ▼
   [mux: !rst ? datain : feedback]  [mux: !rst ? key : next_key]
         ▼                               ▼
     state_q (128 FF)                 key_q (128 FF) ──► key-schedule round ──┐
         ▼                               │           (RC from controller)      │
         ⊕ ◄──────────── sub-key ────────┘                next_key ◄───────────┘
         ├──► dataout (ciphertext when done)
         ▼
      SubBytes ─► ShiftRows ─┬─► MixColumns ─┐
                             └───────────────┴─► [mux: final_round] ─► feedback
```

The XOR with the sub-key sits at the start of the round. So on the first
clock it is AES's initial AddRoundKey with the cipher key, and on the clock
that raises `done` it is the last AddRoundKey with round key 10. `dataout` is
tapped right after that XOR, so it shows the ciphertext exactly when `done`
is high. Between a load and `done`, `dataout` carries intermediate values.

While `done` is high, `key_q` holds round key 10. This is the key that the
decryptor needs for the same cipher key (the round-trip test uses that fact).

Flip-flops: 128 (state) + 128 (key) + 8 (RC) = 264 per encryptor. That is
the same as the 264 slice registers reported for the original encryptor on an
Artix-7. The decryptor adds the one-bit first-round flag, for 265.

## Decryptor datapath

The decryptor is the encryptor turned around. Each clock does four things:

1. `plaintext = state_q ^ key_q`. This is the output tap. After ten rounds
   it holds the plaintext.
2. InvMixColumns on that sum, except on the first round.
3. InvShiftRows.
4. InvSubBytes. The result goes back to `state_q`.

At the same time, `aes_inv_key_round` turns round key i into round key i-1:

```
w3 = w3' ^ w2'   w2 = w2' ^ w1'   w1 = w1' ^ w0'   w0 = w0' ^ F(w3, RC)
```

After ten clocks `key_q` holds the cipher key again. The key schedule needs
only the constants 36 down to 01 for this. The final 00 only signals
completion.

The decryptor needs round key 10 at its input. You can get it in two ways:

* Run the same key through the encryptor once and read its `key_q` at `done`.
* Expand the key in software.

## Key-schedule round and F

`aes_key_round` splits the key into words: w0 in bits 31..0, up to w3 in bits
127..96. It computes:

```
w0' = w0 ^ F(w3, RC)    w1' = w1 ^ w0'    w2' = w2 ^ w1'    w3' = w3 ^ w2'
F(w) = SubWord(RotWord(w)) ^ {24'h0, RC}
```

F (`aes_key_f`) has four S-boxes of its own. So each core has 20 S-boxes: 16 in
the round and 4 in the key schedule.

## Byte order

AES byte i is held in bits `[8*i+7 : 8*i]`, so byte 0 is the **least**
significant byte. Written as a hex literal, a block therefore reads as the
usual AES byte string reversed:

| | usual notation (FIPS-197) | this design's 128-bit value |
|---|---|---|
| key        | `2b7e151628aed2a6abf7158809cf4f3c` | `128'h3c4fcf098815f7aba6d2ae2816157e2b` |
| plaintext  | `6bc1bee22e409f96e93d7e117393172a` | `128'h2a179373117e3de9969f402ee2bec16b` |
| ciphertext | `3ad77bb40d7a3660a89ecaf32466ef97` | `128'h97ef6624f3ca9ea860367a0db47bd73a` |

The state is a 4x4 byte matrix filled column by column, with byte r+4c in row
r, column c. ShiftRows, MixColumns and their inverses work on that matrix.

## Interface and timing

All ports are plain logic. Blocks and keys are 128-bit vectors (`aes_block_t`, `aes_key_t` in `aes_pkg`).

| port (`aes_enc` / `aes_dec`) | dir | meaning |
|---|---|---|
| `clk` | in | clock, rising edge |
| `rst` | in | synchronous, **active-low load**: on a clock edge with `rst` low the core samples its data and key inputs and restarts; keep it high to run |
| `datain` / `ciphertext` | in | input block, sampled only at the load |
| `key` / `dec_key` | in | cipher key / round-10 key, sampled only at the load |
| `dataout` / `plaintext` | out | result, valid while `done` is high |
| `done` | out | rises 10 clocks after the load edge and stays high until the next load |

Sequence:

1. Hold `rst` low for one clock edge, with the inputs valid.
2. Raise `rst`.
3. Ten edges later `done` is high, and the result stays valid until you load again.

You can load again at any time. A load in the middle of a run abandons that
run. Between a load and `done`, the core ignores its inputs.

`rst` is only a load. Nothing needs a power-on reset, because a load sets
every register the core reads. Until the first load, `done` and the outputs
are meaningless.

Each core has 3 x 128 data pins plus `clk`, `rst` and `done`, for 387 pins.

`aes_top` prefixes the core ports with `enc_` and `dec_` and shares `clk`.

## Module map

| file | role |
|---|---|
| `rtl/aes_pkg.sv` | types, RC constants, `xtime`, GF(2^8) multiply and inverse, affine maps |
| `rtl/aes_top.sv` | encryptor and decryptor side by side |
| `rtl/aes_enc.sv`, `rtl/aes_dec.sv` | the two cores: registers, load multiplexers, hold |
| `rtl/aes_enc_ctrl.sv`, `rtl/aes_dec_ctrl.sv` | RC-register controllers |
| `rtl/aes_enc_round.sv`, `rtl/aes_dec_round.sv` | combinational rounds with the final/first-round bypass |
| `rtl/aes_key_round.sv`, `rtl/aes_inv_key_round.sv` | forward and backward key-schedule rounds |
| `rtl/aes_key_f.sv` | RotWord + SubWord + RC |
| `rtl/aes_sub_bytes.sv`, `rtl/aes_inv_sub_bytes.sv` | 16 S-boxes / inverse S-boxes |
| `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv` | one S-box, computed as described below |
| `rtl/aes_shift_rows.sv`, `rtl/aes_inv_shift_rows.sv` | row rotations (wiring only) |
| `rtl/aes_mix_columns.sv`, `rtl/aes_inv_mix_columns.sv` | column mixing in GF(2^8) |

No S-box table is stored. The S-box is the GF(2^8) inverse modulo
x^8+x^4+x^3+x+1, computed as a^254 = a^2·a^4·…·a^128, followed by the affine
map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse
S-box is the inverse affine map `rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05`,
followed by the same inverse. A synthesis tool reduces these to logic. If you
want a ROM or LUT-based S-box, you can swap in a case table without touching
anything else.

## How far it follows the original, and where it departs

Taken from the published design:

* the one-round-per-clock architecture;
* the load multiplexers controlled by reset;
* the ciphertext tap after the sub-key XOR;
* the MixColumns bypass on the final round;
* the on-the-fly key schedule;
* the RC-register controller with its constants 0x01, 0x36 and 0x6c;
* the structure of F (byte rotation and four S-boxes);
* the ten-clock latency.

The encryptor reproduces the published example block. The decryptor
reproduces both blocks of its published simulation, including the RC sequence
36 → 00 and the round keys it steps through.

Choices made here:

* **Hold after done.** The original registers have no enable, so they would
  keep cycling after `done`. Here they stop at `done`, so the result stays
  valid until the next load.
* **Decryptor internals.** The original gives no block diagram for the
  decryptor. Its structure was reconstructed from the names and values of its
  internal signals: AddRoundKey → (InvMixColumns unless first round) →
  InvShiftRows → InvSubBytes, with the key schedule running backwards. The
  backward step rule for RC (0x1b → 0x80, otherwise shift right) is this
  design's own.
* **Load and reset.** `rst` is a synchronous, active-low load. The polarity
  follows the original decryptor's simulation, where `rst` = 0 coincides with
  the new ciphertext being selected. The encryptor uses the same polarity,
  which is assumed. That the load is synchronous is also assumed.
* **Port names.** The decryptor's ports take their names from the original's
  simulation (`ciphertext`, `dec_key`, `plaintext`, `rst`, `done`). A
  schematic of the same design names them `cipher_text`, `cipher_key`,
  `plain_text`, `start` and `ready`.
* **Where RC enters F.** RC is XORed into byte 0 of F's output, as AES
  defines. The original's F diagram does not show where RC enters.
* **Computed S-boxes**, as described under the module map.
* **Not built.** The fully pipelined variant (ten round stages, ten 128-bit
  registers) is only discussed in the original, as the alternative to this
  design, so it is not built here. Also not reproduced: FPGA-specific results
  (slice counts, timing).

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

The expected values come from `tb/aes_ref_pkg.sv`, a behavioural AES written
separately from the RTL:

* the S-box comes from a brute-force inverse search and a bit-by-bit affine map;
* the key schedule is expanded in full;
* the state is handled as a byte array.

The testbenches check these things:

* **Leaf blocks.** All 256 S-box inputs. Random states against the
  reference. The FIPS-197 Appendix A/B intermediate values for SubBytes,
  ShiftRows, MixColumns, F and round key 10.
* **Controllers.** The exact RC sequences, the final-round and first-round
  flags, `done` at exactly ten clocks, the hold after `done`, and a reload in
  mid-run.
* **`aes_enc`.** The example block above, FIPS-197 Appendix B and C.1, and 40
  random blocks. Each block is checked for latency, for every sub-key along
  the way, and for the hold.
* **`aes_dec`.** FIPS-197 Appendix B, the all-zero key and block, the
  example block, and 40 random blocks. Each block is checked for the RC
  sequence, every round key, latency and the hold.
* **`aes_top`** (full size, default configuration). A 40-block round trip,
  with both cores running at once: the decryptor decrypts the encryptor's
  previous output, using the round-10 key left in the encryptor. The test
  counts how often each mechanism happens, and fails if any of them never
  does:
  * the final round without MixColumns;
  * the first round without InvMixColumns;
  * a result held while the core is idle;
  * a load in the middle of a run;
  * both cores busy on the same clock.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other testbench name. Every testbench finishes
in well under a second.

The controllers carry assertions:

* a load sets RC to its start value;
* `done` stays low for the ten clocks after a load and is high after the tenth;
* `done` stays high until the next load.

Run with `--assert` to enable them.
