# Iterative AES-256 encryption and decryption engines

This is a compact AES-256 unit: a 128-bit block cipher with a 256-bit key
and 14 rounds. Instead of unrolling the 14 rounds into a long pipeline, each
engine has one round datapath and runs the block through it again and again.
That costs cycles, but the hardware is one round plus a little control. There are two
engines, one for encryption and one for decryption. They sit side by side in
`aes256_top` and have separate ports.

| engine        | cycles per block | round keys                                          |
|---------------|------------------|-----------------------------------------------------|
| `aes_encrypt` | 28               | computed alongside the rounds, one per round        |
| `aes_decrypt` | 41               | computed first into a key reversal stack, then used last-first |

The architecture follows a published FPGA design of AES-256: one iterative
round, S-boxes as lookup tables, a key reversal buffer for decryption, and
latencies of 28 and 41 cycles. That source gives the cycle counts but not how
the cycles are spent. The two-phase round and the 13-cycle key phase
described below are this implementation's way of meeting those counts.

## Data layout

All blocks are plain vectors. A 128-bit block is written the way AES test
vectors are printed: the first byte is bits `[127:120]`. Byte *i* of the
block is row `i % 4`, column `i / 4` of the 4x4 AES state, so each 32-bit
slice is one column. The 256-bit key is eight 32-bit words, with word 0 at
`key[255:224]`. With this layout the standard test vectors work as they are
printed:

```
key        000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f
plaintext  00112233445566778899aabbccddeeff  ->  8ea2b7ca516745bfeafc49904b496089
plaintext  5468617473206d79204b756e67204675  ->  12605d896ed10cafc9eafcab8911beb9   ("Thats my Kung Fu")
```

## Encryption engine (`aes_encrypt`)

On the clock edge that samples `start`, the engine XORs the plaintext with
round key 0 (the upper half of the key) and loads the result into the state
register. This is the pre-round AddRoundKey. Each of the 14 rounds then
takes two cycles:

| phase | state register gets                              |
|-------|--------------------------------------------------|
| A     | `ShiftRows(SubBytes(state))`                     |
| B     | `MixColumns(state) ^ rk[r]` for rounds 1..13, `state ^ rk[14]` in round 14 |

The key schedule advances once at the end of every phase B. Round key *r* is
therefore ready exactly when round *r* needs it, and nothing is stored.

After 14 x 2 = 28 edges, `ciphertext` holds the result and `done` pulses
high for one cycle. An assertion checks that the key schedule step is always
one behind the round number.

## Decryption engine (`aes_decrypt`) and the key reversal buffer

This is the least obvious part of the design. The inverse cipher needs the
round keys in reverse order: round key 14 first and round key 0 last. The key
schedule, however, can only run forward. The decryption engine deals with
this in two parts.

**Key part, 13 cycles.** On the start edge, the engine loads the key
schedule, samples the ciphertext into the state register, and pushes round
key 0 (taken straight from the key input) onto the key reversal buffer. The
buffer is a 14-entry last-in first-out stack. On each of the next 13 cycles
the schedule advances by one round key:

| edge | pushed onto the stack | key schedule window afterwards |
|------|-----------------------|--------------------------------|
| 0 (start) | rk0              | rk0, rk1                       |
| 1    | rk1                   | rk1, rk2                       |
| ...  | ...                   | ...                            |
| 13   | rk13                  | rk13, rk14                     |

Round key 14 is never stored. On edge 13 the schedule's look-ahead output
(`rk_next`) already shows rk14, and the engine XORs it into the state
directly as the initial AddRoundKey. The stack then holds rk0..rk13, with
rk13 on top.

**Round part, 28 cycles.** One inverse round is reused 14 times, with two
cycles per round:

| phase | state register gets                                   |
|-------|-------------------------------------------------------|
| A     | `InvSubBytes(InvShiftRows(state))`                    |
| B     | `InvMixColumns(state ^ top)` for rounds 1..13, `state ^ top` in round 14 |

Every phase B pops the stack, so the rounds see rk13, rk12, ..., rk0. The
stack is empty when `done` pulses, so the next decryption can start on the
following cycle. Round keys are used as the schedule produces them:
AddRoundKey comes before InvMixColumns, as in the straightforward inverse
cipher. This is not the "equivalent inverse cipher", which would need keys
passed through InvMixColumns.

The total is 13 + 28 = 41 cycles. Assertions check two things: the stack
holds `15 - round` keys at the start of every round, and it is empty at
`done`.

## Key schedule (`aes_key_expansion`, `aes_g_function`)

The 60 words w0..w59 make up 15 round keys of four words each. Round keys 0
and 1 are the key itself. The module keeps a sliding window of the last
eight words. Each advance computes four new words:

```
n0 = w[0] ^ T     n1 = w[1] ^ n0     n2 = w[2] ^ n1     n3 = w[3] ^ n2
T  = g(w[7])       on even steps: rotate left one byte, S-box each byte, XOR Rcon into byte 0
T  = SubWord(w[7]) on odd steps:  S-box each byte only
```

Both cases run through one `aes_g_function`, selected by its `use_rot`
input, so the schedule needs four S-boxes. The odd-step SubWord is specific
to 256-bit keys. The round constant for step *s* is `01 << (s/2)`, giving
01, 02, 04, ..., 40. Outputs:

- `rk_cur` is the newest round key in the window.
- `rk_next` is the key the next advance will produce. It is combinational.
- Advances past round key 14 are ignored, and an assertion flags them.

## Round datapaths and transformations

`aes_round` and `aes_inv_round` hold one round of each direction. Each
offers both of its stage results at once: stage A and stage B. A `last`
input drops (Inv)MixColumns for the final round. The engines register
whichever stage their current phase needs. In the decryption engine, a
separate `aes_add_round_key` instance does the initial AddRoundKey.

Each AES transformation is a small combinational module:

- `aes_sub_bytes` and `aes_inv_sub_bytes`: 16 parallel copies of `aes_sbox` or `aes_inv_sbox`.
- `aes_shift_rows` and `aes_inv_shift_rows`: wiring only. Row *r* rotates by *r* bytes.
- `aes_mix_columns`: the matrix `[02 03 01 01]`, built from `xtime`.
- `aes_inv_mix_columns`: the matrix `[0e 0b 0d 09]`, built from `aes_pkg::gmul`.
- `aes_add_round_key`: a 128-bit XOR.

`aes_sbox` and `aes_inv_sbox` are constant 256-entry ROMs holding the
standard AES tables. FPGA tools map them to LUTs, which matches the source
design. An ASIC flow would give random logic.

## Interface and handshake

Both engines use the same handshake:

- `start` is sampled on the rising edge while the engine is idle. A pulse while `busy` is high is ignored.
- `key` and the input block are sampled on the start edge only. Neither engine reads them again during the operation.
- `busy` rises on the start edge and falls on the edge that raises `done`.
- `done` is a one-cycle pulse. The result stays on the output until the next start.
- A new `start` may be given in the cycle `done` is high.
- `rst_n` is an active-low asynchronous reset for all control and state flops. The key stack's storage array is not reset, because an entry is never read before it has been written.

`aes256_top` brings out both engines' ports with `enc_` and `dec_`
prefixes. Neither engine has parameters that should be changed. `NR` exists
to name the round count, but the key schedule is written for eight-word keys.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come
from `tb/aes_ref_pkg.sv`, a behavioural AES-256 model written independently
of the RTL:

- it computes the S-box from the GF(2^8) inverse and the affine map, not from a table;
- it multiplies in GF(2^8) with a shift-and-add loop;
- it runs the key schedule as the textbook word recurrence.

The model itself is checked against the published vectors above.

- `tb_aes_encrypt` and `tb_aes_decrypt` check the known answers, 30 random
  key/block pairs, the exact latency (28 and 41 cycles), the one-cycle
  `done` pulse, a start ignored while busy, and a reset in the middle of an
  operation.
- `tb_aes256_top` runs both engines at their default sizes at the same time,
  40 operations each. Half of the decryptions take the encryption engine's
  own ciphertexts and must return the original plaintext. The testbench
  counts how often each mechanism occurs: engines overlapping, last round
  without (Inv)MixColumns, key stack full and drained, rk14 used straight
  from the schedule, ignored starts, back-to-back starts. A mechanism that
  never occurs counts as a failure.

To run one testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes256_top.sv --top-module tb_aes256_top
./obj_dir/Vtb_aes256_top
```

Any other testbench builds the same way with its own name as the top
module. Verilator finds the other modules through `-Irtl` / `-Itb`. Each
testbench finishes in well under a second.

## How this relates to the source design, and what to trust

These parts follow the source description:

- the iterative round structure and the round order for both directions;
- the S-box and inverse S-box contents;
- the ShiftRows offsets;
- the g function (rotate, substitute, Rcon);
- the key reversal buffer feeding keys to the inverse rounds in reverse order;
- the 28-cycle and 41-cycle latencies.

These are this implementation's own choices, where the source is silent:

- the two phases per round and the 13-cycle key phase, chosen so that the cycle counts come out as published;
- the buffer built as a stack of 14 entries, with round key 14 used as it is produced;
- the start/busy/done handshake and the reset;
- the MixColumns matrices and the 256-bit extra SubWord step, taken from the AES standard because the source does not print them. Without them the published test vectors do not come out.

Known departures:

- The source's FPGA utilization report for encryption (512 I/Os, no
  flip-flops used) suggests a fully combinational build. Its text and
  latency tables describe a clocked iterative one. This design follows the
  iterative description, so its area and I/O numbers are not comparable with
  that report.
- The source also reports results for 128-bit and 192-bit keys for
  comparison. These engines support 256-bit keys only.
- The source's throughput figures cannot be checked at RTL level. They
  depend on the FPGA clock, and they are not consistent with its own latency
  and time columns. At 28 cycles per block, this engine gives 128/28 bits
  per cycle, which is 4.57 Gbit/s per GHz of clock.
- The decryption engine handles one block per 41 cycles, including the key
  phase, even when the key does not change. Keeping the stack across
  operations would bring this to 28 cycles per block. That is not done
  here.
