# Iterative AES-128 encryptor/decryptor

This core encrypts and decrypts 128-bit blocks with a 128-bit key, using the
Advanced Encryption Standard (Rijndael with 10 rounds). It is built for low
complexity. There is one 128-bit state register, and the state passes through
one full round of logic on every clock: an *iterative looping* architecture.
SubBytes uses 256-entry lookup tables, not GF(2^8) inversion logic, so a
whole round (substitution, row shift, column mix and key addition) fits in one
clock cycle. The eleven round keys are expanded once per key and kept in a
small register file. Decryption can then read them in reverse order at no
extra cost.

In both directions a block takes 10 clock cycles from the start edge to
`done`. A new block can start in the cycle `done` is high, so the core
processes one block every 11 cycles. At clock frequency f, throughput is
128·f/11 bit/s. For example, at 100 MHz that is about 1.16 Gbit/s.

## Datapath

```
            key_in ──► aes_key_expansion ──► round-key store [0..10] ──┐ round_key
                          (4 S-box tables)         ▲ rk_idx              │
                                                   │                     ▼
 data_in ──► AddRoundKey (initial) ──┐        aes_ctrl          ┌── aes_enc_round ◄──┐
                                     ▼        (FSM, round      │   SubBytes          │
                              ┌─► state_q ────counter)─────────┤   ShiftRows         │
                              │   (128 b)                      │   MixColumns*       │
                              │      │                         │   AddRoundKey       │
                              │      ▼ data_out                └── aes_dec_round ◄───┤
                              │                                    InvShiftRows      │
                              └──────── mode mux ◄──────────────   InvSubBytes       │
                                                                   AddRoundKey       │
                                                                   InvMixColumns*  ◄─┘
                                      * bypassed when last_round = 1
```

- **`aes_enc_round`** is one encryption round in combinational logic, in the
  order SubBytes, ShiftRows, MixColumns, AddRoundKey. In the last round,
  `last_round = 1` routes around MixColumns.
- **`aes_dec_round`** is one round of the straightforward inverse cipher, in
  the order InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns. In the last
  round InvMixColumns is bypassed. This is not the "equivalent inverse cipher"
  of the standard. The round keys are used unchanged, in reverse order, so no
  extra InvMixColumns has to be applied to the keys.
- Both round units read the same `state_q` and the same `round_key`. The mode
  latched at start selects which result is written back. Encryption and
  decryption each have their own 16 S-box tables, so there are 36 tables in
  all, counting the key schedule's 4.

## Round sequencing

`aes_ctrl` is a two-state FSM (idle, run) with a 4-bit round counter. For an
encryption started at edge E0:

| edge | `state_q` becomes                         | round key read |
|------|-------------------------------------------|----------------|
| E0   | `data_in ^ RK[0]` (the extra AddRoundKey) | RK[0]          |
| E1…E9 | full round r = 1…9                        | RK[r]          |
| E10  | last round, no MixColumns; `done` = 1     | RK[10]         |

Decryption follows the same timeline. It loads `data_in ^ RK[10]` and reads
RK[10 − r] in round r. The mode (`decrypt`) is sampled with `start` and held
for the whole block, so `decrypt` can change freely while `busy` is high.

## Key expansion and the round-key store

`aes_key_expansion` runs the AES-128 key schedule, producing one round key per
clock. For each new key it computes

```
t   = SubWord(RotWord(w3)) ^ {Rcon, 24'h0}
w0' = w0 ^ t;  w1' = w1 ^ w0';  w2' = w2 ^ w1';  w3' = w3 ^ w2'
```

Rcon starts at 01 and is multiplied by {02} in GF(2^8) after each round key.
Here `w0` is key bits [127:96]. `key_start` writes the cipher key as RK[0].
The next 10 clocks write RK[1]…RK[10], with `key_busy` high. `key_ready` rises
10 cycles after the `key_start` edge.

The store is 11 × 128 bits, read combinationally by index. The top level
ignores `key_start` while a block is running, so the keys cannot change under
a block. It also ignores `start` while keys are expanding. A new key can be
loaded between blocks. The cost is 10 cycles per key change.

## S-box tables

`aes_sbox` and `aes_inv_sbox` are 256 × 8 constant tables indexed by the input
byte. Their contents are computed during elaboration by functions in
`aes_pkg`:
- `S(x) = A(x^254) ^ 63`, where x^254 is the multiplicative inverse modulo
  x^8+x^4+x^3+x+1, with 0 mapped to 0.
- A is the affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4)`.
- The inverse table is the inverse permutation of S.

No table file is needed. Synthesis sees a ROM (yosys reports memory cells)
that an FPGA tool can map to LUTs or block RAM.

## MixColumns arithmetic

Each column (a0…a3, row 0 first) is multiplied modulo x^4 + 1 as follows:
- MixColumns uses c(x) = {03}x³ + {01}x² + {01}x + {02}, giving
  `b_r = 2·a_r ^ 3·a_(r+1) ^ a_(r+2) ^ a_(r+3)`.
- InvMixColumns uses d(x) = {0B}x³ + {0D}x² + {09}x + {0E}, giving
  `b_r = 14·a_r ^ 11·a_(r+1) ^ 13·a_(r+2) ^ 9·a_(r+3)`.

Both are built only from `xtime` (multiply by {02}) and XOR. For example,
9a = 8a ^ a and 14a = 8a ^ 4a ^ 2a.

## State layout

All 128-bit buses use the byte order of the AES standard:
- Byte 0 is bits [127:120].
- Byte i is at row i % 4, column i / 4.

So the standard's test vectors can be written directly as 32-digit hex
literals. For example, key `2b7e1516…09cf4f3c` with plaintext
`3243f6a8…e0370734` encrypts to `3925841d02dc09fbdc118597196a0b32`.

## Interface (`aes_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | asynchronous reset, active low |
| `key_start` | in  | 1     | load `key_in` and expand it (ignored while `busy`) |
| `key_in`    | in  | 128   | cipher key |
| `key_ready` | out | 1     | round keys valid |
| `start`     | in  | 1     | start a block; accepted when idle, `key_ready` = 1 and `key_start` = 0 |
| `decrypt`   | in  | 1     | 0 = encrypt, 1 = decrypt; sampled with `start` |
| `data_in`   | in  | 128   | plaintext or ciphertext, sampled with `start` |
| `data_out`  | out | 128   | result; valid from `done` until the next accepted `start` |
| `done`      | out | 1     | one-cycle strobe, 10 cycles after the start edge |
| `busy`      | out | 1     | high during the 10 round cycles |

The single parameter `NR_P` (default 10) is the round count of AES-128. The
counters allow up to 15, but any value other than 10 gives a cipher that is
not AES. Only the 128-bit key length is implemented. AES-192 and AES-256 need
a different key schedule and 13 or 15 round keys.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | round count, types, GF(2^8) helpers, S-box table generators |
| `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv` | 256-entry lookup tables |
| `rtl/aes_sub_bytes.sv`, `rtl/aes_inv_sub_bytes.sv` | 16 tables across the state |
| `rtl/aes_shift_rows.sv`, `rtl/aes_inv_shift_rows.sv` | byte rotation of rows 1–3 |
| `rtl/aes_mix_columns.sv`, `rtl/aes_inv_mix_columns.sv` | column mixing |
| `rtl/aes_add_round_key.sv` | XOR with the round key |
| `rtl/aes_enc_round.sv`, `rtl/aes_dec_round.sv` | one round each direction |
| `rtl/aes_key_expansion.sv` | key schedule and 11-entry key store |
| `rtl/aes_ctrl.sv` | round FSM, key index, busy/done |
| `rtl/aes_top.sv` | the core |
| `tb/aes_ref_pkg.sv` | independent software AES model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each module has a self-checking testbench. Each one ends by printing
`TB_RESULT checks=N failures=M`. The expected values come from two sources:
- the worked example and test vectors of the AES standard;
- `aes_ref_pkg`, a separate behavioural model. It stores the state as a 4×4
  byte matrix, multiplies bit by bit, finds inverses by search, and writes
  the key schedule word by word. It shares no code with the RTL.

What the testbenches cover:
- The table testbenches check all 256 entries.
- The transformation and round testbenches check 400 to 500 random states
  each.
- `tb_aes_key_expansion` checks all 11 keys for several keys. It also checks
  the key_ready timing and a restart in the middle of an expansion.
- `tb_aes_ctrl` checks the key index, `last_round` and `done` on every cycle
  of a block in both modes.
- `tb_aes_top` runs the full core at its default parameters. It runs the
  standard's example vectors and about 50 random blocks under 8 keys, and it
  checks the 10-cycle latency and back-to-back operation. It counts the
  following, and any of them that never happens counts as a failure:
  - key loads, encryptions and decryptions;
  - mode switches and back-to-back starts;
  - a start ignored during key expansion;
  - start and key_start ignored while busy.

Run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Each testbench runs in well under a second once built.

`aes_ctrl` and `aes_top` contain concurrent assertions:
- `done` only follows a last round;
- the round counter stays in range;
- the key store is never expanding while a block runs.

## Design choices not fixed by the algorithm

These points are choices of this implementation. Change them to suit a
system:
- **Handshake.** The handshake is start/done/busy plus key_start/key_ready,
  with a latency of 10 cycles. `data_out` is the state register itself, so it
  changes as soon as the next block starts. Add an output register if the
  result must be held longer.
- **Key handling.** All round keys are precomputed and stored (1408 flip-flops
  of key store). The alternative is to compute keys on the fly during
  encryption. That saves the store, but decryption would then first have to
  run the schedule forward or keep only the last key.
- **Separate round logic.** Encryption and decryption each have their own
  round logic. This gives the same latency in both directions at the cost of
  twice the S-box tables. A smaller variant could share the tables between
  directions.
- **Reset.** Reset is asynchronous and active low. The key store and the
  S-box ROMs have no reset.
