# Dual-key AES-128 with key-based S-bytes

This is synthesizable SystemVerilog for a variant of AES-128 with two keys:

- The **user key** drives the standard AES-128 key schedule and the AddRoundKey steps.
- The **system key** is built on chip from an 8-bit seed. It keys the SubBytes step, so each key gives a different substitution.

The idea comes from a published FPGA design. It replaces the fixed AES S-box with S-bytes computed from the system key. Two things make the cipher harder to attack this way: the S-box is no longer a public constant, and recovering both keys is harder than recovering one.

The top level handles 512-bit blocks. It has a 512-bit encryptor and a 512-bit decryptor. Each one is four 128-bit cores running in lock step.

## How a block is enciphered

The cipher is AES-128 except for the key-dependent S-byte:

```
SK(1) = system key                   RK(0) = user key
SK(r) = SK(r-1) ^ RK(r),  r = 2..10  RK(r) = AES-128 key expansion of RK(r-1)

state = plaintext ^ RK(0)
for r = 1..10:
    state = SubBytes_SK(r)(state)     # key-based S-bytes
    state = ShiftRows(state)
    if r < 10: state = MixColumns(state)
    state = state ^ RK(r)
ciphertext = state
```

Decryption runs the same steps in reverse. Round r is AddRoundKey(RK(r)), then InvMixColumns (except in round 10), then InvShiftRows, then InvSubBytes with SK(r). A final AddRoundKey with RK(0) ends the block.

The user-key schedule always uses the ordinary, fixed AES S-box (`aes_sbox_lut`). This keeps the schedule independent of the system key. Only SubBytes in the data path uses the keyed S-bytes.

### The system key (`system_key_gen`)

The system key is formed from the seed in three steps:

1. `offset = seed[7:4] ^ seed[3:0]`.
2. `offset` selects one of 16 stored 120-bit keys.
3. The seed is appended as the low byte, giving `system_key = {stored_key[offset], seed}`.

The published description does not list the 16 stored keys. This design computes them with a fixed formula: byte `b` (0 = most significant) of key `j` is the standard AES S-box value of `15*j + b`. Any other constants can be substituted in `build_key_table()`.

### The key-based S-byte (`keyed_sbox`)

The S-byte is computed, not read from a table:

```
S_k(x)    = L(x^-1) ^ k
S_k^-1(y) = (L^-1(y ^ k))^-1
```

- `x^-1` is the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1. It is computed as `x^254`, and 0 maps to 0.
- `L` is the linear part of the AES affine transform: `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4)`.
- `L^-1` is its inverse: `rotl(b,1) ^ rotl(b,3) ^ rotl(b,6)`.

So the key byte replaces the affine constant 0x63, and `k = 8'h63` gives exactly the AES S-box.

In `aes_sub_bytes`, state byte `i` is keyed by byte `i` of the current round's system key. Each round therefore uses 16 different S-boxes.

How the key enters the S-byte is this design's own choice; the published description does not give it. It is also cryptographically modest: `S_k(x) = S(x) ^ 0x63 ^ k`, so the keyed S-byte adds a key-dependent XOR after a fixed S-box. If you want a stronger key-dependent S-box, replace `keyed_sub` and `keyed_inv_sub` in `aes_pkg.sv`. Every other block is independent of that choice.

## Timing

Both cores apply **one transformation per clock**. The state register takes SubBytes, ShiftRows, MixColumns or AddRoundKey in turn, under a small phase FSM.

- **Encryption takes 40 clocks:** 1 for the initial AddRoundKey, 9 rounds × 4, and 3 for the last round. This matches the published latency of 40 cycles. Round keys are computed on the fly: one `aes_key_step` per round, in the cycle of that round's AddRoundKey. No key schedule is stored.
- **Decryption takes 50 clocks.** It needs RK(10) and SK(10) first. So it spends 10 clocks expanding the user key into an 11 × 128-bit round-key register file, running the system key forward to SK(10) at the same time. Then come the 40 clocks of inverse rounds. The system key is stepped back as `SK(r-1) = SK(r) ^ RK(r)`. The published design states only a 40-cycle latency; the extra 10 clocks are this design's choice.

The handshake is the same for both cores and both sides of the top:

- `start` is sampled on a rising edge while the core is idle. Data, user key and seed (or system key) are captured on that edge, and they need not be held afterwards.
- `busy` is high while a block is in flight. A `start` while busy is ignored.
- `done` rises after clock 40 (encryption) or clock 50 (decryption), counting the start edge as clock 1. It stays high, with the output held, until the next `start`.
- `rst_n` is an active-low synchronous reset.

Assertions in the cores check that `done` and `busy` are never both high and that the round counter stays in range. An assertion in the top checks that the four lanes of a direction finish together.

## The 512-bit top (`dual_key_aes_top`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock, synchronous active-low reset |
| `enc_start`, `enc_datain`, `enc_key`, `enc_seed` | 1, 512, 512, 8 | start, plaintext, user key, seed |
| `enc_dataout`, `enc_busy`, `enc_done` | 512, 1, 1 | ciphertext, busy, result valid |
| `dec_start`, `dec_datain`, `dec_key`, `dec_seed` | 1, 512, 512, 8 | start, ciphertext, user key, seed |
| `dec_dataout`, `dec_busy`, `dec_done` | 512, 1, 1 | plaintext, busy, result valid |

Lane `i` takes bits `[128*i+127 : 128*i]` of the data and of the key, so each lane has its own 128-bit user key. Each direction has one seed and one `system_key_gen`, and all four lanes of that direction share the resulting system key. Encryption and decryption are independent and can run at the same time.

Parameters:

- `LANES` (default 4) sets the width to 128 × `LANES` bits.
- `KEYED_SBOX` (default 1). Set to 0, every S-byte uses the constant 0x63 and the design becomes plain AES-128. It exists to check the data path against AES reference vectors. With `KEYED_SBOX = 0` the top reproduces the published 512-bit example exactly. The data is 512'd1214345833 and the key is 512'hff, which gives the ciphertext `66e94bd4…2b2e` three times followed by `0525651e1a3457d41dd82c692b1416ba`. Those published values are standard AES-128 results.

## Module hierarchy

```
dual_key_aes_top
├── system_key_gen ×2           seed -> 128-bit system key
├── dual_key_aes_enc ×LANES      40-clock encryptor
│   ├── aes_sub_bytes (16 × keyed_sbox)
│   ├── aes_shift_rows, aes_mix_columns, aes_add_round_key ×2
│   └── aes_key_step (4 × aes_sbox_lut)
└── dual_key_aes_dec ×LANES      50-clock decryptor (inverse versions, same key step)
aes_pkg                          types, GF(2^8) arithmetic, S-byte and MixColumns functions
```

`aes_sub_bytes`, `aes_shift_rows` and `aes_mix_columns` each take an `INVERSE` parameter. The data layout follows FIPS-197: byte 0 of a block, which is row 0 and column 0 of the state, is bits [127:120], and byte `i` sits in row `i%4`, column `i/4`.

Synthesis sizes are dominated by the 16 computed S-bytes per core and the four key-schedule S-box tables per core. Each core holds 128 state bits plus round-key and system-key registers. The decryptor also holds its 11-entry round-key file.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values come from two independent sources:

- **Known answers.** These are FIPS-197 vectors (Appendix A.1 key expansion, Appendix B round 1, Appendix C.1), the published 512-bit example, and dual-key vectors computed with a separate software model.
- **A reference model.** `tb_aes_ref_pkg` is a behavioural model written differently from the RTL. It uses a bitwise affine formula, finds field inverses and inverse S-bytes by search, and keeps the state as a 4×4 array.

The testbenches:

- `tb_dual_key_aes_top` runs the whole design:
  - the published example on a `KEYED_SBOX = 0` top, in both directions;
  - a dual-key 512-bit vector with encryption and decryption running at the same time;
  - random blocks whose seeds select all 16 stored keys, each round-tripped through the decryptor;
  - restarts while busy.

  It checks the 40- and 50-clock latencies every time and counts each mechanism.
- `tb_dual_key_aes_top_full` runs one complete encrypt/decrypt of 512 bits on the top at its default parameters.
- The core testbenches check latencies, the held `done`, ignored restarts, and random blocks against the model.

To simulate one testbench with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_dual_key_aes_top.sv \
    --top-module tb_dual_key_aes_top -Mdir obj_top
./obj_top/Vtb_dual_key_aes_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if a block hangs.

## Departures from the published design, and open points

- **Not specified in the publication, chosen here:**
  - the S-byte formula and which key byte keys which state byte;
  - the 16 stored 120-bit keys;
  - which end of the system key holds the seed (the low byte here);
  - how the system key chains from round to round (read as SK(r) = SK(r-1) ^ RK(r), with round 1 using the system key unchanged);
  - the start/done handshake and the reset.
- **Decryption takes 50 clocks, not 40**, because of its up-front key expansion.
- **The published results are plain AES-128.** The published simulation and board results are exactly plain AES-128 values. They can only be reproduced with `KEYED_SBOX = 0`. With the default key-based S-bytes, the ciphertext for the same inputs is different.
- **No board-level I/O.** The board-level demonstration showed the low output bits on LEDs. It is not part of this RTL; the top exposes the full 512-bit outputs.
- **No timing or area claims.** The published resource figures and the 1 GHz simulation clock are not reproduced or claimed here.
