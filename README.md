# SEED block cipher with composite-field S-boxes

SEED is the Korean 128-bit block cipher (TTAS KO-12.0004): a 16-round Feistel
network with a 128-bit key. Almost all of its nonlinear cost is in two 8x8
S-boxes:

    S1(x) = A1 · x^247 ⊕ 169        S2(x) = A2 · x^251 ⊕ 56

Both are over GF(2^8) modulo p(x) = x^8 + x^6 + x^5 + x + 1, and A1 and A2 are
8x8 bit matrices. Usually these are 256-entry tables or logic flattened by
synthesis. This design rewrites each S-box as a field inversion plus linear
maps, and does the inversion in a tower field built from 2-bit pieces. On a
smart card that roughly halves the S-box area. The whole cipher runs on a
single shared G-function (the 32-bit layer that holds four S-boxes), so one
block takes 113 clock cycles.

## The S-box trick

Every nonzero x in GF(2^8) satisfies x^255 = 1, so x^-1 = x^254. It follows that
x^247 = (x^-1)^8 and x^251 = (x^-1)^4. Each S-box is therefore:

1. an inversion,
2. then two or three squarings,
3. then an affine matrix and a constant.

Squaring in a binary field is linear over GF(2). So after the inversion,
everything is one 8x8 bit matrix followed by an XOR constant.

Inversion is cheap in a tower field, so the inversion happens there:

| level | field | defining polynomial | element |
|---|---|---|---|
| 1 | GF(2^2) | w^2 + w + 1 | 2 bits, `{b1,b0}` = b1·w + b0 |
| 2 | GF((2^2)^2) | z^2 + z + Φ, Φ = {10} | 4 bits, `{hi,lo}` of level 1 |
| 3 | GF(((2^2)^2)^2) | y^2 + y + λ, λ = {1100} | 8 bits, `{hi,lo}` of level 2 |

One S-box is three combinational stages:

    x ──► DELTA ──► tower-field inverse ──► merged matrix M_s ⊕ c_s ──► S_s(x)
         (seed_iso_map)   (gf256_inv)          (seed_out_map)

- **DELTA** is an 8x8 bit matrix that maps GF(2^8) (polynomial basis of p) onto
  the tower field. It is a field isomorphism: multiplying before or after the
  map gives the same result.
- **Tower-field inverse.** An element is {h, l}. The inverter computes:
  - the norm d = λ·h² ⊕ (h ⊕ l)·l,
  - then x^-1 = {h·d^-1, (h ⊕ l)·d^-1}.
  
  That needs three GF((2^2)^2) multipliers and one GF((2^2)^2) inverter.
  Squaring and multiplying by λ are fixed XOR networks:
  - h² = {h3, h3⊕h2, h2⊕h1, h3⊕h1⊕h0}
  - λ·a = {s0, s1⊕s0, a3, a2}, where s = a[3:2] ⊕ a[1:0]
- **GF((2^2)^2) multiplier** (`gf16_mul`), in Karatsuba form:
  - hi = (ah⊕al)(bh⊕bl) ⊕ al·bl
  - lo = Φ·(ah·bh) ⊕ al·bl
  
  It uses three GF(2^2) multipliers. Multiplying by Φ swaps and XORs two bits:
  Φ·{x1,x0} = {x1⊕x0, x1}.
- **GF(2^2) multiplier** (`gf4_mul`) is four ANDs and XORs:
  - y1 = a1b1 ⊕ a1b0 ⊕ a0b1
  - y0 = a1b1 ⊕ a0b0
- **GF((2^2)^2) inverter** (`gf16_inv`) is a 16-entry table. Each entry
  satisfies x·y = 1, and 0 maps to 0.
- **Merged output matrix.** M_s = A_s · Q^k · DELTA^-1:
  - Q is squaring modulo p(x).
  - k = 3 for S1 and 2 for S2.
  - The constants are c1 = 169 and c2 = 56.

  `seed_pkg::out_matrix` builds M_s at elaboration time from DELTA, A_s and p(x):
  - It finds DELTA^-1 by searching DELTA's image.
  - It squares in GF(2^8).

  The columns it produces, for tower-field input bits 0..7:
  - S1: `2C BF A7 89 32 71 66 BA`
  - S2: `D0 0F 52 0B 1F 77 D8 84`

  The hardware is an XOR tree plus the constant.

### Bit order of the matrices

A1 and A2 are written the usual way:
- the top row gives the most significant output bit;
- the leftmost column multiplies the most significant input bit.

DELTA, as specified, uses the opposite order:
- row 0 gives output bit 0;
- column 0 multiplies input bit 0.

Only these readings work. With them, A1/A2 reproduce the published S-box
tables, and DELTA is a field isomorphism; the testbenches check both
exhaustively. `seed_pkg` keeps each matrix row for row as specified, and uses a
separate apply function for each convention (`mat_msb`, `mat_lsb`). If you
change a matrix, keep its convention.

## The cipher core and its 7-cycle round

`seed_core` has exactly one `seed_g` instance, i.e. four S-boxes. Every G
evaluation in the cipher goes through it: three per round for the round
function F, and two per round for the round keys. Each round takes seven
cycles, selected by `phase_e`:

| phase | G computes | state written at the end of the cycle |
|---|---|---|
| PH_K0  | A + C − KC_i | K0 ← G |
| PH_K1  | B − D + KC_i | K1 ← G |
| PH_MIX | – | T0 ← C⊕K0, T1 ← D⊕K1⊕T0 |
| PH_G1  | T1 | T1 ← G |
| PH_G2  | T0 + T1 | T0 ← G |
| PH_G3  | T1 + T0 | T1 ← G |
| PH_OUT | – | F = {T0+T1, T1}; L ← R, R ← L ⊕ F (round 16: L ← L ⊕ F, no swap); key state rotates |

Notes on the table:
- C and D are the two 32-bit halves of R.
- The additions are modulo 2^32.
- KC_i is 0x9E3779B9 rotated left by i−1.

`seed_f_path` holds T0/T1 and picks the F operand for G. `seed_keysched` holds
the key state and the K0/K1 registers. `seed_core` holds L, R, the phase and
round counters, and the multiplexer in front of G.

One load cycle plus 16 × 7 cycles gives 113 cycles per block. At 15 MHz that is
15e6 × 128 / 113 = 16.99 Mbit/s.

### Key schedule, forward and backward

The key is {A, B, C, D}, with A the most significant word. After an odd round,
A‖B rotates right by 8 bits. After an even round, C‖D rotates left by 8 bits.
Over 16 rounds each 64-bit half rotates by 64 bits, so the final state equals
the key.

Decryption is encryption with the round keys in reverse order. The core
produces them by running the schedule backwards:
- On load it undoes round 16's rotation (C‖D >>> 8).
- After computing the keys of round i, it undoes round i−1's rotation.

No key expansion pass and no round-key storage is needed. The `decrypt` input
selects the direction per block.

## Interface and timing (`seed_core`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid / in_ready | in / out | 1 | request handshake; `in_ready` is high while idle |
| decrypt | in | 1 | 0 = encrypt, 1 = decrypt; sampled with the request |
| key | in | 128 | user key, big-endian (A = key[127:96]) |
| din | in | 128 | input block, L0 = din[127:64], R0 = din[63:0] |
| out_valid | out | 1 | one-cycle pulse: `dout` holds the result |
| dout | out | 128 | result, held until the next request is accepted |

- A request is accepted on a rising edge with `in_valid && in_ready`.
- `out_valid` is high after the 112th following edge.
- `in_ready` rises in the same cycle as `out_valid`, so a waiting request is
  accepted immediately. Back to back, that gives one block every 113 cycles.
- `in_valid` is ignored while busy.
- Assertions check the handshake: no `out_valid` while busy, no acceptance
  while busy, and a legal phase.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

`tb/seed_ref_pkg.sv` is an independent reference. It does not use the tower
field or the merged matrices:
- S-boxes are computed from x^247 / x^251 by repeated multiplication.
- The cipher (G, F, key schedule, 16 rounds) is written as plain functions.

`tb_ref_selftest` checks this reference against the four SEED test vectors of
the standard, encrypting and decrypting.

| testbench | what it checks |
|---|---|
| tb_gf4_mul, tb_gf16_mul | all operand pairs against schoolbook multiplication |
| tb_gf16_inv, tb_gf256_inv | x · inv(x) = 1 for every nonzero x; inv(0) = 0 |
| tb_seed_iso_map | DELTA(a·b) = DELTA(a)·DELTA(b) for all 65,536 pairs, DELTA(1) = 1, one-to-one |
| tb_seed_out_map | both output stages against A·(DELTA^-1 v)^(8 or 4) ⊕ c for all v |
| tb_seed_sbox | S1 and S2 against their defining equations for all 256 inputs, and the first entries of the published tables |
| tb_seed_g | every single-byte input in each lane, plus 3,000 random words |
| tb_seed_keysched | all 16 round keys in encryption and in decryption order, test-vector keys and random keys |
| tb_seed_f_path | 500 random F evaluations over the five F phases |
| tb_seed_core | see below |

`tb_seed_core` runs the full core at its only configuration:
- the four standard test vectors in both directions;
- a six-block back-to-back stream that alternates encryption and decryption;
- 20 random encrypt/decrypt round trips;
- the 112-cycle latency and the 113-cycle block period.

It also counts five events, and each must occur: encryption, decryption, a
back-to-back acceptance, a request held while busy, and an encrypt/decrypt
switch.

To run a testbench with Verilator (from the repository root):

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/seed_pkg.sv tb/seed_ref_pkg.sv tb/tb_seed_core.sv --top-module tb_seed_core
    ./obj_dir/Vtb_seed_core

Replace `tb_seed_core` with any other testbench name. Every run takes seconds.

## What follows the source architecture and what is this design's choice

Taken from the architecture being implemented:
- the S-box equations and the matrices A1, A2 and DELTA;
- the three field polynomials (with Φ = {10} and λ = {1100});
- the structure of the inverter, the GF((2^2)^2) multiplier and the GF(2^2)
  multiplier;
- a table for the GF((2^2)^2) inverse;
- merging DELTA^-1, the squarings and the affine matrix into one matrix;
- the shared G-function;
- 7 cycles per round.

Taken from the SEED standard, because the architecture only names them:
- the G-function's block permutation (masks FC, F3, CF, 3F);
- the whole key schedule, including the KC constants.

This design's own choices:
- The split of the seven cycles shown above. The key schedule shares G, which
  explains the cycle count, but the exact order is not specified.
- The load cycle that makes 113 cycles per block. This fits the reported
  throughput of 16.98 Mbit/s at 15 MHz.
- The valid/ready handshake, the reset style, and running the key schedule
  backwards for decryption.
- The XOR equations for squaring and for multiplying by λ. They were derived
  from the field polynomials rather than copied from a circuit drawing.
- No masking against power analysis. Composite-field S-boxes make masking
  possible, but none is built here.

## What is not reproduced

The reported results are about 8,700 gates for the whole cipher, 1,266 gates
for the S-boxes, and a 32 ns critical path. They come from a 0.18 µm
smart-card cell library, and nothing here reproduces them. Yosys coarse
synthesis of `seed_core` gives a word-level netlist, not a gate count in that
library.

The conventional table-based S-box, which serves only as the comparison point,
is not included.

## Files

| file | role |
|---|---|
| rtl/seed_pkg.sv | types, phase enum, matrices, constants, elaboration-time matrix functions |
| rtl/gf4_mul.sv | GF(2^2) multiplier |
| rtl/gf16_mul.sv | GF((2^2)^2) multiplier |
| rtl/gf16_inv.sv | GF((2^2)^2) inverse table |
| rtl/gf256_inv.sv | tower-field GF(2^8) inverter |
| rtl/seed_iso_map.sv | DELTA |
| rtl/seed_out_map.sv | merged inverse isomorphism, squaring and affine stage (SEL = 1 or 2) |
| rtl/seed_sbox.sv | S1 or S2 (SEL = 1 or 2) |
| rtl/seed_g.sv | G-function: four S-boxes and the block permutation |
| rtl/seed_keysched.sv | on-the-fly key schedule, forward and backward |
| rtl/seed_f_path.sv | round-function datapath for the shared-G schedule |
| rtl/seed_core.sv | top: Feistel registers, controller, shared G |
| tb/seed_ref_pkg.sv | reference model |
| tb/tb_*.sv | testbenches |
