# AES-128 at one block per clock with table-free S-boxes

This is an AES-128 encryption engine for counter (CTR) mode. It accepts a new
128-bit block on every clock cycle and never stalls. All ten rounds are unrolled
into one pipeline. Each round can be cut into up to nine register stages. The
S-boxes use no lookup table and no block RAM: each one computes the inverse in
GF(2^8) as a tree of XOR and AND gates over smaller fields. With no memory
read in the round path, the critical path is set by logic depth alone, so
pipeline registers can be placed wherever they even out the stages.

The same engine also runs electronic codebook (ECB) encryption, selected per
block. ECB is useful for measuring the cipher on its own, and for known-answer
tests.

## Block diagram

```
 key ──► key_expansion ──► key memory rk[0..10] ───────────────┐ (all 11 keys read in parallel)
                                                               ▼
 iv ──► counter ─┐                                   ┌──────────────────────────────────┐
                 ├─mode─► [state ^ rk0] ─► round 1 ─► … ─► round 10 (no MixColumns) ─► ks │
 in_data ────────┘   reg                 STAGES regs      STAGES regs                    │
                                                     └──────────────────────────────────┘
 in_data, mode ─► delay line (1+10·STAGES) ──────────────────────────► out = ks ^ (ctr ? msg : 0) ─► reg
```

Each round is `ShiftRows → SubBytes → MixColumns → AddRoundKey`. The
S-box inside SubBytes is

```
S' = MX · inv( X⁻¹ · S ) ⊕ 0x63
```

Here `X⁻¹` changes the byte into the composite-field basis and `inv` is the
GF(2^8) inverse in that basis. `MX` changes back to the standard basis and
applies the AES affine matrix, both in one step.

## The logic-only S-box

### Field tower

GF(2^8) is built as GF((2^4)^2), GF(2^4) as GF((2^2)^2), and GF(2^2) over
GF(2). Every level uses a *normal* basis:

| level   | polynomial          | basis          | bit layout                              |
|---------|---------------------|----------------|-----------------------------------------|
| GF(2^2) | W² + W + 1          | {W², W}        | `{a1,a0}` = a1·W² + a0·W; one is `2'b11` |
| GF(2^4) | Z² + Z + N, N = W²  | {Z⁴, Z}        | `{A,B}` = A·Z⁴ + B·Z (A, B in GF(2^2))   |
| GF(2^8) | Y² + Y + ν, ν = W·Z | {Y¹⁶, Y}       | `{H,L}` = H·Y¹⁶ + L·Y (H, L nibbles)     |

The X⁻¹ and MX matrices used here are fixed; see `aes_pkg.sv`, where row r
produces output bit 7-r. For both of them to give the AES S-box, the constants
must be N = W² and ν = {2'b00, 2'b01}. An exhaustive search over N and ν finds
no other pair. The testbenches check this exhaustively, against plain GF(2^8)
arithmetic.

### Inversion, one level at a time

With a normal basis and trace one, the inverse of `{H,L}` is:

```
d     = ν·(H ⊕ L)²  ⊕  H·L          (GF_SQ_SCL_4 and GF_MUL_4, then XOR)
d⁻¹   = GF_INV_4(d)
{H,L}⁻¹ = { d⁻¹·L , d⁻¹·H }          (two GF_MUL_4, outputs crossed)
```

`gf_inv_4` applies the same formula one level down, with N in place of ν. In
GF(2^2), inversion and squaring are the same operation: a swap of the two
bits. The building blocks are:

* `gf_mul_4`: a Karatsuba multiplier. It uses three GF(2^2) products, and the
  middle one is scaled by N: `{A·C ⊕ e, B·D ⊕ e}` with `e = N·(A⊕B)(C⊕D)`.
* `gf_sq_scl_4`: ν·x² is linear over GF(2), so the block is four XORs:
  `z = {x2^x0, x3^x1, x1^x0, x0}`.
* `gf_inv_4`: computes `d = N·(A⊕B)² ⊕ A·B` in GF(2^2), swaps its bits to
  invert it, and returns `{d⁻¹·B, d⁻¹·A}`.

Zero maps to zero at every level, as the S-box requires.

`sbox.sv` is the combinational S-box; the key schedule uses it.
`sub_bytes.sv` holds sixteen copies of the same arithmetic for the round. It
is split into six segments with an optional register after each. To allow
finer stages, GF_MUL_4 and GF_INV_4 are each cut into two halves:

* the GF(2^2) products, then their recombination;
* the GF(2^2) inverse t of d, then `{t·B, t·A}`.

The halves are functions in `aes_pkg`. The `gf_mul_4` and `gf_inv_4`
modules are built from the same functions.

## Balancing the round pipeline

A round is flattened into nine segments. The gate depth of each is
estimated in two-input gate levels:

| # | segment                                                    | est. levels |
|---|------------------------------------------------------------|-------------|
| 0 | ShiftRows (wiring) + X⁻¹ matrix                            | 3 |
| 1 | H⊕L → GF_SQ_SCL_4; the three GF(2^2) products of H·L        | 5 |
| 2 | recombine H·L, XOR into d, t = (N(dA⊕dB)² ⊕ dA·dB)⁻¹          | 6 |
| 3 | d⁻¹ = {t·dB, t·dA}                                         | 3 |
| 4 | two GF_MUL_4                                               | 6 |
| 5 | MX matrix, ⊕ 0x63                                          | 3 |
| 6 | MixColumns, first half: a_i and 2·(a_i⊕a_{i+1})            | 2 |
| 7 | MixColumns, second half: XOR tree                          | 2 |
| 8 | AddRoundKey                                                | 1 |

Registers do not go after every operation. Instead, `aes_pkg::cut_mask(STAGES)`
tries every placement of `STAGES` registers at segment boundaries, with the
last always closing the round. It keeps the placement whose deepest stage is
shallowest (`STAGES` = 1 to 9):

| STAGES | registers after segments   | stage depths         |
|--------|----------------------------|----------------------|
| 1      | 8                          | 31                   |
| 2      | 2, 8                       | 14, 17               |
| 4      | 1, 2, 4, 8                 | 8, 6, 9, 8           |
| 8      | 0, 1, 2, 3, 4, 5, 6, 8     | 3,5,6,3,6,3,2,3      |

At `STAGES = 8` there are five registers inside SubBytes and one at its end.
There is also one inside MixColumns (`mix_columns` parameter `CUT_MID`) and
one after AddRoundKey.

The default is `STAGES = 8`. At that setting, the target for this kind of
design is about 500 MHz on a Virtex-5-class FPGA, or roughly 67 Gbit/s. The
intent is about four gate levels per stage. This RTL cuts only at the segment
boundaries above, so its deepest stages remain about six levels. To cut
finer, split more segments and add their depths to `SEG_DEPTH`; `cut_mask`
handles any count up to `NUM_SEG`. The depth numbers are estimates, not
synthesis results, and no clock rate has been measured for this RTL.

The last round has no MixColumns. It keeps the same register positions
anyway, so every round has a latency of exactly `STAGES` cycles.

## Keys

`key_expansion` runs the standard AES-128 schedule. It is deliberately not
unrolled, since it is off the throughput path. After `key_load` it produces
one round key per cycle, using four combinational S-boxes. The keys go into an
eleven-entry register array, which every round reads in parallel. `ready`
rises 10 cycles after `key_load`.

The rounds read the key memory directly, so keys are not carried along the
pipeline. Changing the key corrupts blocks still in flight. To change keys,
let the pipeline drain (82 cycles) before pulsing `key_load`. An assertion
flags `key_load` in the same cycle as `in_valid`.

## Counter mode, interface and timing

Top module: `aes_ctr_top #(STAGES = 8)`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset (clears valid bits, key-ready, counter) |
| `key_load`, `key` | in | 1, 128 | start the key schedule |
| `keys_ready` | out | 1 | key memory valid |
| `iv_load`, `iv` | in | 1, 128 | load the 128-bit counter |
| `mode_ctr` | in | 1 | per block: 1 = CTR, 0 = ECB |
| `in_valid`, `in_data` | in | 1, 128 | one block per cycle, no back-pressure |
| `in_ready` | out | 1 | equals `keys_ready`; blocks offered while it is low are dropped |
| `out_valid`, `out_data` | out | 1, 128 | result |

* **CTR:** the counter block is encrypted, and `out_data = E_K(ctr) ⊕ in_data`.
  The counter then advances by a full 128-bit `+1`, carrying through all
  words. Encryption and decryption are the same operation. If `iv_load`
  arrives together with a CTR block, that block already uses the new `iv`.
* **ECB:** `out_data = E_K(in_data)`. The counter does not move.
* **Latency:** `2 + 10·STAGES` cycles (82 at the default). That is one cycle
  for the initial AddRoundKey register, `STAGES` per round, and one for the
  output XOR register. Throughput is one block per cycle in both modes, with
  modes mixed freely.
* Byte order follows FIPS-197: byte 0 of the state (row 0, column 0) is in
  bits `[127:120]`, and state byte i is column i/4, row i%4. Keys and IVs use
  the same order.

The 128-bit increment is a single adder in one cycle. At high clock rates it
is the slowest path in the design. That is why known high-throughput results
for this style of design were measured in ECB mode. A faster adder, such as
a parallel-prefix (Kogge-Stone or Brent-Kung) incrementer or a pipelined
carry, is not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.
`tb/aes_ref_pkg.sv` is an independent textbook model. Its S-box is `a^254`
followed by the bitwise affine map, and it shares no code with the
composite-field RTL.

* The GF blocks, `gf_inv_8` and `sbox` are checked exhaustively against
  GF(2^8) arithmetic, plus published S-box entries.
* `tb_sub_bytes`, `tb_mix_columns` and `tb_aes_round` run random streams and
  check exact latency. `tb_aes_round` covers STAGES = 8, 4, 2 and 1, with and
  without MixColumns.
* `tb_key_expansion` uses the FIPS-197 key (round key 10 =
  `d014f9a8c9ee2589e13f0cc8b6630ca6`) and random keys, and checks the
  10-cycle ready timing.
* `tb_aes_pipeline` uses the FIPS-197 C.1 vector and 300+ random blocks with
  gaps, and checks a latency of exactly 81 cycles.
* `tb_aes_ctr_top` runs the whole engine at its default parameters:
  * the FIPS-197 ECB vector and the SP 800-38A F.5.1 CTR-AES128 vectors;
  * a 400-block back-to-back stream of mixed modes;
  * counter carries across 32 and 64 bits, and `iv_load` together with a
    block;
  * blocks dropped before the keys are ready, and a key change.

  It counts each of these events and fails if one never happens.
* `tb_aes_stage_sweep` runs the cipher pipeline at STAGES = 1, 2 and 4. It
  checks results, the `1 + 10·STAGES` latency, and one block per cycle.

To simulate with Verilator, put the package files first:

```
verilator --binary --timing -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v aes_pkg) tb/tb_aes_ctr_top.sv --top-module tb_aes_ctr_top
./obj_dir/Vtb_aes_ctr_top
```

Any other testbench works the same way, with its own name in place of
`tb_aes_ctr_top`. The full-size top testbench takes about two minutes to
compile and a second to run.

## Departures and limits

* The S-box gate counts and register positions above belong to this RTL.
  The stages are about six gate levels deep, not four. Cutting finer would
  need splits inside the GF(2^2) operations.
* The field constants N and ν are derived from the two basis-change matrices;
  they are not given by a source.
* Encryption only. CTR mode needs no inverse cipher. ECB decryption is not
  provided.
* `key_load` during traffic is not guarded in hardware, only by an assertion.
* The clock rate, area and throughput of this RTL on any device have not been
  measured.

## Files

`rtl/aes_pkg.sv` holds the types, matrices, depth table and `cut_mask`.
`rtl/gf_mul_4.sv`, `gf_sq_scl_4.sv`, `gf_inv_4.sv` and `gf_inv_8.sv` hold the
field arithmetic. `sbox.sv`, `sub_bytes.sv`, `shift_rows.sv`,
`mix_columns.sv` and `add_round_key.sv` are the round operations.
`aes_round.sv` and `aes_pipeline.sv` form the cipher. `key_expansion.sv` is
the key schedule and memory. `aes_ctr_top.sv` is the top, and `pipe_reg.sv`
is the optional pipeline register.
