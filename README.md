# Representation-randomised AES-128 encryption core

AES does all its arithmetic in the finite field GF(2^8), written in one fixed
way: bytes are polynomials modulo x^8+x^4+x^3+x+1. That field can be written
in many other ways. Each alternative uses a different degree-8 irreducible
polynomial and a different correspondence between elements. All of them are
the same field up to relabelling. If a cipher core converts its input into
another representation, runs all ten rounds there with suitably converted
constants, and converts the result back, it produces exactly the AES
ciphertext. But the bit patterns on its internal wires, and so its power
consumption, are different in each representation.

This core picks a new representation for every block, from 240 choices
(30 irreducible polynomials × 8 isomorphisms each). The aim is to weaken
the link between the data and the power trace that differential power
analysis (DPA) relies on. The ciphertext stays standard AES-128. The only
inputs are the data and the key, and here the key is stored inside the core.

The RTL follows a published architecture for such a core. It is built from
small, representation-independent GF(2^8) blocks (adder, multiplier,
inverter, affine transform, mapping matrix). From these it assembles two
versions:

| version | module | cycles per block | what happens per cycle |
|---|---|---|---|
| 1 | `aes_iso_round_core` | 12 | input, 10 full rounds, output |
| 2 | `aes_iso_step_core` | 42 | input, 40 single transformations, output |

`aes_iso_top` puts both side by side, each with its own ports.

## What a "representation" is, and how its parameters are derived

This is the part that needs the most care. Everything else is ordinary AES
hardware with some inputs widened.

Take a representation to be the field F' = GF(2)[y]/p(y), with p one of the
30 irreducible polynomials of degree 8. An isomorphism φ from the AES field F
to F' is fixed by where it sends x (the byte 8'h02). The image must be a root
in F' of the AES polynomial m. m has exactly 8 roots in F': r, r^2, r^4, …,
r^128. So each polynomial gives 8 isomorphisms, and 30 × 8 = 240. One
isomorphism per polynomial is the plain AES field itself: polynomial 11B with
r = 02. Representation 0 is that one.

For representation (polynomial index i, generator index k):

* `p = IRR_POLY[i]`. The 30 polynomials are listed in ascending order by a
  constant function in `aes_iso_pkg`. They are computed at elaboration, not
  typed in.
* `r = ROOT_R0[i]^(2^k)`. `ROOT_R0[i]` is the smallest root of m in F', also
  found at elaboration. The core computes the squarings at run time with
  `gf_mul` blocks.
* **Mapping matrix** M: column j is r^j, computed in F'. M·a is φ(a).
* **Inverse mapping matrix** M⁻¹: column j is s^j, computed in F, where
  s = φ⁻¹(y). `ROOT_S0[i]` is s for k = 0. For generator k the core uses
  `s = ROOT_S0[i]^(2^((8-k) mod 8))`, because φ_k(a) = φ_0(a^(2^k)).
* **SubBytes**: inversion commutes with φ, so S'(a) = A'·inv_p(a) + c' with
  A' = M·A·M⁻¹ and c' = M·63. Here A is the AES affine matrix.
* **MixColumns**: C(x) becomes {φ(03), φ(01), φ(01), φ(02)} = {r+1, 01, 01, r}.
* **Round keys** are stored in standard form and mapped with M as they are
  read.

`op_params` does all of this combinationally. It uses 28 `gf_mul` and 17
`gf_map` instances and no lookup tables, apart from the three 30-entry tables
that the package computes at elaboration. The cores register its outputs in
the input cycle of each block.

Matrices are packed by column: `m[j]` is the image of bit j, and M·x is the
XOR of the columns selected by the set bits of x. Polynomials carry their
eight low coefficients, with the x^8 term implied, so the AES polynomial is
`8'h1B`.

## Choosing the next representation

`rep_select` holds an 8-bit Fibonacci LFSR with the primitive polynomial
x^8+x^6+x^5+x^4+1. Its 255 non-zero states are visited once per period. The
representation number is `state - 1`, so polynomial index = number / 8 and
generator index = number mod 8.

The 15 states whose number would be 240 or more are stepped over one per
clock, without being asked to. During those cycles `rep_valid`, and so the
core's `ready`, is low. As a result, every run of 240 consecutive blocks uses
all 240 representations exactly once.

The selector advances when a block is accepted, so any skipping happens while
that block is being encrypted. This polynomial never produces more than 4
out-of-range states in a row, so the skipping is always over before either
core can take its next block.

An LFSR is predictable. It is here as a stand-in. A production device should
drive `advance`/`poly_idx`/`gen_idx` from a real random source instead,
while keeping the rule that no representation is repeated too soon.

## Datapath blocks

| module | function |
|---|---|
| `gf_add` | GF(2^8) addition (XOR); the same in every representation |
| `gf_mul` | a·b mod x^8+`poly`; shift-and-add with interleaved reduction |
| `gf_inv` | a^254 by an addition chain of 13 `gf_mul` (inv(0) = 0) |
| `gf_affine` | A·x + c, with A and c as inputs |
| `gf_map` | M·x, the change of basis |
| `map_state` | `gf_map` on all 16 bytes (input, round-key and inverse mapping) |
| `sbox_iso` | `gf_inv` followed by `gf_affine`: the S-box in any representation |
| `sub_bytes` | 16 `sbox_iso` in parallel |
| `shift_rows` | wiring: row r rotated left by r |
| `mix_columns` | b_i = Σ_j coef[(i−j) mod 4]·a_j per column, 64 `gf_mul` |
| `add_round_key` | 16 `gf_add` |
| `round_key_store` | the 11 expanded round keys, read by round number |

Block byte order is the FIPS-197 order: byte 0 (row 0, column 0) is in bits
127:120, and byte i is at row i mod 4, column i / 4.

## The two cores

Both cores have the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | accept `din` on this edge if `ready` |
| `din` | in | 128 | plaintext |
| `ready` | out | 1 | idle and a representation is available |
| `busy` | out | 1 | a block is in flight; `start` is ignored |
| `done` | out | 1 | one-cycle pulse; `dout` is valid from here on |
| `dout` | out | 128 | ciphertext, held until the next `done` |
| `rep_id` | out | 8 | representation (0..239) used by the current/last block |

Timing is counted from the edge that takes `start`, as cycle 1:

* **Version 1 (12 cycles).**
  * Cycle 1: map the plaintext and round key 0 into the selected
    representation, add them, and register the representation parameters.
  * Cycles 2–11: one round per cycle, SubBytes → ShiftRows → MixColumns →
    AddRoundKey. Round 10 bypasses MixColumns.
  * Cycle 12: map back to standard form into `dout` and raise `done`.
* **Version 2 (42 cycles).** The same input and output cycles. Between them,
  each round takes four cycles, one per transformation. The state register
  feeds all four transformation blocks, and a phase counter chooses which
  result to load. In round 10 the MixColumns cycle leaves the state
  unchanged, which keeps the count at 42. This trades 30 extra cycles for a
  critical path of one SubBytes rather than a whole round.

`rep_id` is there for testing and characterisation. A hardened product would
not bring it out.

## Key storage

The core has no key input. The key is meant to already be on the chip in
expanded form. `round_key_store` models that storage as a ROM. It holds 11
round keys expanded at elaboration from the `KEY` parameter by the FIPS-197
key schedule. The default `KEY` is the FIPS-197 example key
000102…0e0f. Change `KEY` on the core or the top to use another key. A real
device would put non-volatile storage in its place.

## Choices made in this RTL

The published description fixes the architecture, the block decomposition,
the programmable inputs of SubBytes and MixColumns, the LFSR selector, the 240
representations and the 12/42 cycle counts. The following are choices made
here:

* **Initial key addition.** The architecture diagrams show the round loop
  only. To produce standard ciphertext, the initial AddRoundKey with round
  key 0 is done in the input cycle, so 11 round keys are stored.
* **Which 240 isomorphisms.** They are the conjugate roots of the AES
  polynomial in each field, and the order of polynomials and roots is the
  one described above. The same 240 isomorphisms exist however they are
  numbered.
* **How parameters are derived.** They are derived combinationally, from
  three elaboration-time tables plus run-time GF(2^8) arithmetic, and then
  registered once per block.
* **Selector details.** The LFSR polynomial, the seed (`SEED`, default
  8'h01) and the skipping of the 15 out-of-range states are this design's.
* **Version 2 timing.** The idle MixColumns slot in the last round of
  version 2 is this design's.
* **Interface.** The handshake, reset style, the `rep_id` port and putting
  both versions in one top are this design's.
* **Scope.** Only AES-128 encryption is built. Decryption and 192/256-bit
  keys are not.

The unprotected reference cores that the published figures compare against
are not part of this RTL.

## How far to trust it

* Both cores encrypt the FIPS-197 Appendix C.1 block correctly. They also
  agree with an independent software AES-128 model on 250+ random blocks
  each, which between them use all 240 representations, with the exact
  12/42-cycle latency.
* `tb_op_params` checks every one of the 240 parameter sets algebraically.
  The polynomial is irreducible. M preserves products. M⁻¹·M = I. The
  converted S-box commutes with M. The MixColumns coefficients are M·02 and
  M·03. All 240 mapping matrices differ.
* What has **not** been established: any measure of DPA resistance (that
  needs silicon or power simulation), timing closure, or area. The
  combinational path through `op_params` into the input-cycle mapping is
  long. If it limits the clock, register its output one cycle earlier. The
  selector already holds the next representation well in advance, so this
  is easy.

## Simulating

Every testbench is self-checking. Each prints a final
`TB_RESULT checks=N failures=M` line and has a cycle watchdog. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/aes_iso_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_iso_top.sv --top-module tb_aes_iso_top
./obj_dir/Vtb_aes_iso_top
```

Testbenches:

* `tb_<module>`: one per block.
* `tb_aes_iso_round_core` and `tb_aes_iso_step_core`: 251 blocks each.
* `tb_aes_iso_top`: the whole top at its default parameters. It runs 260
  blocks through each version concurrently. It also counts representation
  changes, non-standard representations, skipped LFSR states, full coverage
  of the 240 representations, last-round MixColumns bypasses and ignored
  `start` pulses, and fails if any of these never occurs.

`tb/aes_ref_pkg.sv` holds the reference arithmetic. Its multiplier reduces
by long division, its inverter searches, and its S-box uses the FIPS-197 bit
formula, so none of it shares code with the RTL.

## Files

* `rtl/aes_iso_pkg.sv`: types, the `rep_params_t` struct, and the
  elaboration-time tables and key schedule.
* `rtl/*.sv`: one module per file, as listed above.
* `tb/*.sv`: testbenches and `aes_ref_pkg`.
