# Shared-moduli modulo multipliers and adders for 2^n − 1, 2^n and 2^n + 1

Residue number systems (RNS) built on the moduli 2^n − 1, 2^n and 2^n + 1 need
modular adders and multipliers for all three moduli. The moduli 2^n − 1 and
2^n + 1 are the hard ones. This RTL has two main ideas:

1. **A modulo 2^n + 1 multiplier with no correction stage.** Operands are in
   the normal (n+1-bit) representation, 0 … 2^n. The partial products are built
   so that every constant the wrap-around arithmetic introduces adds up to a
   multiple of 2^n + 1. The "+1" of a standard diminished-one final adder closes
   the sum, so no constant-correction operand and no incrementer are needed.
2. **One multiplier (and one adder) for all three moduli.** The three moduli
   differ only in what happens to the bits that leave the top of an n-bit word.
   For 2^n − 1 they are re-entered as they are (end-around carry, EAC). For
   2^n + 1 they are re-entered inverted (complemented end-around carry, CEAC).
   For 2^n they are dropped. A 2-bit select switches every one of those places
   at once, so one datapath computes |A·B| modulo the chosen modulus, from one
   operation to the next.

Next to these sit the single-modulus multipliers for 2^n − 1 and 2^n, which
complete the set, and a carry-lookahead form of the shared adder.

Everything is combinational. There is no clock and no reset: a result is valid
one propagation delay after the operands change. Register the ports outside if
you need pipelining.

## Arithmetic in one page

- Modulo 2^n − 1, 2^n ≡ 1, so a carry out of bit n−1 is worth 1 and is added at
  bit 0 (EAC).
- Modulo 2^n + 1, 2^n ≡ −1, and a carry c at weight 2^n equals
  (1 − c) − 1 ≡ ¬c − 1. Re-entering ¬c at bit 0 therefore leaves a fixed
  offset of −1 behind (CEAC).
- A two-operand CEAC adder computes the **diminished-one sum**
  |X + Y + 1| mod (2^n + 1). In an ordinary adder the +1 would be a nuisance;
  here it is what absorbs the offsets.
- Modulo 2^n − 1 has two forms of zero (all zeros and all ones). Every unit here
  returns all zeros.
- Modulo 2^n + 1 needs the value 2^n, which does not fit in n bits. Every unit
  that can produce it has an (n+1)-bit result and returns 2^n as `z[n] = 1` with
  the low bits zero.

## The modulo 2^n + 1 multiplier (`mod2np1_mult`)

Three stages: partial-product generation → carry-save tree with CEAC → CEAC
prefix adder.

### Partial products (`ppg_mod2np1`)

Write X = x_n·2^n + X' and Y = y_n·2^n + Y'. Only the value 2^n has its top bit
set, so x_n = 1 implies X' = 0. The generator produces **n + 3 rows of n bits**:

| row | content | why |
|---|---|---|
| PP_j, j = 0 … n−1 | bit k = x_(k−j)·y_j for k ≥ j, and ¬(x_(k−j+n)·y_j) for k < j | X'·y_j·2^j rotated left by j. Bits that pass 2^n wrap to the bottom inverted, because b·2^(n+m) ≡ ¬b·2^m − 2^m. |
| s·¬q | bit k = s ∧ ¬(x_k ∨ y_k), with s = x_n ⊕ y_n | Cross terms x_n·Y' + y_n·X'. When exactly one operand is 2^n, the other one's low bits are the only non-zero ones. |
| a_n b_n | x_n ∧ y_n at bit 0 | 2^n·2^n ≡ 1 |
| 2s | s at bit 1 | Completes the cross terms. |

Summed as plain integers, the rows exceed the true product by the constant
2^n − 1 − n (mod 2^n + 1). This holds for every operand pair. It can be checked
exhaustively for small n, and the testbenches do so.

### Carry-save tree (`ceac_moma`, cell `csa_ceac`)

This is a Wallace tree of carry-save cells whose carry word is rotated left by
one, with the top carry inverted into bit 0. Each cell leaves an offset of +1:
its outputs s + c are congruent to its three inputs plus one. The n + 3 rows
need n + 1 cells, which adds n + 1. The final adder adds 1. The total offset is:

    (2^n − 1 − n) + (n + 1) + 1 = 2^n + 1 ≡ 0

So the result is exact. This is the heart of the design.

The tree groups operands three at a time at every level and passes leftovers
down, so operands are removed at the earliest opportunity. The levels are
generated from the operand count at each level, computed at elaboration time. The depth
follows the Wallace recurrence k → 2⌊k/3⌋ + (k mod 3). Examples:

| operands | levels |
|---|---|
| 7 | 4 |
| 11 | 5 |
| 19 (n = 16, the default) | 6 |

`LEVELS` in the module holds this value.

### Final adder (`ceac_prefix_adder`)

This is a parallel-prefix adder with a direct CEAC:

- the PG unit computes the bit-level propagate and generate signals;
- the prefix tree (Sklansky by default) produces the carry out;
- the inverted carry out is fed into one extra row of reduced prefix nodes (generate part only);
- the sum is computed from those carries.

The result 2^n occurs exactly when all propagate bits are 1. That AND is output
as `z[n]`, and the low bits are then already zero.

## The modulo 2^n − 1 and 2^n multipliers

**`mod2nm1_mult`** uses the same three-stage scheme. Modulo 2^n − 1,
2^(n+m) ≡ 2^m, so:

- partial-product row j is the multiplicand rotated left by j and gated by
  y_j (`ppg_mod2nm1`). There are n rows of n bits and no constants.
- a Wallace tree of end-around-carry cells (`eac_moma`, cell `csa_eac`)
  reduces the rows to two words.
- a prefix adder re-enters its carry out (`eac_prefix_adder`). It returns
  zero as all zeros.

Operands are n bits. All ones is accepted as an operand, as the other form of
zero.

**`mod2n_mult`** is the low half of a binary multiplier:

- the partial products are truncated to n bits;
- a Wallace tree of n-bit cells drops the carry out of the top bit
  (`mod2n_moma`, cell `csa_mod2n`);
- an n-bit prefix adder ignores its carry out.

## Shared moduli (`shared_mod_mult`)

The shared multiplier has the same three stages. Each stage looks at the select
`sel` (`modsel_t`: `MOD_2N_M1`, `MOD_2N`, `MOD_2N_P1`):

| place | 2^n − 1 | 2^n | 2^n + 1 |
|---|---|---|---|
| wrapped partial-product bits (`shared_ppg`) | x·y (rotated) | 0 (dropped) | ¬(x·y) |
| rows s·¬q, a_n b_n, 2s | zero | zero | as above |
| end-around bit of each carry-save cell (`ccsa`) | top carry | 0 | ¬ top carry |
| carry re-entered in the final adder (`shared_mod_adder`) | carry out | 0 | ¬ carry out |

The tree (`ccsa_moma`) has the same size in all modes, n + 3 rows. In the modes
that don't use the extra rows they are simply zero.

- **2^n − 1:** the offsets are all zero. The EAC adder returns |s + c|, with the
  all-ones zero replaced by zero.
- **2^n:** everything above bit n−1 is discarded.
- **2^n + 1:** the arithmetic is that of `mod2np1_mult`.

Operands are n+1 bits wide in every mode. Bit n is only meaningful for 2^n + 1
and is ignored otherwise. Operands must be reduced residues (below the modulus).

### The shared two-operand adder

Only the carry that re-enters the adder depends on the modulus. The shared
adder is therefore an ordinary n-bit adder plus a three-input multiplexer in
front of the carry-in of a last carry row. It comes in two forms:

- **`shared_mod_adder`:** prefix form, with a selectable prefix network. It is
  the final adder of the shared multiplier.
- **`shared_mod_adder_cla`:** two-level carry-lookahead form. It has its own ports on the top.
  - Bit P/G signals are grouped into 4-bit group signals.
  - A look-ahead over the groups gives the carry out.
  - The carry out goes through the same multiplexer.
  - It then enters a second look-ahead over the groups and a look-ahead inside
    each group.
  - All carries are written as sums of products.

Both forms share the same special-value logic, computed from the bit-level
signals in parallel with the carry network:

- **2^n − 1:** an all-ones sum is replaced by zero. This happens when every
  propagate bit is 1 (X + Y = 2^n − 1). It also happens when every generate bit
  is 1, i.e. both operands are all ones, the other form of zero.
- **2^n + 1:** all propagate bits 1 means the diminished-one sum is 2^n, which is
  returned in `z[n]`.

## Top level (`rns_modarith_top`)

The five units sit side by side and share nothing:

| port | dir | width | meaning |
|---|---|---|---|
| `sm_sel` | in | 2 | modulus of the shared multiplier |
| `sm_a`, `sm_b` | in | N+1 | operands, reduced modulo the selected modulus |
| `sm_z` | out | N+1 | \|a·b\| mod m |
| `fm_x`, `fm_y` | in | N+1 | operands 0 … 2^N of the modulo 2^N+1 multiplier |
| `fm_z` | out | N+1 | \|x·y\| mod (2^N+1) |
| `sa_sel` | in | 2 | modulus of the look-ahead shared adder |
| `sa_x`, `sa_y` | in | N | adder operands |
| `sa_z` | out | N+1 | \|x+y\| mod 2^N−1 or 2^N; \|x+y+1\| mod 2^N+1 (diminished-one) |
| `em_x`, `em_y` | in | N | operands of the modulo 2^N−1 multiplier |
| `em_z` | out | N | \|x·y\| mod (2^N−1) |
| `bm_x`, `bm_y` | in | N | operands of the modulo 2^N multiplier |
| `bm_z` | out | N | \|x·y\| mod 2^N |

Parameters:

| name | default | meaning |
|---|---|---|
| `N` | 16 | n, the residue width. The units were characterised at n = 4, 8, 16 and 32, and all four are simulated. |
| `TREE` | `SKLANSKY` | prefix network of the final adders: `SKLANSKY`, `BRENT_KUNG` or `KOGGE_STONE` |

`shared_mod_adder_cla` also has `W` (group size, default 4). Each lower-level
module repeats `N` and `TREE`. The Wallace trees (`*_moma`) take `K`, the number
of operands.

## Files

| file | content |
|---|---|
| `rtl/rns_pkg.sv` | `modsel_t`, `prefix_tree_t`, and elaboration-time functions: prefix network wiring (`prefix_partner`, `prefix_levels`) and Wallace depth |
| `rtl/prefix_node.sv` | prefix operator (g, p) ∘ (g', p') |
| `rtl/pg_unit.sv` | bit propagate / generate |
| `rtl/prefix_tree.sv` | Sklansky, Brent–Kung or Kogge–Stone network of `prefix_node`s |
| `rtl/ceac_prefix_adder.sv` | diminished-one modulo 2^n+1 adder |
| `rtl/shared_mod_adder.sv` | shared adder, prefix form |
| `rtl/shared_mod_adder_cla.sv` | shared adder, carry look-ahead form |
| `rtl/csa_ceac.sv`, `rtl/ccsa.sv` | carry-save cells: CEAC, and selectable EAC/CEAC/none |
| `rtl/ceac_moma.sv`, `rtl/ccsa_moma.sv` | Wallace trees of those cells |
| `rtl/ppg_mod2np1.sv`, `rtl/shared_ppg.sv` | partial-product generators |
| `rtl/mod2np1_mult.sv`, `rtl/shared_mod_mult.sv` | the modulo 2^n+1 and shared multipliers |
| `rtl/csa_eac.sv`, `rtl/eac_moma.sv`, `rtl/ppg_mod2nm1.sv`, `rtl/eac_prefix_adder.sv`, `rtl/mod2nm1_mult.sv` | modulo 2^n−1 multiplier and its parts |
| `rtl/csa_mod2n.sv`, `rtl/mod2n_moma.sv`, `rtl/mod2n_mult.sv` | modulo 2^n multiplier and its parts |
| `rtl/rns_modarith_top.sv` | top level |

## Simulation

Each testbench `tb/tb_<module>.sv` checks its module against integer arithmetic
and prints `TB_RESULT checks=… failures=…` at the end. Build and run one with
plain Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/rns_pkg.sv tb/tb_rns_modarith_top.sv \
              --top-module tb_rns_modarith_top -Mdir obj_top
    ./obj_top/Vtb_rns_modarith_top

Replace the testbench name to run another. Each testbench finishes within seconds.

- **Exhaustive runs:**
  - the adders at n = 6 and 8;
  - all four multipliers at n = 4 and 8;
  - every prefix network.
- **Random runs with boundary values:** n = 16 and 32.
- **`tb_rns_modarith_top`:**
  - drives the top at its default size;
  - counts how often each mechanism occurred: each modulus selected, EAC and
    CEAC carries of 1 re-entered, the all-ones zero corrected, the result 2^n
    produced, the cross-term row active, both operands equal to 2^n. The same
    events are counted for the look-ahead adder and the 2^n − 1 multiplier;
  - fails if any count is zero.
- **`tb_workloads`:** runs all units of the top at n = 4 (Sklansky), and at
  n = 8, 16 and 32 with each of the three prefix networks.
- **Tree depth:** the Wallace depths 4, 5 and 6 for 7, 11 and 19 operands are
  checked by `tb_ceac_moma`.

## Where this RTL makes its own choices

- **Three-way select in the carry-save cells.** The composite carry-save cell is
  usually drawn with a two-way EAC/CEAC multiplexer. This design adds a zero
  input so that the same tree serves 2^n.
- **Special values.**
  - The all-ones zero is caught both by the all-propagate detector and by an
    all-generate detector. The second detector covers the sum of two all-ones
    operands. That sum also yields all ones, yet no propagate bit is set.
  - The value 2^n is returned in `z[n]`, taken from the AND of the propagate
    bits.
- **Operand grouping and tree shape.**
  - The grouping of operands into carry-save cells is this design's choice.
    Only the Wallace strategy and its depths are given.
  - The Sklansky, Brent–Kung and Kogge–Stone networks follow their standard
    textbook shapes.
  - In the look-ahead adder, one look-ahead level spans all groups. At n = 32
    that is 8 groups, a wide fan-in. A further level would be needed to keep
    gates small.
- **Encoding.** The 2-bit `modsel_t` encoding is arbitrary. The unused value 3
  behaves like `MOD_2N` throughout.
- **Top level.** Placing the five units side by side under one top is for
  integration and testing only. The units do not interact.
- **Timing.** No pipelining, clocking or reset is provided.
