# Modulo (2^n+1) arithmetic with a zero indicator

Residue arithmetic often pairs the moduli 2^n and 2^n−1 with a third, 2^n+1.
The first two are cheap: an n-bit adder either drops its carry or feeds it
back around. The third is awkward, because Z_m with m = 2^n+1 has one value
more than n bits can hold. This RTL stores a residue in n+1 bits in a way
that keeps addition and negation close to plain binary logic. The adders are
ordinary n-bit binary adders plus a few gates, and the complement is one
gate per bit.

## The representation

A residue X in {0, 1, …, 2^n} is held as an n-bit field `x` and a one-bit
**zero indicator** `I`:

    X = I · (x + 1)

- `I = 0` means X = 0, and `x` is then all zeros (the canonical form).
- `I = 1` means X = x + 1, so `x` runs over 0 … 2^n−1 for X = 1 … 2^n.

In other words, a non-zero residue is stored *diminished by one*, and zero
gets its own flag. All units in this design assume canonical inputs
(`x = 0` whenever `I = 0`) and always produce canonical outputs.

## Addition: four cases

Adding X = I_x(x+1) and Y = I_y(y+1) gives X+Y = x + y + I_x + I_y. Two
overflow signals of an n-bit adder classify every sum:

- **Q** = 1 when x + y ≥ 2^n, the carry-out of x + y.
- **C_n** = 1 when x + y + I_x·I_y ≥ 2^n, the carry-out when the "hot bit"
  I_x·I_y is fed in as the carry-in.

| case | X + Y          | Q | C_n | result s                 | I_s       |
|------|----------------|---|-----|--------------------------|-----------|
| i    | 0              | 0 | 0   | 0                        | 0         |
| ii   | 1 … m−1        | 0 | 0   | x + y + I_x·I_y          | 1         |
| iii  | exactly m      | 0 | 1   | 0                        | 0         |
| iv   | m+1 … 2m−2     | 1 | 1   | x + y − 2^n (low n bits) | 1         |

So the carry-in must be the hot bit when Q = 0 and zero when Q = 1. The
result is zero only in cases i and iii:

    C_0 = I_x · I_y · ¬Q
    I_s = (Q ∨ ¬C_n) · (I_x ∨ I_y)

Case iii (X + Y = m) is the one that needs care. There both operands are
non-zero and x + y = 2^n − 1, so every bit propagates. The hot carry then
ripples all the way out and leaves s = 0, and I_s must drop.

The trouble is that the carry-in depends on the carry-out of the same
addition. The design offers three ways to break that loop. All three give
identical results.

### Two add cycles with a carry flip-flop (`mod_add_2cycle`)

One n-bit look-ahead adder sees x and y for two clock cycles. Its carry-in
is `I_x · I_y · ¬F`, where F is a D flip-flop.

1. `start` sets F, so the carry-in of the first cycle is 0 and the adder's
   carry-out is Q.
2. The clock edge at the end of that cycle loads Q into F.
3. In the second cycle the carry-in is the hot bit if Q = 0, and 0 if Q = 1.
   The carry-out is then C_n.

The output gates form I_s = ¬(C_n · ¬F) · (I_x ∨ I_y), which is the formula
above with F = Q. Timing: `start` in cycle t, the first add in cycle t+1, and
`valid` with the result in cycle t+2. The caller must hold x and y stable
until `valid`. This is the cheapest variant: one adder, one flip-flop and
three gates.

### Two conditional sums (`mod_csel_adder`)

Two binary adders run in parallel. One adds x + y and produces Q; the other
adds x + y + I_x·I_y and produces C_n. A row of n multiplexers, steered by Q,
picks the first sum in case iv and the second otherwise. C_n is used only
for I_s. The result takes one adder delay plus a multiplexer, at the cost of
a second adder.

### Modular carry-look-ahead (`mod_cla_adder`)

This variant is the hardest to follow. It puts the conditional carry-in
straight into the look-ahead equations, so there is only one adder and no
multiplexer. Bits are numbered from 1 as in the look-ahead literature:
G_i = x_{i−1}·y_{i−1} and P_i = x_{i−1} ⊕ y_{i−1}. A binary carry is

    C_i = G_i ∨ P_i·G_{i−1} ∨ … ∨ P_i…P_2·G_1 ∨ P_i…P_1·C_0

Substituting C_0 = I_x·I_y·¬Q expands ¬Q into a sum of products. The last
term can only matter when P_1 … P_i are all 1. In that case bits 1 … i
cannot generate a carry, so ¬Q reduces to "bits i+1 … n produce no carry":

    B_i = ¬G_n·¬P_n ∨ ¬G_n·¬G_{n−1}·¬P_{n−1} ∨ …
        ∨ ¬G_n…¬G_{i+2}·¬P_{i+2} ∨ ¬G_n…¬G_{i+1}

    C_i = G_i ∨ P_i·G_{i−1} ∨ … ∨ P_i…P_2·G_1 ∨ P_i…P_1·I_x·I_y·B_i

For i = n, B_n is 1 (empty product). For i = 0 it is the full ¬Q and gives
C_0 itself. Sum bit i−1 is P_i ⊕ C_{i−1}. The zero indicator is the case iii
test: all P_i = 1 with both operands non-zero, combined with case i:

    I_s = (I_x ∨ I_y) · ¬(P_n…P_1 · I_x · I_y)

The RTL writes out each C_i and each B_i as a flat two-level expression,
built by nested loops in `always_comb`. That costs O(n²) product terms, like
a textbook full look-ahead adder. Grouped or tree-structured look-ahead is
not provided. For reference, generic yosys coarse synthesis at n = 16 gives
about 450 word-level cells for this adder and 460 for the conditional-sum
one. The two-cycle adder takes about 340 cells plus 3 flip-flop bits; two of
those bits are its phase counter.

The `q` and `cn` outputs of the single-step adders report Q and C_n. They
show which row of the table a sum fell in and are not needed for the result.

## Complement (`mod_complement`)

The additive inverse Y = m − X mod m is

    y = I_x · (2^n − 1 − x),   I_y = I_x

For a non-zero X this is the one's complement of x. For X = 0 it is zero.
Each output bit is therefore y_i = ¬(x_i ∨ ¬I_x): one gate per bit on a
shared inverted I_x, with I_y wired straight from I_x.

## The top level: `mod2n1_alu`

The arithmetic units are combinational (or nearly so) and share no state.
The top wraps them in one small unit with registered operands and result,
so that they can be exercised and compared. It is this design's own
packaging, not part of the arithmetic.

| `op` (`mod2n1_pkg::op_e`) | result                            | latency start → valid |
|---------------------------|-----------------------------------|-----------------------|
| `OP_ADD_CLA`              | A + B, modular look-ahead adder   | 2 cycles              |
| `OP_ADD_SEL`              | A + B, conditional-sum adder      | 2 cycles              |
| `OP_ADD_SEQ`              | A + B, two-cycle adder            | 3 cycles              |
| `OP_NEG`                  | m − A (B ignored)                 | 2 cycles              |

Handshake:

- `start` is accepted while `busy` is low and captures `op`, A and B. A
  `start` while busy is ignored.
- `valid` pulses for one cycle with the result on `r_x`/`r_i`. A new `start`
  may be given in that same cycle.
- `flag_q` and `flag_cn` hold Q and C_n of the last addition. They are 0
  after `OP_NEG`.
- Reset (`rst_n`, active low, synchronous) clears all registers.

An assertion checks that the two-cycle adder is never busy while the unit is
idle. Subtraction is not a separate operation; do `OP_NEG` and then an add.

## Files

| file                        | contents                                             |
|-----------------------------|------------------------------------------------------|
| `rtl/mod2n1_pkg.sv`         | operation-code enum                                  |
| `rtl/cla_binary_adder.sv`   | n-bit binary full carry-look-ahead adder             |
| `rtl/mod_add_2cycle.sv`     | two-cycle adder with the carry flip-flop             |
| `rtl/mod_csel_adder.sv`     | conditional-sum single-step adder                    |
| `rtl/mod_cla_adder.sv`      | modular carry-look-ahead single-step adder           |
| `rtl/mod_complement.sv`     | modular complement                                   |
| `rtl/mod2n1_alu.sv`         | top level                                            |
| `tb/mod2n1_ref_pkg.sv`      | integer reference model used by the testbenches      |
| `tb/tb_<module>.sv`         | one self-checking testbench per module               |

All modules take one parameter, `N` (n, default 16, so m = 65537). Nothing
else depends on the width. Any N from 1 up to about 60 works in simulation:
the reference model uses 64-bit integers.

## Verification

Each testbench checks against integer arithmetic modulo 2^n+1 (decode, add or
negate, re-encode), not against the gate equations, and prints
`TB_RESULT checks=… failures=…`.

- `tb_cla_binary_adder`: exhaustive at n = 4; random and carry-chain corner
  cases at n = 16.
- `tb_mod_cla_adder`, `tb_mod_csel_adder`: every pair of residues at n = 6;
  directed and 20 000 random pairs at n = 16. Also checks Q and C_n, and
  that all four table cases occurred.
- `tb_mod_add_2cycle`: every pair at n = 5; random pairs at n = 16. Also
  checks the 2-cycle latency and busy/valid, and that both the Q = 1 path
  and the hot-carry path occurred.
- `tb_mod_complement`: every residue at n = 8; random ones at n = 16. Also
  checks that X + (−X) ≡ 0.
- `tb_mod2n1_alu`: the whole unit at its default width, with about 20 000
  random operations, random gaps and starts while busy. It counts every
  operation, every table case on every adder, both two-cycle paths,
  complement of zero and non-zero, back-to-back starts and ignored starts,
  and fails if any never happened.

Each testbench was also run against a deliberately broken copy of its module
(for example, the conditional-sum multiplexer steered by C_n instead of Q),
and each reported failures.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/mod2n1_pkg.sv tb/mod2n1_ref_pkg.sv tb/tb_mod2n1_alu.sv \
        --top-module tb_mod2n1_alu -o sim && obj_dir/sim

Every run takes well under a second.

## What follows the source method and what is this design's own

Following the method:

- the representation
- the four-case analysis and the Q / C_n identification
- the two-cycle scheme: one adder, a flip-flop that is set first and then
  loads the carry-out, and the carry-in and I_s gates
- the modular look-ahead carry equations
- the conditional-sum arrangement (two adders, n multiplexers)
- the complement circuit

This design's own choices:

- **Width.** n = 16. The method leaves n open.
- **Clocking of the two-cycle adder.** The method describes an asynchronously
  set flip-flop clocked by a separately delayed clock pulse. Here `start`
  sets the flip-flop synchronously, and both add cycles are cycles of one
  clock.
- **Zero-indicator equation of the look-ahead adder.** It is built as the
  complement of the case iii condition, combined with I_x ∨ I_y, so that it
  agrees with the case table.
- **Look-ahead structure.** Both look-ahead adders are flat, one level deep.
- **Top level.** The whole of `mod2n1_alu` (registers, op codes, handshake,
  flags) and all reset behaviour.
- **Canonical inputs.** Zero is assumed to be presented as `x = 0, I = 0`.
  The adders do not clear `x` when `I = 0`. The complementer tolerates a
  non-canonical zero.
