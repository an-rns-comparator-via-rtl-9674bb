# Magnitude comparator for the residue number system {2^n−1, 2^n, 2^(n+1)−1}

A residue number system (RNS) holds an integer X as its remainders modulo a
few coprime moduli. Addition and multiplication then split into short,
independent channels, but magnitude comparison becomes hard: the residues
carry no weight, so nothing in them directly says which of two numbers is
larger. The usual fix converts both operands back to binary and compares
two long words. That needs a full reverse converter per operand.

This RTL compares two RNS numbers without reconstructing them. It uses
**dynamic range partitioning (DRP)**. From each operand's residues it
computes two short indices, a *partition number* p1 and a *section
number* p2. The triple (p1, p2, x3) orders the numbers exactly as their
integer values do. Three narrow binary comparators and two multiplexers
then finish the job.

The moduli set is

| name | modulus     | residue | bits  |
|------|-------------|---------|-------|
| m1   | 2^n − 1     | x1      | n     |
| m2   | 2^n         | x2      | n     |
| m3   | 2^(n+1) − 1 | x3      | n + 1 |

The default is n = 8, which gives a dynamic range of
M = 255 · 256 · 511 = 33,358,080.

## Why (p1, p2, x3) sorts the numbers

Every X in [0, M) can be written uniquely as

    X = x3 + m3 · p2 + m2 · m3 · p1,   0 ≤ x3 < m3,  0 ≤ p2 < m2,  0 ≤ p1 < m1

This is a mixed-radix form: the range is cut into m1 *partitions* of
m2·m3 values, and each partition into m2 *sections* of m3 values. The
lowest digit is the residue x3 itself. So X > Y exactly when
(p1, p2, x3) of X is lexicographically larger than that of Y.

For these moduli the multiplicative inverses are trivial:

* m3 = 2^(n+1) − 1 ≡ −1 (mod 2^n), so the inverse of m3 modulo m2 is −1;
* m2·m3 ≡ 1 · 1 (mod 2^n − 1), so its inverse modulo m1 is 1.

The two digits therefore come out of a subtraction and a one's-complement
sum:

    p2 = w = |x3 − x2| mod 2^n              = |x3 + ~x2 + 1| mod 2^n
    p1     = |x1 − x3 − w| mod (2^n − 1)    = |x1 + ~x3 + ~w + 2^n − 2| mod (2^n − 1)

Here ~x3 is the (n+1)-bit complement 2^(n+1) − 1 − x3, and ~w and ~x2 are
n-bit complements.

## Computing p1 and p2 (`drp_generator`)

Each operand has its own generator. The generator is the heart of the design.

**Section number.** `p2_adder` forms w = x3[n−1:0] + ~x2 + 1 in an
ordinary n-bit adder, with the constant 1 as its carry-in. Bit n of x3 has
weight 2^n and vanishes modulo 2^n, so the adder only sees the low n bits
of x3.

**Partition number.** Four n-bit rows have to be added modulo 2^n − 1:

    bit:     n-1     n-2    ...   1      0
    row 1:   a[n-1]  a[n-2] ...   a[1]   a[0]       x1
    row 2:  ~c[n-1] ~c[n-2] ...  ~c[1]  ~c[0]       low n bits of ~x3
    row 3:   1       1      ...   1     ~c[n]       2^n − 2, plus ~c[n]·2^n folded to bit 0
    row 4:  ~w[n-1] ~w[n-2] ...  ~w[1]  ~w[0]

Modulo 2^n − 1 the weight 2^n equals 1. So bit n of ~x3 moves down to
bit 0, and every carry leaving bit n−1 re-enters at bit 0 (end-around
carry).

1. `p1_row_reducer` compresses rows 1–3, which are known early, into two
   rows. Row 3 is the constant 1 in bits 1..n−1. A full adder with one
   input tied to 1 is a sum of `a XNOR b` and a carry of `a OR b`. Bit 0
   keeps a real full adder: XOR3 for the sum, majority for the carry.
   Each carry moves up one place, and the carry of bit n−1 wraps to bit 0:

        sum[i]   = a[i] XNOR ~c[i]                  i ≥ 1
        sum[0]   = a[0] XOR ~c[0] XOR ~c[n]
        carry[i] = a[i−1] OR ~c[i−1]                i ≥ 2
        carry[1] = majority(a[0], ~c[0], ~c[n])
        carry[0] = a[n−1] OR ~c[n−1]

   This stage works in parallel with the p2 adder.
2. `mod_csa` is a modulo 2^n − 1 carry-save adder. It adds ~w, the complement
   of the p2 adder's output, as the third row: one full adder per bit, with
   the carry vector rotated left by one place.
3. `mod_adder` resolves the two remaining rows into p1.

The critical path is: n-bit adder (p2), one full-adder level, modulo
2^n − 1 adder, n-bit comparator, two 2:1 multiplexers.

### The two codes of zero

In one's-complement (modulo 2^n − 1) arithmetic, both 0…0 and 1…1 stand for
zero. That does no harm to an adder, but p1 feeds a *magnitude* comparator.
There an all-ones p1 would rank partition 0 above all the others. So
`mod_adder` always returns the canonical value 0 … 2^n − 2:

* it forms a + b and a + b + 1;
* if a + b + 1 carries out of n bits, then a + b ≥ 2^n − 1 and the result
  is the low n bits of a + b + 1; otherwise the result is a + b;
* the one case that still leaves all ones (both inputs all ones) is mapped
  to 0.

The source method does not say how its modulo adder treats zero. This
canonical form is this implementation's choice, and the end-to-end tests
depend on it.

## The comparison stage (`phi_comparator`)

The top instantiates two generators, one per operand, and three
`binary_comparator`s. Each comparator gives `gt` (c_i) and `eq` (E_i):

| stage | compares         | width |
|-------|------------------|-------|
| 1     | p1(X) vs p1(Y)   | n     |
| 2     | p2(X) vs p2(Y)   | n     |
| 3     | x3 vs y3         | n + 1 |

All three run in parallel, and the most significant stage that differs
decides:

    c_xy = E1 ? (E2 ? c3 : c2) : c1
    e    = E1 & E2 & E3

### Ports

| port       | dir | width | meaning                     |
|------------|-----|-------|-----------------------------|
| x1, y1     | in  | N     | residues modulo 2^N − 1     |
| x2, y2     | in  | N     | residues modulo 2^N         |
| x3, y3     | in  | N + 1 | residues modulo 2^(N+1) − 1 |
| c_xy       | out | 1     | 1 when X > Y                |
| e          | out | 1     | 1 when X = Y                |

* **Timing:** the whole design is combinational. It has no clock, no
  registers and no reset.
* **Parameter:** the top has one parameter, `N` (default 8, from
  `phi_pkg::N_DEFAULT`). Any N ≥ 2 works; the tests cover N = 3, 4, 5 and 8.
* **Input contract:** inputs must be canonical residues, i.e.
  x1 ≤ 2^N − 2 and x3 ≤ 2^(N+1) − 2. The all-ones code for x1 or x3 is not
  accepted.

## Choices made where the method leaves room

* **Polarity.** c_i and c_xy mean "greater than". The source diagram names
  the outputs but not the relation. The x3 comparator is wired with the X
  side first, so all three stages have the same polarity.
* **Width of the x3 comparator.** The source calls all three comparators
  n-bit, but x3 has n + 1 bits, so the third comparator is n + 1 bits wide.
* **The constant 1 in p2.** The source draws a carry-save stage that adds
  the constant 1 ahead of the p2 adder. Here the 1 enters as the adder's
  carry-in, which gives the same sum.
* **Behavioural parts.** The comparators and the plain adders are written
  with `>`, `==` and `+` and left to synthesis. The source gives their
  function, not their gates.
* **Gate counts.** The row-reduction gate mix follows the equations above:
  n−1 XNOR, 2 XOR, n−1 OR and one majority cell. It does not follow the
  "n + 1 XNOR / n + 1 OR" count quoted for the method.
* **Pipelining.** There is none. The method is presented as a
  combinational circuit.

For scale: the published evaluation of this method at n = 8 (90 nm standard
cells) reports 1.8 ns, 2624 µm² and 0.85 mW, against 2.5 ns, 7298 µm² and
2.11 mW for a reverse converter followed by a 3n-bit comparator. The
method's own unit-gate estimates are (6n + 4) gate delays and (46n + 4)
gate areas. This RTL has not been
characterised against those numbers.

## Files

* `rtl/phi_pkg.sv`: the default word size.
* `rtl/p2_adder.sv`, `rtl/p1_row_reducer.sv`, `rtl/mod_csa.sv`,
  `rtl/mod_adder.sv`: the arithmetic blocks.
* `rtl/drp_generator.sv`: computes (p1, p2) for one operand.
* `rtl/binary_comparator.sv`: gives gt/eq.
* `rtl/phi_comparator.sv`: the top.

The testbenches in `tb/` all check themselves. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. They build their
reference values from plain integers (`tb/tb_phi_ref_pkg.sv`): p1 is
X div (m2·m3) and p2 is (X mod m2·m3) div m3, so the residue formulas
above are not reused.

| testbench                | what it covers |
|--------------------------|----------------|
| `tb_mod_adder`           | all 65,536 input pairs at n = 8, including the double zero |
| `tb_mod_csa`             | 200,000 random row triples |
| `tb_p1_row_reducer`      | every canonical (x1, x3) at n = 8 |
| `tb_p2_adder`            | every (x2, x3) at n = 8 |
| `tb_binary_comparator`   | exhaustive at widths 8 and 9 |
| `tb_drp_generator`       | every X at n = 4; at n = 8, the partition boundaries plus 300,000 random values |
| `tb_phi_comparator`      | every pair (X, Y) at n = 3 (705,600 pairs), plus 300,000 pairs at n = 5 |
| `tb_phi_comparator_full` | default n = 8: every X against X + 1 in both orders, all partition and many section boundaries, 1.5 M random pairs (68 M comparisons, about 15 s) |

The two end-to-end tests draw pairs from the same partition and from the
same section. They count which stage decided each pair: p1, p2, x3 or
equality. A stage that never decided fails the test. All testbenches pass,
and a deliberately broken copy of each block makes its testbench fail.

To run one, for example the full-size test:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/phi_pkg.sv tb/tb_phi_ref_pkg.sv -y rtl -y tb \
        tb/tb_phi_comparator_full.sv --top-module tb_phi_comparator_full
    ./obj_dir/Vtb_phi_comparator_full

To change the word size, set `N` on `phi_comparator`, or change
`N_DEFAULT` in `rtl/phi_pkg.sv`. The reference package uses 64-bit
integers, so the testbenches work for N up to about 20.
