# GF(p) elliptic-curve point adder on the Krestenson matrix

This design adds two points of an elliptic curve over a prime field GF(p).
It never uses a hardware multiplier. Every modular product comes from a
precomputed table of powers of two modulo p, the *Krestenson matrix*. The
table turns `a*b mod p` into a sum of table entries, and each partial sum
needs only one comparison and at most one subtraction to stay below p.
Each point addition is one fixed schedule of 11 steps. A step is one modular
multiplication, with the additions, subtractions and halvings of that step
running alongside it. The width does not change the number of steps, only
the length of each one.

The default configuration has 92-bit field elements split into four 23-bit
words. A multiplication then takes 17 clocks and a point addition 188 clocks,
which is about 234,000 point additions per second at a 44 MHz clock.

## The point addition

P1 = (x1, y1) is affine. P2 = (X2, Y2, Z2) is Jacobian, where the affine
point is (X2/Z2², Y2/Z2³). The sum is returned in Jacobian coordinates:

    l1 = X1·Z2²        l3 = l1 − X2        l7 = l1 + X2
    l4 = Y1·Z2³        l6 = l4 − Y2        l8 = l4 + Y2
    Z3 = Z2·l3
    X3 = l6² − l7·l3²
    l9 = l7·l3² − 2·X3
    Y3 = (l9·l6 − l8·l3³) / 2

The sum is 11 multiplications, 2 additions, 5 subtractions and 2 halvings.
There is one unit of each kind, and they are grouped into the steps below.
A result is written to the register file when its unit finishes, and it can
be read by any later step.

| step | multiplier        | adder     | subtractor            | halver        |
|------|-------------------|-----------|-----------------------|---------------|
| 1    | Z2·Z2             |           |                       |               |
| 2    | X1·Z2²  → l1      |           |                       |               |
| 3    | Z2²·Z2            | l1 + X2   | l1 − X2               |               |
| 4    | Y1·Z2³  → l4      |           |                       |               |
| 5    | l3·l3             | l4 + Y2   | l4 − Y2               |               |
| 6    | l6·l6             |           |                       | l8/2          |
| 7    | l7·l3²            |           |                       |               |
| 8    | l3²·l3            |           | l6² − l7·l3² → X3     | (l7·l3²)/2    |
| 9    | (l8/2)·l3³        |           | (l7·l3²)/2 − X3 = l9/2 |               |
| 10   | (l9/2)·l6         |           |                       |               |
| 11   | Z2·l3 → Z3        |           | (l9/2)·l6 − (l8/2)·l3³ → Y3 |         |

The halving is folded in early. Step 9 forms l9/2 directly, so
`Y3 = (l9/2)·l6 − (l8/2)·l3³` needs no halving at the end.

The multiplication is the longest operation of a step: 4W+1 clocks, against
W+3 for the adder and subtractor and 1 for the halver. So each step lasts
exactly one multiplication. The next step is issued in the cycle the
multiplication finishes. Steps 2, 3, 4, 5, 8, 9 and 11 read a product in that
same cycle, so the register file writes through and a value being written is
forwarded to its readers. One addition therefore takes

    1 (load) + 11·(4W+1) clocks,   W = ceil(N/23)

## The Krestenson-matrix multiplier (`kr_multiplier`)

Write a = Σ aᵢ2ⁱ and b = Σ bⱼ2ʲ. Then

    a·b mod n = Σ over all (i, j) with aᵢ = bⱼ = 1 of  m(i,j)  (mod n),
    m(i,j) = 2^(i+j) mod n.

Every m(i,j) is below n. Adding two such values, or a value and a reduced
partial sum, gives less than 2n, so one compare-and-subtract reduces it.
No wider intermediate is ever formed.

The sum is taken in two phases:

1. **Row phase.** All N rows work in parallel. Row i accumulates
   rᵢ = Σⱼ bⱼ·m(i,j) mod n, which equals 2ⁱ·b mod n.
2. **Column phase.** The vector of row sums is summed again, with row i
   taken when aᵢ = 1. The result is z = Σᵢ aᵢ·rᵢ mod n.

Each phase covers its N entries in S = 2W slices of C = ceil(N/S) entries,
one slice per clock. For N = 92 that is 8 slices of 12. A slice and the
running sum go through a balanced tree of two-input modular adders: 16 leaves
and 4 levels for C = 12. The latency is 1 load clock + S row clocks + S
column clocks = 4W+1. The row phase uses N such trees and the column phase
one.

m(i,j) depends only on i+j, so the matrix holds only 2N−1 distinct values.
`kr_matrix` stores tbl[k] = 2^k mod n for k = 0…2N−2, and the multiplier reads
tbl[i+j]. The table is built when a modulus is loaded: tbl[0] = 1, then
doubling with one conditional subtraction, one entry per clock, 2N−1 clocks
in all. It changes only with the modulus, so in normal use it is built once
per curve.

## Word-serial adder and subtractor (`mod_adder`, `mod_subtractor`)

The operands are taken as W words of 23 bits, least significant word first.
In each clock the adder adds one pair of words with the carry from the
previous word. In the same clock it subtracts the matching word of n from
the new sum word, with its own borrow chain. After W clocks it holds both
Z = a+b and Z−n. Since a, b < n, Z < 2n. The result is Z−n when Z ≥ n, that
is when the sum carried out of the top word or the subtraction did not
borrow. Otherwise it is Z. A decision clock and an output clock follow.
Latency is W+3 clocks, 7 at 92 bits.

The subtractor mirrors this. It forms D = a−b and, in the same clock, D+n.
When the subtraction borrows out of the top word, a < b and the result is
D+n. Otherwise it is D.

`mod_halver` computes a/2 mod p in one clock. An even a is shifted right.
An odd a has p added first, which makes the sum even, and is then shifted.

## Modules

| module           | role                                                   |
|------------------|--------------------------------------------------------|
| `ec_point_adder` | top: units, write-through register file, modulus port  |
| `pa_controller`  | issues the 11 steps, one per multiplication            |
| `ecc_pkg`        | register names, micro-operation word, the step table   |
| `kr_matrix`      | builds and holds 2^k mod p                             |
| `kr_multiplier`  | a·b mod p by row and column sums of the matrix         |
| `mod_adder`      | a+b mod p, word-serial                                 |
| `mod_subtractor` | a−b mod p, word-serial                                 |
| `mod_halver`     | a/2 mod p                                              |

Parameters: `N` is the field-element width (default 92). `WORD` is the word
width (default 23). Both must be positive, and W = ceil(N/WORD).

### Top-level interface and timing

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; active-low synchronous reset |
| `mod_load`, `modulus[N]` | in | load an odd prime p and rebuild the table |
| `mod_ready` | out | rises 2N−1 clocks after the load clock |
| `start` | in | sampled while `!busy && mod_ready`; ignored otherwise |
| `x1, y1, x2, y2, z2 [N]` | in | affine P1, Jacobian P2, all below p, sampled with `start` |
| `busy` | out | addition in progress |
| `done` | out | one-clock pulse 11·(4W+1)+1 clocks after `start` |
| `x3, y3, z3 [N]` | out | Jacobian sum, valid from `done` until the next `start` |

Cycle counts at the sizes this design was checked at:

| N (bits) | W | multiplication | point addition |
|---------:|--:|---------------:|---------------:|
| 69  | 3 | 13 | 144 |
| 92  | 4 | 17 | 188 |
| 115 | 5 | 21 | 232 |
| 138 | 6 | 25 | 276 |
| 161 | 7 | 29 | 320 |
| 184 | 8 | 33 | 364 |

These counts reproduce the published FPGA rates exactly, taking the clock
rates implied by those figures. At 92 bits and 44 MHz, 44 MHz / 188 = 234,043
additions/s. The clock rate itself is a property of the FPGA implementation
and is not modelled here.

## What is this design's own, and where it departs

The formulas, the 11-step grouping, the unit latencies (4W+1 for a
multiplication, 7 clocks for a 92-bit modular sum) and the two-phase
row/column summation of the matrix follow the published method. The
following are choices of this design:

- **Slice width of the multiplier.** The method gives the latency but not
  how the matrix sum is spread over the clocks. Here it is 2W slices per
  phase, each summed by an adder tree.
- **Table storage.** Only the 2N−1 distinct values are stored, not the full
  N×N matrix split by words. The table is built by serial doubling.
- **Adder inside the multiplier.** The published word-serial adder is also
  described as the building block of the multiplier's multi-operand sums.
  Here the multiplier uses its own combinational compare-and-subtract adders,
  so that a whole slice fits in one clock.
- **Stage split of the adder and subtractor.** W word clocks, then a decision
  clock and an output clock. This matches the 7 clocks quoted for 92 bits.
  The split itself is this design's own.
- **Schedule details.** The published schedule also lists a halving of l6
  and, in step 10, the product (l6/2)·l9. That conflicts with its steps 9 and
  11, which use l9/2 and (l9/2)·l6. This design follows steps 9 and 11, so
  the l6 halving is not issued. The step-8 operation l6² − l7·l3² is a
  subtraction and runs on the subtractor.
- **Forwarding register file, handshake, reset and the ignored-start rule**
  are not specified by the method.
- **Not handled:** P1 = ±P2, a point at infinity as input, and point doubling.
  The caller must avoid these cases. The scalar multiplication around the
  adder is not part of the design either.

## Verification

Every testbench checks itself, ends with a `TB_RESULT checks=… failures=…`
line, and has a watchdog. Reference values come from plain wide-integer
arithmetic in `tb/tb_ref_pkg.sv` (`*`, `%`, inversion by Fermat's little
theorem), never from the circuits under test.

| testbench | what it checks |
|-----------|----------------|
| `tb_mod_adder`, `tb_mod_subtractor` | edge cases and 300 random pairs mod 2^92−83; latency 7 |
| `tb_mod_halver` | 2z ≡ a, z < p, 1-clock latency |
| `tb_kr_matrix` | every entry 2^k mod p for two moduli; 2N−1 clocks |
| `tb_kr_multiplier` | edge cases and 150 random products; latency 17 |
| `tb_pa_controller` | the 11 issued steps against the schedule table; back-to-back issue; done at 11L+1 for two latencies; start ignored while busy |
| `tb_ec_point_adder` | full default size: chained additions under two moduli (2^92−83 and 2^89−1), each checked against the formulas and against the affine chord rule λ = (y2−y1)/(x2−x1); 188 clocks; counts table reloads, ignored starts, adder reductions, subtractor wraps, odd halvings and forwarded results, and fails if any never happened |
| `tb_ec_point_adder_sizes` | the same at 69, 115, 138, 161 and 184 bits, side by side |

For the chord-rule check, any two points with distinct x lie on some curve
y² = x³ + ax + b. So a random pair of affine points is a valid input, and
the affine sum over that curve is an independent reference.

### Running a testbench with Verilator

From the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal --top-module tb_ec_point_adder \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ecc_pkg.sv tb/tb_ref_pkg.sv tb/tb_ec_point_adder.sv -o sim
    ./obj_dir/sim

Replace the top module and file for the other testbenches. The sizes test
takes a couple of minutes to compile, because it builds five instances of
the multiplier with 69 to 184 parallel row trees.

## Cost

The table is (2N−1)·N flip-flops, about 16.8 kbit at N = 92. The row sums
take N·N flip-flops, about 8.5 kbit. The row phase has N adder trees of C
two-input modular adders, 92×15 at the default, each an N-bit add followed
by a compare and a subtract. This area is the price of a multiplication with
no multiplier. The multiplier dominates the design. The adder, subtractor,
halver and the 25-entry register file are small next to it.
