# Modulo 2^n+1 squarer and multiplier: compressor columns and a sparse-tree inverted end-around-carry adder

Arithmetic modulo 2^n+1 shows up in the IDEA cipher (multiplication modulo
2^16+1), in Fermat number transforms and in residue number systems built on the
moduli set {2^n-1, 2^n, 2^n+1}. It is the awkward member of that set: a residue
needs n+1 bits, and a carry out of the top bit is worth 2^n, which is -1 rather
than 0.

This RTL computes

* `x^2 mod (2^n+1)` (squarer), and
* `x*y mod (2^n+1)` (multiplier),

for operands and results in the ordinary weighted representation, 0..2^n, in
n+1 bits. Bit n is set only for the value 2^n. There is no conversion to or
from diminished-1 form. Both units are purely combinational. A result is valid
one propagation delay after the inputs change. There is no clock, register or
reset.

The construction follows a published design that combines three ideas:

1. A **partial-product matrix that is already reduced modulo 2^n+1**. It has n
   columns, and every bit that would land at weight 2^n or above is moved down
   by n places and complemented. The squarer also merges pairs of equal terms.
2. **Columns of MUX-based compressors** (7:2, 5:2, 4:2, 3:2) take the place of a
   full-adder carry-save array. Every carry that leaves the top column comes
   back into the bottom column inverted.
3. A **sparse-tree inverted end-around-carry (EAC) adder** makes the final
   addition. Only every 4th carry comes from a prefix tree, and the sums come
   from conditional-sum blocks.

All the corrections these steps need add up to the constant 3, for every n.
The reduction adds 2 of it as an extra partial-product row. The remaining 1 is
what makes the final modulo 2^n+1 addition equal to a modulo 2^n addition with
an inverted end-around carry.

## The arithmetic behind the matrix

Everything below rests on one identity: for a bit `s` and `k >= n`,

    s * 2^k  ==  ~s * 2^(k-n)  +  2^k      (mod 2^n+1)

A bit that is too heavy is therefore replaced by its complement n places lower,
plus a known constant. Three kinds of bit are moved this way, and the
constants they leave behind are summed:

| moved bits | where | constant left behind (mod 2^n+1) |
|---|---|---|
| product bits of weight >= 2^n (row j has j of them) | partial-product generation | `2^n (2^n - n - 1)` |
| carries out of column n-1, R-2 of them for R rows | reduction ring | `(R-2) 2^n` |
| equal pairs leaving column n-1 (squarer only, m per column) | partial-product generation | `m 2^n` |

For the multiplier R = n+1 and m = 0. For the squarer R = n-m+1. In both
cases the three constants add up to `2^n (2^n - 2) == 3`. So the hardware
computes `sum + carry + 3`, with 2 added as a constant row and 1 left to the
adder.

The operand bit x_n needs no extra rows. When x_n = 1 the operand is exactly
2^n, so every other bit is 0. The terms `x_n y_k` and `x_k y_n` (called q_k) are
therefore ORed into existing terms of the same weight instead of being added.
The term `x_n y_n` has weight 2^2n == 1 and is ORed into bit 0.

## Squarer partial products (`sqr_ppg`)

For squaring, `p(i,j) = x_i x_j` equals `p(j,i)`, and `p(k,k) = x_k`. In the
n x n matrix most columns hold several such equal pairs. Two equal bits at
weight 2^c are one bit at 2^(c+1). Each pair is removed from column c and one
copy is added to column c+1. A pair leaving column n-1 enters column 0
complemented.

Not every column has the same number of pairs. A term merged with q_k has no
twin, and columns with a diagonal term have one pair fewer. So the same number
of pairs, m, is moved out of every column, which keeps all columns the same
height:

| n | pairs moved per column m | rows including the constant 2 |
|---|---|---|
| odd  | (n-3)/2 | (n+5)/2 |
| even | (n-4)/2 | (n+6)/2 |

Where a column has more than m pairs, the pairs with the lowest row are moved.
For n = 7 this reproduces the published example matrix, six rows, up to the
order of the rows. The term tables are computed at elaboration time by
functions in `mod2n1_pkg`, so any n >= 4 works.

## The reduction ring (`ppr_ring`)

All n columns get the same chain of compressors. Every compressor is used as a
counter whose inputs all have the weight of its own column; the carry-in pins
of the 4:2, 5:2 and 7:2 also take ordinary partial-product bits. Its carries go
to the next column up (the 7:2's `cout2` goes two columns up). They are consumed
there by a later stage, never the same one, so the ring has no combinational
loop even though it closes on itself. The carries that leave column n-1 (or
n-2, for weight-4 carries) come back in at the bottom inverted.

The chain is planned by one greedy rule, applied at elaboration time. At each
stage it uses the widest compressor that the available bits can fill. The
order of preference is 7:2 (9 bits), 5:2 (7), 4:2 (5), 3:2 (3). The inputs are
taken in this order: the previous stage's sum, then unused partial products,
then received carries, oldest first. A column is finished when two bits are
left; these two bits form the sum and carry vectors. This rule gives the
published chains where they are printed:

| unit | n | rows | compressors per column, top to bottom |
|---|---|---|---|
| squarer | 7 (default) | 6 | 4:2, 3:2, 3:2 |
| squarer | 8 | 7 | 5:2, 3:2, 3:2 |
| squarer | 16 | 11 | 7:2, 4:2, 3:2, 3:2 |
| squarer | 32 | 19 | 7:2, 7:2, 7:2, 3:2, 3:2 |
| multiplier | 7 | 8 | 5:2, 4:2, 3:2 |
| multiplier | 8 | 9 | 7:2, 3:2, 3:2 |
| multiplier | 16 | 17 | 7:2, 7:2, 5:2, 3:2, 3:2 |

With parameter `USE7 = 0` the plan uses only 5:2, 4:2 and 3:2. For 9 rows it
then gives 5:2, 4:2, 3:2, 3:2, the other drawn alternative.

No matter which compressors are used, reducing R rows to 2 always wraps R-2
carries. A weight-4 carry counts twice: it wraps from column n-2 into column 0,
and from column n-1 into column 1 as `2 * ~c`. The correction therefore stays
at (R-2) 2^n. The ring's contract is

    sum_o + carry_o == sum(rows) + (R-2)      (mod 2^n+1)

## Compressors

All compressors are built from three cells. `mux2` is a 2:1 multiplexer.
`xor_xnor` delivers both a^b and its complement, so that a following MUX can act
as an XOR with no inverter. `cgen` is the carry generator `(x+y)z + xy`.

| cell | equation | notes |
|---|---|---|
| `comp3_2` | x1+x2+x3 = s + 2c | one XOR/XNOR and one MUX deep |
| `comp4_2` | x1+..+x4+cin = s + 2(c + cout) | cout does not depend on cin |
| `comp5_2` | x1+..+x5+cin1+cin2 = sum + 2(carry+cout1+cout2) | wiring read from the published cell drawing |
| `comp7_2` | x1+..+x7+cin1+cin2 = sum + 2(carry+cout1) + 4 cout2 | cout2 has weight 4 |

The published equation for the 7:2 gives both of its extra carries weight 2.
That cannot hold when all nine inputs are 1. The published column drawing
sends one 7:2 carry to weight 2^(i+2), and that is what is built here.

## Final adder (`sparse_ieac_adder`, `csg`)

For n-bit vectors a and b, `|a+b+1| mod (2^n+1) = |a+b+~cout| mod 2^n`, where
cout is the carry out of a+b. Feeding ~cout straight back into the carry-in
would make a loop. Instead, the carry into each bit position i+1 is computed
in closed form:

    C*(i)  = G[i:0] | P[i:0] & ~G[n-1:i+1]
    C*(-1) = ~G[n-1:0]                      (carry into bit 0)

Here g = a&b and p = a|b for each bit, combined with the carry-merge
operator `(g,p) o (g',p') = (g | p g', p p')`.

The sparse tree forms only C*(-1), C*(3), C*(7), and so on (K = 4). It uses
block (G,P) values, a prefix tree upwards from bit 0 and a suffix tree
downwards from bit n-1. The C* values are evaluated as
`~((~P', ~G)[i:0] o (G,P)[n-1:i+1])`, the rearranged form that stays within
log2 n levels. Each 4-bit block (`csg`) ripples two carry rails, one assuming a
block carry-in of 0 and one assuming 1. It forms both sums and picks one with a
2:1 MUX driven by the sparse carry. If n is not a multiple of 4, the top block
is shorter.

Two details differ from the published formulas, and both are needed for
correctness:

* `P' = G | P` is used in the rearranged carry form. With OR propagates, a group
  can generate a carry without propagating one (G = 1, P = 0). The form with
  plain P then returns 0 where the carry is 1.
* The result's bit n is `&(a ^ b)`: it is set when a and b are exactly
  complementary, so that a+b+1 = 2^n. The published text calls it the group
  propagate. With OR propagates that would also be set for a = b = all ones.

## Interfaces

| module | parameters (default) | ports |
|---|---|---|
| `mod2n1_top` | `N` (7) | `sq_x[N:0]` -> `sq_r[N:0]`; `mul_x[N:0]`, `mul_y[N:0]` -> `mul_r[N:0]` |
| `mod2n1_squarer` | `N` (7) | `x[N:0]` -> `r[N:0]` |
| `mod2n1_multiplier` | `N` (7) | `x[N:0]`, `y[N:0]` -> `r[N:0]` |
| `sqr_ppg` | `N` (7) | `x[N:0]` -> `pp[R][N-1:0]`, R = `sq_rows(N)` |
| `mul_ppg` | `N` (7) | `x`, `y` -> `pp[N+1][N-1:0]` |
| `ppr_ring` | `N` (7), `R` (6), `USE7` (1) | `pp[R][N-1:0]` -> `sum_o`, `carry_o` |
| `sparse_ieac_adder` | `WIDTH` (16), `K` (4) | `a`, `b` -> `r[WIDTH:0]` = (a+b+1) mod 2^WIDTH+1 |
| `csg` | `K` (4) | `g`, `p`, `h`, `cin` -> `s` |

Operands above 2^n are outside the function, and the outputs are then
meaningless. The top instantiates the squarer and the multiplier side by side.
They share no logic. `N = 7` is the width of the fully worked squarer example.
The multiplier uses the same default so that the two match. For IDEA, set
`N = 16`. IDEA multiplies 16-bit words modulo 2^16+1 and treats the word 0 as
2^16; the caller can pass that value by setting x[16]. A caller that only
needs n-bit operands ties x[n] to 0.

## Simulating

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/mod2n1_pkg.sv \
        tb/tb_mod2n1_top.sv --top-module tb_mod2n1_top -Mdir obj -o sim
    ./obj/sim

Verilator finds the other modules by name in `rtl/`. Replace the
testbench name to run another. What the testbenches cover:

* `tb_mod2n1_top` runs the top at its defaults (n = 7). It applies all
  129 x 129 multiplier operand pairs and all 129 squarer inputs, and checks
  squarer against multiplier. It counts how often each mechanism occurred: an
  operand of 2^n, a moved pair term set, a carry wrapping around, the final
  carry out 0 and 1, and a result of 2^n. It fails if any count is zero.
* `tb_mod2n1_squarer` covers every input for n = 4, 5, 6, 7, 8 and 9, plus
  random inputs and corner values for n = 16. This includes the worked example
  87^2 mod 129 = 87.
* `tb_mod2n1_multiplier` covers all pairs for n = 4, 5 and 7, and random pairs
  plus 0, 2^n and 2^n-1 for n = 8, 16 and 32.
* `tb_eval_sizes` builds the squarer at n = 4, 8, 12, 16, 20, 24, 28 and 32.
  These are the widths of the published delay and power comparison. Each
  width gets corner values and random inputs. `tb_eval_sizes_mul` does the
  same for the multiplier at 12, 20, 24 and 28 bits, so both units are
  simulated at every width of that comparison.
* `tb_ppr_ring` checks the ring's contract with random rows for five ring
  shapes, and checks the compressor plans against the table above.
* `tb_sqr_ppg` and `tb_mul_ppg` check the row sums against x^2 and x*y.
* `tb_sparse_ieac_adder` tries every pair for 7 and 8 bits, and random pairs
  plus complementary and all-ones operands for 16 and 32 bits.
* The compressors and cells are tested exhaustively. This includes the
  independence of each compressor's cout from its carry inputs.

Compiling takes about 3 minutes for `tb_eval_sizes`, 2.5 minutes for
`tb_eval_sizes_mul` and 1.5 minutes for `tb_mod2n1_multiplier`. The other testbenches compile in seconds.
Every simulation itself finishes in under a second.

Verilator's lint reports UNOPTFLAT on the internal arrays of `ppr_ring`. Each
array is a single variable to Verilator. Bit by bit there is no loop, because
every carry feeds a later stage.

## What is this design's own choice

The following are not fixed by the published description. They were chosen
here:

* The greedy compressor plan, and the order in which bits are assigned to
  compressor pins. Pin order affects delay, not the result.
* Which equal pairs the squarer moves, and the order of terms within a column.
* The internal arrangement of the 3:2 and 4:2 compressors, which are not drawn.
  The pin-level wiring of the 5:2 and 7:2 is a reading of the cell drawings,
  checked against each cell's equation.
* Kogge-Stone style block prefix and suffix trees in the adder, for any width.
  The published 16-bit tree is one specific placement of merge cells.
* Purely combinational units, with no pipeline registers, clock or reset.

The published squarer matrix keeps the x_n x_k terms for k < n. For a legal squarer
input they are always 0, and they are kept here as well.
