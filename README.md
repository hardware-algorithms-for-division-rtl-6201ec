# Array divider and square rooter with redundant binary remainders

Classic subtract-and-shift division and square rooting are slow in
combinational form because every row of the array waits for a full borrow
chain: n rows of n-bit subtraction give O(n^2) delay. These two circuits keep
every partial remainder in **redundant binary** (signed digits -1, 0, +1, radix
2). In that form a subtraction needs no carry chain: each result digit depends
on only a few neighbouring input digits, so a row has constant delay and the
whole n-row array is O(n) deep, with O(n^2) cells in a regular grid.

The price is that the remainder's sign is no longer visible from one bit.
Each row therefore picks its quotient (or root) digit from {-1, 0, +1} by
looking at the **three leading digits** of the remainder only; the digit 0
means "just shift". The result comes out as a signed-digit number and one
ordinary binary subtraction at the end turns it into binary.

Two designs are provided, side by side in `rb_divsqrt_top`:

| unit        | operands                     | result                     | accuracy                 |
|-------------|------------------------------|----------------------------|--------------------------|
| `rb_divider`| 1/2 <= X < 1, 1/2 <= Y < 1   | Q = X/Y, 1 integer + N fraction bits | \|Q - X/Y\| < 2^-N |
| `rb_sqrt`   | 1/4 <= X < 1                 | Q = sqrt(X), 1 integer + N fraction bits | \|Q - sqrt X\| < 2^-N |

Both are purely combinational: no clock, no reset, no handshake. The result
is the operand's truncated or rounded-up value (it is not always the
truncated one); which of the two depends on the digits the array selects.

## Number format

Operands are unsigned binary fractions `[.x1 x2 .. xN]`. In every port vector
bit `N-i` carries the digit of weight 2^-i (MSB first, as usual); result
vectors have one more bit on top for weight 2^0.

A signed digit is held on two rails, `sd_t = {p, n}` in `rb_pkg`, with value
p - n (`{1,1}` never occurs). A whole signed-digit number is then simply two
binary words, its +1 digits and its -1 digits, and its value is their
difference. The arrays bring the digit words of their result out (`*_pos`,
`*_neg`) beside the binary result.

## The add/subtract cell (`rb_addsub_cell`)

One cell handles one digit position of `x - m*y`, where `x` is a remainder
digit, `y` an operand digit and `m` the digit chosen for the row (broadcast
along the row). With `a = -m*y` the pair `(x, a)` sums to -2 .. 2, which is
split into an intermediate carry `c` (to the next higher position) and an
intermediate sum `s`. For the ambiguous sums +1 and -1 the split depends on a
single flag from the next lower position, "that pair has no -1 digit":

| x + a | lower pair has no -1 | lower pair has a -1 |
|-------|----------------------|---------------------|
| +2    | c=+1, s=0            | c=+1, s=0           |
| +1    | c=+1, s=-1           | c=0,  s=+1          |
| 0     | c=0,  s=0            | c=0,  s=0           |
| -1    | c=0,  s=-1           | c=-1, s=+1          |
| -2    | c=-1, s=0            | c=-1, s=0           |

The output digit is `s + c_in`. Because a pair with no -1 can only send a
carry of 0 or +1, and a pair with a -1 only 0 or -1, that sum never leaves
{-1, 0, +1}. A result digit therefore depends on its own pair and the two
pairs below it, and nothing propagates further. This is the standard
signed-digit addition rule; it is this implementation's choice of cell.

## Digit selection (`digit_select`)

The sign of a signed-digit number is the sign of its leading nonzero digit,
so "sign of the three leading digits" is a three-way priority choice with no
arithmetic. The same cell serves both arrays.

## Division array (`rb_divider`)

The array evaluates R_{j+1} = 2 R_j - q_j Y with R_0 = X:

* Row 0 is fixed: q0 = 1, R_1 = X - Y (no doubling).
* Row j = 1 .. N-1 selects q_j = sign of the leading digits `[r0 . r1 r2]` of
  R_j, then forms 2 R_j - q_j Y with one cell per digit position. The doubling
  is only wiring: digit i of R_j feeds the cell one position to the left.
* q_N is selected from R_N; R_{N+1} is not needed.

Since |R_j| < Y every step (when the leading digits are positive, R_j is
positive; when they are zero, |R_j| < 1/4 <= Y/2), the remainder never
escapes and the quotient digits [q0 . q1 .. qN] approximate X/Y to 2^-N.

**Leading-digit fold.** Doubling R_j moves r0 to weight 2^1, and the cell
at that position can carry into 2^2, so a row produces two digits above the
binary point's usual place. The true value of R_{j+1} lies in (-1, 1),
and the digits below 2^0 add up to less than 1 in magnitude, so the three
digits of weight 2^2, 2^1 and 2^0 must sum to -1, 0 or +1. A small
constant-size block adds them (4c + 2z + z') and that value becomes the new
r0. This keeps every remainder in the same N+1 digit frame. The same
argument applies in the square rooter.

## Square-root array (`rb_sqrt`)

The array evaluates

    R_{j+1} = R_j - q_j (2 Q_{j-1} + q_j),   q_j = p_j 2^-j,   Q_j = Q_{j-1} + q_j

from R_1 = X and p_1 = 1 (first row: R_2 = X - 1/4). Row j picks p_j from the
three leading digits of R_j, which occupies the weights 2^-(j-2) .. 2^-2j.
There is no shift between rows. Instead each row reaches two positions
further down, and the operand bits below 2^-2j join the remainder in later
rows.

The subtrahend needs no multiplier. Shifted by 2^-j, the digits of
2 Q_{j-1} + q_j are the root digits found so far, p_1 .. p_{j-1} (weights
2^-j .. 2^-(2j-2)), then a 0, then p_j at 2^-2j. Each cell gets one of them and
multiplies it by the row's p_j: a single-digit product, which is a sign
flip or zero. The leading digits are folded as in the divider. The binary
root has an integer bit because a root rounded up from just below 1 comes out
as exactly 1.0 (for example sqrt(1 - 2^-N)).

## Pruning the low-order cells (`PRUNE`)

Because a digit of a row's result depends on only three digits of its
input, a remainder digit far enough to the right can never reach the leading
digits that select the last quotient or root digit. Those cells can be left
out. With `PRUNE = 1` (default):

* divider: row j keeps digits 0 .. 2 + 3(N-j) of R_j, so rows beyond about
  2N/3 get shorter;
* square rooter: row j keeps digits down to weight 2^-(3N-2j), so rows
  beyond 3N/4 get shorter.

The selected digits, and hence the results, are bit-identical to the full
array's (`PRUNE = 0`); the testbenches check this. A cheaper addition rule
specialised to the divider, where all digits of q_j Y share one sign, would
let the divider prune from about N/2 instead. That rule is not implemented.

## Final conversion (`rb2bin`)

The signed-digit result is known to be positive, so its value is (+1 digits)
minus (-1 digits), one W-bit subtraction. It is written as the `-` operator,
so synthesis chooses ripple or carry-look-ahead. This stage is the only carry
chain in either unit.

## Where this departs from, or adds to, the algorithm as published

* The digit encoding, the addition rule inside the cell, the leading-digit
  fold and the priority-mux selection cell are this design's own choices;
  the algorithm only requires constant-time signed-digit addition and the
  three-digit sign rule.
* Because the addition rule differs, the intermediate signed digits can
  differ from hand-worked examples done with another rule. The binary
  results still meet the same error bound. For instance, 0.10011101 /
  0.11000101 gives 0.11001100 and sqrt(0.10001101) gives 0.10111110.
* The pruning boundary for the divider (about 2N/3) follows from this cell's
  dependency range. It is later than the N/2 that a shorter-range rule allows.
* Both results carry an extra integer bit.
* Putting both units in one top module is a packaging choice; they share no
  hardware.
* Published gate depths and sizes for 4-input NOR/OR realisations are not
  reproduced: the RTL is not mapped to such gates.
* Not built: a sequential (iterative) version reusing one row of cells with
  a shifter, which is mentioned as an alternative implementation.

## Files

| file | contents |
|------|----------|
| `rtl/rb_pkg.sv` | digit type `sd_t` and small digit helpers |
| `rtl/rb_addsub_cell.sv` | carry-free add/subtract cell |
| `rtl/digit_select.sv` | three-digit sign selection cell |
| `rtl/rb2bin.sv` | signed-digit to binary converter |
| `rtl/rb_divider.sv` | division array, parameters `N` (8), `PRUNE` (1) |
| `rtl/rb_sqrt.sv` | square-root array, parameters `N` (8), `PRUNE` (1) |
| `rtl/rb_divsqrt_top.sv` | both arrays side by side, parameter `N` (8) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_rb_table2_sizes` |

`N` must be at least 3. The default N = 8 is the width of the worked
examples; 16, 32, 64 and 128 are other sizes of interest.

## Verification

Every testbench computes its expected results independently with integer
arithmetic, prints `TB_RESULT checks=<n> failures=<m>`, and has a watchdog.

* `tb_rb_addsub_cell`: every input combination of a single cell (value
  identity, carry promise, digit validity), plus random 8-digit rows.
* `tb_digit_select`: all 27 digit triples.
* `tb_rb2bin`: random nonnegative digit strings, W = 12.
* `tb_rb_divider`: all 16384 normalized operand pairs at N = 8; random pairs
  at N = 16 and 64; pruned vs. full array digit equality at N = 8 and 64.
* `tb_rb_sqrt`: every operand at N = 8 and N = 16 (49152 values); random at
  N = 64; pruned vs. full digit equality at N = 16 and 64.
* `tb_rb_divsqrt_top`: the top at its defaults, every normalized division and
  every square-root operand. It counts how often each row took each of the
  three actions (subtract, add, shift) in each unit and fails if one never
  occurs.
* `tb_rb_table2_sizes`: random operands at N = 16, 32, 64 through the top.

N = 128 is accepted by the RTL but was not simulated: verilator's C++ build
of arrays that size takes too long for routine use. The leading-digit fold
relies on the remainder bound. For the divider the bound is proven above; for
the square rooter it is backed by the exhaustive runs at N = 8 and 16 and the
random runs at larger sizes, not by a proof.

## Simulating

With verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rb_divsqrt_top \
        rtl/rb_pkg.sv rtl/rb_addsub_cell.sv rtl/digit_select.sv rtl/rb2bin.sv \
        rtl/rb_divider.sv rtl/rb_sqrt.sv rtl/rb_divsqrt_top.sv tb/tb_rb_divsqrt_top.sv
    ./obj_dir/Vtb_rb_divsqrt_top

Any other testbench builds the same way with its own top module name. Build
time grows quickly with N: the N = 64 testbenches take a few minutes to
compile.
