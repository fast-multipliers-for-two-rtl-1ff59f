# Serial multipliers for two's-complement numbers

These are bit-serial multipliers for signed (two's-complement) factors. The
factors arrive least significant bit first, and the product leaves in the same
order. The goal is the shortest possible delay from input to output. In three of
the four schemes, product bit `P_k` appears in the same clock cycle as factor
bits `x_k` and `y_k`.

Each multiplier has two parts:

* an **array generator**, which takes the serial bits and produces the terms
  of the multiplication array (the partial-product matrix) a few at a time;
* a **summer**, which adds those terms with *parallel counters* and stores the
  carries it produces. A parallel counter counts the ones on its inputs. Its
  carries come back into the summer at a later bit time, where their weight
  matches.

A two's-complement array contains negative-weight terms, which the summer
cannot handle directly. So each scheme first rewrites the array into an
equivalent one whose terms are all non-negative, where every term is an AND of
two bits, sometimes inverted, or a constant 1. There are three such arrays, and
the generator decides which one is used. The summer then only counts ones.

Four multipliers are provided. `serial_mult_top` places all four side by side,
with the same factor width `N` (default 4):

| | module | generator | array | product bits | input rate |
|---|---|---|---|---|---|
| a | `rd_mult_bw` | rows and diagonals, shift registers, inverting switches | complemented sign terms + two constant ones | `P_k` in cycle `t_k`, 2N-1 (or 2N) bits | 1 bit per cycle |
| b | `rd_mult_se` | rows and diagonals, stack registers | sign-extended | `P_k` in cycle `t_k`, 2N-1 bits | 1 bit per cycle |
| c | `col_mult_sr` | columns, shift + stack register, negator | sign-extended rows, complemented sign row | `P_k` in cycle `t_k`, 2N-1 (or 2N) bits | 1 bit per cycle |
| d | `col_mult_cf` | columns, two opposed shift registers clocked alternately | sign-extended | `P_c` in cycle `N+1+c`, 2N-1 bits | 1 bit per 2 cycles |

## Non-negative arrays

Write `X = -s_x·2^(N-1) + Σ x_i·2^i`, where `s_x = x_(N-1)` is the sign bit, and
write `Y` the same way. The plain array has one negative-weight diagonal (the
`s_x·y_j` terms) and one negative-weight row (the `x_i·s_y` terms).

1. **Complemented sign terms (scheme a).** A number made only of 0 and -1 digits
   equals minus the same pattern read with 1s. Taking minus a number as its
   complement plus one, the negative diagonal and row become:
   * the inverted terms `NOT(s_x·y_j)` and `NOT(x_i·s_y)`, at weights
     `2^(N-1+j)` and `2^(N-1+i)`;
   * a constant 1 at weight `2^N`;
   * a constant 1 at weight `2^(2N-1)`.

   The single term `s_x·s_y` at `2^(2N-2)` keeps its positive weight and is
   **not** inverted.
2. **Sign extension (schemes b and d).** Both factors are extended by repeating
   their sign bits. Then every term of the array, truncated to the product
   width, is a plain AND.
3. **Sign-extended rows, complemented sign row (scheme c).** The first N-1 rows
   are sign-extended. The sign row, `-s_y·X·2^(N-1)`, becomes
   `NOT(x_i·s_y)` at weights `2^(N-1+i)`, with `x_i` sign-extended, plus a
   constant `2^(N-1)`. That constant is spread as
   `1 + 2 + … + 2^(N-2)` plus one more 1 at weight 1.

Product width: a signed N×N product needs 2N bits only for
`(-2^(N-1))·(-2^(N-1))`. If that factor value is excluded, 2N-1 bits are enough.
The default of every multiplier is 2N-1 bits. Those bits are always the true
product modulo `2^(2N-1)`, so for that single pair the top bit reads as the
wrong sign. Schemes a and c also accept `PW = 2N` for the full range. Schemes b
and d stop at 2N-1 bits: b's generator does not produce the `s_x·s_y` term of
weight `2^(2N-1)`, and d's registers are sized for 2N-1 columns.

## Scheme a: rows and diagonals, weights ×4 per step

**Generator (`rd_gen_bw`).** At bit time `t_k` the new bits `x_k` and `y_k`
complete:

* row `R_k`: `r[p] = x_(k-p)·y_k`, for p = 0..N-1;
* diagonal `D_k`: `d[p] = x_k·y_(k-p)`, for p = 1..N-1.

Output index `p` has weight `2^(2k-p)`. So the same wire carries four times the
weight at the next step.

X and Y are shift registers holding the previous N-1 bits. The newest bit comes
straight from the input pin, so the terms of `t_k` exist during `t_k`.

In the sign cycle `t_(N-1)` an XOR array inverts `r[1..N-1]` and all `d[]`,
which gives array 1. After the sign cycle the inputs are gated off and R and D
are 0.

**Summer (`rd_summer_bw`).** This is the part that takes the most care.

* The summer is a row of columns p = -1 … PW-1. Column p holds bits of weight
  `2^(2k-p)` at step k, so its weight moves with the step.
* Each column has a parallel counter. Its possible inputs are:
  * `r[p]` and `d[p]`;
  * a constant 1 at `t_(N-1)` in columns -1 and N-2 (weights `2^(2N-1)` and
    `2^N`);
  * three carry cells from the previous step: the weight-1 count bit of column
    p-2, the weight-2 bit of column p-1, and the weight-4 bit of column p.
* A count bit of weight `2^j` leaving column p lands in column `p-j+2` at the
  next step. The counter outputs cover three adjacent columns, and the feedback
  shifts them two columns right to make up for the ×4 weight change.
* Column k at step k has weight `2^k`, and nothing later can reach it. So its
  weight-1 bit is the product bit `P_k`. The product bits therefore leave from
  a **different column at each step**, on `p_cols[k]`.
* That bit is not fed back. Because of this, the columns to its right stay
  empty.
* `p_bit` is the single-wire form of the product: an OR of the column outputs,
  each ANDed with its own bit time. The gating is needed because the columns to
  the left hold high-weight carries.
* Each counter takes only those inputs that can ever be 1. A carry input
  exists only if its source column can count high enough. This rule is solved
  at elaboration time by `smul_pkg::bw_mask`. For N = 4 the columns -1, 0, 1,
  … get 1, 1, 3, 6, 5, 2, 2, 2 inputs: two pass-through bits, then a (3;2), a
  (6;3) and a (5;3) counter, then (2;2) counters. No column ever has more than
  six inputs.

**Parallel high half (`rd_msp_adder`).** No array term arrives after the sign
cycle. So `P_N … P_(PW-1)` are just the sum of the carries being stored at the
end of `t_(N-1)`. The adder works as follows:

1. It weights the three carry rows; column p at step N has weight `2^(N-p)`
   relative to `P_N`.
2. A row of full adders reduces the three rows to two, with no carry
   propagation.
3. The two rows are added.

The result is on `p_hi` during `t_(N-1)`, so the whole product is known N
cycles after the first bit.

## Scheme b: rows and diagonals, weights ×2 per step

**Generator (`rd_gen_se`).** Two stack registers keep `x_q` and `y_q` at fixed
positions q. Two auxiliary cells hold the newest bits. The outputs are:

* `r[q] = y_k·x_q`, for q ≤ k;
* `d[q] = x_k·y_q`, for q < k.

Output q has weight `2^(k+q)`. After the sign cycle nothing is loaded any more.
The cells keep `s_x` and `s_y`, and R and D stay constant until the end. This
continuing output is exactly the sign extension of both factors.

**Summer (`rd_summer_se`).** Column q has weight `2^(k+q)`. A count bit of
weight `2^j` from column q returns to column `q+j-1`. The weight-1 bit of
column 0 is `P_k`, so the output column is fixed.

* The middle columns 1 … N-2 have (5;3) counters: `r`, `d` and three carry
  cells.
* Column 0 has nothing to its right, so it gets a (4;3) counter.
* The leftmost column N-1 has no counter and no cells. Its single term
  `r[N-1]` passes straight through. A carry landing there at `t_k` would
  have weight `2^(k+N-1)` or more. That could only affect the 2N-1 product bits
  while `k <= N-2`, and at that point the column cannot yet hold a carry. So
  the weight-4 bit of column N-2 is simply dropped.
* For N = 4 this is 8 carry cells. The module needs N >= 3.

## Scheme c: columns, shift and stack register, one counter

**Generator (`col_gen_sr`).**

* X shifts through a register, `xs[s] = x_(k-s)`. After the sign bit, its first
  stage keeps re-entering `s_x`.
* Y is written into a stack register, `ys[s] = y_s`.
* AND gate s pairs `xs[s]` with `ys[s]`, so at `t_k` the gates hold column k of
  array 3.
* The bottom gate, `x_(k-N+1)·s_y`, goes through a **negator**. While `y_(N-1)`
  has not arrived, the negator turns the zero term into 1. These ones at
  `t_0 … t_(N-2)` are the constant `1 + 2 + … + 2^(N-2)`.

**Summer (`col_summer`).** A single (6;3) counter for N = 4. It takes:

* the 4 column terms;
* the weight-2 output, returned after one register stage;
* the weight-4 output, returned after two stages.

The one-stage register is preset to 1. This preset is the remaining 1 of the
constant `2^(N-1)` (the "initial carry"). The weight-1 output is the product.

Example: `X = 1110` (-2) and `Y = 1101` (-3) give `0000110` (+6) in
`t_0 … t_6`.

## Scheme d: columns from counter-flowing registers

**Generator (`col_gen_cf`).** Two shift registers run in opposite
directions. Y enters at the bottom and shifts up; X enters at the top and
shifts down. Each has N plain stages, and AND gate a pairs Y stage `a` (counted
from the Y input) with the X stage facing it, `N-1-a` (counted from the X
input).

* Y shifts in even cycles and X in odd cycles. So in every cycle the two
  streams slide one stage past each other, and the index sum of all facing
  pairs grows by one.
* Each cycle therefore presents one whole column of the sign-extended array.
* After its sign bit, each register keeps re-entering that bit.
* Bits enter at half the column rate: `y_m` in cycle 2m and `x_m` in cycle
  2m+1. The `y_take` and `x_take` outputs say when.
* Late columns need more terms than N facing pairs can give: column c has
  c+1 terms up to c = 2N-2. The missing terms all contain a sign bit. So both
  registers are lengthened by extension stages, which have no partner facing
  them:
  * Y gets `floor(N/2)` stages beyond its plain part. Each is ANDed with the X
    input stage, which holds `s_x` by the time those stages fill.
  * X gets `floor((N-1)/2)` stages beyond its plain part. Each is ANDed with
    the Y input stage, which holds `s_y` by then.
  * For N = 4 this is 6 Y stages, 5 X stages and 4 + 2 + 1 = 7 gates.
* Terms are read from the registers only. Column c is on the gates in cycle
  `N + 1 + c`, so the first product bit leaves while the factors are still
  coming in. Before column 0, every gate sees at least one cleared stage and
  gives 0.

**Summer.** The same single-counter summer as scheme c, with 7 term inputs and
3 feedback lines (weights 2, 4 and 8, returned after 1, 2 and 3 cycles) into a
(10;4) counter. It has no initial carry. The width follows a general bound
(the least w with `2^w - 1 >= T + w - 1` for T terms). At N = 4 counts of 8
occur only in columns 5 and 6. Their weight-8 carry would land beyond the
7-bit product, so at this size the weight-8 line never carries a 1.

## Interface and timing

All multipliers share these conventions:

* One clock, with asynchronous active-low reset `rst_n`.
* `start` is high in the first cycle of an operation. For a, b and c that cycle
  is `t_0`, and it carries `x_0` and `y_0`.
* For a, b and c: `x_k` and `y_k` are presented in `t_k`, for k < N, sign bit
  last. Later input bits are ignored. `P_k` is valid combinationally in `t_k`,
  for k = 0 … PW-1, while `p_valid` is high.
* For d: bits are sampled when `x_take` or `y_take` is high. `P_c` is valid in
  cycle `N+1+c`, and one operation takes `3N` cycles.
* All state is cleared at the clock edge that ends the last product bit, and
  while idle. A new `start` may follow immediately.
* `step_timer` produces the bit-time count `k`. It drives the sign-cycle
  switches, the constant ones and the output gating.

Because a, b and c produce `P_k` combinationally from `x_k` and `y_k`, a chain
of these multipliers has a combinational path through each one. To break the
path, put a register on `p_bit`.

## Choices made in this implementation

These points are this implementation's own, or settle points that the original
scheme leaves open:

* **Scheme a, `s_x·s_y` term.** The switch array inverts 2N-2 terms, not all
  2N-1 outputs: `r[0] = s_x·s_y` passes unchanged. Inverting it as well gives a
  wrong product, for example (-1)·(-1).
* **Scheme a output bit.** The output column's weight-1 bit is explicitly kept
  out of the carry cells.
* **Scheme b counters.** The middle columns use (5;3) counters, the most
  inputs they can receive. The original drawing labels one of them as a
  six-input counter. That label is not followed here.
* **Scheme d registers.** The stage counts and the gates of the extension
  stages were worked out from the register contents drawn for N = 4, and are
  generalised to any N by the formulas above. Each cycle of this design is one
  half period of the original two-phase clock. Sign extension re-enters the
  sign bit at each register's input.
* **Framing.** The start pulse, gating inputs off after the sign bit, and
  clearing at the end of an operation are this implementation's own framing.
  The original scheme does not specify them.
* **Parallel counters.** Written as plain sums of their inputs; synthesis
  chooses the gate structure.

## Simulation

Every module has a self-checking testbench in `tb/`, named `<module>_tb.sv`.
Each ends by printing `TB_RESULT checks=N failures=M`.

* The multiplier and summer benches run all `2^(2N)` factor pairs back to back.
  They put random bits on the inputs after the sign bit, and check every
  product bit in its own cycle against the integer product.
* The generator benches check every output term in every cycle against the
  array formulas above.
* `serial_mult_top_tb` runs the four multipliers together at default size. It
  checks all products, and counts each mechanism: sign-cycle inversion, carry
  feedback, held sign-extended terms, negator ones, the initial carry, weight-4
  feedback, counter-flow sampling, the parallel high half, and back-to-back
  and gapped operations. It fails if any of them never occurs.

To run a bench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/smul_pkg.sv \
          tb/serial_mult_top_tb.sv --top-module serial_mult_top_tb -Mdir obj -o sim
./obj/sim
```

Replace the bench name to run any other. Each one finishes in well under a
second.

All four multipliers have also been run exhaustively at N = 3, 5, 6 and 8,
with the same testbenches and only their `N` changed. No mismatches were
found.

To change the factor width, set `N` on `serial_mult_top` or on a single
multiplier. All widths, counter sizes and register lengths follow from `N`. The
testbenches use `localparam int N = 4`, and their exhaustive loops grow as
`4^N`.

## Files

* `rtl/smul_pkg.sv`: counter-width helper functions.
* `rtl/par_counter.sv`: the (m;k) parallel counter.
* `rtl/step_timer.sv`: bit-time counter.
* Scheme a: `rtl/rd_gen_bw.sv`, `rtl/rd_summer_bw.sv`, `rtl/rd_msp_adder.sv`,
  `rtl/rd_mult_bw.sv`.
* Scheme b: `rtl/rd_gen_se.sv`, `rtl/rd_summer_se.sv`, `rtl/rd_mult_se.sv`.
* Scheme c: `rtl/col_gen_sr.sv`, `rtl/col_summer.sv`, `rtl/col_mult_sr.sv`.
* Scheme d: `rtl/col_gen_cf.sv`, `rtl/col_mult_cf.sv` (it reuses
  `col_summer`).
* `rtl/serial_mult_top.sv`: all four side by side.
