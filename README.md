# Digit-serial systolic divider for GF(2^m)

This design computes C(x) = A(x) / B(x) mod G(x) in the binary field GF(2^m),
with polynomials in the standard basis. Operands go in and results come out
as L-bit digits, one digit per clock. The work is spread over a one-way chain
of 2m/L identical cells. The digit size L sets the trade-off:

| | |
|---|---|
| rate | one quotient every m/L cycles |
| latency | 5m/L − 1 cycles, first operand digit in to last quotient digit out |
| hardware | 2m/L cells, each with L row controllers and L² one-bit coefficient cells, so O(L·m) in total |

With L = 1 this would be a bit-serial divider. With L = m it is a fully
unrolled one that takes a new operand pair every cycle. The defaults are
m = 6 and L = 3: four cells, two digits per word, one quotient every 2
cycles, 9 cycles of latency.

The field polynomial G(x) enters with the operands, so one divider works for
any field of degree m. G must be irreducible and B must be nonzero.

## The algorithm

The divider runs 2m iterations of a Euclid-type algorithm. It keeps five
polynomials, a one-bit `state` and a small counter `count`:

```
R = B; S = G; U = A; V = T = 0; state = 0; count = 0
repeat 2m times:
    R = x*R;  T = x*T mod G
    if state == 0:
        count += 1
        if r_m:  (R, S) = (R + S, R);  T = U;  state = 1       # (I) + (II)
    else:
        count -= 1
        if r_m:  R = R + S;  T = T + U                         # (II)
    if count == 0:
        V = T + V;  swap(U, V);  state = 0                      # (III)
result: V
```

Here r_m is the coefficient of x^m of x·R. S always has degree exactly m, so
its top coefficient is never stored. R, T, U and V always have degree below
m. `count` stays between 0 and m.

Each iteration splits into two parts:

* a **control part**, which looks only at r_m, `state` and `count`, and
  derives three control signals:
  * Ctrl1 = (state = 0) ∧ r_m
  * Ctrl2 = r_m
  * Ctrl3 = (count becomes 0)
* a **coefficient part**, which applies the selected operations (I), (II)
  and (III) to coefficient j of every polynomial. Coefficient j of the new R
  and T uses coefficient j−1 of the old ones, because of the multiplication
  by x. Everything else uses coefficient j.

Unrolled over the 2m iterations, this gives an array of 2m rows. Each row
has one control cell (`gf_type1_cell`) and m coefficient cells
(`gf_type2_cell`).

### The count as a moving flag

The control part must know at once whether `count` has returned to zero.
Comparing a binary counter across the array would be slow, so the count is
kept as a one-hot flag over the columns: it sits at column m − count.
Column m belongs to the control cell, and its flag bit is the C-zero signal.

* In state 0 the count grows, and each coefficient cell takes the flag from
  column j+1 (the "Inc" input).
* In state 1 the count shrinks, and each cell takes it from column j−1 (the
  "Dec" input).

So C-zero after an iteration is simply state ∧ (flag at column m−1).

## From rows to a digit-serial cell

This part is the hardest to follow, and everything in `gf_ds_cell` depends
on it.

A word is streamed most significant digit first. Digit d carries
coefficients m−1−dL down to m−L−dL, and lane p of the digit carries
coefficient m−1−dL−p. A cell performs L consecutive rows (L iterations).

The rows of a cell cannot all work on the same coefficients in the same
cycle. Row k needs coefficient j−1 of row k−1 to produce its own
coefficient j, and lower coefficients arrive later. The cell therefore
skews the rows: **in the cycle of digit d, lane p of row k handles
coefficient**

    j = m + k − d·L − p

Each row is one coefficient behind the row above it. With this skew, three
things hold:

* **Bit j−1 of the row above** (the x·R and x·T shift) comes from the same
  lane in the same cycle. It is a combinational path through L rows; this
  path sets the cell's critical delay.
* **Bit j of the row above** (S, U, V, G) comes from lane p−1. Lane 0 takes
  a registered copy of the previous cycle's lane L−1.
* **The flag of bit j+1** (the Inc input) comes from lane p−2. Lanes 0 and 1
  use registered copies of lanes L−2 and L−1.

A row's control cell works at "column m". That position falls in lane k of
the first cycle of a word, the cycle with `ct = 0`. In that cycle the row
splits:

* Lanes p > k start the new word, using the controls the row computes in
  that cycle.
* Lanes p ≤ k finish the previous word, coefficient k−p, using controls
  held from the previous word.

The row controller `gf_type3_cell` produces both sets of controls. It keeps
a four-bit holding register (state, Ctrl2, Ctrl3, t_{m−1}) that loads when
`ct = 0` and holds for the rest of the word. Ctrl1 is rebuilt from the held
state and Ctrl2.

Three more details complete the cell:

* **Zeros at the bottom of a word.** In the `ct = 0` cycle, lane k of row k
  produces coefficient 0 of the old word. Its shifted inputs r, t and f
  would come from the new word's coefficient m−1. An AND gate forces them
  to zero. That is 3 gates per row, 3L per cell.
* **The flag entering column m−1** must be the C-zero of the row above, not
  a lane's flag bit. A multiplexer per row makes this choice in the
  `ct = 0` cycle. For the last row it happens one cycle later, from the row
  above's held C-zero.
* **Cell delay.** After L rows the skew amounts to exactly one digit, so the
  cell's output is again digit-aligned. It comes out two cycles after the
  input: one cycle of output register plus the one-digit skew. `ct`, and the
  state and C-zero of the last row, travel to the next cell on two-cycle
  delay lines so that they arrive with that cell's `ct = 0`.

Chaining 2m/L such cells makes the divider. Operand digit 0 enters in
cycle 0. Quotient digit d leaves in cycle 4m/L + d, so the last digit
leaves in cycle 5m/L − 1.

## Interface (`gf_ds_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `ct_in` | in | 1 | 0 on the first digit of each word, 1 on the others (sequence 0 1 … 1 of length m/L) |
| `a_in`, `b_in`, `g_in` | in | L | one digit of A, B and G (G without its x^m term). Bit L−1 is the highest coefficient of the digit. |
| `ct_out` | out | 1 | 0 on the first digit of each quotient |
| `c_out` | out | L | one digit of C, same format |

Words may follow each other back to back. There is no valid/ready
handshake. A word of don't-care data simply produces a don't-care quotient,
still framed by `ct_out`. Once `ct_in` has first gone low, an assertion
checks that it has period m/L.

Example, m = 6 and L = 3, with A = 0x15, B = 0x06 and G = x^6 + x + 1
(`g` = 0x03):

| cycle | 0 | 1 | 2 | … | 8 | 9 |
|---|---|---|---|---|---|---|
| `ct_in` | 0 | 1 | 0 (next word) | | | |
| `a_in` | 3'b010 | 3'b101 | … | | | |
| `ct_out` | | | | | 0 | 1 |
| `c_out` | | | | | C[5:3] | C[2:0] |

## Modules

| module | role |
|---|---|
| `gf_div_pkg` | `lane_t` (one coefficient of R, S, U, V, T, G and the count flag) and `ctl_t` (a row's controls) |
| `gf_type1_cell` | control equations of one iteration, combinational |
| `gf_type2_cell` | one coefficient of one iteration, combinational |
| `gf_type3_cell` | Type-1 cell plus the holding register for a row's controls |
| `gf_ds_cell` | L rows × L lanes with the skewed schedule, registers and zero gates |
| `gf_ds_divider` | top: 2m/L cells in a chain, operand formatting, protocol assertion |

Parameters: `gf_ds_divider` has `M` (field degree, default 6) and `L`
(digit size, default 3). `gf_ds_cell` has only `L`: a cell does not depend
on m, because the word length is set by the `ct` sequence. L must divide m
and must be at least 2.

Cost per cell after synthesis at L = 3: 57 flip-flops (17L + 6) and about
200 logic cells. The top at the defaults has 176 flip-flops; synthesis
removes registers that only ever carry constants.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_gf_type1_cell` | all 8 input combinations against the algorithm's control rules |
| `tb_gf_type2_cell` | all 4096 consistent input combinations against a step-by-step replay of one iteration |
| `tb_gf_type3_cell` | 2000 random cycles: live controls, and held controls that change only after `ct = 0` |
| `tb_gf_ds_cell` | one cell (L = 3) on 2-digit and 4-digit words with random legal algorithm states: outputs match L software iterations and arrive two cycles later |
| `tb_gf_ds_divider` | the divider at its defaults, 200 words back to back with bubbles. Every quotient is checked against A·B^(2^m−2) mod G and by C·B = A. Also checks the 4m/L and 5m/L − 1 cycle timing, the m/L-cycle spacing, and that operations I, II and III each occurred. |
| `tb_gf_ds_divider_sizes` | the same bench at (m, L) = (4,2), (6,2), (6,6), (8,2), (8,4), (12,3), (12,4) |

`gf_div_bench` is the shared stimulus and checker for the two divider
testbenches. To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/gf_div_pkg.sv rtl/gf_type1_cell.sv rtl/gf_type2_cell.sv rtl/gf_type3_cell.sv \
    rtl/gf_ds_cell.sv rtl/gf_ds_divider.sv tb/gf_div_bench.sv tb/tb_gf_ds_divider.sv \
    --top-module tb_gf_ds_divider
./obj_dir/Vtb_gf_ds_divider
```

## How this design relates to the architecture it implements

These parts follow the published architecture:

* the algorithm and its control equations
* the partition into 2m/L cells of L rows
* the schedule in m/L + 1 equitemporal regions
* the row controller with four held bits loaded when Ct = 0
* the 3L zero gates
* the input format, rate and latency

These are choices made here:

* **Cell internals.** The gate-level form of the control and coefficient
  cells, and the exact placement of delay elements in a cell, are this
  design's. The flip-flop count comes to 17L + 6 per cell, against 19L + 4
  in the original description.
* **Count encoding.** The one-hot flag at column m − count is this design's
  reading of the Inc/Dec multiplexer.
* **State and C-zero between cells.** The last row's state and C-zero go to
  the next cell on dedicated one-bit signals.
* **Conventions.** Digit bit order, the asynchronous reset and the `ct_in`
  period assertion.

Not built:

* **Deeper pipelining of a cell for large L.** This is an option that adds a
  register on each link crossing two cut lines, so a cell becomes three
  stages. Without it, the combinational path through a cell grows with L:
  about L coefficient cells in series, plus the control cell.
* **The bit-parallel array of all 2m rows.** It is the starting point of the
  derivation, not part of this divider.
