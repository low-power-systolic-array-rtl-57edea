# Systolic band-pass filter for QRS detection, built on low-leakage 4:2 compressors

Heartbeat detectors for ECG monitors start by band-pass filtering the signal. The
filter keeps the roughly 5–15 Hz band in which the QRS complex has most of its
energy, and drops baseline wander and high-frequency noise. This design builds that
filter as two recursive (IIR) filters in cascade:

    low-pass   y(n) = 2 y(n-1) - y(n-2) + x(n) - 2 x(n-6) + x(n-12)
    high-pass  y(n) = x(n-16) - (1/32) [ y(n-1) + x(n) - x(n-32) ]

Each filter is a **systolic array**: a row of identical processing elements, each
with two multipliers and one adder. Samples pass between neighbouring elements
through delay registers. Multipliers dominate the array, so the design puts its
effort into them. Each 8 × 8 multiplier reduces its partial products with a
**4:2 compressor** of a particular shape. In that shape the carry passed to the
next column is computed in parallel with the sum and does not depend on the
neighbour's carry. Sum and carry logic are kept separate and written as two-level
AND-OR functions. At the circuit level this shape aims at low leakage: fewer gates,
deep transistor stacks, few inverters. In RTL it remains a particular choice of
Boolean structure.

Everything is synthesizable SystemVerilog-2017 and combinational except the delay
registers of the arrays.

## Module hierarchy

```
qrs_bandpass_filter            top: low-pass array -> high-pass array
└─ systolic_iir  (x2)          one recursive filter as a systolic array
   └─ systolic_cell (xCELLS)   a*x + b*y + partial sum
      ├─ compressor_multiplier (x2)   8x8 signed multiplier
      │  ├─ compressor_row            four rows -> two rows
      │  │  └─ compressor_4_2         the 5-input / 3-output compressor
      │  └─ ripple_adder              final carry-propagate adder
      │     └─ full_adder
      └─ adder3                       three-operand adder (carry save + ripple)
filter_pkg                     widths, number format, coefficient sets
```

The default configuration has 13 + 33 = 46 cells, 92 multipliers, 4 416 compressors
and 804 flip-flops.

## The systolic array (`systolic_iir`)

`systolic_iir` computes the general recursive filter

    y(n) = [ Σ_{i=0}^{CELLS-1} a_i x(n-i) + Σ_{i=1}^{CELLS} b_i y(n-i) ] >>> FRAC

Here x(n) is the sample accepted at step n, and y(n) is the output after that step.
Three lines run through the row of cells:

```
 x_i ─[R]──┬─────────┬──[R]──┬─────────┬──[R]── ...      input line, moves right
           a0        a1      a2        a3
 y_o ◄── cell0 ◄[R]─ cell1 ◄─ cell2 ◄[R]─ cell3 ◄─ ...   partial sums, move left
   │       b1        b2      b3        b4
   └──[R]──┴─────────┴──[R]──┴─────────┴──[R]── ...      output line, moves right
```

The cells come in pairs:

* **Input and output lines.** A register sits in front of every even cell on both
  lines. Cell *i* reads the input sample from i/2 steps ago; the first register is
  the input register. It reads the output sample from i/2 + 1 steps ago.
* **Partial-sum line.** A register sits between every odd cell and the even cell to
  its left. The sum from cell *i* therefore reaches the output ⌈i/2⌉ steps later.

So the delays of cell *i* add up to i on the input side and i + 1 on the output
side. Cell *i* holds tap a_i and tap b_{i+1}, which is exactly the equation above.
One register serves every two taps, so the array needs about half the registers of
a fully pipelined systolic array. The price is a critical path of one multiplier
plus two cell adders.

**Number format.** Samples are 8-bit two's complement (`DATA_W`). Coefficients have
8 bits with 5 fractional bits (Q2.5, range −4 … +3.97, step 1/32). This is the
smallest format that holds every coefficient of both equations exactly:

| value | code |
|---|---|
| 1 | 32 |
| −2 | −64 |
| 2 | 64 |
| −1 | −32 |
| ±1/32 | ±1 |

Partial sums are `ACC_W = 2·DATA_W + clog2(CELLS) + 1` bits wide, so the sum of all
products never overflows. The output keeps bits `[FRAC +: DATA_W]` of the final sum.
That is an arithmetic shift right by 5 (rounding toward −∞), wrapped to 8 bits.
The same 8-bit value is fed back into the output line.

Wrapping, rather than saturating, is deliberate. The low-pass recursion has a
double pole at z = 1 that the zeros cancel exactly. With modular arithmetic the
recursion stays exact whenever the true output fits in 8 bits. With saturation it
would drift for good after the first clipped sample.

**Coefficient mapping.** Port `coef_a_i[i]` is a_i. Port `coef_b_i[i]` is
b_{i+1}, not b_i.

## The band-pass cascade (`qrs_bandpass_filter`)

The top module has two `systolic_iir` instances:

* a low-pass array of 13 cells, for taps up to x(n−12);
* a high-pass array of 33 cells, for taps up to x(n−32).

The low-pass output drives the high-pass input. Coefficients are input ports, so
every multiplier is a full general-purpose 8 × 8 multiplier, and other responses
can be loaded. `filter_pkg` provides the coefficients of the two equations above
through the functions `lp_a(i)`, `lp_b(i)`, `hp_a(i)` and `hp_b(i)`:

* low-pass: a0 = 1, a6 = −2, a12 = 1, b1 = 2, b2 = −1;
* high-pass: a0 = −1/32, a16 = 1, a32 = +1/32, b1 = −1/32.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low clear of all delay registers |
| `en` | in | 1 | sample strobe: registers advance on a rising edge with `en` = 1 |
| `x_i` | in | 8 | input sample |
| `lp_a_i`, `lp_b_i` | in | 13 × 8 | low-pass a_0..a_12 and b_1..b_13 |
| `hp_a_i`, `hp_b_i` | in | 33 × 8 | high-pass a_0..a_32 and b_1..b_33 |
| `lp_y_o` | out | 8 | low-pass output |
| `y_o` | out | 8 | band-pass output |

**Timing.**

* A sample on `x_i` is accepted at a rising edge with `en` high.
* `lp_y_o` shows that sample's low-pass result in the next cycle.
* The high-pass array has its own input register, so it takes that result at the
  next `en`. Counted in samples, the path from `x_i` to `y_o` is
  z⁻¹·H_lp(z)·H_hp(z).
* Both outputs are combinational from registers and hold while `en` is low.
* The sample rate is whatever rate `en` is pulsed at; one sample per clock cycle is
  allowed.

**Things to know about these coefficients.**

* The low-pass section has a DC gain of 36. With 8-bit samples its output wraps
  once |x| exceeds 3. Scale the input, or widen `DATA_W` (all modules are
  parameterised), for real ECG amplitudes.
* In the high-pass equation as given, the 1/32 feedback acts on the section's own
  output. That leaves its DC gain at 32/33, so the cascade as loaded does not remove
  a baseline offset.
* The usual QRS high-pass, x(n−16) minus the mean of the last 32 samples, fits the
  same 33-cell array without feedback: a_i = −1/32 for i = 0..31 except
  a16 = 31/32, and every b = 0.

## The 4:2 compressor (`compressor_4_2`)

The compressor has five inputs and three outputs. The pin names are those of the
cell: A, B, CIX, C, D in and S, COX, CO out. It satisfies

    A + B + CIX + C + D = S + 2·(CO + COX)

* **Inputs.** A, B, CIX and D are four partial-product bits of one column. C is the
  lateral ("horizontal") carry from the compressor one column lower.
* **t and COX.** The first logic group forms t, the parity of A, B and CIX. It is
  written as the OR of the four odd minterms over the inputs and their complements.
  In parallel, COX = majority(A, B, CIX) is formed from the same three inputs.
* **S and CO.** S = t ⊕ C ⊕ D, and CO = majority(t, C, D).
* **Which input is the carry-in.** The cell description says only that one input is
  the carry from the previous column, not which one. This design uses C. COX never
  depends on C, so chaining COX into the next column's C cannot form a ripple path.
  A whole row of compressors then has the delay of one compressor.

Transistor stacking, drive strength and leakage are properties of a cell layout,
and RTL cannot carry them. A synthesis tool will restructure this AND-OR logic
unless the compressor is kept as a hand-built or preserved cell. The RTL fixes
function and connectivity, not the transistor-level form.

## The multiplier (`compressor_multiplier`)

The multiplier works in three combinational stages:

1. **Partial products.** Row *j* is a·b[j], shifted left by *j*. Rows are in
   Baugh-Wooley form so that signed operands need no sign-extension rows:
   * the products that involve exactly one sign bit are inverted;
   * the constant 2^N + 2^(2N−1) occupies the free bit N of row 0 and the free
     bit 2N−1 of row N−1.

   That leaves exactly N rows of 2N bits.
2. **Reduction.** `compressor_row` turns four rows into two with 2N compressors
   chained COX → C. Each level halves the row count, and all groups of a level work
   in parallel. For N = 8 that is 8 → 4 → 2.
3. **Final addition.** A 2N-bit `ripple_adder` of `full_adder` cells adds the last
   two rows.

All arithmetic is modulo 2^(2N). That is exact because the signed product always
fits in 2N bits. N must be a power of two, at least 4.

The cell adders (`adder3`) and the final adder use a full adder written in the
compressor's style: sum from minterms, carry from three products, no shared logic.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a cycle-count watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_qrs_bandpass_filter rtl/filter_pkg.sv tb/tb_qrs_bandpass_filter.sv
./obj_dir/Vtb_qrs_bandpass_filter
```

Replace the testbench name for the others. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/filter_pkg.sv rtl/<module>.sv`.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_compressor_4_2` | all 32 combinations: the column identity, S = parity, COX independent of C |
| `tb_ripple_adder` | 16-bit corner cases and random pairs; a 5-bit instance exhaustively |
| `tb_compressor_multiplier` | 8 × 8 on all 65 536 pairs; 4 × 4 on all pairs; 16 × 16 random and corner cases |
| `tb_systolic_cell` | sum_o = sum_i + a·x + b·y mod 2^ACC_W, random and extreme operands |
| `tb_systolic_iir` | 13-cell and 6-cell arrays against a difference-equation model, every cycle, with random coefficients and `en` gaps, then the low-pass impulse response |
| `tb_qrs_bandpass_filter` | the full default design with the equation coefficients (see below) |

`tb_qrs_bandpass_filter` runs at the default size and compares both outputs with a
bit-exact model in every cycle. It applies:

* an impulse, whose low-pass response must be the triangle 1 2 3 4 5 6 5 4 3 2 1;
* a synthetic ECG-like trace;
* large random samples.

It fails if any of these never occurs: cycles with `en` low, use of the feedback
taps, dropped fractional bits, or 8-bit wrap-around. The full run takes a few
seconds of simulation, and about two minutes to build.

## Departures and own choices

The following are this design's choices, not part of the original description:

* the 8-bit sample width and the Q2.5 coefficient format;
* floor scaling with wrap-around;
* the `en` strobe and the asynchronous reset;
* coefficients as ports;
* signed (Baugh-Wooley) partial products;
* ripple-carry final adders;
* the carry-save three-operand cell adder;
* the full adder's exact form;
* the choice of C as the compressor's carry input.

Two points about the array and the multiplier:

* **Fourth array column.** The array's fourth column is wired as a_3 / b_4, which
  continues the numbering of the first three columns.
* **Multiplier stages.** The "three stages" of the 8-bit multiplier are read as
  partial-product generation, compressor reduction (two levels for eight rows) and
  final addition.

Power, area and delay figures (leakage per compressor, multiplier and filter in a
65 nm library) are outside what RTL can reproduce.
