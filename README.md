# Extended-range fixed-point exponential unit

This is a small, multiplier-free iterative unit that computes `e^x` in
fixed point, plus a wrapper that extends its input range from roughly
±1.3 to −128 … +128. The intended use is the Gaussian (RBF) kernel
`exp(-γ‖x−z‖²)` of a support-vector-machine classifier. That kernel needs
exponentials of arguments far outside the range where a plain
shift-and-add exponential converges.

The design has two layers:

* **`exp_core`**: an iterative exponential working on 25-bit 2.23 words.
  Each iteration uses only a table lookup, a barrel shift and two
  additions. 25 iterations give about 22 correct fraction bits.
* **`exp_extended`** (the top): it rewrites `e^x` as `2^I · e^(±f·ln2)`,
  where `I` and `f` are the integer and fractional parts of `|x|/ln2`. The
  core computes `e^(±f·ln2)`, whose argument always lies in (−0.7, 0.7).
  A shifter then applies `2^I`. Input and output are 24-bit 8.16 words.

## How the core iterates

The core keeps two registers, `X` and `Y`, and applies

```
x_{i+1} = x_i − ln(1 + s_i·2^-i)
y_{i+1} = y_i + s_i·y_i·2^-i          s_i ∈ {−1, 0, +1},  i = 0 … 24
```

It starts from `X = x0` and `Y = 1`. The product `y_i · e^(x_i)` never
changes, so `Y` ends at `e^(x0)` once `X` has been driven to zero. The
multiplication by `(1 + s·2^-i)` is one shift and one add. The constants
`ln(1 ± 2^-i)` come from two 25-entry ROMs:

* `ROM1` holds `ln(1 + 2^-i)`.
* `ROM2` holds `ln(1 − 2^-i)`.

`ln_rom` computes both tables at elaboration time from those formulas.

### Choosing s_i

Choosing `s_i` is the subtle part. A step always points towards zero:

* If `X ≥ 0`, the step uses ROM1 and adds `Y·2^-i`.
* If `X < 0`, it uses ROM2 and subtracts `Y·2^-i`.

The step is taken only if it makes `|X|` smaller. Otherwise `s_i = 0` and
both registers keep their values. The simpler rule, where the step is
always taken with `s_i = sign(x_i)`, overshoots badly in the first
iterations. For example, `ln(1 − 1/2) = −0.69` is larger than all later
steps together, so that rule fails for many inputs. A one-sided rule,
which refuses every step that would change the sign of `X`, fails for
parts of the negative range. The rule used here converges for the whole
interval `−1.24 ≤ x0 ≤ 1.56`, i.e. for `Σ ln(1−2^-i) ≤ x0 ≤ Σ ln(1+2^-i)`.
This was checked against a real-number model on a 0.001 grid.

### The acceptance test

`cc_logic` decides acceptance with one extra adder. Because the trial
`t = x − ln(1 ± 2^-i)` always moves towards zero, `|t| < |x|` holds
exactly when `x + t` has the sign of `x` and is not zero. For a negative
`X` at `i = 0` the table entry `ln(0)` does not exist. There the
controller always refuses the step, so every operation has the same
length.

### One iteration, two clocks

`exp_fsm` runs five states:

| state   | what happens                                                                  |
|---------|-------------------------------------------------------------------------------|
| IDLE    | on `start`: `X_ext_reg ← x0`, clear the counter and the condition code        |
| INIT    | `X_int_reg ← X_ext_reg`, `Y_reg ← 1.0`                                         |
| CHECK   | if `i = 25` → DONE; else form `X − ROM(i)` and store "accept?" in `Cc_reg`     |
| ITER    | if accepted: `X ← X − ROM(i)`, `Y ← Y ± Y>>i`; always `i ← i + 1` → CHECK      |
| DONE    | `done = 1` for one cycle, result in `Y_reg`                                    |

The ROMs are registered. They sample the counter's *next* value
(`count_nx`), so their output always belongs to the current count. The
barrel shifter is five stages of 2:1 multiplexers, driven by the counter.

## How the range is extended

`exp_extended` needs one clock per stage:

| stage      | value                                  | format / width                         |
|------------|----------------------------------------|----------------------------------------|
| input      | `x`                                    | signed 8.16, 24 bits                   |
| Multiplier1| `x · 1/ln2` (constant 94548 = 1.44269·2^16) | signed 10.32, 42 bits             |
| sign mux   | `|x|/ln2` (two's complement if x < 0)  | 10.32, 42 bits                         |
| split      | `I = bits 39:32`, `f = bits 31:16`     | 8-bit integer, 16-bit fraction         |
| Multiplier2| `f · ln2` (constant 363409 = 0.693147·2^19) | 0.35, 35 bits                     |
| core input | `+f·ln2` for x ≥ 0, `−f·ln2` for x < 0 | signed 2.23, 25 bits                   |
| core output| `e^(±f·ln2)` ∈ [0.5, 2), cut to 1.15   | 16 bits (`Fraction_part`)              |
| shifter    | `·2^I` (left) for x ≥ 0, `·2^-I` (right) for x < 0 | unsigned 8.16, 24 bits     |

For a negative `x`, the identity is `e^x = 2^-I · e^(−f·ln2)`. The core's
input is therefore negated as well as the shift direction reversed. The
core accepts negative arguments, so no extra logic is needed.

The 8.16 output limits the result range:

* Results above 255.99998 (`x > ln 256 ≈ 5.545`) **saturate** to `0xFFFFFF`.
* Results below 2^-16 (`x < about −11.1`) **underflow** to zero.

For the RBF kernel the argument is never positive, so the output always
lies in (0, 1].

## Interfaces and timing

Both units use the same handshake:

* The operand is sampled on the rising clock edge where `start` (or
  `start_exp`) is high and `busy` is low. `start` is ignored while busy.
* `done` is high for one cycle when the result register is valid. The
  result stays there until the next operation.
* `rst_n` is an asynchronous active-low reset.

| unit           | operand          | result                     | latency (clock edges from start sample to `done`) |
|----------------|------------------|----------------------------|---------------------------------------------------|
| `exp_core`     | `x0`, signed 2.23 | `y`, unsigned 2.23        | 2·25 + 2 = 52                                      |
| `exp_extended` | `x`, signed 8.16  | `exp_extended_out`, unsigned 8.16 | 2·25 + 6 = 56                              |

Throughput is one result per 57 clocks for the top. A new start is
accepted in the cycle after `done`. The critical path of the top is the
SPLIT stage: two constant multipliers and a 42-bit negation in one cycle.
Pipeline that stage if a high clock rate is needed.

## Accuracy

These figures were measured by the self-checking testbenches against
real-number `exp()`:

* **Core:** the maximum absolute error was 7.2·10^-7 (about 6 LSB of 2.23)
  over 300+ random inputs in −1.24 … 1.38.
* **Extended unit:** the maximum relative error was 6·10^-5 for results
  above 0.5. The main sources are:
  * the 16-bit `Fraction_part`;
  * the 16-bit fraction of `|x|/ln2`;
  * the 2^-16 rounding of the 1/ln2 constant, whose effect grows with `|x|`
    (about 5·10^-6·|x| relative).

  Small results lose relative precision because the output LSB is 2^-16.

Valid input ranges:

* **Core:** the iteration converges for `−1.24 ≤ x0 ≤ 1.56`. However,
  `Y_reg` holds only values below 4, and `Y` may pass `e^(x0)` on the way,
  so results are valid for `x0 < 1.38`. Inside `exp_extended` the core only
  sees arguments in (−0.7, 0.7).
* **Extended unit:** any 8.16 input (−128 … 127.99998) is accepted. The
  output is limited as described in the previous section.

## Where this design makes its own choices

The block structure, word widths and constants follow the architecture it
implements:

* the core: 25-bit 2.23 data, 25 iterations, two ROMs, two
  adder/subtractors, a barrel shifter, a counter, condition-code logic and
  an FSM;
* the wrapper: 24-bit 8.16 input, an 18-bit 1/ln2 constant, a 42-bit 10.32
  product with a two's-complement mux, an 8-bit integer part, a 16-bit
  fraction, a 35-bit `f·ln2` product, a 25-bit core interface, a 16-bit
  fraction result and a 24-bit shifter output.

The following points are this design's own:

* **Step selection:** the rule is the magnitude-reducing one described in
  "Choosing s_i", with `s_i = 0` allowed. The condition-code logic
  therefore also looks at `X_int_reg`, not only at the subtractor output.
* **Negative wrapper inputs:** the core gets `−f·ln2`, which makes the
  result `e^x`. Scaling `e^(+f·ln2)` by `2^-I` would give `e^(x + 2f·ln2)`.
* **Formats and rounding:** the formats of the constants (2.16 and 0.19),
  of `Fraction_part` (1.15) and of the output (8.16) are chosen here. So are
  output saturation and truncation everywhere except the ROM entries, which
  are rounded to nearest.
* **Control:** the start/busy/done handshake, the wrapper's sequencer and
  the two-clock iteration are chosen here. Two control lines of the
  original controller, `cc_cntrl` and `preset_count`, had no stated
  function. `cc_cntrl` now carries the step direction to the
  condition-code logic; `preset_count` is not generated.
* **Extra ports:** `busy` and `done` are outputs in addition to data,
  clock, reset and start.

## Module map

```
exp_extended                 top: range extension and sequencer
├── data_reg   ×6            X_ext_reg, Integer_part, sign, X_frac_reg, Fraction_part, output
├── const_mult ×2            x·(1/ln2), f·ln2
├── twos_complement          magnitude of the negative product
├── mux2                     sign mux
├── pow2_shifter             ·2^±I with saturation
└── exp_core                 iterative exponential
    ├── exp_fsm              controller
    ├── data_reg ×3          X_ext_reg, X_int_reg, Y_reg (preset 1.0)
    ├── mux2     ×2          Mux1 (X source), Mux2 (ROM1/ROM2)
    ├── iter_counter         i, and the ROM address
    ├── ln_rom   ×2          ln(1+2^-i), ln(1−2^-i)
    ├── add_sub  ×2          X update, Y update
    ├── cc_logic             accept/refuse the step, Cc_reg
    └── barrel_shifter       Y·2^-i
exp_pkg                      shared widths and constants
```

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. The testbenches are:

* **`tb_exp_extended`:** the end-to-end test at the default sizes. It runs
  about 1500 random and special operands over the full input range. It
  checks the fixed latency, and that `start` is ignored while busy. It also
  counts that every mechanism occurred: left and right scaling, negative
  core operands, refused iterations, saturation and underflow.
* **`tb_exp_core`:** checks accuracy and latency of the core alone.
* **The other testbenches:** each checks its block against a reference
  computed in the testbench.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl --top-module tb_exp_extended \
    rtl/exp_pkg.sv tb/tb_exp_extended.sv -Mdir obj_ext
./obj_ext/Vtb_exp_extended
```

Replace the testbench name to run any other test. `-Irtl` lets Verilator
find each module in `rtl/<module>.sv`. The package must be listed first.
The full end-to-end test takes well under a second.

## Changing sizes

* **Core:** `exp_core` takes `W`, `FRAC` and `N` (word width, fraction bits,
  iterations). The ROM contents follow automatically. Keep `N ≤ FRAC + 1`;
  later entries are zero anyway.
* **Wrapper widths and constants:** these live in `exp_pkg`. If you change
  `EXT_FRAC` or the constant widths, recompute `INV_LN2 = round(2^16/ln2)`
  and `LN2 = round(2^19·ln2)` for the new scalings. Also adjust the bit
  fields cut out in `exp_extended`: `MULT1_FRAC`, the `f·ln2` slice and
  `Fraction_part`.
