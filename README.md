# Fixed-point delayed-LMS adaptive FIR filter

An LMS adaptive filter learns the FIR weights that make its output `y_n` follow a
desired signal `d_n`. Every sample it computes the error `e_n = d_n - y_n` and
nudges each weight by `mu * e_n * x_(n-k)`. In plain LMS the error of one sample
must be ready before the next sample is filtered, and that feedback loop runs
through a full multiply-accumulate tree. It cannot be pipelined.

The delayed LMS (DLMS) algorithm breaks that loop by using an error a few
samples old:

    e_n     = d_n - w_n^T x_n
    w_(n+1) = w_n + mu * e_(n-m) * x_(n-m)

The adaptation delay `m` becomes room for pipeline registers. This design splits
the delay as `m = n1 + n2`, following the paper "Area Efficient Fixed-Point LMS
Adaptive Filter":

* the **error-computation block** computes `y_n` and `e_n` in `n1 = 5` pipeline
  stages;
* the **weight-update block** forms the weight increments and registers them
  before adding them to the weights. That register is `n2 = 1`.

With 16 taps the total delay is `m = 6`, which is the paper's `(n1 = 5, n2 = 1)`
operating point. The paper reports that going from plain LMS to this amount of
delay slows convergence but leaves the steady-state error about the same. The
end-to-end test below shows the same behaviour.

The multipliers follow the paper's area argument. There are no array
multipliers. Each product is built from 2-bit (radix-4) digit partial products,
the partial products are summed by adder trees, and carry-select adders do the
final shifted additions.

## Block structure

```
            x_in ──► tap_delay_line (N + N1 samples) ──┬── taps 0..N-1 ──► error_comp ──► e_out, y_out
                                                        │                    ▲   │
            d_in ───────────────────────────────────────┼────────────────────┘   │ e
                                                        │                        ▼
                                                        └── taps N1..N1+N-1 ─► weight_update ──► w (to error_comp, w_out)
```

| module | role |
|---|---|
| `dlms_top` | top level. Wires the delay line and the two blocks, and generates `out_valid` |
| `tap_delay_line` | shift register of input samples, shared by both blocks |
| `error_comp` | pipelined FIR and error subtraction |
| `weight_update` | increments `mu*e*x_k`, an increment register, and saturating weight registers |
| `ppg` | radix-4 partial product generator: 2-to-3 decoders and AND-OR cells |
| `adder_tree` | pipelined binary adder tree |
| `shift_add_tree` | merges digit-position sums with shifts, using carry-select adders |
| `csla` | carry-select adder |
| `lms_pkg` | default word lengths and the tree-latency function |

## The error-computation pipeline

`error_comp` reorders the sum of products to share hardware. Write each sample
as radix-4 digits, `x = sum_j u_j 4^j` with `j = 0..L/2-1`. Then

    y = sum_k w_k x_k = sum_j 4^j * ( sum_k u_(k,j) * w_k ).

So the block forms every digit-by-weight product first. It then sums each digit
position across all taps and shifts only once, at the end:

1. **Partial products (stage 1).** There is one `ppg` per tap. The weight is the
   multiplicand and the sample gives the digits. A 2-to-3 decoder turns each
   digit into one-hot selects for 1, 2 or 3. An AND-OR cell passes `w`, `2w` or
   `3w`, where `3w = w + 2w` is the only adder. The top digit holds the sign of
   the two's-complement sample, so its codes 2 and 3 select `-2w` and `-w`. All
   `N * L/2` partial products are registered.
2. **Adder trees (stages 2-3).** There is one `adder_tree` per digit position
   (4 trees for 8-bit data). Each tree sums the N partial products of its
   position. A register follows every two adder levels. For 16 taps that is
   4 levels, so 2 stages.
3. **Shift-add (stage 4).** `shift_add_tree` merges the 4 digit sums pairwise
   (`s0 + 4 s1`, `s2 + 4 s3`, then `lo + 16 hi`). Each addition is a `csla`. The
   exact `y_n` is registered.
4. **Error (stage 5).** A `csla` computes `d*2^WF - y` as an add of the
   complement with carry-in 1. A 5-deep delay line aligns `d` with `y`. The
   result is shifted down by `WF` (floor) and saturated to L bits.

The number of stages depends on N: `N1 = ceil(log2(N)/2) + 3`. That gives 5 for
8 and 16 taps, and 6 for 32 and 64 taps.

## Timing and the adaptation delay

Everything is driven by one enable, `en`. On every rising clock edge with `en`
high, one `(x_in, d_in)` pair enters and the whole pipeline moves one step. With
`en` low everything holds its state, weights included, so stalls are invisible
to the algorithm.

Count enabled edges and let sample `n` enter at edge `n`:

| edge | event |
|---|---|
| n | `x_n` enters `taps[0]`, `d_n` enters the `d` delay line |
| n+1 | partial products of `x_n` with the weights `W(n)` registered |
| n+2, n+3 | adder-tree stages |
| n+4 | `y_n` registered |
| n+5 | `e_n` registered. `e_out`/`y_out` show sample n, and `out_valid` is high from here on |
| n+6 | increment `mu*e_n*x_(n-k)` registered. `taps[N1+k]` held `x_(n-k)` at edge n+5 |
| n+7 | weights updated: `W(n+7) = W(n+6) + increment` |

`W(t)` is the weight register after edge t. Then `y_n` uses `W(n)` and
`W(t+1) = W(t) + mu e_(t-6) x_(t-6)`. This is exactly the DLMS recursion with
`m = 6`. The paper's modified form, with the error delayed by `n1` and the
filter's weights delayed by `n2`, reduces to the same recursion with
`m = n1 + n2`. The output latency seen at the ports is `N1 + 1 = 6` enabled
cycles. The extra cycle is the input register of the delay line.

The weight update needs the samples that its error was computed from. Those
samples are still in the delay line, `N1` places further down. The line is
therefore `N + N1` samples long, and no second copy of the input history exists.

## Number formats

All values are two's complement.

| signal | width | format | range |
|---|---|---|---|
| `x_in`, `d_in`, `e_out` | L = 8 | 1 sign bit, 7 fraction bits | [-1, 1) |
| weights | WW = 16 | WF = 14 fraction bits | [-2, 2) |
| `y_out` | WW + L + log2 N + 1 = 29 | 21 fraction bits, exact | |
| step size | | `mu = 2^-MU_SHIFT = 0.5` | |

* **Error.** It is rounded down and saturated to 8 bits before it enters the
  weight update. This keeps the update multipliers 8x8.
* **Increment.** The product `e * x_k` has 14 fraction bits. It is shifted right
  by `MU_SHIFT + 2(L-1) - WF`, which is 1 with the defaults, rounded down.
* **Weights.** They saturate at the limits of 16 bits.

## Departures from the paper and choices of this design

The paper gives the algorithm, the two-block split, the `(n1 = 5, n2 = 1)`
operating point and the building blocks by name: a 2-bit partial product
generator, pipelined adder trees, carry-select adders in place of a shift-adder
tree, and balanced pipelining. It gives no word lengths and no circuit-level
details. Everything below is this design's own.

* **Word lengths.** 8-bit data and error, and 16-bit Q2.14 weights.
* **Step size.** `mu = 0.5`, done as a shift. The paper's floating-point study
  uses `mu = 0.4`, which is not a power of two.
* **Saturation.** The error and the weights saturate. The rounding is floor
  (truncation).
* **Circuits.** The decoder/AND-OR form of the partial product generator and its
  signed top digit. The order of summation: digit positions across taps, then a
  single shift-add tree. The placement of the pipeline registers. The 4-bit
  blocks of the carry-select adder.
* **Interface.** The shared delay line, the global enable, the asynchronous
  active-low reset to all-zero weights and pipeline, and `out_valid`.
* **Other delay cases.** The paper's `(n1 = 7, n2 = 2)` comparison case is not
  provided. `REG_EVERY = 1` gives `n1 = 7` for 16 taps, but `n2` stays 1. Plain
  LMS (`n1 = n2 = 0`) is not possible with this pipeline.
* **Not modelled.** The paper's area, power and speed comparisons are about
  synthesis results and are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_csla` | random and corner operands, two widths, against `a+b+cin` |
| `tb_ppg` | every multiplier value with extreme multiplicands, plus random operands. Checks each partial product and the recombined product |
| `tb_adder_tree` | 16-input/2-stage and 5-input/3-stage trees: sums at the exact latency, holding during stalls |
| `tb_shift_add_tree` | 4- and 8-input trees against `sum s_j 4^j`, including extremes |
| `tb_tap_delay_line` | every tap against a software history, with stalls |
| `tb_error_comp` | `y` exact and `e` rounded and saturated, at latency 5, with stalls. Both saturation limits are required to occur |
| `tb_weight_update` | all weights every cycle against a model. Both saturation limits are required to occur |
| `tb_dlms_top` | end to end at the default parameters (see below) |
| `tb_dlms_sizes` | N = 8, 32 and 64 against the same bit-exact model. Uses the harness `dlms_size_run` |

`tb_dlms_top` runs a system-identification experiment:

* **Unknown system.** A 10-tap band-pass FIR,
  `h_n = (sin(0.7pi(n-4.5)) - sin(0.3pi(n-4.5))) / (pi(n-4.5))`, normalised to
  unit gain in power.
* **Input.** Gaussian noise with standard deviation 0.25.
* **Desired response.** The output of the unknown system plus noise 70 dB down.
* **Length.** 2000 samples. Then the unknown system becomes `-2h` for 1000 more
  samples.

Every `e_out`, `y_out` and weight is compared bit-exactly with a software model
of the recursion above. Random stalls are mixed in. The test also requires:

* the mean squared error to fall by at least 20 dB in the first phase, and by at
  least 10 dB in the second. In the second phase the desired response clips at
  8 bits.
* the final weights to lie within a squared distance of 0.01 of the unknown
  system;
* stalls, weight adaptation and error saturation each to have happened.

A typical run gives an MSE of -20 dB at the start and -44 dB after about 1800
samples. After the change of system it goes from -12 dB to -25 dB. The squared
weight error ends at 3e-4.

### Running with Verilator

From the directory that holds `rtl/` and `tb/`, run:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lms_pkg.sv \
    rtl/csla.sv rtl/ppg.sv rtl/adder_tree.sv rtl/shift_add_tree.sv \
    rtl/tap_delay_line.sv rtl/error_comp.sv rtl/weight_update.sv rtl/dlms_top.sv \
    tb/tb_dlms_top.sv --top-module tb_dlms_top -o sim
./obj_dir/sim
```

To run a different test, swap the testbench file and the top module name.
`tb_dlms_sizes` also needs `tb/dlms_size_run.sv`. The full-size test takes a few
seconds.

## Changing the design

* **`N`.** Any value of 2 or more works. The tree is padded to a power of two and
  the latency follows `N1 = ceil(log2 N / REG_EVERY) + 3`.
* **`L`.** Must be even. With `L = 8` there are 4 digits, and the shift-add tree
  expects a power-of-two number of digits (`L = 4, 8, 16`).
* **`WW`, `WF`.** Choose them so that `WF <= 2(L-1) + MU_SHIFT`.
* **`MU_SHIFT`.** Sets the step size `2^-MU_SHIFT`.
* **`REG_EVERY`.** The number of adder-tree levels per pipeline stage. Fewer
  levels per stage give a shorter clock period and a longer `n1`.

The testbenches hard-code the default latency and formats, apart from
`dlms_size_run`, which derives them from `N`.
