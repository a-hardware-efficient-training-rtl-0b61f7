# TQA softmax: a training-grade base-2 softmax with piecewise-quadratic 2^x and log2

Softmax in Transformer training needs about 1e-6 absolute accuracy, far more
than inference accelerators usually deliver, yet it sits on the critical path of
every attention head. This RTL computes an 8-element **base-2 softmax**

    f2(x_i) = 2^x_i / sum_j 2^x_j

in fixed point, with a maximum absolute error of about 1.6e-6 and a mean error
below 1e-7 for inputs in [-10, 10]. It does not divide, and it uses no look-up
table larger than a few dozen coefficients. It implements the TQA-Softmax
architecture ("training-oriented quadratic approximation"): the block structure,
the approximation method and the main sizes come from that architecture. Many
details are this implementation's own; they are listed under
[Where this implementation makes its own choices](#where-this-implementation-makes-its-own-choices).

## The idea in three identities

1. **Down-scaling.** Subtracting the maximum, `x'_i = x_i - x_max <= 0`, keeps
   every exponential in (0, 1], so nothing overflows.
2. **Log-sum-exp.** `f2(x_i) = 2^(x'_i - log2(sum))` with
   `sum = sum_j 2^x'_j`, so the division becomes a subtraction and a second
   exponential.
3. **Range reduction.** Only two small-domain functions remain:
   * `2^x = 2^b >> (-a)`, where `a = floor(x)` and `b = x - a` in [0, 1). For a
     two's-complement number, `a` and `b` are simply the integer and fraction
     bit fields. No logic is needed.
   * `log2(sum) = k + log2(m)`, where a leading-one detector gives `k` and
     `m = sum >> k` lies in [1, 2). Because `log2(m)` lies in [0, 1), the sum
     `k + log2(m)` is a bit concatenation, with no adder.

`2^b` and `log2(m)` are both evaluated by the same kind of **piecewise-quadratic
unit** (described [below](#the-quadratic-unit)).

## Datapath and schedule

```
 in_x ──► comparison (max) ──────────────► x_max ─┐
      └─► register ──► x_i ─────────────────────┐ │
                                                ▼ ▼
        ┌──────────── x'_i (11-stage delay) ─► MUX ◄── log2(sum) = {k, log2 m}
        │                                       │                      ▲
        │                                       ▼                      │
        └──────────────────────────────── SUBTRACT (shared)             │
                                                │                      │
                                     separation a | b                  │
                                                ▼                      │
                                    EXP ×8 (shared) ──► exp_2i ──► out_y
                                                │ exp_1i               │
                                                ▼                      │
                                 adder tree ─► LOD ─► m ─► LOG ──► log2 m
                                                  └──► k (4-stage delay)
```

Each vector passes through the subtraction module and the eight exponent modules
twice. **Pass 1** computes `x_i - x_max` and its exponentials, which feed the
adder tree. **Pass 2** computes `x'_i - log2(sum)`; its exponentials are the
outputs. The two passes share the hardware through one operand multiplexer. The
cycle numbers below count clock edges after the vector is accepted at edge 0:

| edge  | stage                                                                 |
|-------|-----------------------------------------------------------------------|
| 0     | comparison tree registers `x_max`; the inputs wait in a register       |
| 1     | pass 1: subtraction registers `x'_i`                                   |
| 2-5   | exponent modules (4 stages): `exp1_i = 2^x'_i`                         |
| 6-8   | adder tree (3 levels): `sum`                                           |
| 9-12  | leading-one detector (combinational) and log module (4 stages)         |
| 13    | pass 2: subtraction registers `x'_i - log2(sum)`                       |
| 14-17 | exponent modules: `f2(x_i)`; `out_valid` is high after edge 17         |

**Latency: 18 cycles.** This matches the architecture's 18 cycles, which include
3 for the adder tree and 4 each for the exponent and log modules.

### Sharing and back-pressure

The subtraction module is used 1 cycle and 13 cycles after a vector is accepted.
Two vectors accepted exactly 12 cycles apart would need it in the same cycle. The
control unit prevents that collision with one shift register of "accepted" flags:

* `in_ready` is low in any cycle where a vector was accepted 12 cycles earlier;
* the multiplexer selects the pass-2 operands when a vector was accepted 13
  cycles earlier;
* `out_valid` is the flag of the vector accepted 18 cycles earlier.

An assertion in the control unit checks that the two passes never collide. With
a continuous stream of requests, the unit accepts 12 vectors back to back and
then pauses for 12 cycles. Sustained throughput is therefore **one 8-element
vector every two cycles**: 4 inputs per cycle, or 4 G inputs/s at 1 GHz. A
figure of 8 inputs per cycle (8 lanes times the clock) would need separate
pass-2 hardware, and that is not what the architecture draws.

## Number formats

| signal                     | format                                              |
|----------------------------|-----------------------------------------------------|
| `in_x[i]`                  | signed, 1 sign + 4 integer + 21 fraction bits (26) |
| `x'_i`, pass-2 exponent     | signed, 28 bits, 21 fraction bits                   |
| `2^b`, `exp_i`, `out_y[i]`  | unsigned, 1 integer + 24 fraction bits (25)        |
| `sum`                      | unsigned, 4 integer + 24 fraction bits (28)        |
| `m` (to the log unit)      | 24 fraction bits (the leading 1 is implied)         |
| `log2(sum)`                | `{k[1:0], log2 m}`, truncated to 21 fraction bits  |

Inputs may span [-16, 16). Each output is the softmax of its lane, so the eight
outputs add up to 1 to within the error. A lane whose exponent is -25 or less
underflows to 0.

## The quadratic unit

`tqa_unit` splits its input fraction, MSB first, into three fields:

    x = M0 | M1 | M2           (N0, N1, N2 bits)
    y = w2[M0]*M1^2 + w1[M0]*(M1+M2) + w0[M0]

`M0` selects one of `2^N0` coefficient sets through a constant multiplexer. The
quadratic term uses only `M1`, which keeps the squarer small. The linear term
uses all of `M1+M2`. Two branches run in parallel over four registered stages:

| stage | quadratic branch           | linear branch                  |
|-------|----------------------------|--------------------------------|
| 1     | select `w2`; register `M1` | select `w1`, `w0`; register `{M1,M2}` |
| 2     | `M1^2` (truncated squarer) | `w1*{M1,M2}` (truncated multiplier) |
| 3     | `w2*M1^2`                  | `+ w0`                         |
| 4     | final add and clamp        |                                |

|                          | 2^b on [0,1)   | log2(m) on [1,2) |
|--------------------------|----------------|------------------|
| input fraction bits      | 21             | 24               |
| N0 / N1 / N2             | 4 / 16 / 1     | 5 / 14 / 5       |
| segments                 | 16             | 32               |
| `w2` fraction bits       | 16 (w2 > 0)    | 14 (w2 < 0, stored as magnitude, subtracted) |
| `w1` fraction bits       | 20             | 19               |
| `w0` / output fraction   | 24             | 24               |
| kept bits of M1^2, w2*M1^2, w1*(M1+M2) | 24, 24, 24 | 24, 24, 24 |

**Where the widths come from.** The error budget targets a last-place unit of
2^-21 (1e-6 needs 19.9 bits). The budget is split evenly over five error
sources: the quadratic-term truncation, the linear-term truncation and the
quantisation of the three coefficients. This gives
`N1 >= 21 + log2 5 - 2*N0`, `Nw2 >= 21 + log2 5 - 2*N0`,
`Nw1 >= 21 + log2 5 - N0` and `Nw0 >= 21 + log2 5`, each rounded up. The
intermediate products could be cut to 20-23 bits by the same bound. Keeping 24
bits holds the unit at its model error.

**Truncated multipliers** (`trunc_mult`, `trunc_square`). Each operand is split
into high and low parts, and the low×low partial product is never generated,
because it falls entirely into the bits that are discarded. The squarer forms
`H^2 + 2*H*L`, and the factor 2 is a wire shift. The dropped terms cost less
than a few LSBs at 2^-24.

**Coefficients** (constants in `tqa_pkg`). For each segment `i` with base point
`x_i`:

1. Fit `f(x_i + t) ≈ w2*t^2 + w1*t + w0` by least squares over every input code
   `t` of the segment, for `f = 2^x` or `f = log2 x`.
2. Round each coefficient to its width both down and up. Evaluate all eight
   combinations bit-exactly, including the truncations of the unit, and keep
   the one with the smallest maximum error over the segment.

Changing a width or a split point means repeating this procedure and replacing
the tables.

## Accuracy

The bit-exact RTL was measured in simulation against double precision:

| what                                        | max abs error | mean abs error |
|---------------------------------------------|---------------|----------------|
| 2^b unit, 40 000 inputs on [0,1)             | 1.46e-6       | 3.3e-7         |
| log2 unit, 40 000 inputs on [1,2)            | 6.6e-7        | 1.1e-7         |
| softmax, 800 000 inputs uniform in [-1,1]   | 3.3e-7        | 4.3e-8         |
| softmax, 800 000 inputs uniform in [-5,5]   | 1.2e-6        | 6.0e-8         |
| softmax, 800 000 inputs uniform in [-10,10] | 1.6e-6        | 7.0e-8         |

The 2^b unit is limited by its 16 segments. The quadratic fit alone already
leaves 1.3e-6, so a maximum error slightly above 1e-6 is inherent to N0 = 4.
32 segments would lower it about eightfold but double the coefficient
multiplexers of all eight exponent modules.

## Interface

| port        | dir | width          | meaning                                          |
|-------------|-----|----------------|--------------------------------------------------|
| `clk`       | in  | 1              | clock, rising edge                               |
| `rst_n`     | in  | 1              | synchronous active-low reset of the control unit |
| `in_valid`  | in  | 1              | `in_x` holds a vector                            |
| `in_ready`  | out | 1              | the vector is taken at this edge if `in_valid`   |
| `in_x[8]`   | in  | 26 each        | signed 4.21 inputs                               |
| `out_valid` | out | 1              | `out_y` holds the result, 18 cycles after acceptance |
| `out_y[8]`  | out | 25 each        | f2(x_i), 24 fraction bits                        |

`in_x` is sampled only in the accepting cycle. `out_y` is valid only while
`out_valid` is high; it is not held. Datapath registers are not reset. After
reset, `out_valid` stays low until a vector has been accepted and has gone
through the full latency.

## Files

| file                   | block                                                   |
|------------------------|---------------------------------------------------------|
| `rtl/tqa_softmax.sv`   | top: wiring, widths, latency bookkeeping                |
| `rtl/tqa_pkg.sv`       | function enum, coefficient struct and tables (the coefficient multiplexers) |
| `rtl/ctrl_unit.sv`     | control unit: acceptance shift register, `in_ready`, mux select, `out_valid` |
| `rtl/cmp_max.sv`       | comparison tree for `x_max`, 1 cycle                    |
| `rtl/pipe_delay.sv`    | delay lines (`x_i`, `x'_i`, `k`)                        |
| `rtl/operand_mux.sv`   | pass-1 / pass-2 operand select                          |
| `rtl/sub_module.sv`    | 8 registered subtractors                                |
| `rtl/tqa_exp.sv`       | separation, 2^b unit, right shift; 4 cycles             |
| `rtl/tqa_unit.sv`      | piecewise-quadratic unit; 4 cycles                      |
| `rtl/trunc_mult.sv`    | truncated multiplier                                    |
| `rtl/trunc_square.sv`  | truncated squarer                                       |
| `rtl/adder_tree.sv`    | pipelined adder tree, log2(N) cycles                    |
| `rtl/lod_norm.sv`      | leading-one detector and normaliser (k, m)              |
| `rtl/tqa_log.sv`       | log2(m) unit; 4 cycles                                  |

Each `tb/tb_<module>.sv` is a self-checking testbench for one module. All of
them end with a line `TB_RESULT checks=N failures=F`. Two testbenches cover the
whole top:

* `tb/tb_tqa_softmax.sv` streams 3000 vectors of assorted kinds through the
  handshake: isolated vectors, bursts, random gaps, all-equal vectors, one
  dominant element and extreme spreads. It checks the 18-cycle latency of every
  result and an error limit of 1e-5 per lane. It also requires that stalls,
  second passes, each leading-one position k = 0..3 and flushes to zero all
  occur.
* `tb/tb_tqa_softmax_accuracy.sv` produces the accuracy table above.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tqa_pkg.sv tb/tb_tqa_softmax.sv --top-module tb_tqa_softmax
./obj_dir/Vtb_tqa_softmax
```

To run another testbench, replace the testbench file and the `--top-module`
name. The package must come first on the command line. The testbenches use only
`$urandom`, real arithmetic and queues, with no constraint solver and no
external files.

## Changing the design

* **Lanes.** `N` (a power of two) sets the lanes. The adder tree, the `k` width,
  the pass-2 offset and the total latency (`2 + 4 + log2 N + 4 + 1 + 4`) all
  follow from it. The `sum` width grows by one bit per doubling.
* **Input format.** `X_I` and `X_F` set the input format. The exponent modules
  take the fraction width from `X_F`. The 2^b unit is sized for 21 input
  fraction bits, so changing `X_F` means re-deriving its widths and
  coefficients.
* **Unit widths.** `tqa_unit` parameters control the unit widths. The
  coefficient tables in `tqa_pkg` belong to the widths given above.

## Where this implementation makes its own choices

The architecture fixes the block structure and operand reuse, 8 lanes, 4.21
inputs, N0 = 4 / 5, the error-budget method, floor/ceil coefficient selection,
the truncated multipliers, and the 3 + 4 + 4 cycles inside the 18. The choices
below are this implementation's own:

* a sign bit added to the 4.21 input, so that inputs of ±10 fit;
* placing the remaining 3 latency cycles in the comparison module and in the
  two subtraction passes;
* the whole control unit: its schedule, the ready/valid handshake and the
  reset. The architecture only shows a control unit driving the mux and the
  exponent modules;
* all internal widths, the MSB/LSB split points of the truncated multipliers,
  and the 24-bit intermediate precisions;
* truncating (not rounding) `log2(sum)` to 21 fraction bits, and placing the
  right shift after the exponent unit's last register, so `out_y` comes from
  that register through a barrel shifter;
* the clamps: shift amounts ≥ 31, unit outputs outside [0, 2), a sum below 1
  (which can only arise from approximation error) treated as exactly 1;
* the selection criterion for the floor/ceil combination (smallest maximum
  error).

## Limits

* One vector covers one softmax row of exactly `N` elements. Longer rows
  (attention over 64 or 512 tokens) would need either a wider instance or an
  extension that accumulates the sum across vectors. Neither is built.
* The backward pass of training (`∂f2(x_i)/∂x_j = ln2 · f2(x_i)(δ_ij − f2(x_j))`)
  is not hardware here.
* Outputs and `log2(sum)` are truncated, not rounded.
