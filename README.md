# Floating-point neurons with CORDIC-based RadBas, LogSig and TanSig activations

This is synthesizable SystemVerilog for single artificial neurons. They work in
IEEE-754 single precision, and their activation functions all need `e^x`:

| activation | f(x)                    |
|------------|-------------------------|
| RadBas     | `exp(-x^2)`             |
| LogSig     | `1 / (1 + exp(-x))`     |
| TanSig     | `2 / (1 + exp(-2x)) - 1`|

The idea is that one small unit computes all three. A hyperbolic CORDIC
produces `cosh(x)` and `sinh(x)`, and their sum is `e^x`. Around that unit sit
a few floating-point multipliers, adders and a divider. Every unit is fully
pipelined. A neuron accepts a new set of inputs on every clock. It delivers
each result a fixed number of cycles later, flagged by a ready pulse.

A neuron can have 2, 4 or 6 inputs, with or without a bias, and any of the
three activations. That makes 18 variants. The top level `neuron_bank` holds
all 18 side by side.

## The neuron seen from outside

```
             +--------------------------+
weight_in -->|                          |
data_in[] -->|  neuron                  |--> f_out        (float)
shift ------>|  N_INPUTS, BIAS, ACT     |--> result_ready
input_ready->|                          |
rst, clk --->|                          |
             +--------------------------+
```

**Loading weights.** The weights and the bias sit in a chain of shift
registers with a single serial input:

```
weight_in -> W0 -> W1 -> ... -> W(n-1) -> bias
```

While `shift` is high, each clock moves the chain one place on. So the words
go in in this order: the bias first (biased neurons only), then `W(n-1)`,
down to `W0`. Loading happens once, during initialisation. The registers then
hold their values.

**Running.** Present an input set on `data_in` with `input_ready` high. The
result appears on `f_out` a fixed latency later, and `result_ready` is high
for that one cycle. You can present sets on consecutive clocks; nothing ever
stalls. Because `result_ready` lines up with `f_out`, it can drive the
`input_ready` of a following neuron. That is how neurons chain into a network.

**Reset.** `rst` is synchronous and active high. It clears the weight
registers and the ready pipeline. Any results still in flight are therefore
never flagged. The datapath registers are not reset, because nothing reads
them without a ready flag.

## Where the cycles go

The published design states only a few latencies:
- the floating multiplier takes 8 cycles;
- the floating adder takes 12 cycles;
- each of the 18 neurons has a total latency, listed below.

Those totals pin down the rest of the budget. Take the first neuron, a 2-input
RadBas without bias. Its total is 62 cycles. Its front end is 20 cycles: one
multiply (8) plus one add (12). That leaves 42 cycles for the RadBas chain. In
the same way, LogSig gets 62 cycles and TanSig gets 94.

Taking the chains apart gives two results:
- The converters plus the CORDIC must take 34 cycles together.
- The divider must take 28 cycles.

One more thing follows: the second fixed adder in LogSig adds no cycle at all.
This design therefore makes both fixed adders combinational. That also
explains the original report that the LogSig neurons have a longer clock
period: their two adders sit in cascade between registers.

The table lists every unit's latency. Only the multiplier and adder latencies
come from the published design; the rest were split to fit the totals.

| unit                        | cycles |
|-----------------------------|--------|
| floating multiplier         | 8      |
| floating adder              | 12     |
| floating divider            | 28     |
| float-to-fixed converter    | 6      |
| hyperbolic CORDIC           | 22     |
| fixed-to-float converter    | 6      |
| negation, fixed adders      | 0      |

These numbers build up the neuron in two parts.

**Front end:** `8 + 12 * ceil(log2(inputs + bias))` cycles.

**Activation:**
- RadBas: `8 + 6 + 22 + 6 = 42` cycles
- LogSig: `6 + 22 + 6 + 28 = 62` cycles
- TanSig: `6 + 22 + 6 + 8 + 12 + 28 + 12 = 94` cycles

The full latency, from `input_ready` to `result_ready`, is the sum of the two:

| inputs / bias | RadBas | LogSig | TanSig |
|---------------|--------|--------|--------|
| 2, no         | 62     | 82     | 114    |
| 2, yes        | 74     | 94     | 126    |
| 4, no         | 74     | 94     | 126    |
| 4, yes        | 86     | 106    | 138    |
| 6, no         | 86     | 106    | 138    |
| 6, yes        | 86     | 106    | 138    |

All 18 match the published figures. The package `neuron_pkg` computes them
with `neuron_latency()`, and the testbenches check them cycle by cycle. To
change a unit's latency, edit the constants in `neuron_pkg`; the ready
pipeline follows automatically.

## The exponent calculator (`exp_unit`)

The calculator runs four steps:

```
float x --> float_to_fixed --> cordic_hyp --cosh--> 2-bit ext --+
              18 bit s.2.15              --sinh--> 2-bit ext --+--> fixed add --> e^x (20 bit s.3.16)
```

`s.i.f` means a sign bit, `i` integer bits and `f` fraction bits.

- **Float to fixed.** The float becomes an 18-bit angle in s.2.15 format. It
  rounds to nearest even and saturates at about ±4.
- **CORDIC.** The CORDIC rotates in hyperbolic mode. It runs iterations
  i = 1..18, and does i = 4 and i = 13 twice; hyperbolic CORDIC needs those
  repeats to converge. Its internal datapath is 24 bits wide, with 20 fraction
  bits.
  - The start vector is `(1/K, 0)`, so no gain correction is needed
    afterwards.
  - The elaboration computes `1/K` and the `atanh(2^-i)` constants from their
    series. No table file is involved.
  - The outputs are rounded to 18 bits in s.1.16.
- **2-bit extension.** This step widens each output by two sign bits, to s.3.16.
  It is needed because `e^(pi/4)` is 2.19, which is too large for s.1.16.
  LogSig's `1 + e^x` is larger still, and fits s.3.16 as well.
- **Fixed adder.** A 20-bit adder forms `cosh + sinh`.

**Input range.** The published design is specified for `|x| <= pi/4`. The
CORDIC itself converges up to about 1.118. Beyond that, the results are wrong
but bounded: inputs saturate in the converter, and outputs saturate in the
CORDIC. So the neuron expects normalised data: the net input `sum(w*x)+b` must
stay inside about ±0.78. For RadBas the limit is `x^2 <= pi/4`.

**Accuracy.** Measured error stays below 5e-5 for `e^x` and below 4e-5 at the
activation outputs. That is about five correct decimal digits.

## The three activation chains

| module       | chain |
|--------------|-------|
| `radbas_act` | `x*x` (fp_mul) -> negate -> exp_unit -> fixed_to_float |
| `logsig_act` | negate -> exp_unit -> fixed add `+1.0` -> fixed_to_float -> `1.0f / .` (fp_div) |
| `tansig_act` | negate -> exp_unit -> fixed_to_float -> square (fp_mul) -> `+1.0f` (fp_add) -> `2.0f / .` (fp_div) -> `-1.0f` (fp_add) |

TanSig needs `e^-2x`. It squares `e^-x` instead of computing `e^-2x`
directly. That keeps the CORDIC argument at `|x|`, not `2|x|`, so TanSig gets
the same input range as LogSig.

## Products and adder tree (`weighted_sum`)

Each input has its own floating multiplier. The products go into a tree of
floating adders, which adds neighbouring terms in pairs.

A level with an odd number of terms needs care. Its last term waits in a
`delay_unit` for one adder latency (12 registers), and so meets its partner at
the next level in step. For 6 inputs, the tree works like this:

1. Three adders form (I0+I1), (I2+I3) and (I4+I5).
2. The first two sums go into one adder. The third sum goes through the delay
   unit.
3. A final adder joins the two results.

In a biased neuron, the bias takes the place of a delay unit. The bias
register is static while the neuron runs, so it needs no alignment and joins
the tree wherever it is the odd term. For 6 inputs plus bias, (I4+I5) is added
to the bias instead of being delayed. The 2- and 4-input variants follow the
same rule.

## Floating-point units

`fp_mul`, `fp_add` and `fp_div` stand in for the vendor-generated cores of the
original design. They keep the same format and the same latency. Their
arithmetic follows these rules, all chosen for this design:
- Rounding is to nearest, ties to even.
- Subnormal inputs and results are flushed to zero.
- Overflow gives infinity.
- Invalid operations, such as inf-inf, 0*inf, 0/0 and inf/inf, give the quiet
  NaN `0x7FC00000`.
- x/0 gives infinity.

Each unit computes its result in one block of logic, then passes it through a
line of `LATENCY` registers. To reach a high clock rate, let the synthesis tool
retime those registers into the logic, or split the logic by hand. The
register count is what fixes the timing; where the registers sit does not.

The float-to-fixed converter rounds to nearest even and saturates. The
fixed-to-float converter is exact, since 20 bits fit in the 24-bit
significand.

## The bank (`neuron_bank`, top level)

Neuron `k = act*6 + n*2 + b` has these settings:
- `act`: 0, 1 or 2 for RadBas, LogSig or TanSig;
- `n`: 0, 1 or 2 for 2, 4 or 6 inputs;
- `b`: 1 if the neuron has a bias.

The neurons share the clock, reset, `weight_in`, `data_in[0..5]` and
`input_ready`. A 2-input neuron uses only `data_in[0..1]`. Each neuron has its
own `shift[k]`, `f_out[k]` and `result_ready[k]`. To give every neuron
different weights, pulse one `shift` bit at a time while feeding its words.

## How far to trust it, and where it departs from the original

Every variant has been simulated end to end against a real-valued reference.
The tests also check cycle-exact latencies, streaming on consecutive clocks,
reloading of weights and reset. Where this RTL makes its own choices:

- **Vendor cores.** The floating-point cores and the CORDIC were vendor IP in
  the original. Here they are written from scratch, with the published widths
  and latencies. Their rounding and special-value behaviour is this design's
  own, as listed above.
- **Latency split.** The divider's 28 cycles and the 6 + 22 + 6 split of the
  converters and the CORDIC are inferred from the published neuron totals. Only
  the sums are certain.
- **Fixed-point formats.** The binary points (s.2.15, s.1.16, s.3.16) are
  chosen here. The widths (18 and 20 bits) are the original's.
- **LogSig output width.** One drawing of the original LogSig chain labels the
  divider output as 20 bits. This design follows the written statement
  instead: every activation produces a 32-bit float.
- **Bias position and reset.** The bias sits at the end of the shift chain,
  and the reset is synchronous. Both are this design's choices.
- **Grouping.** Putting all 18 neurons into one bank is for building and
  testing only. In a real network you would instantiate `neuron` directly.
- **Not reproduced.** The original reported FPGA results: slices, clock
  periods of 2.469 and 3.263 ns, and 10 neurons fitting a mid-size device.
  Those depend on the vendor cores and the implementation tools, so they are
  not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/neuron_pkg.sv` | float type, activation enum, constants, latency functions |
| `rtl/neuron_bank.sv` | top: the 18 variants |
| `rtl/neuron.sv` | one neuron: weights, weighted sum, activation, ready pipeline |
| `rtl/weight_chain.sv` | serial weight/bias registers |
| `rtl/weighted_sum.sv` | multipliers, adder tree, delay units |
| `rtl/radbas_act.sv`, `rtl/logsig_act.sv`, `rtl/tansig_act.sv` | activation chains |
| `rtl/exp_unit.sv` | CORDIC exponent calculator |
| `rtl/cordic_hyp.sv` | pipelined hyperbolic CORDIC |
| `rtl/float_to_fixed.sv`, `rtl/fixed_to_float.sv` | converters |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv`, `rtl/fp_div.sv`, `rtl/fp_negate.sv` | floating-point units |
| `rtl/fixed_add.sv`, `rtl/delay_unit.sv` | fixed adder, register delay line |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_fp_pkg.sv` | reference float conversions for the testbenches |
| `tb/tb_neuron_chain.sv` | two neuron layers chained through ready signals |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Build and run
one with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/neuron_pkg.sv tb/tb_fp_pkg.sv tb/tb_neuron_bank.sv \
  --top-module tb_neuron_bank -o sim
./obj_dir/sim
```

Replace `tb_neuron_bank` with any other testbench. `tb_neuron_bank` runs the
whole bank at its default size. Verilator needs about a minute to build it;
the simulation itself takes well under a second.

The testbenches check results in two ways:
- The floating-point units and converters are checked bit-exactly against a
  double-precision reference rounded to single precision.
- The CORDIC, the exponent calculator, the activations and the neurons are
  checked against `$exp`, `$cosh` and `$sinh` within a small tolerance.
