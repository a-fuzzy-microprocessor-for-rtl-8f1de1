# FMP — a fuzzy inference processor for real-time control

Motor, engine or process controllers that use fuzzy logic need thousands of
rule evaluations per second. Software can't keep up at that rate. This RTL
implements the fuzzy microprocessor (FMP) architecture published as "A Fuzzy
Microprocessor for Real-time Control Applications": a complete fuzzy inference
engine on one chip, small enough to sit next to a host CPU.

- 8 input variables with 8-bit resolution, each covered by 8 trapezoid terms.
- Up to 128 rules, in 4 rule-sets of 32.
- 4 output variables with 8 singleton terms each.
- MIN-MAX or MIN-SUM inference, with weighted-mean defuzzification.
- An inference over 32 rules takes 170 clock cycles. Over 128 rules it takes 386.

At the original 20 MHz clock that is about 118 K and 52 K inferences per
second. The original chip reports 114 K and 51 K.

Two ideas keep the chip small, and most of this README explains them:

1. **No membership tables.** The memory stores only each term's break
   points and slopes, and a fuzzifier computes the grade arithmetically.
2. **One comparator per processing element.** The same adder does both
   the MIN and the MAX. The rules are evaluated serially, in a schedule
   that matches the fuzzifier's output rate exactly.

All sizes in the RTL are the original chip's. The RTL has no size parameters:
the counts live in `fmp_pkg` and are fixed by the architecture.

## What one inference computes

Grades are 8-bit unsigned numbers, where 255 stands for 1.0.

1. **Fuzzify.** For every input `x_i` and every term `n`, compute the
   grade `G_n(x_i)`.
2. **Rule strength.** Each rule names one term `n` (1..8) per input, or 0
   for "input not used". Its strength is the minimum over the 8 inputs:
   `w = min_i G_n(x_i)`. An unused input contributes 1.0.
3. **Aggregate.** The rules that conclude the same output term `j` are
   combined into that term's height `h_j`:
   - MIN-MAX: `h_j = max(w)`.
   - MIN-SUM: `h_j = min(255, sum(w))`.
4. **Defuzzify.** Each output term is a singleton at position `c_j`. The
   output is `y = floor(sum_j h_j c_j / sum_j h_j)`, or 0 if every `h_j` is 0.

The rules are organised in rule-sets. Rule-set `s` (0..3) produces output
`s`. Inside a rule-set, processing element (PE) `j` (0..7) evaluates four
rules, and all of them conclude output term `j`. That gives 4 rule-sets × 8
PEs × 4 rules = 128 rules.

## Membership terms and the fuzzifier

Each term is a trapezoid described by four numbers:

- `a`: the foot of the rising edge.
- `b`: the point where the falling edge starts.
- `mu`: the rising slope.
- `beta`: the falling slope.

The grade is:

```
G(x) = mu * (x - a)          for a <= x < b
G(x) = 1 + beta * (x - b)    for x >= b
```

The result is limited to the range 0..1. Other shapes come from the same
formula:

- A very steep `mu` gives a Z shape, which starts at 1.
- `mu * (b - a) = 1` gives a triangle.
- `beta = 0` gives an S shape, which stays at 1.

**Slopes are floating point:** `slope = M / 2^E`.

- `M` is an 8-bit two's-complement mantissa. `E` is a 3-bit exponent.
- Slopes therefore range from 1/128 up to 127 grade steps per input step.
  The step is 1/255 of full scale.
- The exponent is what lets a gentle slope be tuned finely.
- A term takes 6 bytes: `a`, `b`, `mu_m`, `mu_e`, `beta_m`, `beta_e`.
  Eight terms for each of 8 inputs make 3072 bits.

**Two fuzzifiers, odd and even terms.**

- The 8 terms of an input are arranged so that neighbours overlap but
  terms 1,3,5,7 do not overlap each other, and neither do 2,4,6,8.
- So at any `x`, at most one odd and one even term is non-zero.
- Fuzzifier 1 (`GROUP=0`) finds the active odd term. Fuzzifier 2
  (`GROUP=1`) finds the active even term.
- Each reports a pair: the term number `m` and the grade `G_m(x)`.
- A PE asking for term `n` takes the pair with `n`'s parity. It uses the
  grade if `m == n` and 0 otherwise.
- For this to work, each group's terms must be in ascending order of `a`
  and must not overlap. Software that loads the memory has to respect this.

**Three pipelined stages, 8 cycles each** (`fmp_fuzzifier`). A new input
enters every 8 cycles, and its result appears 24 cycles later.

| stage | cycles | what happens |
|---|---|---|
| 1 compare | 8 | One adder with a two's complementer computes `x-a` and then `x-b` for each of the group's 4 terms, one term per 2 cycles. The counter keeps the last term with `x >= a` (carry out = 1), with its differences and slopes. |
| 2 multiply | 8 | Shift-and-add, one bit per cycle: `|slope mantissa| * (x-a)`, or `* (x-b)` once `x >= b`. The product is 16 bits. |
| 3 scale and limit | 8 | Shift right by `E`, one bit per cycle. Limit the result to 255 (`L`). Select the grade: `L` on a rising edge with a positive slope, 0 with a negative one; `255-L` on a falling edge with a negative slope, 255 with a non-negative one. |

If `x` lies below `a` of every term in a group, that group reports grade 0.

## Processing element: MIN and MAX on one adder

A PE (`fmp_pe`) has these parts:

- An EQUAL/selector that turns the fuzzifier pair into `G_n(x_i)`.
- One adder used as a comparator.
- REG(B): a 4-deep rotating register holding `w_1..w_4`.
- REG(A): the register that holds `h`.

A rule-set period lasts 72 cycles. `cyc` counts them and is supplied by the
controller.

```
cyc  0..63  MIN   input i = cyc[5:3], rule r = cyc[2:1]
            even cycle: G_n(x_i) -> operand register
            odd cycle : compare operand with the head of REG(B) (= w_r),
                        shift the smaller back in (for i = 0: load it)
cyc 64..71  MAX   rule k = cyc[2:1]
            odd cycle : REG(A) <- max(REG(A), w_k), or saturated sum;
                        w_k is also sent to the weight memory
```

The rules are visited input by input: one input every 8 cycles, two cycles
per rule. That is exactly the rate at which the fuzzifiers deliver inputs, so
the PEs can start while the fuzzifiers are still producing later inputs.

All 8 PEs run in lockstep. The rule memory delivers the 8 term numbers for
`(rule-set, r, i)` in one read.

## Defuzzifier

`fmp_defuzzifier` takes 72 cycles per output:

- **Cycles 0..63:** an 8-cycle shift-and-add multiply-accumulate per term,
  accumulating `sum h_j c_j` (19 bits) and `sum h_j` (11 bits).
- **Cycles 64..71:** a restoring division that produces one quotient bit
  per cycle.

While the defuzzifier works on rule-set `s`, the PEs evaluate rule-set
`s+1`. A PE's `h` stays valid until cycle 65 of the following period, and
the defuzzifier has read all eight by cycle 63. A new start may coincide
with the last division cycle.

## Timeline of an inference

With `t` = 0 the first busy cycle and `R` the number of rule-sets:

```
t = 0, 8, ..., 56       input 0..7 enters the fuzzifiers
t = 24, 32, ..., 80     its result is stored in the fuzzified-value register
t = 25 + 72 s           PEs start rule-set s (s = 0..R-1)
t = 25 + 72 s + 71      defuzzifier starts on rule-set s
t = 25 + 72 (s+2)       output s written
t = 25 + 72 (R+1) + 1   done
```

The fuzzified-value register holds `(m, G)` from both fuzzifiers for all 8
inputs. Rule-sets 1..3 reuse those values, so the fuzzifiers run only once
per inference.

## Using the chip

### Host bus

The host bus is D0-7, A0-10, /CS, /RE and /WE, all active low, plus /RES
(`rst_n`).

- **Writes:** the strobes are sampled on the system clock. One write
  happens per falling edge of /WE while /CS is low. Hold the address and
  data for at least 2 clocks.
- **Reads:** reads are combinational. `doe` tells the pad driver to drive
  D0-7.

| address | contents |
|---|---|
| `000`–`1FF` | input membership terms: `{input[2:0], term[2:0], field[2:0]}`. The fields are 0 `a`, 1 `b`, 2 `mu_m`, 3 `mu_e`, 4 `beta_m`, 5 `beta_e`. |
| `200`–`3FF` | rules: `{rset[1:0], pe[2:0], rule[1:0], pair[1:0]}`. The low nibble holds input `2*pair` and the high nibble input `2*pair+1`. Value 1..8 = term, 0 = input unused. |
| `400`–`47F` | weight memory, read only: strength of rule `{rset, pe, rule}` from the last inference. |
| `480`–`49F` | output singletons: `{output[1:0], term[2:0]}`. |
| `4A0`–`4A7` | input variables. |
| `4A8`–`4AB` | output values, read only. |
| `4B0` | control, written while idle: bit 0 start, bits 2:1 = rule-sets − 1, bit 3 = MIN-SUM. Status, when read: `{busy, done, 0, 0, method, rsets-1, 0}`. |

### Target-side pins

- `tgt_din`, `tgt_addr` and `tgt_we` write an input variable directly. The
  target wins if the host writes the same cycle.
- `tgt_dout` shows output `tgt_addr[1:0]`.
- `tgt_start` starts an inference with the stored configuration.
- `busy` and `done` report progress.

## How far this follows the original design

These parts follow the original design:

- The block structure: input register, two fuzzifiers, rule memory, 8
  PEs, multiplexer, weight memory, input and output membership memories,
  defuzzifier, output register, CPU bus and controller.
- All counts and memory capacities.
- The trapezoid formula and the odd/even split between the fuzzifiers.
- The fuzzifier datapath: adder-comparator, counter, 16-bit shift
  multiplier, floating-point shifter, limiter, complement and selector.
- The PE datapath: shared comparator, 4-stage REG(B), REG(A).
- The cycle budget: 8/8/8 in the fuzzifier, 64+8 in the PE and 64+8 in
  the defuzzifier.
- The pipelining of the PEs with the defuzzifier.

These are choices made here, because the original description leaves them
open:

- The byte layout of a term. The slope format is `M/2^E` with a
  two's-complement `M`, so the steepest slope is 127 rather than 255.
  With `beta = 0` a term stays at 1 after `b`.
- The 4-bit rule code, with 0 meaning "input unused".
- That PE `j` holds the rules of output term `j`, and that rule-set `s`
  drives output `s`.
- That the weight memory keeps the rule strengths of the last inference.
- The saturating sum for MIN-SUM. Truncating division, with output 0 when
  every weight is 0.
- The address map, the sampled bus protocol, the control/status byte and
  the target control pins.
- The fuzzified-value register, and the one cycle it adds before the
  first PE period. With it an inference is 170 cycles rather than the
  original ~175, and 386 rather than ~392.
- The memories are register arrays with as many read ports as the
  datapath needs. The original chip uses SRAM macros.

Not modelled: the pads and the tri-state D0-7 driver. Data in, data out and
drive enable are separate ports.

## Files and simulation

`rtl/` holds one module per file. The package `fmp_pkg` is shared:

- `fmp_top`: the whole chip.
- `fmp_fuzzifier`, `fmp_pe`, `fmp_defuzzifier`, `fmp_mux`: the datapath.
- `fmp_mf_mem`, `fmp_rule_mem`, `fmp_weight_mem`, `fmp_then_mem`: the
  memories.
- `fmp_input_reg`, `fmp_output_reg`: the input and output registers.
- `fmp_cpu_if`, `fmp_controller`: the host bus and the sequencer.

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` at the end. `tb_fmp_top` does the
following:

- It acts as the host: it loads random, well-formed knowledge bases and
  runs inferences with 1 to 4 rule-sets in both methods.
- It starts inferences from the host and from the target pins.
- It compares every output and every stored rule strength with a
  reference model written from the formulas.
- It checks the 170- and 386-cycle latencies.
- It counts each mechanism: edges, limiter, negative slopes, term
  match/mismatch, unused inputs, MIN-SUM saturation, overlap, an all-zero
  output, target I/O. A mechanism that never occurs counts as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fmp_pkg.sv \
          tb/tb_fmp_top.sv --top-module tb_fmp_top -Mdir obj -o sim
./obj/sim
```

`-y rtl` lets Verilator find each module by its file name. `-Wno-fatal`
keeps its lint warnings, mostly width and unused-signal notes, from
stopping the build. `--assert` enables the concurrent assertions in
`fmp_cpu_if` and `fmp_controller`:

- a write strobe lasts one cycle and selects at most one region;
- the defuzzifier starts only on the last cycle of a PE period;
- `busy` and `done` are never high together.

Replace `tb_fmp_top` with any other testbench name. The full-size top
test runs in well under a second.
