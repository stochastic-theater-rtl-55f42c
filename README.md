# Stochastic datapaths with their test platform: a KLT projector and an expression engine

In stochastic computing a number between 0 and 1 is carried on one wire. It is
the fraction of clock cycles in which the wire is 1. Arithmetic then costs
almost nothing:

- an AND gate multiplies two uncorrelated streams;
- a multiplexer that picks each input in turn averages them;
- an inverter gives 1 - a.

A bit flip changes the result by only one least significant bit, whichever bit
it hits, so the arithmetic degrades gracefully under faults. The costs are
time, since a w-bit result needs a 2^w-bit stream, and the converters between
binary and streams, which are often larger than the datapath they serve.

This RTL implements the hardware of the *Stochastic Theater* framework. The
framework turns an arithmetic expression into a stochastic datapath (SD) and
wraps it in a fixed test platform. The platform holds the input memory, the
binary-to-stream generators, a fault injector, the stream-to-binary counters,
the result memory and a controller. The top level `stochastic_theater` holds
two such systems:

- **KLT system**: a fully unrolled Karhunen-Loève (PCA) projection. By default
  it projects one 500-pixel image (a 20x25 face) onto 100 components, with
  9-bit values and 512-bit streams.
- **Expression system**: an SD built from a node list in postfix order. By
  default it computes the framework's example `(i0*i1 + i2*i3*i4)/2` from five
  sensors, plus a second expression that uses the remaining operators.

It also holds the PWM generator for the analog sensor interface.

## Number representation and the generators

A unipolar stream encodes p = ones / length. A bipolar stream encodes
2p - 1, which is in [-1, 1]. Every unit here defaults to unipolar. The
multiplier and squarer have a `BIPOLAR` parameter that switches them to XNOR.

`sc_bin2sto` makes a stream from a binary value v:

- a W-bit maximal-length Fibonacci LFSR (`sc_lfsr`) produces a number r each
  clock;
- the output bit is `r < v`.

The LFSR runs through 1 .. 2^W-1 exactly once per period, so **any
2^W-1 consecutive bits hold exactly v-1 ones**. The encoded value is therefore
(v-1)/(2^W-1), not v/2^W. A value of 0 or 1 gives a stream of all zeros, and
no 9-bit value gives a stream of all ones. Testbenches and users should decode
with this rule.

Every generator has its own fixed seed, `seed_of(i, W) = (37*i mod (2^W-1)) + 1`
(in `sc_pkg`). Seeds are fixed, so a run with the same inputs is repeatable to
the bit.

`sc_sto2bin` is two counters. One counts 1 bits and the other counts all bits,
both while the controller's conversion enable is high. The result is
ones/total.

## The arithmetic units

| unit | operator | circuit | latency |
|---|---|---|---|
| `sc_mul` | `*` (n inputs) | AND of all inputs; bipolar: XNOR chain | combinational |
| `sc_add` | `+` (n inputs, average) | mod-n counter selects one input per clock, registered | 1 clock |
| `sc_not` | `-` and `not` | inverter (1-a; bipolar -a) | combinational |
| `sc_pow2` | `pow2` | a AND a delayed one clock (bipolar XNOR) | combinational from a and its register |

Units are n-ary: a node with three operands becomes a 3-input AND or a 3-input
multiplexer, not a tree of 2-input units.

The scaled adder divides its sum by n. A P-input dot product therefore comes
out as f/P.

Each adder takes one bit per clock from its inputs in turn. When n is close to
the stream length, as in the KLT (500 inputs, 512 bits), each product is
sampled about once per run. The result is then an average of single bits. It
is unbiased, but its spread is about sqrt(f(1-f)/512), roughly ±0.02 to ±0.05.

The squarer needs its delayed copy to be uncorrelated with the live bit. LFSR
streams from a Fibonacci register are only partly decorrelated by one clock,
so `pow2` is the least accurate operator here.

## Expression datapath (`sc_expr_datapath`)

The expression is described by a `sc_node_t` array parameter `NODES`. Each
node holds an operator, an operand count and up to four operand indices. Index
i < N_IN names input i. Index N_IN + j names the output of node j. A node may
only use inputs and earlier nodes, and violations stop elaboration with
`$error`. `OUTS` lists the signal indices that become outputs.

The default program:

```
node 0  sig5  = i0 * i1            (aux0)
node 1  sig6  = i2 * i3 * i4       (aux1)
node 2  sig7  = (sig5 + sig6)/2    -> out_s[0]   func
node 3  sig8  = pow2(i0)
node 4  sig9  = not i1
node 5  sig10 = sig8 * sig9
node 6  sig11 = - i2
node 7  sig12 = (sig10 + sig11)/2  -> out_s[1]   g = (i0^2(1-i1) + 1-i2)/2
```

Output 1 is this design's own addition, so that every operator is built.

To compile another expression, override `N_IN`, `N_NODES`, `N_OUT`, `NODES`
and `OUTS`. Build the entries with `sc_node(op, nargs, a0, a1, a2, a3)`. The
leftmost element of the concatenation is the last node. Then size the
platform's `N_IN`/`N_OUT` to match.

## KLT datapath (`sc_klt_dotprod`)

For each component k, P two-input multipliers form `x_p AND lambda_pk`. A
P-input scaled adder sums them, so output k encodes f_k / P, where
f_k = sum_p x_p lambda_pk. The sample streams are shared by all components,
and each coefficient has its own generator.

In the source architecture the samples pass along a delay line before
multiplication. Here the host writes the samples one after another into the
platform's input memory, and that memory plays the delay line's role.

Memory map of the KLT platform (`klt_wr_addr`):

- 0 .. P-1: samples x_p;
- P + k*P + p: coefficient lambda_pk.

The default size needs 50,500 generators, 50,000 AND gates and 100
500-input multiplexers.

For signed coefficients, set `BIPOLAR` on `sc_klt_dotprod`. You then also need
to encode the values in bipolar form. The top level leaves it unipolar.

## The test platform and one run (`sc_platform`, `sc_ctrl_fsm`)

The host drives a run through these steps:

1. It writes the values (`wr_en/wr_addr/wr_data`).
2. It pulses `start`.
3. It waits for `busy` to fall, or for the one-cycle `done` pulse.
4. It reads each output's ones and total counts with `rd_addr`. The data
   appears one clock later.

The controller's sequence after `start`:

| state | cycles | what happens |
|---|---|---|
| LOAD | 1 | generators reload their seeds; datapath and counters cleared |
| BURNIN | `BURN_IN` (8) | streams flow, outputs not counted; skipped if 0 |
| RUN | `LEN` = 2^WL (512) | converters count |
| CAPTURE | 1 | counts copied to result memory; `done` |

`busy` is high for exactly 2 + BURN_IN + LEN cycles, which is 522 by default.

The burn-in exists for units whose outputs take time to settle. The FSM-based
exp/tanh units are the main case, and they are not built here. Of the units
built, the adders and squarers need one clock, so 8 cycles is generous.

The input memory is a register array, not a block RAM, because every
generator reads its word in every cycle. At the default KLT size it holds
50,500 x 9 bits.

Starting a run while `busy` is high is ignored. An assertion reports it.

## Clocks

The platform runs on `clk`. Each datapath has its own clock input
(`klt_sd_clk`, `expr_sd_clk`). In the framework each stochastic unit is
clocked by its own self-timed ring oscillator (STRO). Because the oscillators
drift against each other, streams from different units stay uncorrelated.

`sc_stro` is a **behavioural, non-synthesizable model** of such an oscillator.
Its half period is STAGES x STAGE_PS plus a seeded random jitter. On an FPGA
it would be a placed ring of LUTs. The synthesizable top therefore takes the
datapath clocks as ports, and the end-to-end testbench drives them either from
`clk` or from two `sc_stro` instances.

Crossing between `clk` and a datapath clock needs no synchronizer for the
streams: the converter samples a stream, which is exactly what stochastic
decoding tolerates. `sd_rst` is a level from the platform. With a much slower
datapath clock the datapath may miss the one-cycle LOAD reset. That only
shifts the phase of the adders' counters.

## Fault injection (`sc_fault_inject`)

A fault is described by a net, a time and a level, as in the framework's
fault model. The injector sits between the generators and the datapath.
While `flt_en` is high, input stream `flt_sel` is forced to `flt_val`:

- holding it for a whole run gives a permanent stuck-at fault;
- holding it for a window gives a transient fault.

In the KLT, a stuck-at-1 on one coefficient moves f_k by at most
x_p(1 - lambda_pk)/P, which is one input's share. The end-to-end test checks
this, together with a transient stuck-at-0 on a sample.

The framework draws fault times from Weibull or normal distributions in its
scripts. A testbench can do the same by driving these ports.

## Analog interface

`sc_pwm_gen` is a counter-based PWM output, 8 high clocks in every 16 by
default. Outside the FPGA an RC filter and an op-amp comparator turn an
analog sensor voltage into a stream against this reference. Only the
generator's existence and its pins are given by the source, so the period and
duty cycle are this design's choice. The analog parts, the stream-to-analog
converter for actuators, and the FSM-based exp/tanh/abs units are not
implemented.

## Where this RTL departs from or adds to the source design

- The datapath is fixed by parameters (a node list, or the KLT sizes). The
  framework instead generates it from a Python expression.
- The input and result stores are register arrays. The source uses block RAMs.
- Host access is a plain write port and a registered read port. The source
  drives the board from TCL scripts on a host computer and gives no protocol.
- The platform uses one clock. The source figure shows separate clocks for
  the generators and the datapath/converters.
- The burn-in length (8), the LOAD/CAPTURE cycles, the seeds, the LFSR taps
  and the 32-bit counters are choices. The counter width matches the source
  block diagram's 32-bit output bus.
- The 3-input product of the example is one n-ary AND, as the framework's
  Python list writes it. One printed form of the expression uses two binary
  products instead.
- The source's test circuit also brings the datapath's output stream out as
  a pin. Here the streams stay inside; only their counts reach the host.
- The second expression output and the fault injector as logic are additions.
  The source injects faults from the simulator.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sc_pkg.sv tb/tb_stochastic_theater.sv \
          --top-module tb_stochastic_theater -o sim && ./obj_dir/sim
```

- `tb_stochastic_theater`: both systems at a KLT of P=4, K=2. It runs on
  `clk`, then on ring-oscillator clocks, then with a permanent and a
  transient fault. It counts every mechanism and checks results against
  closed-form values, with a tolerance of 0.06.
- `tb_klt_face_projection`: the KLT at its full projection length, 500
  samples, onto K=8 components. Every component is thus the same 500-input
  dot product as at the default size. It makes 4,500 host writes and one run,
  and checks every component within 0.08. The largest error seen is about
  0.03.
- The default 500x100 top has not been simulated. Verilator turns it into
  roughly 150 MB of C++, which does not build in reasonable time.
- `tb_correlation_effect`: why streams must be uncorrelated. Two aligned
  0.5 streams multiply to 0. Two generators with the same seed multiply to
  0.5, and with different seeds to about 0.25. It also decodes the 8-bit
  stream 01110110 as 0.625 unipolar and 0.25 bipolar.
- Unit testbenches `tb_sc_*`: exact, cycle-by-cycle checks of each block.
  Examples are the LFSR period, exactly v-1 ones per period from the
  generator, the round-robin order of the adder and the controller's cycle
  counts.

Lint of the full-size top with `verilator --lint-only -Wall` takes about four
minutes and 4 GB.

## Files

- `rtl/sc_pkg.sv`: operator codes, node record, controller states, LFSR taps,
  seeds
- `rtl/sc_lfsr.sv`, `sc_bin2sto.sv`, `sc_sto2bin.sv`: conversion
- `rtl/sc_mul.sv`, `sc_add.sv`, `sc_not.sv`, `sc_pow2.sv`: arithmetic
- `rtl/sc_expr_datapath.sv`, `sc_klt_dotprod.sv`: datapaths
- `rtl/sc_ctrl_fsm.sv`, `sc_fault_inject.sv`, `sc_platform.sv`: test
  platform
- `rtl/sc_pwm_gen.sv`: analog interface reference
- `rtl/sc_stro.sv`: ring-oscillator model (simulation only)
- `rtl/stochastic_theater.sv`: top level
