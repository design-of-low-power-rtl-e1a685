# A 4-tap, 8-bit FIR filter pipelined at the gate level for adiabatic logic

This is a small FIR filter whose structure comes from adiabatic circuit
design. It is meant for pass-transistor adiabatic logic (PAL). In PAL every
gate is powered by a sinusoidal *power clock* rather than a DC rail. A gate
evaluates while its power clock rises and gives its charge back while the
clock falls. Two complementary power clocks alternate from one gate level to
the next. As a result every logic level is a pipeline stage, and pipelining
costs no flip-flops.

The filter is therefore very deep. It has four taps, 8-bit signed samples and
coefficients, and a 16-bit output. Each tap has a radix-4 Booth multiplier
followed by a carry-lookahead adder (CLA), 12 stages in all. The sample
enters the last tap's adder 48 stages (24 power-clock cycles) after it enters
the filter. A new sample can enter on every stage, which is two samples per
power-clock cycle.

The RTL describes this pipeline in synthesizable SystemVerilog. Next to the
filter sits the digital sequencer of the resonant supply that makes the power
clock.

## How an adiabatic stage becomes RTL

PAL gates are dual-rail and transistor-level, so RTL cannot show their energy
recovery. What RTL can show is their timing. Each PAL stage holds its result
for one half power-clock cycle, and data advances one stage per half cycle.
The RTL therefore uses:

* **one clock, `clk`, with one rising edge per half power-clock cycle.** It
  is called the *stage clock* below.
* **one register per PAL stage.** Every pipeline depth in this design counts
  such registers. Two stages make one power-clock cycle.

All the logic is single-rail. An asynchronous active-low reset `rst_n` clears
every stage so that a simulation starts from zeros. PAL has no reset; the
reset belongs to this RTL.

## The filter: `pal_fir`

```
 x_in ──┬──[12 buf]──┬──[12 buf]──┬──[12 buf]──┐
        │            │            │            │
      A0 ⊗         A1 ⊗         A2 ⊗         A3 ⊗     Booth array, 7 stages
        │            │            │            │
  0 ──► ⊕ ─[2 buf]─► ⊕ ─[2 buf]─► ⊕ ─[2 buf]─► ⊕ ──► y_out   CLA, 5 stages
```

The structure is a systolic direct form:

* **Sample line.** The upper line runs the sample through three chains of 12
  PAL buffers (`pal_buffers`, `X_BUF`). The 12 buffers equal the 12 stages of
  a tap's multiplier plus adder.
* **Taps.** Every tap has a `booth_multiplier`. It multiplies the tap's
  sample by its coefficient `coef[k]` and adds the running sum from the tap
  before. The first tap adds 0.
* **Sum line.** Between two adders sit 2 PAL buffers (`S_BUF`).

### What the filter computes

This is the least obvious part of the design. The path from `x_in` through
tap k to `y_out` is

```
L_k = k*X_BUF + MUL_STAGES + ADD_STAGES + (3-k)*(S_BUF + ADD_STAGES)
```

stages long, so the filter computes

```
y(t) = sum_k coef[k] * x(t - L_k)      (mod 2^16)
```

Neighbouring taps are `X_BUF - S_BUF - ADD_STAGES` samples apart. The
defaults follow the published depths: 12, 2, 7 and 5. With them, L = 33,
38, 43, 48, so **the four taps are 5 samples apart**, not 1. The response
is a sparse 4-tap filter that takes the newest of its four samples 33 stages
ago.

The total latency (48 stages = 24 power-clock cycles) matches the published
figure. The spacing, however, follows from the published buffer depths and
is not what an ordinary 4-tap FIR needs. An ordinary 4-tap FIR, with taps 1
sample apart, needs `S_BUF = X_BUF - ADD_STAGES - 1`: that is 6 with the
other defaults, and the latency is unchanged. Both settings are tested.
`coef[3]` always multiplies the oldest sample.

### Timing and interface

| port | width | meaning |
|------|-------|---------|
| `clk` | 1 | stage clock (one edge per half power-clock cycle) |
| `rst_n` | 1 | asynchronous active-low reset |
| `x_valid`, `x_in` | 1, 8 | sample (signed), one per clock |
| `coef[4]` | 4 × 8 | coefficients A0..A3 (signed) |
| `y_out` | 16 | output, wraps modulo 2^16 |
| `y_valid` | 1 | `x_valid` delayed by L_3 = 48 clocks |

Each coefficient enters the pipeline along with the sample it multiplies. A
change of coefficients therefore reaches the output gradually over
L_0..L_3 clocks. `y_valid` is a plain delayed flag. It does not mark which
outputs contain only valid samples.

The sum of four 8×8 products can exceed 16 bits: 4 × (−128)·(−128) = 65536.
The output wraps, just as the 16-bit adder does.

## The multiply-accumulate unit: `booth_multiplier`

`booth_multiplier` computes `product = MIER × MCAND + SUM_IN (mod 2^16)` for
signed 8-bit operands. The coefficient is MIER and the sample is MCAND. The
unit has two parts:

* a Booth array (`booth_array`, `MUL_STAGES` = 7) that reduces four partial
  products to two 15-bit vectors, SUM and CRY;
* a CLA (`cla_adder`, `ADD_STAGES` = 5) that adds SUM, CRY and `SUM_IN`.

`SUM_IN` goes straight into the adder. It is therefore sampled `MUL_STAGES`
clocks after the operands it is added to. In the filter this is simply where
the previous tap's sum arrives.

### Booth recoding (`booth_decode`)

Rank i examines the multiplier bits m = MIER<2i+1 : 2i−1>, with MIER<−1> = 0.
These give the digit d = −2·m2 + m1 + m0 ∈ {−2, −1, 0, +1, +2}. The decoder
produces four control signals:

* `x1 = m0 ^ m1` selects the multiplicand once;
* `x2 = m0·m1·¬m2 + ¬m0·¬m1·m2` selects twice the multiplicand;
* `n[1] = m2` negates the selected multiple;
* `n[0] = ¬m2` is the complement rail of `n[1]`.

### Ranks and the sign-extension trick (`booth_rank`)

Each rank has nine Booth gates that form the partial product:

```
pp_raw = x1·{M7, M}  |  x2·{M, 0}
pp     = n[1] ? ~pp_raw : pp_raw
```

The +1 that completes a negation goes into the rank's CRY<0>. Instead of
extending every partial product to 16 bits, each rank adds constant bits:

| rank | SUM<8:0> | CRY<8:0> | SUM + CRY |
|------|----------|----------|-----------|
| first | `{~pp8, pp[7:0]}` | `{1, 0000000, n1}` | d·M + 512 |
| others | `{~pp8, ~pp7, S[6:0]}` | `{pp7, C[6:0], n1}` | A + B + d·M + 384 |

In the second row, S and C come from seven full adders on A, B and pp[6:0].
A and B are the previous rank's SUM<8:2> and CRY<8:2>, so the SUM vector
moves two places per rank and the carries one.

Each rank retires its SUM<1:0> and CRY<1:0>. After four ranks the vectors
hold bits 14:0, and SUM + CRY = MIER·MCAND + 2^15 exactly. The CLA adds a 1
at bit 15 of its SUM operand, where the 15-bit vector has no bit, which
removes the 2^15 modulo 2^16. The testbenches prove this arithmetic over all
65536 operand pairs.

In `booth_array` each rank is followed by a register, giving 4 stages. The
remaining `MUL_STAGES − 4` stages are buffers at the output. PAL spreads its
seven stages over gate levels; the RTL only keeps the count.

### The adder (`cla_adder`)

The adder has five stages, one register after each:

1. 3:2 carry-save row (SUM, CRY, SUM_IN);
2. bit generate and propagate;
3. 4-bit group generate and propagate;
4. lookahead carries into each group and each bit;
5. sum.

Setting `ADD_STAGES` above 5 adds output buffers.

## The power-clock supply and `pulse_generator`

The power clock comes from a resonant push-pull supply made of several
parts:

* a ring oscillator clocks a pulse generator;
* the pulse generator, through gate drivers, briefly closes two switches in
  turn:
  * S2 ties the power-clock node to Vss near its minimum;
  * S1 ties it to Vdd near its maximum;
* an external inductor and the load capacitance resonate between these
  pulses.

Energy is added only when the voltage across a switch is nearly zero.

`pulse_generator` is the digital part of this supply. It is a small state
machine clocked by the oscillator output `osc_i`. A power-clock period lasts
`PERIOD` oscillator cycles (default 8). Its outputs are:

* `a` (to S2): high for `PULSE_W` cycles (default 1) at the start of each
  period;
* `b` (to S1): high for the same time half a period later.

An assertion checks that `a` and `b` never overlap. The original describes
the circuit as an asynchronous state machine; this version is synchronous,
and its period and pulse width are assumptions.

The oscillator, the gate drivers, the switches, the inductor and the DC
supplies are analog and are not modelled.

## The top: `adiabatic_fir_top`

The top holds `pal_fir` and `pulse_generator` side by side:

* `osc_i` comes from the ring oscillator;
* `gate_s2` and `gate_s1` go to the gate drivers.

The two clocks `clk` and `osc_i` are independent inputs. In silicon the stage
clock would be the power clock the supply produces; that link is analog.
Parameters pass through to the two blocks: `MUL_STAGES`, `ADD_STAGES`,
`X_BUF`, `S_BUF`, `PG_PERIOD` and `PG_PULSE_W`.

## Where this RTL departs from the published design, and why

* **Stage counts.** The published text gives the multiplier 5 stages and the
  adder 7. Its block diagram gives 7 and 5. The RTL uses 7 and 5. Either way
  the sum is 12, so the filter's timing is the same.
* **Tap spacing.** The taps are 5 samples apart with the published buffer
  depths; see *What the filter computes*. `S_BUF = 6` gives an ordinary
  4-tap FIR.
* **Own choices.** The following are this RTL's own choices:
  * the single-rail, one-register-per-stage model;
  * the reset and the `y_valid` flag;
  * coefficients as ports, applied as the Booth multiplier operand;
  * signed arithmetic wrapping at 16 bits;
  * the exact sign-extension constants;
  * the split of the multiplier's stages (one per rank, then buffers);
  * the CLA's 4-bit grouping;
  * the synchronous pulse generator with its default period and width.
* **Not included.** The comparison design built in static CMOS is not part
  of this RTL: 4 flip-flops per tap, 2+2 stages, 16-cycle latency. Neither
  are power figures or the analog supply.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it proves |
|-----------|----------------|
| `tb_booth_decode` | all 8 windows give the right digit controls |
| `tb_booth_rank` | first and later rank arithmetic, all windows × all multiplicands |
| `tb_booth_array` | SUM+CRY = product + 2^15 for all 65536 pairs, latency 7 |
| `tb_cla_adder` | 20000 random sums plus extremes, latency 5 |
| `tb_booth_multiplier` | all 65536 pairs with random SUM_IN, latency 12 |
| `tb_pal_buffers` | depths 12, 2 and 0; reset values |
| `tb_pal_fir` | default filter and the S_BUF=6 filter against the formula above, three coefficient sets, `y_valid` |
| `tb_pulse_generator` | exact pulse positions for two settings, no overlap, pulse counts |
| `tb_adiabatic_fir_top` | whole design at default parameters (see below) |
| `tb_fir_sample_rates` | whole design clocked for 10 MS/s (GSM) and 50 MS/s (DECT) input; impulse arrival times in ns (4800 ns and 960 ns = 24 power-clock cycles) and a full-rate stream |

`tb_adiabatic_fir_top` runs the whole design at its default parameters:

* it checks the filter output and `y_valid` on every clock for 4000 samples;
* it checks the gate pulses on every oscillator edge;
* it counts mechanisms and fails if any never happens: Booth digits −2…+2,
  16-bit wrap-around, `y_valid` rising and falling, full-rate runs, and S1
  and S2 pulses.

To simulate with Verilator 5 (the package is passed first; other modules are
found in `rtl/` by name):

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl rtl/pal_fir_pkg.sv \
    tb/tb_adiabatic_fir_top.sv --top-module tb_adiabatic_fir_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Each finishes in well under a
second. For lint, use `verilator --lint-only -Wall -y rtl rtl/pal_fir_pkg.sv
rtl/<module>.sv`. The only warnings are unused constants of the shared
package.

## Files

* `rtl/pal_fir_pkg.sv`: widths, default depths, `booth_ctrl_t`
* `rtl/booth_decode.sv`, `rtl/booth_rank.sv`, `rtl/booth_array.sv`:
  the Booth array
* `rtl/cla_adder.sv`, `rtl/booth_multiplier.sv`: adder and
  multiply-accumulate unit
* `rtl/pal_buffers.sv`: PAL buffer chain
* `rtl/pal_fir.sv`: the filter
* `rtl/pulse_generator.sv`: supply pulse sequencer
* `rtl/adiabatic_fir_top.sv`: top
* `tb/tb_*.sv`: one testbench per module, plus `tb_fir_sample_rates`
