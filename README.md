# LLRF field controller for a superconducting cavity string

A superconducting linac drives several cryomodules, up to 32 cavities, from one
klystron. The low-level RF (LLRF) controller must keep the amplitude and phase
of the accelerating field constant, although each cavity detunes
(microphonics, Lorentz-force detuning) and although every probe and cable has
its own gain and phase error. The controller does this in four steps:

1. Turn each cavity's probe signal into a calibrated complex field value
   (I_c, Q_c), with that cavity's gain and phase error taken out.
2. Add the values of all cavities into the *vector sum* (I, Q).
3. Average the vector sum with a single-pole low-pass filter.
4. Drive the klystron's vector modulator with a proportional regulator plus a
   feed-forward term:
   `I_ctrl = I_ff + K_fb,I * (I_set - I_av)`, and the same for Q.

This repository is a synthesizable SystemVerilog implementation of that
controller as one pipelined datapath. It follows a published FPGA design that
was built for the TESLA Test Facility on a Xilinx Virtex-II with 18x18
multipliers. That design was drawn in a block-diagram tool, so it left open
many details that RTL has to fix: word widths, bus protocols and the latency
of some stages. Where this code had to choose, the section
"Own choices and departures" below says so.

## From IF samples to I and Q

The 1.3 GHz probe signals are down-converted to an intermediate frequency of
250 kHz and sampled at 1 MHz. That gives exactly four samples per IF period,
and each sample sits in a known *quarter* k = 0..3 of the period. For a probe
with gain K_c and phase error phi_c, the four samples of a field (I, Q) are

| quarter | sample V_k                              |
|---------|-----------------------------------------|
| 0       | K_c (Q cos phi_c + I sin phi_c)         |
| 1       | K_c (I cos phi_c - Q sin phi_c)         |
| 2       | -(sample of quarter 0)                  |
| 3       | -(sample of quarter 1)                  |

So any two consecutive samples, V_k-1 and V_k, hold the whole complex field.
It is recovered by a 2x2 matrix whose entries depend on the cavity and on the
quarter of V_k. Every quarter can use the same four-multiplier datapath
(`matrix_rotation`):

    I_c = (V_k * c) - (V_k-1 * s)
    Q_c = (V_k-1 * c) + (V_k * s)

Only the coefficient pair (c, s) changes with the quarter:

| quarter of V_k | c            | s            |
|----------------|--------------|--------------|
| 0              |  sin(phi)/K  |  cos(phi)/K  |
| 1              |  cos(phi)/K  | -sin(phi)/K  |
| 2              | -sin(phi)/K  | -cos(phi)/K  |
| 3              | -cos(phi)/K  |  sin(phi)/K  |

The host works these values out during calibration and writes them into a
small RAM in each conditioner (`coef_ram`). The RAM is addressed by
{ADC number, quarter}. This table is the key to using the design. The
end-to-end testbench `tb/tb_llrf_top.sv` builds it for 32 cavities with
random gains and phases. It then checks that a common field of (400, -250)
comes out of the chain as 32 x (400, -250) to within a few LSB.

Coefficients are signed 18-bit fractions with 18 fractional bits, so the
value is `coef / 2**18`, each product is shifted right by 18, and |c|, |s|
must stay below 0.5. A probe gain K_c must therefore be above 2 in ADC LSB
per field unit. If it is not, scale the field unit.

## Multiplexed ADC buses

The 32 ADCs are not wired to the FPGA in parallel. Four *ADC conditioners*
each serve a bus of 8 ADCs. After a conversion, the ADCs of each bus put their
samples on the bus one per clock. All four buses run in lock step and share
these inputs:

- `process_data`: high in a clock that carries a new sample.
- `adc_num`: 0..7, the ADC (cavity) number within the bus.
- `quarter`: 0..3, the quarter of the IF period of this conversion.

A *burst* is the 8 words of one conversion, ADC 0 first and ADC 7 last. Words
must come in the order 0..7, and an assertion in `cond_control` checks this.
`process_data` may drop for a few clocks inside a burst, and bursts may
follow back to back or with gaps.

Inside a conditioner, the pairing of V_k with V_k-1 is done by `sample_delay`.
This is an 8-deep shift register that advances only when `process_data` is
high. Its output is therefore always the same cavity's sample from the
previous burst. After reset the register is cleared, so the first burst after
reset is paired with zeros.

## Datapath and timing

```
 adc_data[0..3] --> adc_conditioner x4 --> vector_sum --> lp_filter (I) --> prop_regulator --> i_ctrl, q_ctrl
 process_data,      sample_delay (Z^-8)                  lp_filter (Q)     (subtract, gain,    data_ready
 adc_num, quarter   coef_ram                                                add feed-forward)
 cpu_wr ----------> matrix_rotation
                    iq_accumulator + cond_control
```

Every stage is fully pipelined. The conditioners accept one word per clock, so
the controller takes one burst every 8 clocks. At 100 MHz that is
12.5 Msample/s per ADC, above the 10 Msample/s upgrade the original design
aimed for. At 65 MHz it is 8.1 Msample/s.

The stage latencies, counted from the clock in which ADC 0 of a burst is on
the bus:

| stage                                            | clocks |
|--------------------------------------------------|--------|
| remaining 7 words of the burst                   | 7      |
| coefficient RAM read (samples registered to meet it) | 1  |
| rotation multipliers (z^-2) and add/subtract     | 3      |
| accumulator over the 8 cavities                  | 1      |
| vector sum                                       | 1      |
| low-pass filter (multiplier z^-2, state update)  | 3      |
| regulator (subtract, multiply, add)              | 3      |
| **total**                                        | **19** |

The 19 clocks match the total latency reported for the original design. That
report does not say which two events it measures between; the split above is
this implementation's. The end-to-end test checks the 19 clocks for every
burst. For a stalled burst it checks 12 clocks after the last word.

### How the data-ready signals are handled

This is the least obvious part of the control flow.

- Each conditioner's `cond_control` delays the ADC number by 4 clocks, to line
  it up with the rotated value. On ADC 0 it *presets* the accumulator with the
  incoming value, and on the other ADCs it adds. With ADC 7 it raises
  `data_ready`. That signal is a **level**: it stays high until the next
  burst's ADC 0 overwrites the sum, so during idle gaps it stays high for many
  clocks.
- `vector_sum` marks its output valid when all four conditioners are ready.
- Each `lp_filter` delays that signal by 2 clocks, to meet its multiplier, and
  enables its state update on the **rising edge** only (delay, invert, AND).
  A level that is held therefore updates the filter once per burst. The
  filter's input only needs to be valid in the clock in which data_ready
  rises, so back-to-back bursts, where the level is high for one clock, work
  as well.
- `lp_filter` pulses `dout_valid` when its state changes. `prop_regulator`
  delays that pulse by its 3 pipeline stages, and the result is the top's
  `data_ready`: one clock per new control vector.

The regulator stages run every clock, not only on data_ready. So a change of
set point, gain or feed-forward reaches `i_ctrl`/`q_ctrl` within 3 clocks,
even between field updates.

### The low-pass filter

`y += alpha * (x - y)`, with `alpha = one_over_n / 2**17`. It follows the
original filter's structure:

1. subtract the state from the input;
2. saturate the difference to 18 bits;
3. multiply by the 1/N register;
4. shift right by 17;
5. saturate to the state width and accumulate.

`one_over_n` is loaded when `lpf_we` is high and resets to 0, so the filter
holds still until the host sets it. Because the state has no fraction bits
below the LSB, the output settles within about `2**17 / one_over_n` LSB of a
constant input. The truncation leaves a small dead band.

## Interfaces of `llrf_top`

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst` | 1 | clock; synchronous active-high reset |
| `adc_data[N_COND]` | 14 signed each | one sample per bus per clock |
| `process_data`, `adc_num`, `quarter` | 1, 3, 2 | bus framing, shared by all buses |
| `cpu_wr` | struct `{we, addr[15:0], data[17:0]}` | coefficient write |
| `one_over_n`, `lpf_we` | 18 signed, 1 | filter coefficient and its load strobe |
| `i_set`, `q_set` | 20 signed | set point, in vector-sum units |
| `kfb_i`, `kfb_q` | 18 signed | gain, 12 fractional bits (4096 = 1.0) |
| `i_ff`, `q_ff` | 16 signed | feed-forward, in output units |
| `i_ctrl`, `q_ctrl` | 16 signed | vector modulator drive, saturated |
| `data_ready` | 1 | pulse: a new control vector is on the outputs |

CPU bus address, from bit 0 upwards: bit 0 selects the word (0 = c, 1 = s),
bits 2:1 are the quarter, bits 5:3 the ADC number and bits 7:6 the
conditioner (the field widths follow `N_ADC` and `N_COND`). Each write takes
one clock. The bus is write-only.

Set points, gains and feed-forward are plain inputs, so a table or the host
can change them sample by sample, as the control law allows.

## Fixed-point formats

| signal | width | note |
|--------|-------|------|
| ADC sample | 14 | `llrf_pkg::ADC_W` |
| rotation coefficient | 18, 18 fractional bits | `COEF_W`, `ROT_SHIFT` |
| per-cavity I_c, Q_c | 15 | sum of two 14-bit products after the shift |
| conditioner sum | 18 | 8 cavities, cannot overflow |
| vector sum, filter state, set point | 20 | 32 cavities, cannot overflow |
| filter / regulator multiplier operands | 18 | saturated before multiplying |
| control output | 16 | saturated |

Every right shift is arithmetic, so it truncates towards minus infinity.

## Files

`rtl/` holds one module per file:

- `llrf_pkg.sv`: widths, the CPU bus struct and a saturation function.
- `llrf_top.sv`: the whole controller (parameters `N_COND` = 4,
  `N_ADC` = 8).
- `adc_conditioner.sv`, built from `sample_delay.sv`, `coef_ram.sv`,
  `matrix_rotation.sv`, `cond_control.sv` and `iq_accumulator.sv`.
- `vector_sum.sv`, `lp_filter.sv`, `prop_regulator.sv`.

`tb/` holds a self-checking testbench `tb_<module>.sv` for every module. Each
compares against an independent integer model and prints
`TB_RESULT checks=N failures=M`. `tb_llrf_closed_loop.sv` is described in the
next section. `tb_llrf_top` runs the full 32-cavity design
at its default parameters. It covers calibration, 280 bursts in all four
quarters, back-to-back bursts, idle gaps, stalled bursts, a change of filter
coefficient, changes of set point, gain and feed-forward, and output
saturation.

## Closing the loop

`tb_llrf_closed_loop` puts the controller, at its default size, in a loop with
a behavioural model of the cavities. The model is one complex baseband field
V shared by all 32 cavities and advanced once per sample:

    V += a * (G * u - (1 - j*d) * V)

Here u is the drive (`i_ctrl + j*q_ctrl`), G = 0.1, a = 0.05 per microsecond
and d is the detuning. Each cavity's probe still has its own gain and phase
error. The test runs at 1 Msample/s (one burst every 100 clocks) and at
10 Msample/s (every 10 clocks), and steps d from 0.3 to 0.6 to model a
Lorentz-force detuning change. It checks the measured field against the
steady states that follow from the model equations:

| mode | model prediction | simulated |
|------|------------------|-----------|
| feedback only, K_fb = 4 | \|V\| = 370.9 | 371.1 |
| feed-forward only, after the detuning step | \|V\| = 358.1 (-10 %) | 358.1 |
| feed-forward + feedback, before and after the step, both rates | \|V\| = 400 | 399.8 .. 400.3 |

With feedback alone, a proportional loop leaves the usual steady-state error,
`1 / (1 + loop gain)`. Feed-forward removes the predictable part of the drive.
Feedback then corrects what feed-forward cannot foresee, here the detuning
step.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/llrf_pkg.sv tb/tb_llrf_top.sv \
          --top-module tb_llrf_top -o sim
./obj_dir/sim
```

Replace `tb_llrf_top` with any other testbench name. For lint, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/llrf_pkg.sv rtl/llrf_top.sv`.
The only warnings are for package constants that a given module does not use.

## Own choices and departures

These points follow the original design:

- the 4 x 8 organisation and the conditioner's internal structure (Z^-8
  FIFO enabled by process_data, coefficient RAM addressed by ADC and quarter,
  rotation, accumulator preset by the first cavity, control logic);
- the rotation's four multipliers with 2-clock latency, shift by 18 and
  1-clock add/subtract;
- the filter's structure, including the 1/N register, the shift by 17 and the
  edge-detected enable;
- the regulator's subtract, multiply and add order, with a delay line for
  data ready;
- the control law itself.

These are this implementation's own choices:

- the 14-bit ADC width, the 16-bit output width and the gain format;
- saturation rather than wrap in the casts;
- the CPU bus and its address map;
- data ready as a level out of the conditioners;
- AND-combining the four conditioner ready signals;
- a 2-clock sync delay in the filter;
- one register per regulator stage;
- zero reset values;
- the extra register that aligns the samples with the synchronous RAM read.

Departures:

- The original filter also passes its data output through the sync block. Here
  the output comes straight from the state register, and `dout_valid` marks
  when it is new.
- The original shows one low-pass block for the complex value. Here it is two
  instances of a one-channel filter, one for I and one for Q.

Not included:

- the analog front end (down-converters, ADCs);
- the vector modulator and klystron;
- the host that computes the calibration table;
- the cavity model used for closed-loop simulation. The simple behavioural
  model in `tb_llrf_closed_loop` stands in for it in testing only.

Timing closure on a real FPGA has not been checked. The original design
reached 103.85 MHz on a Virtex-II. This RTL has the same multiplier
pipelining, with 20 multipliers of 18x18, but it has not been through
place-and-route.
