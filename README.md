# Multiplier-free decimation filter for a 1-bit sigma-delta modulator

This design is a decimation filter for a sigma-delta ADC. The ADC is meant for
the control loops of a flywheel MEMS gyroscope, where six converters share one
chip. Area and power therefore matter more than having a sharp filter.

Most decimation filters shrink the sample rate after every stage and finish
with a long, selective FIR filter. This one does the opposite:

- It has three identical sections, and all three run at the modulator rate f_S.
- Each section is a moving sum of the last N+1 samples, which is an FIR filter
  whose coefficients are all 1. It needs no multiplier.
- There is no sharp final filter.

Three moving sums in series give a sinc³-shaped response. That response is a
weak filter on its own. It is good enough here because:

- the modulator's noise shaping leaves little noise just above the signal band;
- a large oversampling ratio (around 200) keeps the passband droop small.

Every section produces a result for every input sample. The output can
therefore be decimated by any integer M, chosen at run time.

```
 bit_i ─► [section 1] ─5b─► [section 2] ─10b─► [section 3] ─15b─► [÷M] ─► dout_o / valid_o
           1 → 5 bits        5 → 10 bits        10 → 15 bits       any M
             all three at f_S, window N+1 = 8, 16 or 32 (order_i)
```

## One section: a running sum with one adder and one subtractor

The sum of the samples in the window is not recomputed each clock. A section
keeps the window in a delay line and keeps its sum in an accumulator. Each clock
it does the following:

1. Adds the sample that enters the window.
2. Subtracts the sample that drops out of it.
3. Shifts the delay line by one place.

So a section costs one adder, one subtractor, a 32-stage shift register and a
register, whatever its order. For the whole filter that is three adders and
three subtractors. The order is picked by tapping the delay line after element
8, 16 or 32. This gives the three settings FIR8, FIR16 and FIR32, with orders
N = 7, 15 and 31.

Each operation is followed by overflow control:

- After the adder, a result that does not fit in the output width is clamped to
  all ones.
- After the subtractor, a negative result is clamped to zero.

Only section 1 can reach a clamp. Its 1-bit input gives a 32-sample sum of 0 to
32, which does not fit in its 5-bit output. The later sections cannot overflow:
32 × 31 = 992 fits in 10 bits, and 32 × 1023 = 32 736 fits in 15 bits.

The order of the two clamps matters for section 1. With a window full of ones,
the clamped add gives 31 and then the subtraction of the leaving one gives 30.
So 32 ones in a row settle at 30, not at 32. When the ones stop, the zero clamp
brings the accumulator back to the exact sum once the window has emptied. A
2nd-order modulator inside its stable input range does not emit 32 ones in a
row, so this only matters at overload. Both the end-to-end test and the section
test drive this case on purpose.

## Word widths and resolution

| order select | N  | window | growth per section | resolution, output range |
|--------------|----|--------|--------------------|---------------------|
| FIR32        | 31 | 32     | 5 bits             | 15 bits, 0…31 744 |
| FIR16        | 15 | 16     | 4 bits             | 12 bits, 0…4 096 |
| FIR8         |  7 | 8      | 3 bits             | 9 bits, 0…512 |

The hardware widths are fixed at 5/10/15 bits, which is what FIR32 needs. The
shorter windows use only the low bits. For FIR16 and FIR8 the full-scale value (N+1)³ is one count above the nominal resolution. For FIR32 the section-1 clamp keeps the top value below 2¹⁵. A DC input u (full scale ±1) makes the
modulator emit ones with density p = (1+u)/2. The settled output is then about
p·(N+1)³.

All three sections always use the same order. The order is configuration: it
may change only while reset is held. Otherwise the accumulators would no longer
match their delay lines. An assertion in `boxcar_section` reports a change
outside reset.

## Output decimation, and the counter form of the last section

`output_decimator` counts 0…M−1. When the count reaches M−1, it captures the
section-3 value and then pulses `valid_o` for one clock. M = 0 is treated as 1.
M can be any value from 1 to 65 535.

When M ≥ N+1, only one moving sum in every M is ever read. The third section
can then be replaced by a plain accumulator with no delay line and no
subtractor (`counter_section`, selected with `LAST_AS_COUNTER = 1`). The
decimator pulses `win_start_o` exactly L = N+1 clocks before each capture. On
that pulse the accumulator restarts with the current input, and it adds every
input after that. At the capture instant it therefore holds the same L-sample
sum as the full section, bit for bit.

The third section carries the widest words, so this saves the largest delay
line. `m_ok_o` goes low when M < N+1, for example M = 4 with FIR16. The counter
form then gives partial sums and must not be used. The default build is the
full three-section filter.

## Timing

- Each section registers its sum, so an input bit first affects `full_o` three
  rising edges later.
- The impulse response of the cascade lasts 3(N+1) − 2 clocks (94 clocks for
  FIR32).
- The group delay is 3·N/2 samples plus the three register stages: 46.5 + 3
  clocks for FIR32. At 200 MHz that is about 250 ns.
- `dout_o` changes once every M clocks. `valid_o` is high in the clock after
  the capture.

## Frequency response, as measured on the RTL

The filter was designed so that OSR = f_S / f_cutoff of about 200 gives
acceptable droop at the band edge. `tb/tb_passband_droop.sv` checks this on the
RTL. It drives the modulator model with a sine and correlates the bit stream
and the full-rate output at that frequency. The measured gains are:

| band edge f_S/OSR | measured     | sinc³ (L = 32) | design target |
|-------------------|--------------|----------------|---------------|
| OSR 100           | −4.54 dB     | −4.54 dB       | about −4.5 dB |
| OSR 200           | −1.11 dB     | −1.11 dB       | about −1.2 dB |
| OSR 400           | −0.27 dB     | −0.28 dB       | about −0.4 dB |
| OSR 800           | −0.07 dB     | −0.07 dB       | about −0.1 dB |
| first sidelobe    | −39.7 dB     | −39.7 dB       | about −40 dB  |
| first notch f_S/32| below −130 dB| −∞             |               |

The phase lag at every passband point is 49.5 samples. That is 248 ns at
f_S = 200 MHz, or 495 ns at 100 MHz. The ~40 dB rejection just above the band
is enough only because the 2nd-order modulator's quantisation noise is still
low there. The filter was sized on that assumption.

## Top-level interface (`sd_decimation_filter`)

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`          | in  | 1     | modulator sampling clock, rising edge |
| `rst_n`        | in  | 1     | asynchronous, active-low reset; clears all delay lines and sums |
| `bit_i`        | in  | 1     | modulator bit, one per clock |
| `order_i`      | in  | `fir_order_e` | FIR8 / FIR16 / FIR32, for all sections |
| `dec_factor_i` | in  | 16    | decimation factor M |
| `sec1_o`, `sec2_o`, `full_o` | out | 5, 10, 15 | full-rate outputs of the three sections |
| `dout_o`       | out | 15    | decimated output |
| `valid_o`      | out | 1     | `dout_o` updated (one-clock pulse) |
| `sat_o`        | out | 3     | overflow control acted, per section |
| `m_ok_o`       | out | 1     | M ≥ N+1 |

Parameters: `W1/W2/W3` (5/10/15) set the section widths. `M_W` (16) sets the
width of M. `LAST_AS_COUNTER` (0) selects the counter form of section 3. The
shared type `fir_order_e` and the constants are in `decim_pkg`.

## Where this RTL departs from the circuit it models

- **Storage.** The original circuit uses dynamic storage. Its delay elements
  and accumulator memory are transmission-gate/inverter latches that keep the
  samples on parasitic capacitances, driven by a two-phase non-overlapping
  clock. Here they are ordinary flip-flops on one clock edge. The logic
  function, a one-sample delay, is the same. The power and area figures of the
  original (about 4–10 pJ per output sample, about 0.05 mm² in 180 nm, fewer
  than 6 500 transistors, f_S up to 500 MHz) do not carry over to this RTL.
- **Window length.** The window is N+1 samples, held in a 32-stage delay line.
  One description of the circuit speaks of 31 delay elements. The N+1-sample
  sum is what makes FIR32 a 32-tap filter, so that reading was followed.
- **Clamp order.** The adder comes first and the subtractor second, each with
  its own clamp. The exact gates of the overflow control were not specified.
  The clamps to all ones and to zero are this design's reading.
- **Own choices.** The following are this design's own:
  - the reset behaviour;
  - the binary encoding of the order select (one enum instead of three select
    lines);
  - the width of M;
  - the valid pulse;
  - the window-start scheme of the counter section.
- **Orders.** Only orders 7, 15 and 31 exist. A 16th-order setting is not
  available.
- **Not included.** The modulator and the clock-phase generator are not part
  of the RTL. `tb/sd_modulator_model.sv` is a simple 2nd-order behavioural
  modulator, used only as a stimulus.

## Files

| file | contents |
|------|----------|
| `rtl/decim_pkg.sv` | `fir_order_e`, widths, `win_len()` |
| `rtl/tap_delay_line.sv` | 32-stage delay line with the 8/16/32 taps |
| `rtl/boxcar_section.sv` | one running-sum section with overflow control |
| `rtl/counter_section.sv` | accumulate-and-restart form of the last section |
| `rtl/output_decimator.sv` | down-sampler by M, window-start pulse |
| `rtl/sd_decimation_filter.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sd_decimation_filter_full` |
| `tb/tb_passband_droop.sv` | frequency response and delay measurement |
| `tb/sd_modulator_model.sv` | behavioural 2nd-order modulator (stimulus only) |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. Each
also has a watchdog that counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/decim_pkg.sv tb/tb_sd_decimation_filter.sv --top-module tb_sd_decimation_filter
./obj_dir/Vtb_sd_decimation_filter
```

Use the same command for `tb_boxcar_section`, `tb_tap_delay_line`,
`tb_output_decimator` and `tb_counter_section`. Every run takes well under a
second.

What the tests establish:

- **`tb_sd_decimation_filter`** runs the top at its default parameters. The
  modulator model feeds two filters at once: the default one and one with the
  counter-form last section. The test checks the default filter every clock
  against its own model of the three sections (window sums, with the first
  section's clamp rule) and of the down-sampler. Its scenarios are:
  - an impulse, for the latency and the length of the response;
  - DC inputs at FIR32 with M = 200 and at FIR8 with M = 100; the decimated
    value must lie within 2 % of full scale of p·(N+1)³;
  - a sine at FIR16 with M = 4;
  - a run of 100 ones, which must make the clamp act and then recover.

  The counter variant must match the full filter on every output where M ≥ N+1.
  The test fails if any of these mechanisms never happened: the clamp, the
  three orders, the M < N+1 indication, the counter comparison, and the latency
  check.
- **`tb_sd_decimation_filter_full`** runs one complete conversion through the
  top at its default parameters, with no overrides. The settings are FIR32 and
  M = 200, with a sine and then a DC input from the modulator model. Every
  full-rate value and every decimated word is checked against a model the test
  computes from the bit stream. The words must be exactly 200 clocks apart. The
  DC level must be reproduced within 2 %.
- **`tb_passband_droop`** measures the gain and the phase delay of the default
  filter at the band edges of OSR 100, 200, 400 and 800. It also measures the
  first sidelobe and the first notch. The results are in the table above.
- **`tb_boxcar_section`** checks a 1→5-bit and a 5→10-bit section against
  window sums taken from its own history, for all three orders. It includes
  runs of ones and zeros that force the clamp and then the return to the exact
  sum.
- **`tb_tap_delay_line`** checks that the leaving sample is exactly 8, 16 or 32
  clocks old.
- **`tb_output_decimator`** checks, for several values of M, that the valid
  pulses are spaced exactly M clocks apart, that the right word is captured,
  that `m_ok_o` is correct, and that the window-start pulse comes L clocks
  before each capture.
- **`tb_counter_section`** checks that the restarted sums equal the window sums
  for several M and L, and that the 15-bit clamp works.
