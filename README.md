# SRRC matched-filter PAM detector for upset-tolerance studies

This is a small receiver datapath: a sampled-data detector for binary PAM (pulse amplitude
modulation) with a square-root raised-cosine (SRRC) matched filter. It is meant for one study.
In an SRAM-based FPGA, a radiation-induced single-event upset (SEU) flips a configuration bit.
That changes the circuit itself, not just the data. What does such an upset do to the bit error
rate (BER) of a signal-processing design?

The point behind the design is that a communications datapath is not judged on bit-exact
results. It is judged on BER. Most configuration upsets in a feed-forward filter act like a
little extra additive noise. Only a few upsets, such as those in the clock, the reset, the
high-order bits of the arithmetic and the MSB of the filter output, wreck the link. Full triple
modular redundancy (TMR) is therefore more than such a design needs. The RTL here gives the
detector in all six configurations used to measure that effect. A testbench measures the BER of
each configuration, and the BER after representative coefficient upsets.

## Signal chain

```
 ADC samples r(nT)        x(nT)                x(kTb+tau)           bit
 ----------------> matched filter ---> downsample by N ---> sign decision --->
   in_valid/in_sample  fir_direct or      downsample          decision
                       fir_transposed     (phase = tau)
```

- The transmitter sends symbols a(k) in {-1, +1}. Each symbol is an SRRC pulse p(t) that spans
  -Lp·Tb to +Lp·Tb, with Lp = 6.
- The receiver samples at N = 4 samples per bit. The matched filter therefore has
  2·Lp·N + 1 = 49 taps.
- The SRRC pulse is a square-root Nyquist pulse. With perfect timing, the filter output taken once
  per bit at the pulse peak is x(kTb + tau) = a(k) + noise, and has no inter-symbol interference.
- The downsampler keeps that one output per bit. Its `phase` input is the propagation delay tau,
  rounded to whole samples. The design has no timing recovery: the phase comes from outside.
- The decision block takes the sign. The detected bit is the inverted MSB of the filter output.
  This is why an upset on that MSB gives a BER of 1/2.

The anti-aliasing filter and the ADC sit ahead of this logic and are not part of the RTL. The
testbenches compute the ADC samples themselves.

## Configurations

`pam_detector` has three parameters. Together they select one of the six evaluated designs:

| design                 | `ARCH`            | `ROLLOFF`      | `COEF_W` |
|------------------------|-------------------|----------------|----------|
| 16b logic, alpha = 1.0 (default) | `ARCH_DIRECT` | `ROLLOFF_1_00` | 16 |
| 16b logic, alpha = 0.25 | `ARCH_DIRECT`    | `ROLLOFF_0_25` | 16       |
| 8b logic, alpha = 1.0  | `ARCH_DIRECT`     | `ROLLOFF_1_00` | 8        |
| 8b logic, alpha = 0.25 | `ARCH_DIRECT`     | `ROLLOFF_0_25` | 8        |
| 16b DSP, alpha = 1.0   | `ARCH_TRANSPOSED` | `ROLLOFF_1_00` | 16       |
| 16b DSP, alpha = 0.25  | `ARCH_TRANSPOSED` | `ROLLOFF_0_25` | 16       |

`COEF_W` may only be 16 or 8. The DSP designs use 16-bit coefficients, as their names say. One
description of them mentions 8-bit coefficients. To use that reading, set `COEF_W = 8` with
`ARCH_TRANSPOSED`.

## The coefficient tables (`mf_pkg`)

The four coefficient sets (two roll-offs times two widths) are constant tables in `mf_pkg`. Tap n
(n = 0..48) is

    h[n] = round( p((n - 24)/4) * (2^(W-1) - 1) / max|p| )

where p is the SRRC pulse with roll-off a, t in bit times:

    p(t)         = [sin(pi t (1-a)) + 4 a t cos(pi t (1+a))] / [pi t (1 - (4 a t)^2)]
    p(0)         = 1 - a + 4a/pi
    p(±1/(4a))   = a/sqrt(2) [(1 + 2/pi) sin(pi/(4a)) + (1 - 2/pi) cos(pi/(4a))]

The pulse is symmetric, so the matched filter uses the pulse table unchanged. The largest tap is
scaled to full scale. This scaling is a choice of this design: a common gain changes no decision.
The tables explain the size differences between designs:

- alpha = 1.0: every odd tap away from the centre is exactly 0 (22 of 49 taps). At 8 bits, the
  small outer taps also round to 0 (32 of 49 taps). Synthesis removes the multiplier and adder of
  every zero tap, so these designs are smaller and have fewer configuration bits that can be hit.
- alpha = 0.25: no tap is 0 at 16 bits, and 6 taps are 0 at 8 bits.

To use another pulse or size, recompute the tables from the formula above. Then change `LP`,
`NSPB` and `TAPS` in `mf_pkg` to match.

## The two filter structures

Both compute y[n] = sum_k h[k]·x[n-k] to full precision: IN_W + COEF_W + clog2(49) bits, 34 bits
by default. No bit is rounded away, so every output bit, the MSB included, is a true arithmetic
result. Both have the same ports and the same timing, and they give bit-identical outputs.

- **`fir_direct`** (direct form, plain logic): a 48-entry delay line of past samples, one
  constant multiplier per tap, and one adder tree. Only the output is registered.
- **`fir_transposed`** (transposed form, the structure that maps onto a chain of DSP
  multiply-add blocks): each new sample goes to all 49 multipliers at once. A chain of
  partial-sum registers carries the sum: `z[k] <= h[k]·x + z[k+1]`, and the output is
  `h[0]·x + z[1]`. Each multiply-add with its register is one DSP slice.

The direct form has a long combinational adder tree. A design that must reach a high sample clock
would pipeline it. That would change only the latency, and this design does not do it.

## Interface and timing

Top-level ports of `pam_detector`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `phase` | in | 2 | which of the N samples of each bit is kept (tau in samples) |
| `in_valid`, `in_sample` | in | 1, 12 | one signed ADC sample per `in_valid` |
| `mf_valid`, `mf_y` | out | 1, 34 | every filter output, 1 clock after its sample |
| `sym_valid`, `sym_x` | out | 1, 34 | decision variable, once per bit, 2 clocks after its sample |
| `bit_valid`, `bit_out` | out | 1, 1 | detected bit (1 means +1), 3 clocks after its sample |

- Throughput is one sample per clock. `in_valid` may have gaps, and the datapath advances only on
  valid samples.
- Reset clears the sample history and restarts the downsampler count at 0. Filter output number
  m (counted from 0 after reset) is kept when m mod 4 = `phase`.
- Suppose the first sample after reset is where symbol 0's pulse begins, delayed by d samples
  (0 ≤ d < 4). Then symbol k peaks at filter output k·4 + 24 + d. Set `phase = d`. Output bit j is
  then symbol j − 6. The first 6 bits come from the filter's start-up and hold no symbol.

## Behaviour under upsets

The upset study itself works on the FPGA bitstream, which RTL does not have. `tb_pam_configs`
repeats the part of it that RTL can express: it builds copies of the default detector whose
coefficient table holds one inverted bit. It uses a noisy channel at about 3.2 dB Eb/N0 over
100,000 bits:

| configuration | measured BER | BER from Q(mu/sigma) |
|---|---|---|
| all six designs, alpha = 1.0 | 0.0210 | 0.0202 |
| all six designs, alpha = 0.25 | 0.0071 | 0.0073 |
| default, LSB of an outer tap inverted | 0.0210 (no change) | |
| default, bit 14 of the centre tap inverted | 0.0264 | 0.0250 |
| default, sign bit of the centre tap inverted | 0.0599 | 0.0570 |
| default, filter-output MSB stuck at 0 | 0.502 | 0.5 |

The alpha = 0.25 stream uses the same noise level and pulse peak as the alpha = 1.0 stream. Its
pulse carries more energy, so it has the lower BER.

The coefficient upsets act like a loss in signal-to-noise ratio. Mu is the noiseless filter peak
and sigma is the output noise, both computed from the upset coefficients. Q(mu/sigma) then
predicts the BER, and the measurement matches it. A low-order bit costs nothing, higher bits cost
more, and the output MSB is fatal. Even the sign bit of the largest tap leaves the eye open with
this 49-tap filter. The catastrophic cases therefore come from control and output bits, such as
the clock, the reset and the output MSB, not from coefficient values. These are the parts that
selective protection would have to cover. The RTL has no such protection: it is the unprotected
design that gets characterized.

## Files

| file | content |
|---|---|
| `rtl/mf_pkg.sv` | constants (Lp, N, taps, ADC width), `arch_e`/`rolloff_e` enums, the four coefficient tables |
| `rtl/fir_direct.sv` | direct form matched filter |
| `rtl/fir_transposed.sv` | transposed (DSP chain) matched filter |
| `rtl/downsample.sv` | keep one output per bit at the chosen phase |
| `rtl/decision.sv` | sign decision |
| `rtl/pam_detector.sv` | top: filter, downsampler and decision |
| `tb/tb_util_pkg.sv` | real-valued SRRC pulse, Gaussian noise, Q function |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two below |

## Verification

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each has a watchdog.

- `tb_fir_direct`, `tb_fir_transposed`: an impulse, random samples with gaps, full-scale inputs
  and a reset in mid-stream. Each output is compared exactly with a convolution computed by the
  testbench, and the 1-clock latency is checked.
- `tb_downsample`: every phase, with gaps, then a phase change.
- `tb_decision`: random values, zero, ±1 and the extremes.
- `tb_mf_pkg`: each table against the closed-form pulse, evaluated in real arithmetic, to within
  half an LSB. Also symmetry, the centre tap and the number of zero taps.
- `tb_pam_detector`: the default configuration, end to end and without parameter overrides. An
  SRRC transmitter model sends 4 × 400 random bits with delays of 0 to 3 samples, with and without
  input gaps, and with a reset in mid-stream. The test checks every filter output and every
  decision variable against the testbench's own convolution, and every detected bit against the
  bit sent. It checks the 1-, 2- and 3-clock latencies, and it counts how often each mechanism
  occurred.
- `tb_pam_configs`: the BER workload and the upset copies described above.

All of these pass. Each module testbench was also run against a copy of its module with a
deliberate bug, and it failed there as it should.

To simulate with Verilator 5 from the project root (here the end-to-end test):

    verilator --binary --timing -Wno-fatal --top-module tb_pam_detector \
        -y rtl -y tb +libext+.sv rtl/mf_pkg.sv tb/tb_util_pkg.sv tb/tb_pam_detector.sv
    ./obj_dir/Vtb_pam_detector

For another test, replace the testbench name in both places. Each test runs in about a second.

## Choices not fixed by the reference

- The ADC is 12 bits wide (`IN_W`).
- The coefficients are scaled so that the largest tap is full scale.
- The filter keeps the full 34-bit precision, with no rounding or saturation.
- A one-sample `in_valid` strobe drives the datapath. Each stage has a 1-clock latency, and the
  direct form's adder tree is not pipelined.
- The reset is synchronous and active low.
- Bit 1 means symbol +1, and a filter output of exactly 0 is decided as +1.
- The sampling phase is an input, because the reference assumes perfect timing.
- The downsampler and the decision stage are built in logic. The reference's experiments did
  those two steps off-chip.
