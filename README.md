# Pulse output DDS with virtual clock jitter correction

A pulse output direct digital synthesizer (DDS) makes a pulse train of
frequency

    f_DDS = N / M * f_c        (0 < N < M)

from a reference clock f_c. Its core is a phase accumulator: every clock the
control word N is added modulo M, and each wrap-around is an output pulse.
The mean frequency is exact and can be tuned in steps of f_c / M, but each
pulse can only come out on a clock edge. The true moment at which the phase
crossed M lies somewhere inside the preceding clock period, so the pulses
jitter by up to one reference period. That jitter is periodic and shows up as
discrete spurs in the output spectrum.

The accumulator value left after a wrap, the remainder r, tells exactly how
late the pulse is: the crossing happened r/N of a clock period before the edge.
This design uses that to correct the pulse time:

* **Virtual clock enhancement** divides r by N to get the offset to a
  resolution of 1/B period, B = 2^V. The corrected pulse is put out on a
  virtual clock f_c,v = B * f_c. The jitter falls by a factor of B, but it is
  still periodic, so spurs remain, only lower.
* **Dithering** (optional) rounds the remaining sub-tick fraction at random.
  The spurs turn into a flat noise floor.
* **Noise shaping** (optional) rounds the fraction with error feedback. The
  noise floor becomes low close to the carrier and rises away from it.

```
            r, N            r_v, N             r_dith, N
 N,M -> pulse_dds -> vce_divider -> dither -> noise_shaper -> pulse_gen ==> pulse_serializer -> s_dds
 clk        | s_ov      s_v, q       s_dith, adv      pulse, adv   slot_word       (clk_v)
            +-> s_ov (uncorrected)                                   |
                                                                      +-> slot_word (parallel form)
```

Everything up to `pulse_gen` runs on the reference clock `clk`. Only
`pulse_serializer` runs on the virtual clock `clk_v`.

## How a pulse time is computed

Suppose an overflow is registered at reference edge k with remainder r. The
phase reached M at time

    X = k - r/N   reference periods   =   k*B - r*B/N   virtual ticks.

`vce_divider` splits r*B/N into whole ticks and a fraction:

    q   = floor(r*B / N)     (0 .. B-1, the "advance")
    r_v = (r*B) mod N        (fraction r_v/N of a tick still unaccounted for)

The division is exact integer arithmetic, so no approximation is involved up
to this point. What remains is to decide what to do with r_v/N. A pulse can
only be placed on a whole tick.

* Both optional stages off: the fraction is dropped. The pulse lands on
  ceil(X), at most one tick late, with a repeating error pattern.
* `dither`: a random d, uniform in [0, N), is added to r_v. A carry out of
  the fraction (r_v + d >= N) advances the pulse by one more tick. Once the
  remaining fraction (r_v + d) mod N is dropped, the result has been rounded
  up with probability r_v/N, so the mean error is zero and the error is
  white.
* `noise_shaper`: it keeps the dropped fractions in an error register e,
  counted in units of 1/N tick, with 0 <= e < 2N. For every pulse it forms
  v = e + r. If v reaches 2N, the pulse is advanced one tick and e becomes
  v - N; otherwise e becomes v. Once e >= N, this is the ordinary first-order
  error feedback. The per-pulse error stays below one tick. The running sum
  of the errors equals the change of e/N, so it stays within two ticks. That
  is first-order noise shaping: the error has almost no low-frequency
  content.
* Both on (dithered noise shaping): the dither stage does not round by
  itself. It hands its random d to the noise shaper, which advances the pulse
  when v + d >= 2N but still feeds back only v - N. The dither changes when
  the carries happen, not how many happen, so it is shaped together with the
  rounding error. It also breaks up the repeating carry patterns that a
  plain first-order loop falls into when N/M is a ratio of short period.

The advance that reaches `pulse_gen` is therefore at most B+1 ticks: B-1 from
the division plus one carry from each optional stage. A pulse cannot be moved
into the past. `pulse_gen` therefore delays every pulse by the same two
reference periods. It schedules the pulse 2*B - adv slots after the edge at
which the pulse arrives, i.e. between slot B-1 and slot 2B. The schedule is
3*B slots long and shifts by B slots each period. Its lowest B slots form
`slot_word`, which holds one bit per virtual tick of the coming reference
period. `pulse_serializer` shifts that word out at the virtual clock. `s_dds`
is high for one virtual tick per pulse.

A constant delay does not matter: only the spacing of the pulses sets the
spectrum, and the spacing is what the correction improves.

## Latency

| path | delay |
|---|---|
| N change to first step using it | 1 clk |
| clock edge of an overflow to `s_ov` high | 0 (`s_ov` is the registered overflow) |
| `s_ov` to result of `vce_divider` | V clk (one quotient bit per stage) |
| `dither`, `noise_shaper` | 1 clk each |
| into `slot_word` | 1 clk, plus 1 to 2 periods of scheduling minus the advance |
| `slot_word` to `s_dds` | 1 clk_v tick |

Every stage accepts a new pulse every cycle. This matters because the
accumulator overflows on consecutive cycles when N > M/2. A new N is used
from the next step without resetting the phase (phase-continuous switching).
Each pulse carries its own N down the pipeline, so the pulses still in flight
are corrected with the N that made them.

## Clocks

`clk_v` must run at exactly 2^V times `clk`, with every rising edge of `clk`
on a rising edge of `clk_v`. How such a clock is produced (PLL, multiphase
delay line) lies outside this RTL. `pulse_gen` toggles `frame_tgl` with every
new `slot_word`. `pulse_serializer` loads the word on the first `clk_v` edge
at which the toggle differs from the value it last saw. Because the clocks
are related, no synchronizer is needed. An assertion checks that a new word
comes every B ticks. If no virtual clock exists, `slot_word` can also feed a
serializer or a multiphase output stage directly.

## Modules

| file | role |
|---|---|
| `rtl/dds_pkg.sv` | default sizes M_W = 32, V = 6 |
| `rtl/pulse_dds.sv` | modulo-M phase accumulator; overflow pulse `ov`, remainder `rem` |
| `rtl/vce_divider.sv` | pipelined restoring divider: q and r_v |
| `rtl/dither.sv` | random rounding of the fraction; uses `xorshift64` |
| `rtl/xorshift64.sv` | 64-bit xorshift pseudo-random generator |
| `rtl/noise_shaper.sv` | first-order error-feedback rounding |
| `rtl/pulse_gen.sv` | places pulses on the virtual tick grid, B-bit word per period |
| `rtl/pulse_serializer.sv` | shifts the word out on `clk_v` |
| `rtl/dds_top.sv` | the whole chain |

Top-level ports of `dds_top`: `clk`, `clk_v`, `rst_n` (asynchronous, active
low), `n_word` (N, M_W bits), `m_mod` (M, M_W+1 bits so that M = 2^M_W can be
given), `dith_en`, `ns_en`, and the outputs `s_ov` (uncorrected pulse),
`slot_word` and `s_dds`.

## Parameters and sizing

* `M_W` (default 32) is the accumulator width m. The frequency step is
  f_c / M. For a given resolution or frequency accuracy the required m
  falls as f_c is chosen lower. At 32 bits the width covers resolutions down
  to about 0.01 Hz and relative frequency offsets down to 1e-8 in the sizing
  studies this design was dimensioned from. A modulus M < 2^M_W can be set at
  run time, e.g. to hit a decimal frequency grid.
* `V` (default 6, B = 64) is the offset word width. The jitter after the
  virtual clock enhancement is T_c / B. A higher V buys spur suppression:
  roughly 14 bits are needed for -80 dBc SFDR close to R = 1, about 10 for
  -60 dBc and about 7 for -40 dBc. V = 6 is the largest value of the
  noise-shaping study. The cost grows with B: the divider has V stages of
  M_W+1 bits, `pulse_gen` holds 3*B flip-flops, and `clk_v` runs at B*f_c.
  High V is therefore realistic only with a multiphase output stage driven by
  `slot_word`.

## What is this design's own choice

The chain of stages is given by the architecture it implements. So are the
signals between the stages (pulse plus remainder), the division of the
remainder by N into a V-bit offset, and the virtual clock of 2^V f_c. The
following details are not given there and were chosen here:

* the general modulus M as an input, and the restart from zero if M is
  lowered below the current phase;
* the restoring divider with one pipeline stage per quotient bit;
* the dither law (uniform over one tick, from a xorshift generator, d =
  floor(u*N / 2^M_W));
* first order for the noise shaping, and clearing its error when it is
  disabled or when N shrinks so far that e >= 2N;
* combining the two optional stages as dithered noise shaping (dither in
  the decision only);
* run-time enables for dithering and noise shaping (the virtual clock
  enhancement is always present);
* the slot-word interface, the fixed two-period scheduling delay, the
  one-tick-wide output pulse and the toggle handover to `clk_v`.

Known limitation: noise shaping alone does not remove every discrete line.
With a ratio of short period, the first-order loop settles into a repeating
pattern. For N/M = 112/373 it repeats every 7 pulses. It pushes those lines
to high offset frequencies, away from the carrier, but does not remove them.
Enabling dithering together with noise shaping removes them and keeps the
shaping.

## Verification

Each module has a self-checking testbench in `tb/` that compares against a
reference model written in the testbench and prints
`TB_RESULT checks=<n> failures=<n>`:

* `tb_pulse_dds` compares every cycle with a 64-bit model. It covers
  M = 2^32, general M, N > M/2 and random hops, and checks the pulse count
  against N/M.
* `tb_vce_divider` feeds random and edge-case (r, N) pairs back to back and
  checks q, r_v and the latency of V cycles.
* `tb_dither` checks the bypass and the carry identity
  r + d = r' + c*N with 0 <= d < N. It checks the carry rate against r/N,
  and the value handed to the noise shaper.
* `tb_noise_shaper` compares with a model of the error register, with and
  without dither, and checks the running error bound.
* `tb_pulse_gen` checks every slot word against a slot timeline.
* `tb_pulse_serializer` checks every virtual tick of the output.
* `tb_dds_top` runs the whole design at the default sizes (M_W = 32, V = 6).
  It records the exact crossing time of every overflow, matches each `s_dds`
  pulse to it, and checks:
  * with the optional stages off, P - C0 = ceil(X) exactly;
  * with dithering, the error is below one tick and the mean error is near 0;
  * with noise shaping, and with both optional stages, the error is below
    one tick and the running error sum stays within two ticks.

  It also checks the `s_ov` rate against N/M, and that consecutive
  overflows, frequency changes, a general modulus, dither carries and
  noise-shaper carries all occurred.

`tb_dds_spectrum` reproduces the spectral comparison of the output
configurations. It computes a DFT of the pulse timing error over 1008 pulses
(N/M = 112/373, and 0x4D2F1A37 / 2^32 for noise shaping alone) and
reports:

| configuration | error power (tick^2) | largest / mean bin |
|---|---|---|
| uncorrected `s_ov` | 341 (about B^2/12) | 306, discrete lines |
| virtual clock enhancement | 0.082 (about 1/12) | 334, discrete lines |
| + dithering | 0.16 | 8, white |
| + noise shaping | 0.17 | low band 0.001 against high band 0.28 |
| + dithering and noise shaping (112/373) | 0.17 | 7, low band 0.003 against high band 0.24 |

It checks each of these effects against a threshold.

`tb_dds_vsweep` runs five instances with V = 2 to 6 side by side. Each step
of V lowers the largest timing-error line (virtual clock enhancement only)
by about 6 dB. It lowers the noise-shaped error near the carrier by 4 to
6.5 dB:

| V | largest line (period^2) | noise-shaped low band (period^2 per bin) |
|---|---|---|
| 2 | 2.0 dB | -42.8 dB |
| 3 | -3.9 dB | -48.8 dB |
| 4 | -9.7 dB | -52.9 dB |
| 5 | -15.7 dB | -59.4 dB |
| 6 | -21.8 dB | -65.9 dB |

To simulate with Verilator 5, for example the full design:

    verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
        rtl/dds_pkg.sv tb/tb_dds_top.sv --top-module tb_dds_top -o sim
    ./obj_dir/sim

Any other testbench is built the same way with its own file and top name.
Lint with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/dds_pkg.sv
rtl/<module>.sv`. The remaining warnings are unused bits: the upper half of
the dither product, the top bit of wrapped sums, and the carry flags that
only the testbench probes. The assertions' `disable iff (!rst_n)` also gives
a synchronous/asynchronous reset-use note.
