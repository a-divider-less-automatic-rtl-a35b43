# Divider-less automatic frequency calibration for a sub-sampling PLL

A sub-sampling PLL (SSPLL) compares the reference with the oscillator by sampling the oscillator
once per reference period. In lock every sample lands on a zero crossing, so the held voltage is
constant. This gives very low jitter. But the phase detector sees the same thing at every integer
multiple of the reference frequency. A PLL whose oscillator starts one or two reference
frequencies away from the target locks there: a *false lock*. The usual fix is a second
charge-pump PLL with a frequency divider running at the oscillator frequency. At millimetre-wave
frequencies that divider is a large, power-hungry analog circuit.

This RTL implements the digital core of a calibration loop that needs no divider. While the PLL
is locked, truly or falsely, the oscillator is sampled at more points of the reference period.
Those points come from a DLL, so no divided clock is needed. In true lock every point is still a
zero crossing. In a false lock on harmonic *m* ≠ *N*, the samples trace a pattern that is unique
to *m*. A look-up decoder recognises the pattern and moves the 4-bit coarse tuning word of the
oscillator towards the wanted band. The PLL then relocks, and the test repeats until the pattern
is all zeros.

The default configuration is a 56 GHz PLL on an 875 MHz reference (*N* = 64). Its LC oscillator
covers about ±6 GHz and has a 4-bit coarse tuning word. It uses 15 extra sampling points and a
32-tap DLL.

## Why the sample pattern identifies the harmonic

Take *P* = N_AUX + 1 equally spaced points per reference period, at *k*/*P* of the period,
*k* = 1 … N_AUX. In any lock the oscillator runs at *m* · f_ref. The main sampler sits on a
falling zero crossing, so at point *k* the oscillator reads −sin(2π·*m*·*k*/*P*). Only
*r* = (*m*·*k*) mod *P* matters:

| r | sample | window comparator |
|---|--------|-------------------|
| 0 or P/2 | zero crossing | `0` |
| 0 < r < P/2 | negative | `L` |
| r > P/2 | positive | `H` |

For *N* = 64 and *P* = 16, every point of the true lock (m = 64) reads `0`. The reachable false
locks (m = 57 … 71) give these patterns, points 1 to 15 from left to right:

```
m=57 HLHLHLH0LHLHLHL   m=62 HHH0LLL0HHH0LLL   m=67 LLHHHLL0HHLLLHH
m=58 HLH0LHL0HLH0LHL   m=63 HHHHHHH0LLLLLLL   m=68 L0H0L0H0L0H0L0H
m=59 HLLHLLH0LHHLHHL   m=64 000000000000000   m=69 LHHLHHL0HLLHLLH
m=60 H0L0H0L0H0L0H0L   m=65 LLLLLLL0HHHHHHH   m=70 LHL0HLH0LHL0HLH
m=61 HHLLLHH0LLHHHLL   m=66 LLL0HHH0LLL0HHH   m=71 LHLHLHL0HLHLHLH
```

Two conditions make the scheme work:

- *P* must divide 2*N*, so that the true lock is all zeros.
- For every reachable *m* ≠ *N*, *P* must not divide 2*m*. Here m = 56 or 72 would also read all
  zeros, so the oscillator range must stay inside 57 … 71.

`afc_decoder` checks both conditions, and that no two reachable harmonics share a residue
mod *P*, when it is elaborated. It stops with an error if a parameter set breaks them.

A wider tuning range needs more points. For example, ±25 % at *N* = 64 needs *P* = 64.

If the PLL locks to the rising zero crossing instead, every sample changes sign and `H` and `L`
swap. The swapped pattern of *m* is the pattern of 2*N* − *m*, the harmonic mirrored about the
true lock. So the `rising` input must match the PLL's phase-detector polarity. If it does not,
every correction goes the wrong way.

`afc_pkg::exp_sample` evaluates this rule. The decoder compares the measured pattern with it for
each *i* = *m* − *N* in −I_MAX … I_MAX. These are constants, so synthesis turns the comparison
into a plain look-up table. The table is computed from N_RATIO, N_AUX and I_MAX rather than typed
in, so it follows the parameters.

## Serialized measurement: one sampler, a DLL and a backwards edge selector

Fifteen samplers would load the 56 GHz oscillator heavily. Instead a single auxiliary sampler and
a single window comparator take the points one after another, one point per test step. The
sampler's clock comes from a DLL with 32 phases of the reference. The edge selector
(`edge_selector`) routes tap 2*k* to the sampler for point *k*.

The selection changes at the rising reference edge. It moves **backwards**: N_AUX, …, 1, 0,
N_AUX, … Every tap later in the period either is already high from its edge in the last period
or rises later. So moving one point earlier never adds a rising edge. Point 0 is the reference
edge itself, which has just risen, so the wrap from point 0 to point N_AUX is clean as well.
Stepping forwards, or wrapping from point 1 straight to point N_AUX, would add an edge at the
wrong time. `edge_selector_tb` checks this on real phase waveforms. Point 0 coincides with the
main sampler and carries no information, so it is a resting position and is never recorded.

Each decision goes into two 15-bit shift registers (`afc_shift_reg`): one for "above the window"
(`H`) and one for "below" (`L`). Neither bit set means `0`. Sampling runs from point 15 down to
point 1 and the newest bit enters at bit 0. After a full test, bit *k*−1 therefore holds point
*k*, and the decoder needs no reordering.

## The lock detector

The calibration may only judge a pattern while the PLL is locked. A divider-less lock detector
watches the held phase-detector voltage, which is constant in lock. An analog front end keeps two
samples of it on two capacitors, "previous" and "current", and a window comparator reports
`equal`. The digital part (`lock_detector`) does the rest:

- **equal:** a saturating counter counts up. The previous sample stays, and the next sample
  overwrites the current one. This detects slow drift away from a fixed reference.
- **different:** the counter clears and a toggle flip-flop (`select`) flips. This swaps the roles
  of the two capacitors, so the sample just taken becomes the new "previous". The outputs
  `store1 = store & select` and `store2 = store & ~select` steer the store pulse.
- **lock** is high while the counter is full (LOCK_COUNT = 63).

While the PLL acquires, slow stretches of the beating voltage give short runs of `equal`. These
never reach the threshold.

## The controller and its timing

`afc_state_machine` has four states:

- **IDLE:** the edge selector rests on point 0 and the shift registers are clear. When `lock`
  rises, the selector steps to point 15 and the state becomes MEASURE.
- **MEASURE:** each point is held SAMPLE_CYCLES = 2 reference cycles. This gives the sampler and
  comparator a full period at the new point. In the second cycle the comparator bit is shifted in
  and the selector steps on. This takes 15 × 2 = 30 cycles in all.
- **DECODE:** one cycle. The decoder updates the tuning word. Its status outputs are valid one
  cycle later, with a `done` pulse.
- **HOLD:** waits until `lock` falls, which follows a change of the tuning word. In a lasting
  lock it runs a new test every RETEST_CYCLES = 4096 cycles, so the loop keeps watching for a
  lost lock.

If `lock` falls during MEASURE, the test is dropped (`aborted` pulse) and the selector returns to
point 0.

A test therefore takes 31 reference cycles from the first sampling cycle to the new tuning word,
about 35 ns at 875 MHz. A fresh lock is reported 63 cycles after the held voltage settles.

## Decoder and coarse tuning

`afc_decoder` registers the match. Its outputs are `valid` (the pattern matched a state),
`offset` = *i* and `true_lock`. If *i* ≠ 0 it moves the tuning word by −*i*, limited to MAX_STEP
codes (default 1) and saturating at 0 and 15. A higher code gives a higher frequency. A pattern
that matches no state, such as one disturbed by noise, leaves the word unchanged.

One step per test is deliberate. A code step need not equal one reference multiple, so a single
step followed by a new lock and a new test converges without knowing the oscillator's tuning
slope. From code 0111 with the PLL falsely locked at *N* = 61, the code goes to 1000, 1001 and
1010, through locks at 62 and 63 to the true lock at 64. Setting MAX_STEP larger applies the
whole offset at once, which helps if each code is worth one reference multiple.

## Top level: `afc_top`

`afc_top` holds everything digital: the lock detector, controller, edge selector, the two shift
registers and the decoder. All of it runs on the reference clock `clk`, with an asynchronous
active-low reset `rst_n`. The analog parts stay outside and connect through these ports:

| port | dir | to / from |
|------|-----|-----------|
| `dll_phase[31:0]` | in | DLL phases, tap *j* delayed by *j*/32 of a period |
| `sclk` | out | clock of the auxiliary track-and-hold |
| `samp_en` | out | enable of the auxiliary sampler and comparator, high while a test samples |
| `cmp_hi`, `cmp_lo` | in | window comparator after the auxiliary sampler; must be valid by the reference edge that ends the second cycle at a point |
| `ld_store` | in | store pulse for the lock-detector capacitors |
| `ld_store1`, `ld_store2` | out | store into capacitor 1 / 2 |
| `ld_equal` | in | lock-detector comparator, taken at the rising edge of `clk` |
| `rising` | in | 1 if the PLL locks to the rising zero crossing |
| `tune[3:0]` | out | coarse tuning word of the oscillator |

The other outputs are for observation: `lock`, `lock_count`, `ld_select`, `state`, `point`,
`tap`, `pat_hi`, `pat_lo`, `dec_valid`, `dec_offset`, `true_lock`, `dec_done` and
`test_aborted`. Bit 0 of `tap` is always 0, because only every second DLL tap is used.

Parameters and defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| N_RATIO | 64 | wanted harmonic, f_out / f_ref |
| N_AUX | 15 | auxiliary sampling points per period |
| I_MAX | 7 | largest reachable \|m − N\| (⌈6 GHz / 875 MHz⌉) |
| DLL_TAPS | 32 | DLL phases; must be a multiple of N_AUX+1 |
| TUNE_BITS | 4 | coarse tuning word |
| TUNE_INIT | 7 | tuning word after reset |
| MAX_STEP | 1 | largest code change per test |
| LOCK_COUNT | 63 | equal comparisons needed for lock |
| SAMPLE_CYCLES | 2 | reference cycles per sampling point |
| RETEST_CYCLES | 4096 | re-test interval in a lasting lock |

## What is not in the RTL

These parts are analog and are not described as logic:

- the DLL (phase detector, charge pump, filter, 32-stage current-starved delay line);
- the auxiliary track-and-hold;
- the window comparator: two strongARM latches, each with a built-in offset of about 150 mV, giving a ±150 mV window;
- the lock detector's buffer, capacitors and comparator;
- the pulse generator that times store and compare;
- the PLL itself (phase detector, charge pump, loop filter, oscillator).

The end-to-end testbench models them behaviourally.

## Where this implementation makes its own choices

The sampling rule, the look-up decoding, the 4-bit tuning word, the backward edge selection and
the counter-and-swap lock detector follow the original design. The following are this
implementation's choices, so check them against your analog front end:

- **Timing:** one clock (the reference) for all logic. The compare instant is the reference edge.
  The shift registers use a clock enable instead of a gated clock.
- **Numbers:** the lock threshold (63), the two-cycle settling per point, the 4096-cycle re-test
  interval, and the one-code correction step (taken from the observed behaviour of the original:
  one code per false lock). The reset code is 0111.
- **Controller:** its states, the abort on lock loss, point 0 as the resting position, and
  `samp_en` being high exactly during MEASURE.
- **Lock comparator:** its decision comes in on its own input, `ld_equal`. The original reuses
  the window comparator for it; any such sharing is left to the analog front end.
- **Unknown patterns:** they are ignored.
- **Comparator assumption:** every non-zero sample is assumed to clear the comparator window.
  With 15 points the smallest non-zero sample is sin(π/8) ≈ 0.38 of the amplitude, so the held
  amplitude must exceed about 0.4 V for a ±150 mV window. If it does not, patterns go unmatched
  and no correction happens.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `lock_detector_tb`: random runs of equal/different against a reference model. It checks that
  lock comes exactly LOCK_COUNT cycles after a difference.
- `afc_shift_reg_tb`: bit order of a serial word; random shift and clear.
- `edge_selector_tb`: builds real DLL phases. It checks the point sequence, and that the selected
  clock rises once per period at the chosen time, with no stray edge.
- `afc_decoder_tb`: expected patterns come from the sine waveform itself. It covers all 15
  harmonics in both polarities, saturation, random invalid patterns, and a full-offset variant.
  It also runs an *N* = 8, 7-point instance on the patterns `HHH0LLL` (7 GHz on a 1 GHz
  reference, one harmonic low) and `L0H0L0H` (10 GHz, two high).
- `afc_state_machine_tb`: cycle-exact check of one test, the periodic re-test, and the abort.
- `table1_tb` (with helper `tb/table1_case.sv`): the decoder in eight configurations of ratio and
  tuning range, from *N* = 8 with 3 points up to *N* = 64 with 127 points (±32 harmonics). Every
  reachable harmonic must decode to its own offset in both polarities. With 128 points the
  smallest non-zero sample is under 5 % of the amplitude, so such configurations need a much
  finer comparator window than the default one.
- `afc_top_tb` runs at default parameters with a behavioural PLL and front end: DLL phases from a
  36 ps time step, an oscillator whose harmonic depends on the tuning code, beat-like held voltage
  during acquisition, sampler and ±150 mV window comparator, and two-capacitor lock front end.
  - Falling-edge PLL: starts at code 0111 (false lock at 61) and must end at 1010 in true lock
    after exactly the codes 1000, 1001, 1010. One test is disturbed on purpose to exercise the
    abort.
  - Rising-edge PLL: starts above the target and walks down.
  - Every decoded test is checked for pattern, offset, code step and a 30-cycle measurement.
  - The test counts corrections up and down, true locks, periodic re-tests, aborts, lock-counter
    runs cut short, capacitor swaps and both polarities. Each must occur at least once.

Run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/afc_pkg.sv tb/afc_top_tb.sv --top-module afc_top_tb
./obj_dir/Vafc_top_tb
```

Replace `afc_top_tb` with another testbench name to run that one. Each testbench runs in
well under a second; `table1_tb` takes some seconds to compile.

## Files

- `rtl/afc_pkg.sv`: comparator result and controller state types; the pattern rule.
- `rtl/afc_top.sv`: top level.
- `rtl/lock_detector.sv`, `rtl/afc_state_machine.sv`, `rtl/edge_selector.sv`,
  `rtl/afc_shift_reg.sv`, `rtl/afc_decoder.sv`: the blocks described above.
- `tb/*_tb.sv`: one testbench per block, plus `table1_tb`. `tb/afc_top_tb.sv` holds the
  end-to-end run and its analog model.
