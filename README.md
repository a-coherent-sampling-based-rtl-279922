# Coherent-sampling jitter meter for ring-oscillator TRNGs

A true random number generator built from ring oscillators gets its entropy
from their random timing jitter. That jitter is a few picoseconds, far below
what on-chip logic can resolve directly. This design measures it anyway. It
uses two oscillators whose periods differ by a small amount Delta, samples
one with the other, and counts the result with an ordinary 8-bit counter. The
spread of the counter values gives the RMS period jitter with about 1 ps
accuracy. The digital part is one flip-flop and one counter, small enough to
stay on the chip and watch the entropy source while the generator runs.

## The idea: coherent sampling

Oscillator 1 (period T_ro1) is sampled by a D flip-flop clocked by
oscillator 2 (period T_ro2 = T_ro1 + Delta). Each sample lands Delta later in
the waveform of oscillator 1 than the one before. The samples therefore trace
a slow copy of oscillator 1's waveform, the **beat signal**. Its period, in
cycles of oscillator 2, is

    N = T_ro1 / Delta            (5 ns / 40 ps = 125 at the default point)

Delta acts as the time resolution. Sub-nanosecond timing becomes a count of
about a hundred cycles.

## How jitter turns into a spread of counts

Every period of each oscillator is its ideal value plus an independent
Gaussian term of RMS sigma. The position of oscillator 2's sampling edges
relative to oscillator 1's edges therefore moves by `Delta + noise` per
cycle, and that noise has RMS `sqrt(2)*sigma`: it is the difference of two
independent jitters of equal size. The relative phase is a random walk with
drift. One beat period is the time this walk takes to cover one full period
T_ro1, which takes about N steps. After N steps the accumulated timing error
has RMS `sqrt(2*N)*sigma`. Dividing by the time per step, Delta, gives the
spread of the count:

    sigma_beat = sqrt(2 * T_ro1/Delta) * sigma / Delta        (in cycles)

    sigma      = sigma_beat * Delta / sqrt(2 * T_ro1/Delta)   (the estimate)

For 7 ps of jitter at the default point, sigma_beat = 7 * 15.8 / 40 = 2.77
cycles. Quantisation to whole cycles adds about 1/6 cycle² of variance,
which biases the estimate up by roughly 0.1 ps. The `sqrt(2)` assumes both
oscillators have the same jitter, which holds for two ring oscillators built
alike. If oscillator 2 is replaced by a clean external reference, the factor
changes, and that reference's own jitter must be known.

Delta and T_ro1 must be known to use the formula. On a chip they come from
placement and routing, and they differ from chip to chip. The mean count
gives `T_ro1/Delta` directly. Delta itself must be measured separately, for
example by counting both oscillators against a reference clock.

## Circuit

    ro1 ──────────► D  Q ── tbeat ──► beat_counter ──► count[7:0], count_valid, overflow
    ro2 ──┬───────► >clk               ▲ clk
          └────────────────────────────┘

* `beat_sampler`: one rising-edge D flip-flop. It has no reset and no
  synchronizer. In silicon it will go metastable now and then, since ro1 is
  asynchronous to ro2. A resolution that goes either way only moves a beat
  edge by one cycle, and that is already within the quantisation of the method.
* `beat_counter`: runs on ro2. It registers tbeat once more and treats a 0
  followed by a 1 as a rising edge. It reports the number of ro2 cycles from
  one rising edge to the next.
  - `count_valid` is a one-cycle strobe, registered by the clock edge that
    first sees tbeat high. `count` holds its value until the next strobe.
  - The partial period between reset and the first rising edge is dropped.
    The edge register resets to 1, so a beat signal that is already high at
    reset does not count as an edge.
  - A period longer than 255 cycles (2^COUNT_W − 1) is reported as 255, with
    `overflow` set for that strobe.
  - Reset is active low. It is asserted asynchronously and must be released
    synchronously to ro2, which the top brings out as `clk_ro2`.
* `jitter_meter_core`: the two blocks above. This is the synthesizable
  measurement circuit.
* `ring_oscillator`: a **behavioural model**, not synthesizable. It draws
  every period as `N(PERIOD_FS, JITTER_FS)` femtoseconds with
  `$dist_normal`, stays high for half the period, and has an enable input.
  A real implementation is a hand-placed inverter loop. Its period is set
  by the routing, and Delta is typically a few tens of picoseconds.
* `coherent_jitter_top`: two oscillator models (ro2 = ro1 + Delta, started a
  quarter period later, with separate seeds) and the core. Its ports are
  `en`, `rst_n`, `clk_ro2`, `tbeat`, `count`, `count_valid` and `overflow`.
  The statistics are meant to be computed off-chip from the count stream.

Defaults (`jitter_meter_pkg`): T_ro1 = 5 ns, Delta = 40 ps, jitter = 7 ps
RMS, COUNT_W = 8. All times are integer femtoseconds.

## Where the design departs or adds its own choices

* **Full period, not half period.** The counter measures the beat period
  from rising edge to rising edge, and its mean is T_ro1/Delta. Counting
  half-periods would halve the mean and need one bit less. With a 50 % duty
  cycle it would carry the same information.
* **Mean count.** The model's mean count is exactly T_ro1/Delta = 125.
  Published simulations of this method at the same nominal point show means
  near 122. That is consistent with an effective Delta of about 41 ps. The
  jitter estimates agree either way.
* **Form of the estimator.** The estimator is
  `sigma_beat * Delta / (sqrt(2) * sqrt(T_ro1/Delta))`. The placement of
  the `sqrt(2)` matters. This form matches the jitter model and the published
  results: 2.81 cycles gives 7.1 ps at 7 ps injected.
* **Beat-signal chatter.** Near each transition of tbeat, the relative phase
  can step backwards when the jitter noise `sqrt(2)*sigma` is not small
  compared with Delta. The flip-flop then outputs a short 0-1-0 burst, which
  the counter reports as a very short period. At 7 ps against 40 ps this is
  rare: none appeared in 8000 periods. At 7 ps against 15 ps it happens within
  a few dozen periods. No glitch filter is included. Keep Delta at least about
  4× `sqrt(2)*sigma`, or drop implausibly short counts in the analysis.
* **Counter width.** Eight bits covers T_ro1/Delta up to about 255 minus the
  jitter spread. Smaller Delta needs a larger `COUNT_W`. Overflowing periods
  are flagged rather than wrapped.
* **Not included:** on-chip computation of mean, variance and the estimate;
  deterministic jitter, which the estimator does not cover; and the variant
  with an external low-phase-noise VCO as the sampling clock (used to measure
  a single clock precisely). In that variant `ro2` becomes an input and the
  `sqrt(2)` in the estimator changes.

## Verification

Each testbench computes its expected values independently and ends with a
line `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `ring_oscillator_tb` | 4000 periods: mean 5000 ± 0.5 ps, RMS jitter 7 ± 0.5 ps, 50 % duty; exact 5040 ps periods with no jitter; start delay; output held low while disabled; restart |
| `beat_sampler_tb` | output equals ro1 just before each rising edge and holds between edges |
| `beat_counter_tb` | 400 random periods of 2 to 400 cycles: exact counts, saturation and `overflow` at 256 and above, first period dropped, one-cycle strobe, strobe timing |
| `jitter_meter_core_tb` | jitter-free clocks: exactly 125 (Delta 40 ps) and 100 (50 ps); 166/167 with mean 166.67 (30 ps); 255 with overflow (10 ps, true 500); reset in mid-run |
| `coherent_jitter_top_tb` | end to end: 2000 periods give a mean within 1 of 125 and an estimate within 1 ps of 7 ps; stop, reset and restart; overflow copy (Delta 15 ps) saturates; each mechanism occurs at least once |
| `coherent_jitter_top_full_tb` | the top at its defaults: 8000 periods, histogram printed; mean 125.04, sigma_beat 2.81, estimate 7.10 ps |
| `jitter_table_tb` | five full designs at 10, 9, 8, 7 and 6 ps: estimates 10.57, 9.03, 7.94, 7.07 and 6.11 ps, all within 1 ps |

Each testbench takes at most a few seconds.

## Simulating

Verilator 5 with timing support. The package must come first:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/jitter_meter_pkg.sv tb/coherent_jitter_top_full_tb.sv \
        --top-module coherent_jitter_top_full_tb -o sim
    ./obj_dir/sim

Use the same command for any other testbench in `tb/`. Every file sets
`timeunit 1ps; timeprecision 1fs;`, because the jitter is a few picoseconds.
Verilator warns that the oscillator's run-time delays could be zero. They
are always a positive number of femtoseconds.

To try another operating point, override `RO1_PERIOD_FS`, `DELTA_FS`,
`JITTER_FS` and `COUNT_W` on `coherent_jitter_top`. Pass a new Delta to the
estimator formula in the testbench as well.
