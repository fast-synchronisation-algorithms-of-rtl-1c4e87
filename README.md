# Burst-mode 16QAM receiver with preamble-based fast synchronisation

This is the digital back end of a 16QAM burst receiver for the return path of
a cable TV network. Many subscriber modems share one upstream channel in time
slots (TDMA), so the receiver sees short bursts. Each burst arrives with its own
level, carrier phase and symbol timing. The receiver has to learn all three
before the data start, and it has only a **23-symbol preamble** to do it.

The central idea is a preamble that lets the three acquisition loops run **at
the same time** instead of one after the other:

* The preamble symbols all lie on a diagonal corner of the constellation,
  which is the largest amplitude. The amplitude is therefore constant and known,
  so the gain loop can measure it on any sample.
* On that corner the signal looks like BPSK with a very long symbol. The carrier
  phase can be measured on every A/D sample without knowing the symbol timing.
* Halfway through, the preamble jumps to the opposite corner. That single zero
  crossing is enough to measure the sampling phase once and correct it.

All three loops take their samples straight from the A/D converters, before
the data filters, so no loop waits for a filter delay. During the data part of
the burst a decision-directed loop tracks the carrier phase. That loop lets the
receiver cope with a frequency offset between transmitter and receiver,
whatever the burst length.

Figures at the default settings:

| Quantity | Value |
|---|---|
| Symbol rate | 2.7 Mbaud |
| Bit rate | 10.8 Mbit/s |
| Master clock | 86.4 MHz (32 clocks per symbol) |
| Samples per symbol | 2 |
| A/D word | 8 bits |
| Filter output and oscillator words | 10 bits |

## The burst

```
 | preamble, 23 symbols                         | data, data_len symbols       |
 | 12 x corner (+3,+3) | 11 x corner (-3,-3)    | differential 16QAM           |
                       ^ the only transition: the timing is measured here
```

* Levels are ±1 and ±3 on each axis.
* The receiver knows `data_len` (input port) from the time-slot plan.
* The last preamble symbol is the first reference for the differential decoder
  and the first value of the decision levels.

## Acquisition sequence

`sync_controller` runs the burst from events raised by the other blocks. Each
event is also visible on the `status` port.

| # | Event (`status` field) | Cause | What follows |
|---|---|---|---|
| 1 | `activity` | A CORDIC magnitude goes above the activity threshold | The gain loop starts |
| 2 | `gain_adj` × 3 | Each AGC iteration ends | After the first one, `start_cpa` rises and the coarse phase loop starts |
| 3 | `phase_adj` × 3 | Each coarse phase update | After the second one, `start_sta` rises and the timing estimator is armed |
| 4 | `toggle` | The preamble transition is found and the sampling grid is moved | Counting of symbol-centre filter outputs starts |
| 5 | `ft_enable` | The last preamble symbol leaves the data filter | Its level seeds the decision levels |
| 6 | `fine_active` | The first data symbol is decided | Decision-directed tracking runs until the burst ends |
| 7 | `burst_end` | The amplitude stays low for 10 samples | Gain returns to minimum; all blocks clear |

Time budget at two samples per symbol:

* **Gain.** The first AGC measurement waits 4 samples, then averages 2. Each of
  the next two iterations waits 2 and averages 2. Gain is therefore settled
  after 14 samples, which is 7 symbols.
* **Coarse phase.** This loop starts at the first gain update, about symbol 3.
  It makes 3 updates of 2 waiting plus 2 averaging samples each, which is
  6 symbols. It is done by about symbol 9.
* **Timing.** The estimator is armed in time for the transition between
  symbols 11 and 12.
* **Decision levels.** They are loaded from symbol 22.

The preamble therefore holds the whole acquisition with margin. Within that
margin, the coarse phase updates still come after gain steps that can be
several dB.

## Gain loop and burst envelope (`cordic_mag`, `agc_db_table`, `agc_bed`)

**Magnitude.** `cordic_mag` computes |(I,Q)| with a vectoring CORDIC:

* The vector is first folded into the right half plane.
* Four micro-rotations follow, using only adds, subtracts and shifts.
* The CORDIC gain of about 1.6425 is left in the result, and all thresholds are
  scaled to match.
* The result is 10 bits wide.

**Gain correction.** `agc_db_table` turns a magnitude into a gain correction
in 0.5 dB steps:

* `corr = round(40·log10(186/mag))`, clipped to ±63.
* 186 is the magnitude of the preamble corner placed at (80,80) A/D units. That
  point leaves about 4 dB of headroom for the 16QAM peaks.
* The 512-entry table is computed at elaboration by an integer log2 function.
  No data file is needed.

**Gain control.** `agc_bed` owns the gain word of the variable gain amplifier:

* Width 6 bits, 0 = minimum gain, 0.5 dB per step, 31.5 dB of span.
* Between bursts the gain is at minimum, so the strongest expected burst still
  fits the A/D range.
* Each iteration averages two magnitudes and adds the table correction with
  saturation.
* Three iterations are used because each one shrinks the error left for the
  next. With 4 CORDIC rotations and a 5-bit effective A/D, three iterations
  reach about 1 dB. A fourth adds little.

**Thresholds.**

* The activity threshold comes from threshold = sqrt(Vmin·Vnoise):
  * Vmin = 127/10^(15/20) = 22.6 is the smallest expected input over a 15 dB
    range.
  * The noise floor is one LSB.
  * The result is 4.75, or 8 after the CORDIC gain.
* The end-of-burst threshold (37) is half the magnitude of the innermost 16QAM
  point at the target level. It must hold for 10 consecutive samples, so data
  symbols near the origin do not end a burst.

## Carrier phase loop (`coarse_phase_est`, `decision_fine_est`, `phase_err_mux`, `phase_loop_filter`, `dds`)

The local oscillator is a DDS. The loop never changes its frequency. It only
adds corrections to a 16-bit **phase offset register** (2π = 65536). The same
loop filter serves two error detectors.

**Coarse acquisition (preamble).** Per A/D sample:

```
eps = (|I| - |Q|) · sgn(I) · sgn(Q)          (sgn(0) = +1)
```

* `eps` is zero on a diagonal and proportional to −√2·|v|·sin(φ) near it.
* It does not depend on which diagonal corner is being sent, so it works across
  the preamble transition.
* The phase settles on one of four positions 90° apart. The differential decoder
  removes that ambiguity.
* The loop is first order. The output is `upd = −49·eps`, where `eps` is the
  mean of 2 samples (10 bits).
* At the AGC target |v| = 113, this gives an open-loop gain of 0.9. Three
  updates bring an error of tens of degrees below ±5°.
* Each update waits 2 samples for the path DDS → mixer → A/D to show the
  previous correction.

**Fine tracking (data).** `decision_fine_est` decides each symbol-centre filter
output against adaptive levels:

* `Dec = 2/3 · norm` per axis, computed as `(norm·683) >> 10`.
* `norm` starts at the level of the last preamble symbol.
* Only symbols decided as diagonal corners (the outer QPSK points) update the
  levels and the phase:

```
norm(k+1) = 7/8 · norm(k) + 1/8 · |x|              (3 fraction bits kept)
ferr      = ((|I| − I_norm) − (|Q| − Q_norm)) · sgn(I) · sgn(Q)
```

* Subtracting the norms keeps an I/Q gain imbalance from reading as a phase
  error.
* Because the levels follow the signal, a residual level error of a few dB after
  the AGC costs little.

**Loop filter.** In fine mode, `phase_err_mux` passes `ferr` to the loop filter
instead of `eps`. The loop filter then becomes second order:

```
integ += ferr
upd    = −( (13·ferr >>> 3) + (integ >>> 6) )
```

The integrator learns the phase slope of a frequency offset, so the drift is
tracked with no standing error. The end-to-end test tracks ±1 kHz over 256-symbol
bursts.

**DDS.**

* A 24-bit accumulator advances by 8 330 354 each master clock, which puts the
  fundamental at 42.9 MHz.
* The output that is used is the image at 86.4 − 42.9 = 43.5 MHz, which lands on
  the IF. The image carries the negated phase, and the sign of the loop absorbs
  it.
* The phase word addresses a 64-entry quarter-wave table,
  `round(511·sin((k+0.5)·π/128))`, filled at elaboration from a Taylor series.
  The table gives 10-bit sine and cosine words for the D/A converter.

## Symbol timing alignment (`sta_estimator`, `prog_divider`)

This is the least obvious part of the design.

**Sampling grid.** The A/D converters are clocked by `prog_divider`:

* It counts 16 master clocks per sample, which is 2 per symbol.
* It can therefore place the sampling moment on any 1/32 of a symbol.
* Each strobe is tagged `center` (symbol-centre sample) or not.

**Measuring the crossing.** At the preamble transition, the I waveform crosses
zero almost linearly. Let `I'1` and `I'2` be the two samples that straddle the
crossing, half a symbol apart. The position of the crossing between them is
found by **recursive bisection of the straight line** through them:

```
a = I'1, b = I'2
repeat P = 6 times:
    m = (a + b) / 2              -- value of the line at the middle (add + shift)
    if sgn(m) == sgn(a):  bit = 1, a = m     -- crossing in the right half
    else:                 bit = 0, b = m
t_m = the 6 bits                 -- unit: (Tsym/2)/64 = Tsym/128
```

* Each step doubles the resolution and costs one clock.
* The line has the same shape whatever the amplitude and a small phase error, so
  STA runs in parallel with the gain and phase loops.
* The estimator starts on the first pair of consecutive samples that differ in
  sign by at least 32 A/D units. This keeps noise around zero from starting it.

**Applying the correction.**

* `t_s` (6-bit input `ts`) is where the crossing lies when the sampling is right.
  It is set from a simulation of the transmit filter and channel, or tuned for
  the best eye.
* The correction is `adj = round((t_m − t_s)/4)` master clocks, where 4 is
  128/32.
* The divider shifts its count by `adj` at once.
* If the shifted strobe time has already passed, that strobe is dropped (`skip`)
  rather than repeated.
* The first strobe after the correction is a symbol centre, and parity
  alternates from there.
* `sync_controller` counts a skipped centre strobe as a symbol, so symbol
  numbering survives the move.

**Accuracy.** The accuracy is 100·(3·2^(−P−2) + 0.5/R) % of a symbol. With P = 6
and R = 32 this is 2.7 %. The 1/32-symbol step of the divider limits it, not the
bisection.

## Data path (`rrc_fir`, `decision_fine_est`, `diff_decoder`, `ps_converter`, `ber_meter`)

**Data filters.** Two root raised cosine filters (roll-off 0.33), one each for I
and Q:

* 17 taps at 2 samples per symbol:
  `{3,3,−15,17,29,−73,−41,311,555,311,−41,−73,29,17,−15,3,3}`.
* The taps are `round(1024·rrc(n/2)/Σrrc)` and sum to 1023.
* The output is `>>> 8` and saturated to ±511, which is 10 bits.
* The delay is 4 symbols, so the centre/off-centre tag of the input carries over
  to the output.

**Decision.** Each symbol-centre output is decided, per axis, into a sign and
an outer/inner bit.

**Differential decoding.** `diff_decoder` removes the four-fold ambiguity:

* q is the quadrant, counted counter-clockwise: 0 = ++, 1 = −+, 2 = −−, 3 = +−.
* The two high bits are `q − q_prev mod 4`.
* The two low bits are the outer flags. They are swapped in odd quadrants, so a
  point and its 90° rotations map to the same bits.
* The transmitter side must use the inverse mapping. The testbench transmitter
  shows it.

**Output.** `ps_converter` sends the 4 bits MSB first, one every 8 master clocks,
which is 10.8 Mbit/s.

**Bit errors.** `ber_meter` compares the bits with a PRBS-9 (x⁹+x⁵+1, all-ones
seed). The PRBS restarts at each `activity`, and the meter counts bits and
errors.

## Top level (`qam_burst_rx`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | 86.4 MHz master clock, active-low reset |
| `adc_sample` | out | A/D sample strobe from the programmable divider |
| `adc_valid`, `adc_i`, `adc_q` | in | A/D answer: 8-bit signed I and Q, less than 16 clocks after the strobe |
| `gain` | out | 6-bit VGA gain word (0.5 dB/step, 0 = minimum) |
| `lo_sin`, `lo_cos` | out | 10-bit DDS words for the local-oscillator D/A |
| `phase_offset` | out | DDS phase offset register (for observation and for a behavioural demodulator) |
| `ts` | in | 6-bit timing target t_s (unit Tsym/128) |
| `data_len` | in | data symbols per burst (10 bits) |
| `agc_en` | in | 1 = AGC on; 0 = gain held at minimum |
| `fine_en` | in | 1 = decision-directed fine tracking on; 0 = coarse phase only |
| `bit_valid`, `bit_out` | out | decoded serial data |
| `ber_bits`, `ber_errors` | out | PRBS-9 bit and error counters |
| `status` | out | `rx_status_t`: activity, gain_adj, start_cpa, phase_adj, start_sta, toggle, ft_enable, fine_active, burst_end |

**Operating switches.** Normal operation has `agc_en` and `fine_en` both high.
The other settings isolate parts of the synchronisation:

* `fine_en` low keeps the decision-directed error out of the loop. The
  oscillator phase then stays where coarse acquisition left it, and
  `status.fine_active` stays low. Without fine tracking, a burst tolerates only
  the drift that fits inside the decision margin. For 16QAM that margin is about
  17°, which is roughly 450 Hz over a 23 + 256 symbol burst.
* `agc_en` low freezes the gain word at minimum. The gain iterations still run
  and still pace coarse acquisition, so the sequence is unchanged. With the AGC
  off, only the preamble-derived decision levels absorb a level error.

Shared widths and types are in `qam_rx_pkg`. The package also holds `qam_sym_t`
(sign and outer bit per axis) and `rx_status_t`.

The analogue front end is not part of the RTL:

* LNA, up-converter and SAW channel filter.
* Variable gain amplifier.
* Quadrature mixers and low-pass filters.
* A/D converters.
* The D/A and image filter behind the DDS.

The top brings out the signals that connect to them. The end-to-end testbench
holds behavioural models of these parts and of the transmitter.

## Design choices and departures

What follows the published receiver:

* The burst structure and the 23-symbol preamble.
* The order and overlap of the acquisition events.
* The CORDIC magnitude with 4 rotations and a dB table for the gain word, in
  0.5 dB steps.
* The activity threshold formula and three AGC iterations.
* Gain set to minimum between bursts.
* The coarse error formula on raw 8-bit A/D samples, with a 10-bit error.
* A first-order coarse loop with an open-loop gain of 0.9 and three updates.
* The DDS local oscillator used at its image frequency.
* Decision-directed fine tracking with the 7/8–1/8 level recursion and 2/3
  decision levels, into a second-order loop.
* The single-shot bisection timing estimator with P = 6 and a 6-bit t_s.
* A programmable divider at R = 32.
* Root raised cosine data filters with roll-off 0.33.
* Differential decoding after the decision.

This design's own choices include:

* **Numbers.** The AGC target level (186), the end-of-burst rule (37 for 10
  samples), the settling waits (4 and then 2 samples) and the two-sample
  averages.
* **Fine loop gains.** 13/8 proportional and 1/64 integral. The published
  description leaves them to the designer.
* **Preamble layout.** The transition after symbol 12 (12 + 11 symbols).
* **FIR design.** Length and coefficients.
* **Units and rounding** of t_m/t_s, the swing test that starts the timing
  estimator, and the immediate move-and-skip behaviour of the divider.
* **Fine error form.** The exact form of the fine error, with both norms
  subtracted.
* **Data length.** Taking the data length from a `data_len` port. The receiver
  has to know where the data end. A TDMA slot plan fixes it, and the port stands
  for that plan.
* **Bit mapping** of the differential decoder, the serialiser order and the
  PRBS-9 test pattern.

Known limits:

* One instance receives one frequency channel. A receiver for several FDMA
  channels uses one instance per channel, each with its own front end and DDS.
* The coarse phase loop has no frequency memory: a large offset must be caught
  by the fine loop during the data.
* The end-to-end test uses a noiseless channel apart from A/D rounding noise.
  Sensitivity and dynamic range in dBm are properties of the analogue front end
  and are not modelled.

## Verification

Every RTL module has a self-checking testbench `tb/tb_<module>.sv`. It compares
the module with a model computed independently in the testbench, usually in
real arithmetic. Latencies are checked where they are part of the interface.

| Testbench | Checks |
|---|---|
| `tb_cordic_mag` | Magnitude against sqrt·K over random vectors and all quadrants |
| `tb_agc_db_table` | All 512 entries against the real log formula |
| `tb_agc_bed` | Activity, three iterations, saturation, burst end, clear, gain frozen with the AGC off |
| `tb_coarse_phase_est` | Error sign and size over phase, timing of the three updates |
| `tb_decision_fine_est` | Decisions, level recursion, fine error, ignoring of non-corner symbols |
| `tb_phase_loop_filter` | Coarse and fine arithmetic including the integrator |
| `tb_dds` | Frequency, table values, offset register, sin/cos quadrature |
| `tb_prog_divider` | Strobe period, corrections of both signs, skip, parity |
| `tb_sta_estimator` | t_m against the exact crossing, adj rounding, latency of P+1 clocks |
| `tb_rrc_fir` | Impulse response, saturation, delay |
| `tb_diff_decoder` | All symbol pairs under all four rotations |
| `tb_ps_converter` | Bit order and bit timing |
| `tb_ber_meter` | Clean stream, injected errors, restart, misaligned pattern |
| `tb_sync_controller` | Event order and the ft_load tick, with and without a skipped sample |
| `tb_phase_err_mux` | Source selection between the coarse and fine errors |

`tb_qam_burst_rx` runs the whole receiver with default parameters. It sends
10 bursts of 23 preamble and 256 data symbols, shaped with root raised cosine
pulses. Each burst has its own channel:

* Attenuation −2 to 15 dB.
* Carrier phase −100° to +130°.
* Frequency offset 0, ±200, 300, ±400, ±1000 or 1500 Hz.
* Delay 0 to 27 master clocks.

Per burst it checks:

* Every bit against the PRBS, with zero errors expected.
* Gain within 1 dB.
* Residual phase under 5° (modulo 90°) when tracking starts.
* The sampling instant within 2 clocks of the symbol centre.
* That all acquisition ends inside the preamble.
* Burst-end detection.

The last four bursts use the operating switches:

* 300 Hz with fine tracking off must be error-free.
* 1.5 kHz with fine tracking off must show errors, because 56° of drift exceeds
  the decision margin.
* +2 dB and −2 dB with the AGC also off must be error-free and leave the gain at
  minimum.

It also counts each mechanism: the events above, fine updates, skipped samples,
bursts that locked in a rotated quadrant, and bursts run with each switch off. It fails if any mechanism never
happens. It runs in well under a second.

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

To simulate with Verilator 5:

```
verilator --binary --timing -Irtl rtl/qam_rx_pkg.sv tb/tb_qam_burst_rx.sv \
          --top-module tb_qam_burst_rx -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. `+trace` on the end-to-end
test prints the A/D samples, gain and phase during the first burst and the
filter outputs around the second.
