# Differential-PLL desynchronizer for pulse-stuffed DS-1 tributaries (M12)

An M12 multiplexer packs four DS-1 signals (1.544 Mb/s) into one DS-2 signal
(6.312 Mb/s). Because the four inputs are plesiochronous, each is brought up to a
common rate by *pulse stuffing*: now and then a dummy bit is sent instead of a
data bit, at a fixed place in the frame. At the far end the demultiplexer removes
the overhead and stuff bits. The remaining data come on a clock full of gaps, and
a PLL must smooth that clock back into a regular 1.544 MHz. Stuffs can only happen
at fixed opportunities, so the gap pattern carries *waiting-time jitter*: low-
frequency phase wander that a 1.544 MHz PLL of a few hundred hertz bandwidth
passes straight through to the output.

This design recovers the clock a different way. The PLL does not lock to the
1.5 MHz gapped clock. It locks to the stuff pulses themselves, which arrive at
only about 1.8 kHz. At that rate a loop bandwidth of about 13 Hz is easy to build
and still acquires quickly, and far more of the waiting-time jitter is filtered
out. The loop is called a *differential PLL* (DPLL). It compares two
low-frequency signals:

* **A**: the stuff pulses, at rate `f_n - f_1`;
* **B**: the difference between the overhead-free clock `f_n` and the recovered
  clock `f_o`, at rate `f_n - f_o`, made by a digital mixer.

Here `f_n` (about 1.5458 MHz) is the tributary's share of the DS-2 clock with the
overhead bits removed, and `f_1` is the fully gapped clock, whose average is the
DS-1 rate. When the loop holds A and B at the same rate, `f_o` equals the average
of `f_1`: the recovered clock runs at exactly the tributary's rate.

The design follows the experimental desynchronizer of Q. A. Ruan, *Reduction of
Waiting Time Jitter in Digital TDM Systems* (M.Sc. thesis, University of Alberta,
1991). The digital parts are synthesizable RTL. The analog parts (op-amp summer,
RC loop filter, crystal oscillator, mixer filter and Schmitt trigger, and the
jitter meter used to evaluate the result) are behavioural models using `real` values and `#` delays. With those models the
whole loop simulates in Verilator at real time scales.

## Signal flow

```
 ds2_clk 6.312 MHz ──► m12_stuff_generator ──► fn_en ──► (register) ──► fn ─┐
 ds1_ref ────────────►   frame counter          stuff_pulse = A ──┐          │
                         stuff detector         f1_en ──┐         │          │
                                                        │         ▼          ▼
 data_in ──────────────────────────────────────► elastic_store  dpll_phase_detector ◄── B
                                                 (write: f1)      S = cnt(B) - cnt(A)    ▲
                                                        │               │ 3 bits         │
                                   data_out ◄───────────┤         pd_summing_amp         │
                                                        │          u_d = 0.5*S + 4 V     │
                                                        │               ▼                │
                                                        │         lag_loop_filter        │
                                                        │               │ u_f            │
                                                        │               ▼                │
                                                        │         vcxo_mc4024 (8 x f_o)  │
                                                        │               ▼                │
                                          fo ◄──────────┴──────── clk_div8 ── fo ──► pfd_type4 ◄── fn
                                          (read clock)                                   │ up
                                                                                   rc_schmitt ──► B
```

`m12_dpll_desync_top` wires all of this for one tributary. It also contains a
model of the jitter meter used to measure the recovered clock (`jitter_meter`);
its reference clock `meas_ref` comes in on its own port.

## The M12 frame and the stuff-pulse generator (`m12_stuff_generator`)

The M12 frame is 1176 DS-2 bits: 24 blocks of one overhead bit (M, C or F)
followed by 48 data bits, which interleave the four tributaries bit by bit. So
each tributary has 12 slots per block and 288 per frame. The 24 blocks form four
subframes of six blocks, with overhead order M C F C C F. Subframe *n* holds
tributary *n*'s stuff opportunity, in the tributary's first data slot after the
last F bit, so each tributary has one opportunity per frame. The frame length,
the interleave and the place of the opportunity follow the thesis. The overhead
order inside a subframe is the standard M12 one.

The generator takes the place of the multiplexer for one tributary (`CHANNEL`,
default 1):

1. A frame counter runs on the DS-2 clock.
2. The DS-2 clock is inhibited during overhead bits and divided by 4. One phase of
   the divider is `fn_en`, the tributary's overhead-free clock: 288 pulses per
   frame, 1.5458 MHz on average.
3. The stuff detector is an up/down counter. It counts +1 for every pulse of the
   gapped clock `f1_en` and −1 for every edge of the DS-1 reference. The
   reference is resynchronised into the DS-2 domain first. When the count
   reaches `STUFF_THRESHOLD` (1 bit), a stuff flag is set.
4. At the next stuff opportunity with the flag set, that `fn_en` pulse becomes a
   stuff pulse (`stuff_pulse`, signal A). It is left out of `f1_en`, and the flag
   clears.

The stuff ratio (stuffs per opportunity) is
`rho = (f_n - f_DS1) / (f_DS2 / 1176)`. That is 0.3346 at the nominal 1.544 MHz
and about 1/3 at +7 Hz; at +7 Hz the waiting-time jitter has its lowest
frequencies and is hardest to filter.

The thesis builds the stuff detector from a phase/frequency detector and a
D flip-flop. Here it is a bit counter, and the threshold value is this design's
own choice. The counter sees the reference only at DS-2 clock edges, so each stuff
decision has a timing uncertainty of one DS-2 period (0.245 DS-1 UI). This makes
the stuff pattern, and so the jitter, differ a little from that of an analog
comparator.

## The counter phase detector (`dpll_phase_detector`, `pd_summing_amp`)

This is the part that most needs care. Two 3-bit up-counters count the A pulses
and the rising edges of B. A 3-bit subtractor forms

    S = count(B) − count(A)  (mod 8),  read as S = S1 + 2·S2 − 4·S3  ∈ {−4 … +3}

An op-amp summer turns S into a voltage, `u_d = 0.5·S + 4 V`:

| S3 S2 S1 | S  | u_d (V) |
|----------|----|---------|
| 1 0 0    | −4 | 2.0     |
| 1 0 1    | −3 | 2.5     |
| 1 1 0    | −2 | 3.0     |
| 1 1 1    | −1 | 3.5     |
| 0 0 0    | 0  | 4.0     |
| 0 0 1    | +1 | 4.5     |
| 0 1 0    | +2 | 5.0     |
| 0 1 1    | +3 | 5.5     |

One extra pulse on either input is one cycle (2π) of phase, so the gain is
K_d = 0.5 V / 2π = 0.0796 V/rad. The detector is linear over eight cycles, from
−8π to +6π, and then wraps. That is four times the ±2π range of an ordinary
phase/frequency detector, which helps the loop pull in. The thesis text speaks
of "±4π". Eight states of 2π, as its state table and its plot of output against
phase show, give the wider range, and that is what is built.

Between pulses S stays constant, so `u_d` is a staircase. In lock, S switches
between two neighbouring values, and the fraction of time spent in each is the
fine phase. The loop filter averages this into a linear phase detector.

**Sign.** The order of the subtraction is this design's own choice. B gets
slower as the VCXO speeds up, and the VCXO speeds up as its control voltage
rises. So a recovered clock that runs slow makes B run ahead of A, S rises,
`u_d` rises, and the VCXO is pulled up. That is negative feedback.

The counters are synchronous with enables on the DS-2 clock. B is asynchronous
and passes a two-flip-flop synchroniser (3 clocks of delay, against B's period
of about 0.55 ms).

## Loop dynamics (`lag_loop_filter`, `vcxo_mc4024`, `clk_div8`)

| Quantity | Value |
|---|---|
| Loop filter | passive lag, F(s) = (1 + sτ2)/(1 + s(τ1+τ2)); R1 = 47 kΩ, R2 = 4.7 kΩ, C = 3.42 µF |
| τ1, τ2 | 160.7 ms, 16.1 ms |
| VCXO | crystal multivibrator at 8 × 1.544 MHz, then ÷8; 1.544 MHz at 3.80 V |
| K_o | 15039 rad/s/V (2393.5 Hz/V at the divided output) |
| K_d | 0.0796 V/rad |
| ω_n, ξ | 82.5 rad/s (about 13 Hz), 0.70 |

The loop filter model advances its capacitor voltage every 1 µs with the exact
exponential. The VCXO model keeps its edge times as `real` values, so rounding to
the 1 ps time precision adds no frequency error. The VCXO is linear between
1542.901 kHz and 1544.836 kHz at the divided output and clamps outside that
range. The limits come from the loop's measured hold range for the difference
frequency, 0.960 to 2.895 kHz. The real oscillator was measured as linear only
over ±200 Hz. The PD's +4 V offset against the VCXO's 3.80 V centre leaves a
steady phase offset of S ≈ −0.4 in lock, which does no harm.

## The mixer (`pfd_type4`, `rc_schmitt`)

The mixer turns `f_n` and `f_o` into their 1.8 kHz difference B. A type-4
(edge-triggered) phase/frequency detector gets `f_n` on its signal input and
`f_o` on its VCO input. Its UP output is high from each `f_n` edge to the next
`f_o` edge. Because `f_n` is faster, UP's duty cycle grows by
`(f_n − f_o)/f_o` every cycle and wraps once per difference period. An RC
low-pass filter (1 kΩ, 15 nF, corner 10.6 kHz) turns this into a sawtooth. An
inverting Schmitt trigger (SN7414 type, thresholds 1.7 V and 0.9 V) squares the
sawtooth into B.

The RC values and the part types follow the thesis. It does not give which
detector output was used, or the Schmitt thresholds, so those are this design's.
In `pfd_type4` the two flip-flops clear each other with zero delay. This is the
intended structure of a type-4 detector, although a linter may report it as a
combinational loop. If both flip-flops power up set, the first input edge clears
them. `f_n` is registered on the DS-2 clock
before it clocks the detector, so it arrives as a clean one-DS-2-period pulse.

## Elastic store (`elastic_store`)

Data bits are written with the gapped clock `f1_en` on the DS-2 clock, and read
one per `f_o` cycle. The store is a dual-clock FIFO, 16 deep, with Gray-coded
pointers. After reset, reading starts once the store is half full. An empty or
full store skips the read or write and raises `underflow`/`overflow` for one
cycle. After an underflow the read side waits for half fill again. The thesis
only says that such a store of a few bits is written by the gapped clock and read
by the recovered clock. The depth and the start and slip behaviour are this
design's own choices.

## Measuring the jitter (`jitter_meter`)

The original measurement set-up converted the jitter to a voltage with an
EX-OR gate and an active low-pass filter. The gate compares the recovered clock
with the original DS-1 clock. Its duty cycle is twice the delay between the two
clocks, in UI, as long as the delay stays between 0 and half a period. The filter
(3 dB at about 1 kHz) keeps the jitter and removes the 3 MHz ripple. It inverts:
an EX-OR output held high reads −3.55 V, so the scale is −7.1 V/UI
(0.14 UI/V). A reference voltage cancels the reading for the nominal 90° offset.
The model has a single-pole filter and an output offset that cancels exactly 90°.
The meter is only meaningful with `meas_ref` placed about a quarter period ahead
of `fo`. The end-to-end testbench places it there from the measured lock phase,
and checks the meter's reading against its own edge timing. At +50 Hz the meter
reads 0.052 UI p-p against 0.061 UI from the edges; the difference is what the
1 kHz filter removes.

## How the design behaves in simulation

All figures below are at the default parameters, with ideal DS-1 and DS-2
clocks. Jitter is the phase of each rising edge of `f_o` against the reference
DS-1 clock, unwrapped, in unit intervals (UI). It is taken from edge times, so it
includes components above the meter's 1 kHz cutoff.

Jitter against DS-1 frequency offset (`tb_workload_jitter_sweep`):

| DS-1 offset | stuff ratio | window | jitter p-p | jitter rms |
|---|---|---|---|---|
| 0 Hz   | 0.3346 | 2 s | 0.23 UI | 0.068 UI |
| 7 Hz   | 0.3333 | 3 s | 0.40 UI | 0.096 UI |
| 13 Hz  | 0.3322 | 1 s | 0.25 UI | 0.074 UI |
| 100 Hz | 0.3160 | 1 s | 0.07 UI | 0.013 UI |
| 200 Hz | 0.2973 | 1 s | 0.05 UI | 0.009 UI |

The pattern matches the hardware results reported in the thesis. Near a stuff
ratio of 1/3 the jitter reaches down to DC and passes the loop; the thesis
measured 0.33–0.34 UI p-p and 0.09 UI rms at 7 Hz. Away from 1/3 the jitter is
small; the thesis reports about 0.1 UI p-p and 0.02 UI rms. The higher p-p value
at 7 Hz here comes from the coarser stuff decisions of the counter-based stuff
detector (see above).

Acquisition after a step of the DS-1 frequency, starting from lock at 1.544 MHz
(`tb_workload_pull_in`):

| step | lock time (phase within 0.5 UI of final) | largest excursion | PD wraps |
|---|---|---|---|
| +100 Hz | 20 ms  | 0.55 UI | 0 |
| +200 Hz | 31 ms  | 1.0 UI  | 0 |
| +450 Hz | 40 ms  | 2.3 UI  | 0 |
| −800 Hz | 101 ms | 32 UI   | 44 |

From lock, the detector only wraps for a step past its 4-cycle range, hence the
extra −800 Hz case.

The original acquisition measurement started from an unlocked loop instead. The
input was disconnected, so the detector counted B alone and its output was a
sawtooth; then the offset input was connected. `tb_workload_acquisition` repeats
that procedure, holding A away from the detector and then releasing it, three
times per offset at different points of the sawtooth:

| offset | acquisition time (3 releases) | PD wraps |
|---|---|---|
| 100 Hz | 12–41 ms | 0–1 |
| 200 Hz | 0–12 ms  | 0 |
| 450 Hz | 10–39 ms | 0–2 |

The thesis measured 30–40 ms at 100 and 200 Hz, and about 120 ms at 450 Hz, with
several detector wraps. The model shows the same wraps at 450 Hz, but acquires
faster there. How long acquisition takes depends strongly on the detector state
at the moment of connection, which neither set-up controls.

Hold range and lock range (`tb_workload_hold_range`). The original loop held lock
for input frequencies of 0.960 to 2.895 kHz, that is DS-1 offsets of +836 Hz to
−1099 Hz. It locked again when brought back within 1.430 to 2.630 kHz (+366 Hz to
−834 Hz). The model's VCXO tuning limits are set from the hold range. Swept at
1500 Hz/s, the model drops lock at +920 Hz and −1179 Hz; the sweep carries it
about 80 Hz past each limit before the detector wraps. On the way back it locks
again about where it dropped out. With a VCXO that tunes linearly right up to its
limits, the model has no separate, narrower lock range.

## How far to trust it, and where it departs from the thesis

* The loop topology and every component value (gains, R and C values, frame
  format, counter widths) are the thesis's. The analog parts are ideal,
  linear models: no op-amp dynamics, no oscillator phase noise, no
  non-linearity of the VCXO beyond ±200 Hz, and no reset delay in the
  phase/frequency detector.
* The stuff detector is a counter, not an analog phase comparator, so the
  multiplexer-side stuff pattern is this design's own.
* Own choices: the PD subtraction order, which mixer output is used, the Schmitt
  thresholds, the stuff threshold, the elastic store, the synchronisers and
  resets, and the VCXO tuning limits derived from the hold range.
* One tributary is recovered. The other three would use further copies of the
  generator (set `CHANNEL`), PD, mixer and loop.
* The thesis built the loop without a data path. The elastic store and the
  PRBS data check are added so that the recovered clock is tested by real use.
* The jitter meter stands for laboratory equipment, not part of the
  desynchronizer. The DS-1 and DS-2 clock sources are testbench clocks.
* Only the RTL modules synthesize (`m12_stuff_generator`,
  `dpll_phase_detector`, `pfd_type4`, `clk_div8`, `elastic_store`). The top level
  contains the behavioural models and is for simulation.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module tb_m12_dpll_desync_top rtl/m12_pkg.sv tb/tb_m12_dpll_desync_top.sv -o sim
./obj_dir/sim
```

Any other testbench is run by changing the `--top-module` and file name;
`-y rtl` lets Verilator find the modules by name. The package file must come
first. Run times at about 70 ms of simulated time per
wall-clock second:

| testbench | what it checks | wall time |
|---|---|---|
| `tb_m12_dpll_desync_top` | full design at defaults: lock, rates, stuff ratio, jitter < 0.5 UI, error-free PRBS data, no store slips, jitter meter agreeing with edge timing, every mechanism seen | 3 s |
| `tb_workload_jitter_sweep` | jitter table above | about 2 min |
| `tb_workload_pull_in` | pull-in from lock, table above | 35 s |
| `tb_workload_acquisition` | acquisition from the unlocked state, table above | 55 s |
| `tb_workload_hold_range` | hold and lock range by a slow frequency sweep | 55 s |
| `tb_m12_stuff_generator` | slot-by-slot frame positions for tributaries 1 and 3, stuff ratio, f1 rate | seconds |
| `tb_dpll_phase_detector` | S against a counting model under random A and B | seconds |
| `tb_pd_summing_amp`, `tb_lag_loop_filter`, `tb_vcxo_mc4024`, `tb_clk_div8`, `tb_pfd_type4`, `tb_rc_schmitt`, `tb_elastic_store`, `tb_jitter_meter` | each model against closed-form values | seconds |

To change the loop, edit the parameters of `lag_loop_filter` (R1, R2, C) and
`vcxo_mc4024` (gain, limits). ω_n = sqrt(K_o K_d / (τ1 + τ2)) and
ξ = ω_n (τ2 + 1/(K_o K_d)) / 2. `VCXO_OFFSET_HZ` on the top detunes the
free-running oscillator.
