# Parallel-data VLBI correlator

A VLBI correlator multiplies the sampled signal of one radio telescope with
that of another, at many relative delays (lags), and integrates. Two
corrections have to be applied sample by sample while it does so. The
geometric delay between the stations changes as the Earth turns, so station
Y's data must be shifted, one sample at a time, to keep it lined up with
station X (delay tracking). The same motion turns the phase of the
cross-correlation (the fringe), and this must be removed (fringe stopping).

At gigabit rates no correlator logic can run at the sample clock. This design
therefore handles **64 samples per clock**: a 1024 Msps stream needs only a
16 MHz parallel clock. The difficulty is keeping single-sample resolution
while the hardware moves in 64-sample words:

* The delay may grow or shrink by one sample between *any* two samples of a
  word, not only at word boundaries.
* The fringe phase may step at any sample as well.

The design marks the sample where such a step happens with an n-bit mask,
0...01...1, one bit per sample. Every unit that needs the step reads this
mask.

The RTL covers the correlator itself for two stations and four channels:

* time-code synchronization buffers;
* an on-chip a-priori model;
* delay trackers;
* fringe rotation with 90-degree jumps;
* 1024 complex lags per channel.

It also covers the station-side formatter that packs sampler data and inserts
time codes.

## Data path

```
 station X words ─► sync_buffer ─► delay_tracker (never shifts) ─────────────┐
 (per channel)          ▲                                                     │ x
                        │ start                                               ▼
                 sync_controller                                      lag_correlator ─► rd_re/rd_im
                        │ start                                               ▲   ▲
 station Y words ─► sync_buffer ─► delay_tracker ◄── d_shift/d_up/d_bsel      │ y │ codes
 (per channel)      (read offset)       │                 │                   │   │
                                        └─────────────────┼───────────────────┘   │
 builtin_controller:                                      ├─► phase_jump90 ─► fringe_rotator
   delay polynomial ─► zero_cross_decision ───────────────┘                   ▲
   phase polynomial (per channel) ─► zero_cross_decision ─────────────────────┘
```

Everything runs on one clock, the parallel data clock. A word is 64 samples of
2 bits each, 128 bits in all. Sample 0 is the earliest and sits in the least
significant bits. A sample is sign (bit 1) and magnitude (bit 0), and stands
for the levels -3, -1, +1 and +3.

## Delay tracking inside a word (`delay_tracker`)

The tracker holds two consecutive words of station Y. Register **A** has the
older word and register **B** the newer. A selector copies 64 consecutive
samples out of the 128-sample window {B, A} into the output register Y. It
starts at offset `s`, which is the **control counter**.

The window holds one sample more than A and B: the last sample of the word
before A. A negative step at `s = 0` then still finds its sample.

The model supplies three signals each clock:

* `shift`: the integer delay changes during this word;
* `up`: the direction of that change;
* `bsel`: the bit-select control register.

Output sample i is then:

```
Y[i] = window[1 + s + i + (shift && bsel[i] ? (up ? +1 : -1) : 0)]
```

The counter follows each step, `s ± 1`, and the registers move as follows.

| case | counter | registers | words taken from the buffer |
|---|---|---|---|
| normal | s (or s±1) | A ← B, B ← next word | 1 |
| counter passes its maximum (s = 63, step up) | → 0 | A, B ← the next two words (one word skipped) | 2 |
| counter passes zero (s = 0, step down) | → 63 | unchanged | 0 |

So, seen from the sample stream, Y's word k is stream sample
`k·64 + i + d(k,i)`, where d is the integer delay of that sample.

The buffer shows the tracker its next two unread words (`w0`, `w1`). The
tracker answers with `adv` = 0, 1 or 2: the number of those words it
consumed on this clock.

Station X goes through an identical tracker whose step inputs are tied off.
Both stations therefore reach the correlator with the same latency.

The initial delay is split into three parts:

| part of the delay | where it goes |
|---|---|
| whole words (`d_int / 64`) | the read offset of the Y buffers |
| remainder (`d_int mod 64`) | the starting counter value |
| value modulo 4 | the starting quadrant of the phase jump |

The delay must be non-negative when the run starts, and it must change by less
than one sample per word. Earth rotation stays many orders of magnitude below
that limit.

## Where the step falls: the zero-crossing division (`zero_cross_decision`)

The on-chip model (`builtin_controller`) gives the delay at clock k and at
clock k+1, in fixed point with 32 fraction bits. If their integer parts
differ, a step happens inside word k. The step falls where the straight line
between the two values crosses the integer. Call a the distance from the
value at k to the integer, and b the distance from the integer to the value at
k+1. The first shifted sample is then:

* rising value: `pos = ceil(64·a/(a+b))`
* falling value: `pos = floor(64·a/(a+b)) + 1`

A divider computes this, and bits pos..63 of the mask are set.

`pos` can be 64. The value then reaches the integer exactly at the next
word, so no sample of this word moves, but the counter must still move.
For that reason `shift` is a separate signal and not derived from the mask.

The fringe phase is handled the same way, in units of pi/8 and with one
polynomial per channel. It gives the **phase control register** and the
integer phase modulo 16.

Each quantity is a 4th-order polynomial in time. `poly_fwd_diff` evaluates it
by forward differences, which costs four additions per clock. The host loads
the value and the first four forward differences at the start of the scan.

## Fringe phase, the 90-degree jump and the switching code

Fringe stopping is done at the band centre. Moving the delay by one sample
shifts the band-centre phase by 90 degrees, so every delay step must come with
a 90-degree jump. The jump happens at the same sample as the delay step, so it
uses the same bit-select mask. `phase_jump90` keeps the quadrant reached so
far and gives each sample its quadrant offset. It takes +90 degrees per sample
of added delay.

`fringe_rotator` adds up each sample's phase in units of pi/8:

```
phase[i] = p_int + (phase step at i ? ±1 : 0) + 4·qoff[i]      (mod 16)
```

It then rounds this to the nearest quadrant (ties go to the larger angle) and
emits a 2-bit switching code. The code routes that sample's products in the
correlator.

| code | product goes to |
|---|---|
| 00 | + real |
| 10 | − real |
| 01 | + imaginary |
| 11 | − imaginary |

The quadrants map to codes for a rotation by exp(−j·phase): 0° → 00,
90° → 11, 180° → 10, 270° → 01. The phase is tracked at pi/8 resolution, but
the products are weighted at quadrant resolution only.

## Lags and accumulation (`lag_correlator`)

For each of the L = 1024 lags, and for all 64 samples of the word, the
correlator forms `x(u)·y(u + l − L/2)`. It routes each product by the
switching code of x(u) and adds the real and imaginary sums to 40-bit
accumulators. Lag index L/2 is zero delay.

To reach negative lags, X and the codes are delayed by L/2 samples, and Y
keeps its last L samples. For the first L/64 words after the start these
histories are still filling and nothing is accumulated (`hist_full`). All
lags are computed in parallel on every clock. The accumulators are read
through `rd_lag`, and cleared with `acc_clear`.

## Station synchronization by time code (`sync_buffer`, `sync_controller`)

Each station's data carry time codes. A time-code word has a fixed 64-bit
SYNC pattern in bits 127:64, and year, day, hour, minute and second in bits
37:0 (`corr_pkg::time_code_t`). After `arm`, each buffer waits for the
agreed time code and stores the data words that follow it. Time-code words
themselves are never stored. There is one buffer of 64 Mbit (524288 words)
per channel and station.

The controller starts every reader on the same clock. It waits until:

* all buffers have seen the time code;
* every buffer holds `START_MARGIN` (16) words beyond its read offset.

The station that arrives first simply waits in its buffer, which absorbs the
difference in transmission delay. The controller reports that wait as
`sync_wait_cycles`. The buffers raise sticky flags when a reader gets ahead
of the data (`underflow`) or the writer overruns unread data (`overflow`).

## Station side: the formatter (`atm_formatter`)

The formatter takes P = 8 samples of each of four 2-bit channels per clock.
It keeps 1, 2 or 4 channels and 1 or 2 bits per sample (1 bit keeps the sign)
and packs the kept bits, time-major, into 128-bit words. The four possible
bit counts per sample time (1, 2, 4, 8) give the four output rates, 256 to
2048 Mbps at 256 Msps.

A real-time clock counts `TICKS_PER_SEC` clocks per second. On the first clock
of every second, the formatter sends a time-code word ahead of that second's
data, and the data start on a new word. In one-channel, 2-bit mode an output
word is exactly the correlator's input word.

In the top level the formatter stands beside the correlator with its own
`fmt_*` ports. The ATM link between them is not modelled.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | samples per word (parallel width) |
| `NCH` | 4 | channels |
| `L` | 1024 | complex lags per channel |
| `ACC_W` | 40 | accumulator width (own choice) |
| `BUF_BITS` | 64 Mi | buffer bits per channel and station |
| `PW` / `FRAC` | 64 / 32 | polynomial width / fraction bits (own choice) |
| `START_MARGIN` | 16 | words held beyond the offset before readout (own choice) |
| `FMT_P`, `FMT_TICKS_PER_SEC` | 8, 128e6 | formatter input width, clocks per second (own choice) |

The time-code word layout needs 128-bit words, so `N` must stay 64 with
2-bit samples. For a smaller model, reduce `NCH`, `L` and `BUF_BITS`.

## Using it

Follow these steps:

1. Load the polynomials. Put the value and the 4 forward differences in
   `delay_coef` (samples, 2^-32 units) and in `phase_coef[c]` (pi/8 units,
   2^-32), then pulse `coef_load`.
2. Pulse `arm` with `start_tc` set to the time code to start from.
3. Stream the station words into `x_*` and `y_*`, one word per channel per
   clock, time codes included.
4. Keep `acc_en` high for the integration.

`synced` and `running` rise once the start has happened. The path from
`start` to the accumulators has these delays:

* 1 clock until the buffers present words;
* 1 clock for the trackers to load;
* then one word per clock through Y, the codes and the accumulators.

To read the results, set `rd_ch` and `rd_lag`; `rd_re` and `rd_im` follow
combinationally.

A new `arm` pulse stops the run. The accumulators keep their values until
`acc_clear`.

Concurrent assertions in `builtin_controller` flag a delay or phase that
moves by a whole unit or more in one clock. The step masks cannot express
such a move.

## Where this departs from, or adds to, the underlying description

* **Quadrant weighting.** The phase is tracked in pi/8 steps but applied with
  4-phase (±real, ±imaginary) switching. This is the switching structure of
  an earlier single-step system. A finer weighting (more levels of cos/sin)
  would lose less coherence, but none is specified.
* **Own choices.** These were all chosen here:
  * the sample levels;
  * the accumulator width;
  * the fixed-point formats;
  * the time-code word layout and SYNC value;
  * the start margin;
  * the read offset for the whole-word delay;
  * the two-word buffer read port;
  * the sign of the 90-degree jump;
  * the formatter's packing order, P = 8 and its 365-day calendar.
* **Fully parallel.** The lag array computes 64 × 1024 products per channel
  on every clock, with no time multiplexing. This is correct, but a real
  implementation would fold it.
* **One clock.** The buffers are written on the correlator clock. A real
  system writes them from the network or recorder side in their own clock
  domain.
* **Tape playback** uses the same synchronization and has no separate logic
  here.

## Not included

* The sampler (analog converters in a commercial instrument).
* The ATM network link and cell format.
* The phase lock of the formatter's clock to the sampler clock.
* The host's Earth-rotation model that produces the polynomial coefficients.
* The recorders.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_poly_fwd_diff` | forward differences against direct polynomial evaluation |
| `tb_zero_cross_decision` | 20 000 random cases against an exact per-sample floor comparison |
| `tb_delay_tracker` | a random walk of steps with counter wraps both ways; every output sample against the stream |
| `tb_phase_jump90`, `tb_fringe_rotator` | offsets and codes against an angle-based reference |
| `tb_lag_correlator` | all lags against a full-history reference, plus clear |
| `tb_sync_buffer`, `tb_sync_controller` | time-code start, dropped time codes, offset reads, underflow/overflow, start timing |
| `tb_builtin_controller` | masks and integer parts from rising/falling delay and phase |
| `tb_atm_formatter` | every mode's packing, time-code placement and a new-year roll-over |
| `tb_gbit_correlator` | end to end, 2 channels × 128 lags; see below |
| `tb_gbit_correlator_full` | the same, at the default size: 4 channels × 1024 lags, 64 Mbit buffers, 400 words |

The end-to-end benches work as follows:

* **Stimulus.** Station Y starts later than station X and carries station
  X's data delayed by exactly the model delay. The delay rises at up to
  0.9 sample/word and falls back.
* **Reference.** An independent model works out every lag of every channel.
* **Checks.** The benches compare all lags, and require the peak at the
  zero-delay lag. They also require each mechanism to happen at least once:
  a synchronization wait, steps both ways, a word skip, a word hold, phase
  steps, and time-code insertion by the formatter.

Both end-to-end benches pass. The full-size bench takes about a minute to
build and a few seconds to run.

To run a bench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/corr_pkg.sv \
          tb/tb_gbit_correlator.sv --top-module tb_gbit_correlator
./obj_dir/Vtb_gbit_correlator
```
