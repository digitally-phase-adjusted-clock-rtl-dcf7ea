# Digitally phase-adjusted CDR for a receiver with spread-spectrum clocking

This design recovers clock and data from a 6 Gb/s serial stream (SATA
generation 3 class) when the stream and the receiver's own clock can differ
by several thousand ppm. The difference comes from spread-spectrum clocking
(SSC), which sweeps a clock down by up to 5000 ppm at about 33 kHz to lower
EMI.

The receiver's PLL is never steered. It runs free at 1.2 GHz with ten phases.
A small digital loop only chooses *where* inside each 1.2 GHz period the
receiver samples. It picks one of 160 positions, so one step is 1/32 of a
bit. To follow a frequency difference, the loop keeps moving that position at
a constant average rate. For that it has a second-order (phase plus
frequency) loop filter made of two sigma-delta gain elements.

Because only the sampling position moves, one PLL can feed many receive
lanes, each with its own loop. This is a dual-loop, "feed-forward"
architecture.

The same idea also runs in the transmit direction. The spread-spectrum clock
generator (SSCG) builds a down-spread clock from a fixed PLL. It rotates the
PLL's feedback clock by a fraction of a VCO period at every reference edge.
A digital controller sets how far it rotates.

The RTL here is the digital part of such a chip:

| module | what it is |
|---|---|
| `cdr_sscg_top` | Top level: CDR loop, BIST, SSCG controller and SSCG feedback divider. |
| `cdr_loop` | The CDR loop: phase detector → pre-filter → loop filter → rotation counter → phase-mux/interpolator control. |
| `bist_k285` | Self test: aligns the recovered data to a K28.5 pattern and counts bit errors. |
| `sscg_ctrl` | SSC profile → sigma-delta → rotation counter → rotator control. |
| `fb_divider` | Divide-by-12 feedback divider of the SSCG PLL. |
| `cdr_pkg` | Shared constants and types. |

The analog parts are not modelled in RTL:
- the ten-phase PLL and VCO;
- the phase multiplexers and interpolators;
- the edge-clock delay cells;
- the samplers.

The top brings out the control words for these parts and takes the sampler
outputs as inputs. The testbenches use a behavioural phase-domain model of
them (`tb/rx_frontend_model.sv`).

## Rates and numbers to keep in mind

| quantity | value |
|---|---|
| data rate | 6 Gb/s, 1 UI = 166.7 ps |
| word clock `clk` | 1.2 GHz, 5 bits per clock (one PLL period = 5 UI) |
| PLL phases × interpolation steps | 10 × 16 = 160 positions per PLL period |
| phase step | 1/32 UI ≈ 5.2 ps |
| loop-filter update rate | 600 MHz (every second word clock) |
| reference clock `clk_ref` | 100 MHz; the SSCG PLL divides by 12 |
| SSC | 0 … −5000 ppm, triangular, ≈33 kHz |

One rotation step per update is 1/32 UI every 10 bits, so a constant offset
of Δ ppm needs Δ·10⁻⁶ / (1/320) = Δ/3125 steps per update. At 5000 ppm that
is 1.6 steps per update. This number sets the sizes of the loop filter.

## Phase detector and pre-filter (`bbpd`, `gain_comp`, `window_sum`)

Each word clock delivers five data samples D0..D4 and five edge samples
E0..E4. Edge sample Ei lies between Di−1 and Di. For D(−1), the last bit of
the previous word is used.

`bbpd` looks at every pair of neighbouring data bits that differ, which is a
transition. The edge sample between them equals the new bit if the clock is
late; it then raises `lag`. It equals the old bit if the clock is early; it
then raises `lead`. Words without transitions give nothing.

A bang-bang detector like this has a gain that depends on how many
transitions a word has. With five transitions, a plain sum of lead − lag is
five times larger than with one. `gain_comp` removes that dependence. It
supports two schemes, selected by `cfg.mode`:

- **Gain compensation** (`PF_GAIN_COMP`, the one the design uses) outputs
  (lead − lag) / transitions. Three leads and two lags give +0.2; four leads
  give +1. The value is signed fixed point, with 1.0 = 64. The division is
  rounded to the nearest code, so 1/3 becomes 21/64.
- **Majority vote** (`PF_MAJORITY`) outputs the sign of (lead − lag). It is a
  simpler alternative with the same transition-density independence.
  However, it stays bang-bang near lock, so it causes more jitter while
  locked.

`window_sum` adds two consecutive pre-filter values. It emits one sum every
second clock, which is the 600 MHz update. The full scale of the sum is 128.
The pairs do not overlap.

## Multiple alternating edge sampling (`maes_ctrl`)

A bang-bang detector with little input jitter behaves like a switch. Its
gain around lock is huge, and the loop dithers. M-AES makes the detector
proportional. Each edge clock is pushed off its nominal position, and the
side it is pushed to alternates:

| edge clock | offset |
|---|---|
| E0 | ±0.04 UI |
| E1 | ±0.06 UI |
| E2 | ±0.08 UI |
| E3 | ±0.10 UI |
| E4 | ±0.12 UI |

With 5 magnitudes × 2 sides plus the centre, the averaged detector output
takes eleven levels that grow with the phase error. The smallest offset
leaves a dead zone of 2 × 0.04 UI.

`maes_ctrl` outputs each offset as a signed number in 1/100 UI, positive
meaning later. An analog delay stage applies it. The side flips every word
clock, and neighbouring edge clocks sit on opposite sides. That ordering is
this design's choice; see *Caveats*.

## Loop filter: two sigma-delta gain elements (`prop_path`, `integral_path`)

The loop filter must turn a fraction such as "+0.3 of full scale" into whole
rotation steps. It also needs a small gain (1/8 or less), so that one noisy
update does not move the clock by a whole step. Both paths do this with a
first-order sigma-delta (an accumulator whose overflow is the output)
instead of a multiplier.

**Proportional path.** The 600 MHz sum enters a signed accumulator. When the
accumulator passes +2^(N+7), the path outputs a +1 step and subtracts
2^(N+7). When it passes −2^(N+7), it outputs −1. This is the "sign path",
and it makes the element work for both polarities. On average, the gain is
G_P = 2^−N steps per full-scale input. `cfg.n_shift` = N is meant for 2..5,
and the default setting is N = 3.

The proportional path alone can follow a frequency offset up to
2^−N · (1/320) per bit, which is 390.6 ppm for N = 3. Anything larger needs
the integral path.

**Integral path.** The ±1 steps P of the proportional path are summed into
an 8-bit signed frequency register F, which saturates at its range. A second
sigma-delta turns F into steps. An M-bit fractional accumulator adds F at
every update and hands on the integer overflow as the integral steps I. The
average step rate is F/2^M, so G_I = 2^−M; the default is M = 6, giving
1/64. The integrator input is P rather than the detector output. This keeps
the hardware small, and it keeps G_I far below G_P, as stability requires.

With F in −128..127 and M = 6, the path reaches ±1.98 steps per update,
about ±6200 ppm. That covers the 1.6 steps that 5000 ppm needs. In
simulation, F sits near −102 at the SSC peak.

**Sign convention.** A positive detector output means the clock is early,
so the counter counts up and the sampling moves later. When the data runs
faster than the local clock, the samples must move earlier and earlier, so
F goes **negative**. +1000 ppm of data rate gives F ≈ −21. A receive clock
slowed by SSC also gives a negative F.

## Rotation counter and the 160-position decoder (`phase_counter`, `phase_decoder`)

`phase_counter` is a modulo-160 up/down counter. It adds P + I, with −3..+3
steps per update, and reports wraps in each direction.

`phase_decoder` turns a position p into controls for the five sampling
clocks. It computes the PLL phase c = p / 16 and the fraction f = p mod 16.
Each interpolator is fed by two 5:1 multiplexers: one over the even PLL
phases 0, 2, …, 8 and one over the odd phases 1, 3, …, 9.

Between phases c and c+1, one input is always even and the other odd. So
the interpolator "zigzags". Going from even c to odd c+1, the odd weight
rises 0 → 16. Going from odd c to even c+1, it falls 16 → 0. A multiplexer
therefore changes its selection only while its interpolation weight is
zero, and the switch cannot glitch the clock.

The weight is a 16-bit thermometer code (number of ones = odd weight), so
every step is monotonic. Lane k sits 32 positions (1 UI) after lane 0. The
edge clocks are taken as the complementary outputs of the same
interpolators, half a PLL period later. That pairing is this design's
reading.

A PD decision reaches the rotation counter 5–6 word clocks later. It reaches
the interpolator control one clock after that.

## Built-in self test (`bist_k285`)

The test pattern is K28.5 repeated: `1010000011 0101111100`, first bit
first. Its two halves are the two running-disparity forms. It has runs of
five equal bits and alternating stretches, so it exercises both inter-symbol
interference and sparse transitions.

The BIST keeps the last 20 received bits. While unlocked, it compares them
with all 20 rotations of the pattern. On a match it locks the alignment and
raises `data_en`. `rev_data` then shows the 20 bits rotated back into
pattern order.

While locked, every new bit is compared with the expected one. A mismatch
adds to `err_cnt` (16 bits, saturating) and drops `data_en` until the
pattern is found again. `err_pwm` is a 256-clock square wave whose high time
equals the error count (up to 255), so the count can be read as a duty
cycle on a scope pin.

## Spread-spectrum clock generator control (`ssc_profile`, `sd_mod1`, `sscg_ctrl`, `fb_divider`)

The SSCG PLL multiplies 100 MHz by N = 12. Its divider input is not the VCO
itself but a phase-rotated copy of it: 10 VCO phases × 16 interpolation
steps, so p = 160. If the rotator moves the fed-back edge α/160 of a VCO
period earlier at each reference edge, the loop settles where
T_ref = (N − α/p) · T_VCO:

    f_vco = f_nominal · (1 − α / (N·p)) = f_nominal · (1 − α / 1920)

So α = 9.6 gives the 5000 ppm down-spread.

- **`ssc_profile`** builds the triangle as a staircase. K counts 1 → 153 → 1,
  holding each stair for 10 reference cycles. One period is 3040 reference
  cycles, which is 32.9 kHz. `turn_top` and `turn_bot` mark the ends.
- **`sd_mod1`** is a first-order sigma-delta with a 4-bit accumulator. The
  rotation α must be an integer, so it outputs ⌊K/16⌋ plus the accumulator
  carry. The average is K/16, at most 153/16 = 9.5625, which is 4980 ppm.
  153 is the largest K that stays within 5000 ppm. The modulator's
  quantisation noise is pushed to high frequencies, where the PLL filters
  it out.
- **`sscg_ctrl`** chains the profile, the modulator, a modulo-160 counter
  that counts *down* by α each reference cycle, and a one-lane copy of the
  zigzag decoder. The decoder drives the rotator's multiplexers and
  thermometer-coded interpolator.
- **`fb_divider`** divides the rotated clock by 12 (6 cycles high, 6 low)
  to form the feedback clock for the phase-frequency detector.

With `ssc_en` low, α is 0 and the PLL runs at its nominal frequency.

## Top level (`cdr_sscg_top`)

There are three clock domains, each with its own synchronous active-low
reset:

| clock | reset | domain |
|---|---|---|
| `clk` | `rst_n` | CDR and BIST, 1.2 GHz word clock |
| `clk_ref` | `rst_ref_n` | SSCG controller, 100 MHz |
| `clk_rot` | `rst_rot_n` | feedback divider, rotated VCO clock |

Main ports:

| port | dir | meaning |
|---|---|---|
| `cfg` | in | `cdr_cfg_t`: `n_shift` (N), `m_shift` (M), `mode` (gain compensation / majority), `maes_en`, `int_en` (integral path on) |
| `data_s`, `edge_s` | in | the five data and five edge samples, retimed to `clk`, bit 0 earliest |
| `pi_ctrl[5]` | out | per lane: `sel_even`, `sel_odd` (one-hot), `therm` (16-bit thermometer) |
| `edge_offs[5]` | out | M-AES offsets, signed, 1/100 UI |
| `rx_data` | out | recovered 5-bit word |
| `rev_data`, `data_en`, `err_cnt`, `err_pwm` | out | BIST |
| `ssc_en` | in | spread-spectrum modulation on |
| `ssc_pi_ctrl` | out | SSCG rotator control |
| `clk_fb` | out | divided feedback clock |
| `cdr_phase`, `cdr_freq`, `p_step`, `i_step`, `gn`, `wrap_up`, `wrap_dn`, `ssc_phase`, `ssc_k`, `ssc_alpha`, `ssc_turn_*` | out | observation of internal state |

The document's circuit-level configuration is G_P = 1/8, G_I = 1/64, gain
compensation and M-AES on. In `cfg` this is N = 3, M = 6,
`mode = PF_GAIN_COMP`, `maes_en = 1`, `int_en = 1`.

## Where this RTL follows the design and where it chooses

These follow the design:
- the loop structure: binary PD, gain compensation or majority vote, a
  two-word window at 600 MHz, sigma-delta proportional gain 2^−N with a sign
  path, and an integral path fed by P with gain 2^−M;
- the modulo-160 rotation counter, the zigzag even/odd 5:1 multiplexers and
  the thermometer-coded interpolators;
- the M-AES magnitudes;
- the K28.5 BIST with `rev_data` and `data_en`;
- the SSCG's triangular staircase, first-order 4-bit sigma-delta with
  K = 1..153, 160-position rotator and divide-by-12.

The following are this design's own choices:
- all word widths;
- the fixed-point format of the pre-filter (1.0 = 64, rounded division);
- register placement, which sets the loop latency;
- the frequency register range (8 bits, saturating) and its sign convention;
- non-overlapping window pairs;
- the M-AES alternation order;
- the edge-clock pairing in the decoder;
- the BIST search scheme and the `err_pwm` period;
- the stair length of 10 reference cycles, which gives 32.9 kHz;
- the divider's duty cycle;
- synchronous resets.

Deliberately not built:
- A separate gain for the rotation counter. The counter always moves one
  1/32-UI step per unit of P + I.
- Higher-order sigma-delta modulators for the SSCG. With 160-position
  resolution, they lower the VCO's rms jitter only from about 0.45 ps to
  0.2 ps, which is negligible, so the first-order one is used.
- A plain, uncompensated binary PD mode. It exists only as a comparison
  baseline.

## Caveats

- **M-AES alternation and period-2 patterns.** The side of every edge clock
  flips each word, so a given lane's edge sample is always on the same side
  on even words. A data pattern whose transitions fall only on one word
  parity is one that repeats every two words, such as doubled-bit PRBS. For
  such a pattern, each lane sees only one side of its offset. The lock point
  then shifts by up to ≈0.08 UI, and tracking can fail. K28.5, PRBS and 1010
  data are not affected. A pseudo-random alternation order would remove
  this.
- **Retiming is assumed ideal.** As the sampling position wraps through the
  PLL period, a bit moves between words. The model assumes the retimer
  outputs each bit exactly once. The loop sees `wrap_up` and `wrap_dn` but
  does not realign words itself.
- The loop was checked only against the behavioural front end. It has no
  interpolator nonlinearity, no clock skew and no ISI, only random and
  sinusoidal jitter.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and ends on its own or through a
watchdog. The unit tests compare against values computed independently in
the testbench. Examples:
- lead/lag truth tables;
- rounded division for every lead/lag/transition combination;
- long-run sigma-delta averages;
- glitch-free multiplexer switching and thermometer monotonicity at all 160
  positions;
- BIST lock, error counting and relock;
- the SSC triangle's period and turning points.

`tb/rx_frontend_model.sv` stands in for the samplers and interpolators. It
places each data bit from the transmit and receive frequency offsets, adds
Gaussian and sinusoidal jitter, and returns what ideal samplers at the
commanded positions would see. It also counts cycle slips.

`tb_cdr_loop` covers the loop on its own. It runs these scenarios:
- lock on K28.5 (mean sampling error ≈ 0.01 UI);
- +1000 and −1000 ppm offsets (F ≈ ∓21);
- a 0/−5000 ppm, 33 kHz SSC on the incoming data, with no slips;
- majority vote on PRBS7;
- 1010 data at 100 % transition density;
- 0.18 UI pp sinusoidal jitter.

`tb_cdr_density` runs the loop's evaluation conditions. It tries both
pre-filter schemes at three transition densities: 100 % (1010), about 50 %
(PRBS7) and 20 % (five ones, five zeros). Each combination gets 3 MHz
sinusoidal jitter and a +100 ppm offset, and must show no slips. The test
also checks:
- each proportional gain setting N = 2..5;
- the proportional path's own limit with the integral path off, where
  +300 ppm holds and +600 ppm slips, against 390.6 ppm predicted for N = 3;
- that gain compensation locks at least as tightly as majority vote (mean
  error 0.018 UI against 0.019 UI).

`tb_cdr_sscg_top` is the end-to-end test with all defaults. The receive
clock is spread by the design's own SSCG; its α sets the receive-clock
frequency through a first-order low pass that stands in for the PLL. K28.5
data arrives at the nominal rate. The test checks:
- BIST lock;
- zero bit errors and zero slips over more than one SSC period;
- the ≈4980 ppm spread;
- the frequency register following it;
- error detection and relock after a forced 0.5 UI phase jump;
- one divider edge per reference cycle.

It also checks that every loop mechanism occurred at least once:
- up and down steps;
- integral steps;
- wraps both ways;
- fractional gain values;
- M-AES offsets;
- profile turns;
- α alternating 9/10.

It runs in about two seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/cdr_pkg.sv tb/tb_cdr_sscg_top.sv --top-module tb_cdr_sscg_top
    ./obj_dir/Vtb_cdr_sscg_top

Replace the testbench name to run any other test. Widths and sizes are
module parameters with the design's values as defaults, for example `LANES`,
`MODULUS`, `K_MAX`, `STAIR_CYCLES` and `N`. The loop gains are run-time
settings in `cfg`.
