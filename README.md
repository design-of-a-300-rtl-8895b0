# 300-baud full-duplex FSK modem in fixed-point DSP

This is a complete Bell-103-style 300 bit/s modem in which every signal
function runs as sampled fixed-point arithmetic at 9600 samples per second:
- the tone generator;
- the transmit and receive band filters;
- gain control;
- carrier detection;
- the FSK demodulator.

The only analog parts left are the converters and the line hybrid, which
are outside this RTL. The design follows a two-processor modem from UC
Berkeley (W. L. Abbott, "Design of a 300-Baud FSK Modem Using Customized
Digital Signal Processors", Memorandum UCB/ERL M84/93). That design ran the algorithms
as microcode on two custom processors. Here each algorithm is a small
dedicated datapath that computes the same equations once per sample.

The modem shares one telephone pair for both directions. It uses two
frequency bands, and the mode decides which band it transmits in:

| data  | originate transmits | originate receives | answer transmits | answer receives |
|-------|--------------------:|-------------------:|-----------------:|----------------:|
| space | 1070 Hz | 2025 Hz | 2025 Hz | 1070 Hz |
| mark  | 1270 Hz | 2225 Hz | 2225 Hz | 1270 Hz |

## Signal flow

```
 wordin ──► filter_bank (20-bit) ───────────────────────────────► txout (to D/A)
 (O/A,TXD,   │  lowband 10th-order BPF (1170 Hz) ◄─┐  mode muxes:
  SQT,ALB)   │  highband 10th-order BPF (2125 Hz) ◄┤  originate: tx→low, rx→high
 rxin ──────►│                                     │  answer:    tx→high, rx→low
 (from A/D)  │                                     │  self-test: demod ← tx filter
             │ cword, demod          txmod, wd_out │
             ▼                                     │
          modem_core (14-bit)                      │
             modulator (sawtooth or sine table) ───┘
             agc: |x| / (1.625 · lowpass(|x|)), sign restored
             carrier_detect on the agc envelope
             demodulator (mark/space bandpass pair, or delay-line)
             → RXD, CD  ──► wordout
```

`fsk_modem_top` contains two units, `filter_bank` and `modem_core`, which
mirror the two processors of the original chip. Once per sample they
exchange one word in each direction through registers:
- the control word and the filtered receive sample go to the modem core;
- the modulator sample and the status word come back.

Each unit has its own word length:
- **Filter unit, 20 bits.** The tenth-order filters need 20 bits to reach
  more than 70 dB of adjacent-band rejection.
- **Modem core, 14 bits.** 14 bits is enough for the demodulator filters.
- **Outside words, 12 bits.** The top's ports carry 12-bit samples.

### Words at the ports

| port | bits |
|------|------|
| `wordin` | 11: O/A (1 = originate), 10: TXD (1 = mark), 9: SQT (squelch), 8: ALB (self-test); 7..0 unused |
| `wordout` | 11: RXD (1 = mark), 10: CD, active low (0 = carrier present); 9..0 read 0 |
| `rxin`, `txout` | 12-bit two's complement line samples |

With these positions, the test control words of the original design come
out as follows, read as signed 12-bit numbers:

| control word | mode |
|---:|---|
| −2048 | originate space |
| −1024 | originate mark |
| 0 | answer space |
| 1024 | answer mark |
| 256 | answer self-test, space |
| 512 | squelch |

RXD sits in the sign bit, so the status word is negative for mark.

### Timing

- **Sample strobe.** `sample_en` is a one-clock strobe at the sample rate
  (9600 Hz in the application). Consecutive strobes must be at least 32
  clocks apart, so the system clock must be at least 307.2 kHz. A
  simulation-only assertion in `modem_core` checks this spacing.
- **`txout`.** Valid from the clock after the strobe.
- **`wordout`.** Updates about 20 clocks after the strobe:
  - the gain control takes 14 clocks, because of its serial divide;
  - the demodulator takes 2 more;
  - the word transfer adds the rest.
- **Word transfers.** Between the units they add one sample of delay in
  each direction.

End-to-end data delays measured in simulation:

| path | delay |
|------|-------|
| originate → answer over the line | about 130 samples (13.5 ms) |
| answer → originate over the line | about 113 samples (11.8 ms) |
| self-test, originate | about 78 samples |
| self-test, answer | about 70 samples |

Most of this delay comes from the tenth-order band filters, which every
path passes through twice in duplex. At 300 bit/s the bit jitter is about
±1 sample (104 µs). The highband demodulator sometimes lands a to-mark
transition one sample further out.

## Arithmetic conventions

- Samples are two's complement fractions. The largest positive value of a
  W-bit word stands for 1.0; for example, 8191 in the 14-bit modem words.
- Every adder saturates, as the original processors' adders did. Two
  mechanisms depend on this:
  - the sawtooth modulator clips its triangle by overflowing on purpose;
  - the gain control relies on its divide saturating at full scale.
- Filter coefficients are held as integers in units of 2^-12 (`coef_t` in
  `modem_pkg`). This represents every coefficient of the design exactly:
  the coefficients were chosen as short canonical-signed-digit numbers.
  The finest coefficient is the demodulator bandpass scale factor,
  2^-6 + 2^-12.
- A coefficient product is truncated by an arithmetic shift.
- `sat()` clamps a 40-bit intermediate result to the target width.

## Filter unit (`filter_bank`, `band_filter`, `sos_df2`)

Each band filter is a cascade of five direct-form-II second-order sections
followed by an output gain (2.125 for the lowband, 1.75 for the highband).
The section order and scale factors make the filter safe against overflow.

One section (`sos_df2`) computes:

```
w  = scale·x + a1·w1 + a2·w2      (saturated; becomes the new state)
y  = w + b1·w1 + b2·w2
```

Both filters are sixth-order bandpass designs with two extra second-order
sections that equalise group delay between mark and space. Transmission
zeros sit on the opposite band's two tones.

Measured with 12-bit-scale tones through the 20-bit datapath:

| tone | lowband loss | highband loss |
|------|-------------:|--------------:|
| 600 Hz  | 27.3 dB | 72.6 dB |
| 1170 Hz | 0.5 dB  | 78.8 dB |
| 2125 Hz | 73.2 dB | 0.8 dB  |
| 3500 Hz | 67.2 dB | 41.3 dB |

The equalising sections hold the group delay nearly flat across each
band. Measured on the fixed-point filters from the phase slope of
steady tones:

| filter | space tone | mark tone | difference |
|--------|-----------:|----------:|-----------:|
| lowband  | 5.36 ms at 1070 Hz | 5.34 ms at 1270 Hz | 20 µs |
| highband | 4.40 ms at 2025 Hz | 4.47 ms at 2225 Hz | 70 µs |

The requirement is at most 100 µs between mark and space. About 5 ms of
delay per filter is also why carrier detect and data lag the line by
several milliseconds.

In self-test (ALB) the demodulator hears the output of the transmit
filter:
- originate mode uses the lowband filter;
- answer mode uses the highband filter.

`txout` keeps carrying the transmit signal, and the unused filter keeps
filtering `rxin`. Both are this design's choices.

## Modulators

**Sawtooth modulator (`sawtooth_mod`, default).** A 14-bit phase word falls
by a constant step each sample and wraps by adding 8191. The step is
8191·f/9600: 913, 1084, 1728 or 1898 for the four tones. Four saturating
steps turn the sawtooth into a clipped triangle:

```
w−½  →  |2w|  →  −½  →  ×3
```

The ×3 overflows on purpose, and the clipping removes the third harmonic.
The transmit filter removes the rest. The frequency error is below 1 Hz.

**Sine-table modulator (`sine_table_mod`, `MOD_SAWTOOTH=0`).** This
modulator uses a 24-entry quarter-wave table, sin(k·90°/23)·8191. An index
steps through the table and reflects at both ends; a sign flag covers the
negative half-wave. The table is 24 entries long so that the tones need
only simple fractional steps:

| tone | step | except |
|------|-----:|--------|
| 1070 Hz | 11 | 8 every tenth sample |
| 1270 Hz | 13 | 10 every tenth sample |
| 2025 Hz | 20 | 21 every fourth sample |
| 2225 Hz | 22 | 23 every fourth sample |

A full cycle is 96 index steps, so the tone is the mean step times
100 Hz. The tones are therefore exact, with an error set only by the
sample clock.

Both modulators are phase-continuous across data changes. Squelch forces
the output to zero.

The two modulators have different spectra before the transmit filter. These
levels were measured with 512-sample windowed spectra:

| modulator | worst spurious line |
|-----------|---------------------|
| sawtooth, 1070 Hz | third harmonic below −45 dB; aliased fifth −27 dB; aliased seventh −33 dB |
| table, lowband | about −30 dB, from the correction step every tenth sample |
| table, highband | about −39 dB |

The transmit filter cleans both up. Its output has no line above −34 dB
(sawtooth at 2225 Hz, the worst case) and puts nothing above −65 dB into
the receive band. The table modulator's lowband result is about 1 dB
worse than the −31 dB reported for the original.

## Gain control (`agc`, `serial_divider`, `lpf3_core`)

The received sample is divided by its own envelope. This normalises it to
nearly full scale without the harmonics a hard limiter would create:
1. The sign is stored.
2. A full-wave rectifier forms |x|.
3. The demodulator's third-order 300 Hz lowpass filters |x| into an
   envelope. This is `lpf3_core`, one second-order plus one first-order
   section, with DC gain 0.95. Its step response rises in about 1 ms
   (6 samples) and overshoots by 4 % of the input step (9 % of its own
   final value). It loses 0.4 dB at 100–150 Hz and about 48 dB at 2 kHz,
   where the rectifier's double-frequency products lie.
4. The envelope is multiplied by 1.625 (1 + ½ + ⅛).
5. |x| is divided by the scaled envelope.
6. The sign is put back.

The divide is serial, one quotient bit per clock (`serial_divider`):
- subtract |D|/2, |D|/4, … from |N|;
- keep a difference only if it is positive, and set that quotient bit;
- convert the sign-magnitude result to two's complement.

The accumulator carries W−1 guard bits, so the shifted divisor is never
truncated. The quotient is therefore floor(|N|/|D|·2^(W−1)), and it
saturates when |N| ≥ |D|. Because only strictly positive differences are
kept, 0/0 gives 0. That matters at start-up, before the envelope has
built up.

A tone at −24 dB or −36 dB comes out with peaks within 2 dB of full scale.

## Carrier detect (`carrier_detect`)

The gain control's envelope is compared against a threshold with
hysteresis: 33 (−48 dB) while the carrier is present, and 58 (−43 dB)
while it is absent. The sign of each comparison drives an integrating
counter:
- every sample it adds `ST1` = 43;
- while the signal is below threshold it also adds `ST2` = −128.

When the counter changes sign it jumps to ±8191, so every change of state
restarts a full delay. CD is the counter's sign. The result:
- carrier detect turns on after 192 samples (20 ms);
- it turns off after 97 samples (10 ms);
- it ignores short dropouts and bursts.

With `ST1`=164 and `ST2`=−328, both delays become 50 samples. These are
the values used for quick testing; the top and the modem core pass them
down as `CD_ST1` and `CD_ST2`.

Through the whole receive chain the narrow band filter adds its own
delays. When the line drops from 0 dB to −60 dB, the filter rings for more
than 100 samples before the envelope falls below −48 dB. A short burst
after a long silence is enough to start the turn-on count. With the test
steps, the original test schedule gives the following transitions:

| line level from sample | carrier detect, reference | carrier detect, this design |
|---|---|---|
| 0: 0 dB; 64: −60 dB | on at 64, off at 229 | on at 60, off at 226 |
| 256: 0 dB for 16 samples, then −60 dB, then −24 dB from 304 | on at 318 | on at 316–319 |
| 432: −45 dB | stays on | stays on |

## Demodulators

**Bandpass-filter demodulator (`bpf_demod`, default).** This demodulator
has two paths, one for space and one for mark. Each path is a second-order
bandpass filter, a full-wave rectifier and the 300 Hz lowpass. RXD is mark
when the mark path's level is at least the space path's.

The four bandpass filters (two bands × mark/space) share all coefficients
except a1, so one filter datapath is time-multiplexed:
- the space path is computed on the clock that samples the input;
- the mark path is computed on the next clock, with its own stored states.

Band selection is O/A xor ALB, so self-test listens to the modem's own
transmit band. The decision delay is about 22 samples.

**Delay-line discriminator (`delay_line_demod`, `DEMOD_BPF=0`).** This
demodulator multiplies x(n) by x(n−d), which averages to
½·A²·cos(ωdT), low-pass filters the product and compares it with a
threshold:

| receive band | delay d | threshold |
|--------------|--------:|----------:|
| 2025/2225 Hz | 1 sample | 680 |
| 1070/1270 Hz | 2 samples | 161 |

RXD is mark below the threshold. The thresholds assume the full-scale
input that the gain control provides. The formula with A = 1 gives 733
for the high band, but the measured level at the band centre is lower:
- the lowpass has a DC gain of 0.951;
- the truncating multiplier and filter pull it down by about 20 LSB.

It comes out at 676, which is why 680 works better than 733. Measured
levels for full-scale tones:

| tone | 2025 | 2125 | 2225 | 1070 | 1170 | 1270 Hz |
|------|-----:|-----:|-----:|-----:|-----:|--------:|
| level | 927 | 676 | 423 | 640 | 131 | −381 | The product uses the bit-serial multiplier (`serial_multiplier`,
−x·y₀ + Σ yᵢ·x/2^i), which takes 13 clocks. The decision delay is about
6 samples.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `fsk_modem_top`, `modem_core` | `MOD_SAWTOOTH` | 1 | 1 = sawtooth modulator, 0 = sine table |
| `fsk_modem_top`, `modem_core` | `DEMOD_BPF` | 1 | 1 = bandpass demodulator, 0 = delay-line |
| `modem_core` | `MIN_CLKS` | 32 | minimum clocks between sample strobes (assertion only) |
| `fsk_modem_top`, `modem_core` | `CD_ST1`, `CD_ST2` | 43, −128 | carrier-detect counter steps; 164, −328 give 50-sample delays for testing |
| `carrier_detect` | `TH_OFF`, `TH_ON`, `ST1`, `ST2`, `MAXC`, `MINC` | 33, 58, 43, −128, 8191, 8191 | thresholds, steps, limiter |
| `delay_line_demod` | `TH_ORIG`, `TH_ANS` | 680, 161 | decision thresholds |
| `band_filter` | `LOWBAND`, `W` | 1, 20 | which filter, word length |
| most modem blocks | `W` | 14 | word length |

The coefficient tables and word lengths live in `rtl/modem_pkg.sv`.

Coarse synthesis of the default top gives about 680 cells, 300 flip-flop
bits and a 780-bit memory. The memory holds the band filter and
demodulator states. The multipliers are constant-coefficient and
shift-and-add friendly.

## Verification

Each block has a self-checking testbench in `tb/`. Three more testbenches
run system-level tests of the original design: `tb_modem_table15`,
`tb_modulator_spectra` and `tb_cd_test`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_sos_df2` | hand-worked cases, saturation, and 2000 random inputs and coefficients against a model that floors exact products and clamps to W bits |
| `tb_band_filter` | impulse response against a floating-point model of the same cascade (largest error 50 LSB of a 20-bit word, limit 300); centre-band loss within 1 dB and adjacent band at least 55 dB down, in both filters; loss at 15 frequencies from 100 Hz to 4 kHz within 1 dB of the filter design values (at least 50 dB where those are deeper); group delay at the four tones within 0.1 ms of the design values, mark and space at most 100 µs apart |
| `tb_filter_bank` | mode routing in originate, answer and both self-tests; word transfers; strobe latency |
| `tb_sawtooth_mod` | bit-exact against a model; frequencies within 1 Hz over 9600 samples; phase continuity; clipping; squelch |
| `tb_sine_table_mod` | frequencies; every output a table value; reflections; squelch |
| `tb_serial_divider` | the 6-bit worked example (0.25/0.625 → 0.01100); 3000 random divides against a model, within 1 LSB of N/D; latency W−1 |
| `tb_serial_multiplier` | the 6-bit worked example (011000·110100 → 110111); 3000 random products; latency W−1 |
| `tb_lpf3_core` | DC gain; rise time ≈ 1 ms; overshoot < 10 %; loss at eight frequencies from 100 Hz to 4.5 kHz against the filter design values (e.g. 0.40 dB at 100 Hz, 30.1 dB at 1.5 kHz, 47.7 dB at 2 kHz) |
| `tb_agc` | normalisation at −24 dB and −36 dB; sign restoration; level tracking; latency |
| `tb_carrier_detect` | 20 ms / 10 ms delays; 50-sample delays with the test steps; hysteresis; 20000-step random walk against a model |
| `tb_bpf_demod` | both bands; steady and alternating data; random 300-baud data; jitter; no false transitions; loss of all four bandpass filters at ten frequencies each, from the steady path levels, within 1 dB of the design values |
| `tb_delay_line_demod` | the same data tests; discriminator level against (A²/2)·cos(ωdT)·0.951 at six frequencies, within 40 LSB |
| `tb_modem_core` | both variants side by side: transmit frequency, carrier detect on/off, data, status word, squelch |
| `tb_fsk_modem_top` | two default modems back to back, without reset between phases: full duplex, −36 dB line, self-test in both modes, squelch with carrier loss and recovery. Every mechanism is counted (see below). Runs in seconds. |
| `tb_modem_table15` | the acceptance tests of the original design at default parameters (see below) |
| `tb_modulator_spectra` | windowed 512-point spectra: sawtooth harmonics against the shaping theory; table modulator spurs; transmit output of the modem with either modulator at all four tones, spurs at most −32 dB and the receive band at least 48 dB down |
| `tb_cd_test` | carrier detect through the whole receive chain with the test steps and the level schedule above; hysteresis from both sides |

In `tb_fsk_modem_top`, the data checks are:
- jitter spread of at most 3 samples on the 150 Hz pattern;
- jitter within 6 samples on random data;
- no false transitions.

The counted mechanisms are:
- data transitions received on each path;
- carrier-detect turn-on and turn-off;
- squelched samples;
- modulator clipping events.

`tb_modem_table15` runs the original design's acceptance tests, 512
samples each, from reset, with the original control-word values:
1. squelch from the start;
2. and 3. full duplex in originate and in answer, with 150 Hz toggling;
4. 400 bit/s in self-test;
5. receive at −36 dB;
6. to 9. self-test with the patterns "2 marks, 1 space" and
   "2 spaces, 1 mark", in both modes.

To run one testbench with plain Verilator, from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/modem_pkg.sv tb/tb_fsk_modem_top.sv --top-module tb_fsk_modem_top -o sim
./obj_dir/sim
```

`tb_fsk_modem_top` reads internal observation signals
(`u_modem.ev_clip`) to count clipping events. It therefore needs the real
`modem_core` underneath the top.

## Where this design departs from, or adds to, the original

- **Dedicated datapaths.** The original runs microcode on programmable
  processors. Here each function is dedicated logic:
  - results are the same to the equations;
  - cycle timing within a sample is this design's own;
  - only the once-per-sample behaviour matches.
- **Divider guard bits.** The serial divider keeps W−1 guard bits, so the
  shifted divisor is exact, which the worked example of the original
  implies. A zero difference is discarded, as "only when positive" says.
- **Modulator timing.** The modulator steps one clock after the strobe, so
  a squelch or data change acts in the same sample. This is needed for
  the squelch test (64 samples of exactly 0).
- **Control and status bit positions.** These were derived from the
  original test table's control-word values, which agree with the field
  order given for the words.
- **Self-test details.** During self-test the transmit output stays
  active, and the unused filter keeps filtering the line input. The
  original says neither.
- **Reset values.** Carrier absent, counter at −8191, all filter states
  zero, RXD = space.
- **Sine-table reflection.** Past the top of the table the index becomes
  47 − index; below the bottom it becomes −1 − index, and the sign flips.
  This is this design's own reading of the table walk. It keeps exactly
  96 index steps per cycle, so the frequencies come out exact.
- **Table modulator purity.** The lowband spurs measure about −30 dB,
  where the original reports −31 dB. The table has the same values as
  the original: 24 equally spaced angles from 0° to 90°, both ends
  included. The 1 dB may come from the measurement method; this design
  uses a windowed spectrum.
- **Jitter reading.** "1 sample" of jitter is taken as a deviation of at
  most one sample from the nominal delay. The short Table-15-style runs
  meet this. Over 2400 samples, the highband demodulator (answer to
  originate and answer self-test) gives a to-mark spread of 3 samples in
  some runs: about one transition in forty lands 2 samples from nominal.
  The long run therefore allows a spread of 3. Random data shows up to ±3
  samples from intersymbol interference.

## Not included

- **The processor fabric of the original chip.** This covers data memory,
  microcode sequencer, finite state machine and host/serial I/O. The modem
  functions it ran are built here directly.
- **Analog parts.** The anti-alias filter and A/D, the D/A and
  reconstruction filter, and the line hybrid and drivers are outside this
  RTL. `rxin` and `txout` are where they would connect.
- **The digital-PLL demodulator.** The original only outlines it as a
  possible alternative, without an algorithm to build.

## Files

- `rtl/modem_pkg.sv`: word lengths, control-word layout, coefficient
  tables, saturation.
- `rtl/fsk_modem_top.sv`: the top.
- `rtl/filter_bank.sv`, `rtl/band_filter.sv`, `rtl/sos_df2.sv`: the filter
  unit.
- `rtl/modem_core.sv`: the modem core.
- `rtl/sawtooth_mod.sv`, `rtl/sine_table_mod.sv`: the modulators.
- `rtl/agc.sv`, `rtl/serial_divider.sv`, `rtl/lpf3_core.sv`: gain control.
- `rtl/carrier_detect.sv`: carrier detect.
- `rtl/bpf_demod.sv`, `rtl/delay_line_demod.sv`,
  `rtl/serial_multiplier.sv`: the demodulators.
- `tb/tb_*.sv`: testbenches.
- `tb/tb_util.svh`: the check and finish macros.
