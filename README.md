# ODQPSK burst modem in SystemVerilog

This is a single-clock RTL model of an all-digital modem for TDMA radio
links that send data in short bursts. The hard part of burst reception is
time. Each burst must be found, its level set, and its bit clock recovered
within a few symbols, before any data can be decoded. The modem makes that
cheap in three ways:

- **Offset differential QPSK (ODQPSK) with non-coherent demodulation.** The
  receiver never has to recover the carrier phase, so frequency offsets and
  phase noise matter little.
- **Clock recovery from steep zero crossings.** The recovered clock is
  acquired from the first steep zero crossing of the demodulated waveform.
- **Burst detection from the received signal strength (RSSI).** This runs
  in parallel with the data path, so every burst gets a clean start signal.

The design follows the architecture of the paper *Single Chip OQPSK Modem
Appropriate for Wireless Burst Data Communications*. That paper gives the
block structure, the encoding rule, the pulse shape and the demodulator
topology. It does not give the internals of most blocks. Everything it
leaves open was designed here; the section *Departures and open points*
lists those choices.

```
 tx_data ─┐   ┌────────┐  ┌──────────────┐  ┌──────┐ I_bus/Q_bus
 PRBS-9 ──┴──►│ diff.  ├─►│ raised cosine├─►│ gain ├──────────────► (D/A, RF)
 tx_clock ───►│ encoder│  │ I/Q shaping  │  │ x2   │◄── PCU ◄── pwr_meas
 tx_burst ───►└────────┘  └──────────────┘  └──┬───┘     └──► attenuate
                                               │ fs/4 up-conversion (loopback)
 if_in ────────────────────────────────────┬───▼──┐
                                           │ mux  │
              ┌──────────┐  ┌──────┐  ┌────┴──────┴┐  ┌─────┐ X ┌───────────┐
 rx_data ◄────┤ Viterbi  │◄─┤decim.│◄─┤ correlator │◄─┤ ALC │◄──┤ prog.     │
 rx_clock◄────┤ 4 states │  └──▲───┘  │ X, Y + LPF │  │ gain│   │ delay     │
              └────▲─────┘     │      └─────┬──────┘  └──▲──┘   └───────────┘
                   │      clock recovery ◄──┘ X        LMU ◄── X
 rssi ──► burst filter ──► burst control ──► rx_burst (resets / gates the above)
 SPI ◄──► register file (all thresholds, levels, modes; status read-back)
```

## Clocking and number formats

- **Clock.** Everything runs on one clock, `clk`, at the sample rate, with
  `SPB = 8` samples per bit. At 8 Mbit/s that is a 64 MHz clock.
- **Transmit inputs.** `tx_clock` must have a period of `SPB` clock cycles.
  `tx_clock`, `tx_data` and `tx_burst` pass a two-flip-flop synchroniser
  (`edge_sync`). A bit is taken on each rising edge of `tx_clock`.
- **Widths.** I/Q buses are 12 bits, the receive IF is 10 bits, correlator
  and filter outputs are 16 bits, and RSSI is 8 bits.
- **Constants.** Shared widths, the raised cosine table, the register map
  and the `cfg_t`/`stat_t` structs are in `rtl/odqpsk_pkg.sv`.

## Transmitter

### Differential encoder (`diff_encoder`)

The encoder applies the Kaleh rule b_k = j·a_k·b_(k−1), with a_k = ±1 and
b_k one of {1, j, −1, −j}.

- **Phase index.** b_k is held as a 2-bit phase index. A data bit 1 adds a
  quarter turn and a data bit 0 subtracts one.
- **Offset.** Consecutive symbols therefore alternate between the real and
  the imaginary axis. Real symbols feed the I filter and imaginary ones the
  Q filter, so I and Q carry their symbols one bit apart. That offset is the
  "O" in ODQPSK.

### Pulse shaping (`pulse_shaper`)

The pulse is a full raised cosine (rolloff 1) spanning 8 bits, applied as a
polyphase filter.

- **Table.** The 64 coefficients are computed from
  h(x) = sinc(x)·cos(πx)/(1−4x²) and scaled to a peak of 256.
- **Burst ramps.** Outside `tx_burst` the filter is fed zero symbols, so
  each burst ramps up and down smoothly and the guard time can stay short.

### Transmit power control (`power_control`)

The power control unit (PCU) holds the transmitted power at a programmed
level using the external power measurement `pwr_meas`.

- **Valid samples.** Samples from the guard time are never used. After
  `tx_burst` rises, 64 samples (the ramp) are skipped. The rest of the
  burst is averaged in windows of 256 samples.
- **Fine gain.** After each window the fine gain of both I/Q gain elements
  moves by a quarter of the error (128 = unity).
- **Coarse attenuation.** When the fine gain leaves [64, 192), the coarse
  RF attenuation code `attenuate` steps by one, taken as 6 dB. The fine gain
  is then halved or doubled, so the output level stays continuous.

## Demodulator: what X looks like and why it needs a Viterbi decoder

This is the least obvious part of the design.

### The correlator

The receive IF is a real signal at a quarter of the sample rate. A
non-coherent delay-and-multiply correlator (`correlator`) forms two
products:

    X(n) = −IF(n)·IF(n − D − SPB)      Y(n) = −IF(n)·IF(n − D)

A 4-tap moving average (`lpf`) then removes the component at twice the
carrier, which sits at fs/2.

For a product with delay d, what survives the filter is
½·Re{s(n)·s*(n−d)·e^{jωd}}, where s is the complex envelope. D = 1 sample
is a quarter carrier period, so e^{jωD} = j. X then becomes
Im{s(n)·s*(n−SPB)}: the imaginary part of the phase step over one bit.

- **X is the data.** A data bit 1 turns the phase by +90°, so X is
  positive; a bit 0 gives a negative X.
- **Y is a test point.** It measures the phase change over one sample, an
  instantaneous-frequency signal. It is brought out as `y_mon` and not used
  for decisions.

### The zero level

With a rolloff-1 pulse, X at the eye centre does not take only two values.

- **Runs of equal bits** give X ≈ ±A.
- **Alternating data** (…, −a, +a, −a, …) gives X ≈ 0. The two neighbouring
  rotations cancel, so the sign of X says nothing about that bit.

A slicer therefore gets alternating data wrong about half the time.

### The Viterbi decoder (`viterbi_decoder`)

The decoder resolves the zero level from the neighbouring bits.

- **Trellis.** It has 4 states (a_(k−1), a_k).
- **Expected level.** A branch into bit a_(k+1) predicts the level of bit
  k as 0 if a_(k−1) ≠ a_k ≠ a_(k+1), and ±A (the sign of a_k) otherwise.
- **Metric.** The branch metric is |X − level|. Path metrics are
  renormalised every bit.
- **Survivors.** They are kept by register exchange, 16 bits deep.
  Decisions come out 15 bits after their sample.
- **Reference level.** A is the register `VIT_LEVEL` × 16. The level
  control keeps X at a known amplitude, so this reference fits a whole
  burst.

The unit testbench feeds 564 bits that a sign decision gets wrong; the
decoder gets all of them right.

### Level control (`level_measure` + receive `gain_stage`)

The level measurement unit keeps X at that amplitude.

- **Measurement.** It averages |X| over 256 samples, only while `rx_burst`
  is high, or all the time in continuous mode.
- **Gain update.** It moves the receive digital gain in front of the
  correlator by 1/16 of the error against `ALC_TARGET`×16.
- **Convergence.** The gain acts before a multiplier, so X goes with the
  square of the gain. The small step keeps the loop stable anyway.

### Programmable delay (`prog_delay`)

This is a 64-entry circular buffer in front of the receive gain. It lines
up the IF with the RSSI path, so that `rx_burst` and the start of the
demodulated burst coincide.

## Clock recovery (`clock_recovery`, `decimator`)

The recovered clock comes from the points where X swings between opposite
data levels. There X crosses zero with its steepest slope, and the eye
centre lies half a bit later. The circuit has four stages:

1. **Crossing detection.** It flags a sign change between two samples and
   forms the derivative X(n) − X(n−1).
2. **Derivative filter.** It keeps a crossing only if |derivative| exceeds
   `SLOPE_THR`×4, then ignores the next half bit. Shallow crossings, such as
   X drifting through the zero level of alternating data, are rejected.
3. **Pulse to location.** A counter runs modulo SPB from the burst start.
   An accepted crossing lies half a sample before the current count, with
   4 fractional bits.
4. **Clock extraction.**
   - The target phase is the crossing location + SPB/2.
   - The first crossing after `rx_burst` rises sets the phase directly.
     This is why acquisition needs only a few symbols.
   - Later crossings pull the phase by a quarter of the error, along the
     shorter way round the bit circle.
   - A strobe timer fires exactly once every SPB samples. At each strobe it
     moves the next strobe by at most one sample toward the phase. A phase
     close to the bit boundary therefore never drops or doubles a bit.

The decimator takes the strobed sample and the next one and interpolates
linearly by the fractional phase. It produces one X value per bit for the
Viterbi decoder.

The whole circuit restarts on every rising edge of `rx_burst`. In the
testbench it locks within 48 samples (three 2-bit symbols) of the burst
start.

## Burst detector (`burst_filter`, `burst_control`)

`rx_burst` is produced in two stages:

1. **Smoothing.** A first-order IIR, y += (rssi − y)/8, smooths the RSSI.
2. **State machine.** Three states turn the smoothed value into
   `rx_burst`:
   - **IDLE → ACTIVE** after `BC_ON_CNT` samples above `BC_ON_THR`.
   - **ACTIVE → IDLE** after `BC_OFF_CNT` samples below `BC_OFF_THR`.
   - **ACTIVE → WAIT_LOW** when `BURST_LEN` is non-zero and the burst has
     lasted `BURST_LEN`×64 samples. `rx_burst` drops, and the machine waits
     for the envelope to fall before another burst can start.

`rx_burst` has three effects:

- it resets the clock recovery and the Viterbi path metrics;
- it gates the level measurement;
- in burst mode it defines where data is decoded.

## Register map (SPI)

The SPI port runs in mode 0. A frame is 16 bits, MSB first:
`{write, address[6:0], data[7:0]}`.

- **Write.** The register is written at the end of the frame.
- **Read.** Read data is shifted out on MISO during the last 8 bits.
- **Sampling.** SCLK must be at most 1/16 of `clk`, the rate the testbenches use. The port is sampled
  through synchronisers.
- **Aborted frames.** A frame cut short by raising `cs_n` writes nothing.

| addr | name | reset | meaning |
|------|------|-------|---------|
| 0x00 | CTRL | 0x02 | bit0 loopback (internal up-converter feeds the receiver), bit1 burst mode, bit2 PRBS-9 pattern replaces tx_data |
| 0x01 | PWR_TGT | 128 | PCU target for the mean power measurement |
| 0x02 | ALC_TGT | 96 | ALC target, mean \|X\| / 16 |
| 0x03 | VIT_LVL | 192 | Viterbi reference level A / 16 |
| 0x04 | SLOPE_THR | 80 | clock recovery minimum \|dX\| / 4 |
| 0x05 | RX_DELAY | 0 | IF delay in samples (0..63) |
| 0x06 | BC_ON_THR | 40 | burst start threshold (smoothed RSSI) |
| 0x07 | BC_OFF_THR | 20 | burst end threshold |
| 0x08 | BC_ON_CNT | 4 | samples above threshold to start |
| 0x09 | BC_OFF_CNT | 16 | samples below threshold to end |
| 0x0A | BURST_LEN | 0 | maximum burst length in units of 8 bits, 0 = none |
| 0x10 | ATTEN (ro) | – | PCU attenuation code |
| 0x11 | TX_GAIN (ro) | – | PCU fine gain |
| 0x12 | RX_GAIN (ro) | – | ALC gain, upper 8 bits |
| 0x13 | STATUS (ro) | – | bit0 rx_burst, bit1 clock locked, bit2 ALC at limit, bit3 PCU at limit |

Unmapped addresses read 0.

The reset values of ALC_TGT, VIT_LVL and SLOPE_THR belong together:

- with ALC_TGT = 96, the eye level of X settles near 3000;
- VIT_LVL = 192 puts A at 3072, close to that level;
- SLOPE_THR = 80 sits above the slope of the shallow crossings (about 220)
  and well below that of the steep ones.

Change one of them and the other two need re-checking.

### Linear and limiter receivers

The receiver also works behind a hard limiter, where the IF reaching the
modem has only two levels. Limiting flattens the X eye: its mean
magnitude comes closer to its peak. With the same ALC target, the eye
level A therefore ends up lower. In simulation, limited bursts decode
without errors for VIT_LVL from 96 to 144 and fail at 192 and above; the
testbench uses 128. The default of 192 is set to the measured linear eye
level. Linear bursts also decode with 144, so 144 would serve both
receiver types in this noiseless test.

After switching between the two, the ALC needs a few bursts (about three
in the testbench) to settle at the new level. The short-preamble bursts
assume a settled ALC.

## Test features

- **Loopback.** `CTRL.loopback` replaces `if_in` with an internal fs/4
  up-conversion of I_bus/Q_bus. The IF sequence is I, −Q, −I, Q, so no
  multiplier is needed. It works in both continuous and burst mode.
- **Pattern generator.** `CTRL.prbs_en` sends a PRBS-9 (x⁹+x⁵+1) instead
  of `tx_data`.
- **Test points.** `x_mon`, `y_mon`, `clk_locked`, `cr_extremum` and
  `pcu_meas_valid` are brought out as ports.

## Behaviour in noise

`tb_odqpsk_ber` adds white Gaussian noise to the external IF. SNR is
measured over the whole sample band. There is no channel filter in front
of the modem, so the in-band SNR is several dB better than these figures.
The test counts errors of the Viterbi output and of a sign decision on the
same decimated samples, over 6000 bits per point:

| SNR (full band) | Viterbi errors | slicer errors |
|---|---|---|
| no noise | 0 | 1448 |
| 12.5 dB | 509 | 863 |
| 15.1 dB | 153 | 910 |
| 17.5 dB | 50 | 968 |

Even without noise, the slicer loses about a quarter of the bits: the
zero-level ones. The Viterbi decoder recovers them.

The weak point in noise is clock recovery. With the reset slope threshold
(80), noise crossings pass the derivative filter and pull the recovered
clock until it slips bits. This test programs `SLOPE_THR` = 170. At 200
and above, the steep crossings themselves no longer pass reliably, and
acquisition can fail. A tracking window around the expected crossing was
tried and dropped: it made a wrong first lock permanent.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.
With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
          rtl/odqpsk_pkg.sv tb/tb_odqpsk_modem.sv \
          --top-module tb_odqpsk_modem -Mdir obj_tb -o sim
./obj_tb/sim
```

Replace `tb_odqpsk_modem` with any other testbench name to run that one.
Modules are found through `-Irtl`. `--timescale` gives the RTL, which has
no timescale of its own, the testbenches' time unit. `-Wno-fatal` keeps
style warnings from stopping the build; these come mostly from the
testbenches.

`tb_odqpsk_modem` runs the whole modem at its default parameters, in a few
seconds. It programs the modem over SPI. Models of the external parts
supply the RSSI, the power measurement (following the attenuator at
6 dB/step) and an external IF loop. The test then runs:

1. a continuous-mode transmission;
2. four loopback bursts;
3. a burst through the external IF input with a 5-sample receive delay;
4. three bursts through a hard-limited external IF (limiter receiver);
5. two bursts with a preamble of only three symbols (6 bits);
6. a PRBS burst, checked against the generator recurrence;
7. bursts with and without the burst length limit.

All payloads must arrive without bit errors. The test also counts every
mechanism: mode switches, burst detections, clock acquisitions, PCU-valid
samples, attenuator steps, ALC updates, zero-level Viterbi decisions,
external IF, receive delay, limiter, short preamble, PRBS and burst
cut-off.

`tb_odqpsk_ber` (above) is the noise test.

The unit testbenches check each block against an independent reference
model:

- the raised cosine from real arithmetic;
- the correlator product from its formula;
- the Viterbi decoder against the transmitted bits;
- the clock recovery strobes against the known eye centre;
- the PCU and ALC loops for convergence and clamping.

## Departures and open points

- **Not present.**
  - The alarm supervisory points.
  - The external converters, RF parts and the host of the monitor
    interface. These are represented only by ports.
- **Trellis size.** The paper's performance curve is labelled as 8-state
  soft decoding. This design uses 4 states (a_(k−1), a_k). An 8-state
  trellis would also model the pulse overlap of the second neighbours.
- **Own choices.** The paper names a Viterbi algorithm for "soft decoding
  and equalisation" but not its trellis. The 4-state zero-level trellis
  here is this design's reading. Also this design's:
  - all widths and numeric parameters;
  - the IF at fs/4;
  - the sample rate of 8 samples per bit;
  - the loop laws of the PCU and ALC;
  - the clock recovery internals;
  - the burst detector state machine;
  - the register map.
- **Y branch.** It is computed and brought out but not used. The paper
  shows both X and Y eyes without saying how Y is used.
- **Burst detector thresholds.** They are absolute values, not relative
  to the received level. The paper's claim of two-symbol jitter over
  65 dB of dynamic range depends on the RSSI detector's law. It was not
  verified.
- **Not simulated.**
  - **BER curve.** Only a few noise points were simulated (see *Behaviour
    in noise*). No full curve was measured, and none was compared with
    published figures.
- **Timing closure.** The design processes one sample per clock with no
  multi-cycle paths. Whether 64 MHz (8 Mbit/s) closes timing depends on
  the technology. The Viterbi add-compare-select is the longest path.
