# Closed-loop neural vector analyzer and phase-synchrony-triggered stimulator

This is synthesizable SystemVerilog for the digital part of a 64-channel implantable
neural interface. The chip watches how tightly the phases of pairs of neural signals
are locked together. In epilepsy, a rise in that locking in a narrow frequency band is
an early sign that a seizure is coming. The measure used is the phase-locking value,
PLV = |mean(exp(j·Δφ))|. When the PLV crosses a programmed limit, the chip switches its
channels to stimulation and drives a programmable biphasic current burst. Over a
10 Mb/s Manchester-coded UWB link it sends either raw samples or, for every sample,
the magnitude and phase of each channel and the phase difference and PLV of each pair.

The main trick is that no digital multipliers are used anywhere:

* **FIR filters without multipliers.** The FIR filters that split each signal into
  in-phase (I) and quadrature (Q) parts get their multiplications from the channels'
  own SAR ADCs. Each converter's capacitor DAC is scaled by a stored coefficient,
  which makes it a *multiplying* ADC (MADC). Its output code is already the tap
  product.
* **Shift-and-add for everything after the filters.** Magnitude, phase, phase
  difference and PLV all come from three CORDIC cores, which only shift and add.
* **No separate stimulation hardware.** The same SAR register and DAC also set the
  stimulation current.

```
 afe_in[64] ──► neural_channel ×16 ──┬─ set A (coef = allpass)  ─► add_delay_line (I) ─┐
   (analog     (S/H, SAR, MDAC,      └─ set B (coef = Hilbert)  ─► add_delay_line (Q) ─┤ iq_group ×4
    front end)  22-bit memory,                                                          │
                stimulation)                                                            ▼
                      ▲                              I/Q ×32 ─► cordic_processor (3 cores)
                      │ stim_mode, unit_tick                    mag, phase ×32, Δφ, PLV ×32
                      │                                              │            │
               soc_controller ◄── trigger ── plv_detector ◄──────────┘            ▼
               (registers, slot timing,                                   tx_framer ─► manchester_enc ─► uwb_chip
                bursts)                                                    (raw or vector frames)
```

## Multiplying converters and the shared add-and-delay lines

Read this section first, because the FIR organisation explains everything else.

**The multiplying converter.** Each channel has an 8-bit SAR converter. It holds its
input, then searches one bit per clock: its `trial` code drives the MDAC, and the
comparator keeps or clears the bit under test. When `mult_en` is set, the DAC levels
are scaled by the channel's 8-bit coefficient `c`, taken as signed Q1.7. The finished
search then returns

    code = clamp( floor( vin · c / 2^(AIN_W-1) ), -128, 127 )      (AIN_W = 12)

This is the product of the input and the coefficient, quantised to 8 bits. With
`mult_en` low the factor is 1.0, and the result is a plain 8-bit sample, floor(vin/16).
A conversion takes 9 cycles from `conv_start` to `adc_valid`. The capacitor DAC and
the comparator are analog parts. `madc_analog.sv` is a behavioural model of them that
states this relation in integers. The SAR logic around it is real RTL.

**Groups and slots.** Each group has 16 channels in two sets of eight:

* set A (channels 0..7 of the group) stores the eight unique coefficients of an
  allpass filter;
* set B (channels 8..15) stores those of a Hilbert transformer.

A sample period has eight conversion slots. In slot *j*, all sixteen converters take
input *j* of the group (the front-end output of channel *j*). Set A then produces the
eight products c_A[k]·x_j and set B the products c_B[k]·x_j. So eight multiplier banks
serve eight inputs by time-multiplexing: 16 converters give 16 filters per group, and
4 groups give 64 filters and 32 I/Q channels.

**Folded, transposed line.** A 16-tap filter has linear phase, so its taps mirror:
h[15-k] = ±h[k]. That means eight products are enough for all sixteen taps. The line
is in transposed form, so each new input sample is multiplied once and added into a
chain of partial sums:

    y    = h[0]·x + r[0]
    r[i] ← h[i+1]·x + r[i+1]      (i = 0..13)
    r[14] ← h[15]·x

* **Per-filter state.** Each line keeps eight sets of the 15 partial sums, one per
  input, and updates set `sel` in the slot of that input.
* **Sign of the mirrored taps.** The I line adds the mirrored taps. The Q line
  subtracts them (`ANTISYM = 1`), because an even-length Hilbert transformer is
  antisymmetric.
* **Output.** The sum is 12 bits wide and is saturated to the 10-bit processor word.
  I and Q of slot *j* appear one cycle after the conversion ends.

**Choosing coefficients.** Any 8-coefficient symmetric/antisymmetric pair can be
loaded. The end-to-end testbench uses Hamming-windowed ideal responses with
m = k − 7.5 and w[k] = 0.54 − 0.46·cos(2πk/15), quantised as round(128·h):

    allpass (I):  h[k] = w[k] · sin(πm)/(πm)      (a half-sample delay, 7.5 samples total)
    Hilbert (Q):  h[k] = w[k] / (πm)

Both have close to unit gain and a 90° difference around a quarter of the sample rate.
Set the sample period so that the band of interest sits there. For example, a 4 Hz
band needs 16 S/s, which is a period of 1.25 M cycles at 20 MHz. The 24-bit period
register leaves room for that.

## Phase, magnitude and phase locking

`cordic_processor` starts when the last slot's I and Q are stored. It has three
iterative CORDIC cores with ten micro-rotations each. Each operation takes 13 cycles.

1. **Core 1, vectoring.** It runs over the 32 channels and gives `mag` = |I + jQ| and
   `phase` = atan2(Q, I).
2. **Core 2, rotation.** For each pair *p* of the pair table it forms
   Δφ = phase[a] − phase[b] and rotates the vector (511, 0) by Δφ. The result is the
   unit phasor (cos Δφ, sin Δφ).
3. **Averaging.** The phasor goes into a shift-only moving average:
   C += (cos − C) >> `ema_shift`, and the same for S. The average spans about
   2^ema_shift samples.
4. **Core 3, vectoring.** It gives PLV = |(C, S)|, on a scale where 511 is 1.0.

Cores 2 and 3 run at the same time, on pair *p* and pair *p−1*. A full run takes
32·13 + 33·13 + 1 = **846 cycles**. The CORDIC gain (≈1.647) is removed with the
shift-add constant 2⁻¹+2⁻⁴+2⁻⁵+2⁻⁷+2⁻⁸+2⁻¹⁰.

Angles are binary throughout: 1024 is a full turn, and subtraction wraps on its own.
Accuracy is tested to within ±3 LSB in magnitude and ±2 LSB in angle.

The pair table (`0x80 + p`: bits [4:0] channel a, bits [9:5] channel b) resets to
pairs (p, p+1 mod 32).

## Closing the loop

**Trigger.** `plv_detector` compares each new PLV set with `threshold`. It triggers
when at least one pair enabled in `mask` has been above the threshold for `hold`
consecutive samples. The trigger acts only while closed loop is enabled.

**Burst.** The controller then enters its stimulation state. The sample clock keeps
running, but frames are not converted, and skipped sample ticks are counted. Every
channel whose memory has `stim_en` set stimulates:

* **Current amplitude.** The SAR register already holds the channel's 8-bit amplitude
  as the MDAC code, because it is reloaded whenever no conversion runs. That code is
  `stim_amp`, the input to the off-chip V-I converter.
* **Timing.** A stimulation period is 32 units of `stim_unit` clocks. Current flows for
  `duty`+1 units in each 16-unit half. The halves have opposite polarity
  (`stim_anodic`), in the order given by `anodic_first`. Both phases always have the
  same width, so the charge balances.
* **End of the burst.** After `npulses` periods the channels return to recording on
  the same edge as the last unit tick.

The reset values give 5 Hz pulses at a 20 MHz clock (32 × 125 000 cycles).

## Wireless link

`tx_framer` sends one of two frame types. Fields are MSB first, channel 0 first.

| frame | contents | bits |
|---|---|---|
| raw (type 0x01) | sync 0xA5C3, type, 64 × 8-bit samples | 536 |
| vector (type 0x02) | sync, type, 32 × {mag, phase}, 32 × {Δφ, PLV}, all 10-bit | 1304 |

`manchester_enc` sends each bit as two chips: 1 is low-then-high and 0 is
high-then-low. It sends HALF clocks per chip, so HALF = 1 at 20 MHz gives 10 Mb/s.
Frames are sent back to back. A frame that arrives while the previous one is still
being sent is dropped and counted in `frames_dropped`. A vector frame takes 2608
cycles, well inside the 5714-cycle reset period. All 64 raw channels fit up to about
18.6 kS/s.

## Modes, timing and registers

The design uses one clock, assumed to be 20 MHz, and an asynchronous active-low
reset. The controller's free-running timer ticks every `period` cycles. What a tick
does depends on the mode:

* **Raw mode:** one conversion on all 64 channels.
* **I/Q mode:** eight slots of 10 cycles, then the processor (846 cycles), then the
  vector frame.

Registers are written through `cfg_we`/`cfg_addr`/`cfg_wdata`:

| addr | register | reset |
|---|---|---|
| 0x00 | [0] I/Q mode, [1] closed loop, [2] run | 0 |
| 0x01 | sample period, cycles (24 bits) | 5714 (3.5 kS/s = 28 kS/s / 8) |
| 0x02 | PLV threshold (10 bits, 511 = 1.0) | 400 |
| 0x03 | consecutive samples above threshold | 4 |
| 0x04 | pair mask for the detector | all ones |
| 0x05 | stimulation unit, cycles (20 bits) | 125000 |
| 0x06 | biphasic periods per burst | 10 |
| 0x07 | PLV averaging shift | 4 |
| 0x08 | analog settings: [2:0] gain step, [6:3] BPF tuning, [10:7] RC LPF tuning, [11] chopper enable, [12] UWB high band | 0x1800 (chopper on, 3.1–10.4 GHz band) |
| 0x40+ch | channel memory: [7:0] coef, [15:8] amplitude, [19:16] duty, [20] stim_en, [21] anodic_first | 0 |
| 0x80+p | pair table {b, a} | (p, p+1) |

## What is outside the RTL

Several parts are analog and are not modelled here:

* the two-stage chopper-stabilised recording amplifier (54–60 dB);
* the switched-capacitor band-pass filter (Q = 3.2) and low-pass filter;
* the RC anti-alias buffer;
* the V-I converter and 3.3 V biphasic current driver;
* the delay-line UWB pulse generator, whose current-starved inverters shape a
  double-differentiated Gaussian pulse for the 0–1 GHz or 3.1–10.4 GHz band;
* the electrode pads.

The top brings out their connections instead:

* **`afe_in`** carries the held front-end output of each channel, as a signed 12-bit
  fraction of full scale.
* **`stim_on`, `stim_anodic` and `stim_amp`** drive the current drivers.
* **`uwb_chip` and `uwb_en`** drive the pulse generator.
* **`analog_ctrl`** holds the static analog settings from register 0x08: amplifier
  gain step, BPF and RC LPF tuning codes, chopper enable and UWB band. Their codes and
  their effect on the circuits are chosen here.

## Where this RTL makes its own choices

The architecture is fixed: 64 channels, 8-bit multiplying SAR converters, eight-MADC
banks time-shared over eight inputs with folded 16-tap transposed lines, allpass/Hilbert
I/Q separation in four groups (32 channels, 64 filters), a 10-bit three-core
shift-only CORDIC processor, PLV thresholding, per-channel 8-bit amplitude and 4-bit
duty cycle, reuse of SAR logic and DAC for stimulation, a 22-bit channel memory, and a
10 Mb/s Manchester link.

Everything below was chosen here:

* **Numbers and widths:**
  * the clock frequency;
  * the Q1.7 coefficient format;
  * the accumulator width and the output saturation;
  * the 12-bit stand-in for the analog input.
* **Signal processing:**
  * the antisymmetric Q line;
  * the assignment of work to the three cores;
  * the moving-average PLV window;
  * the pair table.
* **Trigger and stimulation:**
  * the trigger criteria (threshold, mask, hold count);
  * the shape of the stimulation period (32 units, equal phases);
  * the phase-order bit.
* **Memory, control and link:**
  * the split of the 22-bit memory beyond the 12-bit stimulation word;
  * the register map, including the analog settings word;
  * the frame format;
  * dropping frames when the link is busy.
* **Counts:** magnitude and phase are computed for the 32 I/Q channels that the
  64 filters produce, one pair of filters per channel.

Recording pauses during a burst because its converters are in use. The PLV average
simply resumes afterwards.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Each compares the module against a reference that
does not reuse the RTL:

| testbench | reference |
|---|---|
| converter and SAR | integer arithmetic |
| add-and-delay line and group | direct-form sums over the input history |
| CORDIC core and processor | real-number `$atan2`, `$sqrt`, `$cos`, and a real-valued moving average |
| detector | a run-length model |
| controller | a converter stand-in |
| framer and encoder | bit-level decoding |

Latencies are checked too: 9 cycles per conversion, 12 cycles per CORDIC operation,
846 cycles per processor run, and 2 chips per bit.

`tb_nvas_soc` runs the whole chip with all parameters at their defaults and decodes
everything from the Manchester stream. It simulates about 400 000 cycles in seconds.
It checks:

* raw frames against the inputs;
* vector frames against the processor results;
* the +0.3 rad phase difference of phase-locked sinusoid pairs, to ±8 LSB, and
  PLV ≥ 400 for those pairs;
* PLV ≤ 420 for random-phase pairs;
* the PLV-triggered burst: its length, and every channel's current code, polarity
  and on-time;
* dropped frames under a too-short sample period;
* skipped samples during the burst.

`tb_workload_rat_seizure` replays the rodent experiment in compressed time. Eight
electrodes carry a band at a quarter of the sample rate; their phases wander at random
and then lock. The test checks three things:

* there is no trigger before the lock and there is one after it;
* the burst drives only those eight electrodes, with code 21 (about 100 µA);
* the pulse period is 4 000 000 cycles (5 Hz at 20 MHz).

`tb_workload_vector_analysis` repeats the three measurements of the signal path in
one open-loop run:

* phase differences of 0.7 to 4.9 rad between delayed copies of a tone, whose mean
  error must stay within 1.5 % of the ideal value (it stays below 0.6 angle steps);
* the magnitude of an amplitude-modulated tone, which must follow the envelope with a
  correlation of at least 0.97 (it reaches 0.996, 8 samples late);
* the PLV of two tones against their frequency offset, which must match the response
  of the 16-sample moving average to within 0.08 (it is within 0.01).

All testbenches pass.

Limits of the checks:

* the converter model is ideal (no offset, no noise, no capacitor mismatch);
* timing closure and power have not been looked at;
* storage: the channel memories hold 64 x 22 bits (176 bytes). The eight
  add-and-delay lines keep 8 x 8 x 15 partial sums of 12 bits (about 11.5 kbit) in
  flip-flops, and the processor keeps 32 x 2 moving-average sums of 17 bits. That is more
  than the roughly 1 kB of storage a chip of this size would carry in total, so a
  silicon version would need narrower sums or shared storage.

## Files and simulation

`rtl/nvas_pkg.sv` must be compiled first. It holds the constants, the channel-memory
struct and the register map. Then compile the modules: `sar_logic`, `madc_analog`,
`stim_pulse_gen`, `neural_channel`, `add_delay_line`, `iq_group`, `cordic_core`,
`cordic_processor`, `plv_detector`, `soc_controller`, `tx_framer`, `manchester_enc`,
and the top `nvas_soc`.

```
verilator --binary --timing --assert rtl/nvas_pkg.sv $(ls rtl/*.sv | grep -v nvas_pkg) \
          tb/tb_nvas_soc.sv --top-module tb_nvas_soc -o sim
./obj_dir/sim
```

Replace `tb_nvas_soc` with any other `tb_<module>` to test one block.
