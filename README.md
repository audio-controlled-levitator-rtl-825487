# Audio-controlled levitator

A ping-pong ball floats in a clear tube above a fan. You sing, hum or whistle
into the board's microphone, and the ball rises or sinks to follow your pitch.
A higher note puts the ball higher. The whole system sits in one FPGA (a
Nexys 4 DDR class board) and has two halves:

* **Pitch side (104 MHz):** turns the microphone's 1-bit PDM stream into PCM
  audio and hands 4096-sample frames to an FFT core. It then finds the pitch
  in the spectrum and maps it to a 6-bit height reference from 0 to 63.
* **Control side (65 MHz):** reads an infrared distance sensor and four tuning
  knobs through an SPI ADC. A fixed-point PD controller compares the measured
  height with the reference and drives the fan with a 1 kHz PWM signal.

An XGA monitor (1024x768) shows the live waveform, the spectrum, the detected
pitch against the usable range, and the ball position. An 8-digit 7-segment
display shows the numbers.

```
 PDM mic ─► audio_interface ─► frame RAM 4096x16 ─► bram_to_fft ═AXIS═► [FFT core]
            (÷42 clk, CIC R=15,        │ (circular)                           │
             ÷16 average)              └► trace RAM 1024 ─► sound_display      │ real part,
                                                                               ▼ bins 0..1023
   result RAM 1024x16 ◄────────────────────────────────────────────────────────┘
        │ read along the raster (65 MHz)
        ├► negative → 0 ─► histogram (red bars)
        │                └► freq_det ─► reference_gen ─► ref (6 bit) ─┐
        │                      │             (continuous / discrete)  │ sw6: pitch or sw[5:0]
        │                      └► bin_to_hz ─► 7-segment              ▼
 MCP3008 ◄─SPI─► adc_reader ─► ch0 ─► ir_sensor ─► height (6 bit) ─► psd_controller ─► pwm_generator ─► fan
                             └► ch1..4: Kp, Ki, Kd, bias knobs ──────────┘
```

## Clocks and domains

There are two clock inputs, `clk_104` (104 MHz) and `clk_65` (65 MHz). The
audio path runs on 104 MHz because the FFT core is clocked there. Video and
control run on 65 MHz, the XGA pixel clock. Three signals cross between the
domains:

* The FFT result RAM and the waveform trace RAM are true dual-clock RAMs,
  written at 104 MHz and read at 65 MHz.
* Vertical sync goes through a two-flop synchroniser into 104 MHz. Its
  falling edge starts one FFT frame per video frame, about 60 per second.
* The switches that select the FFT scaling are double-registered into
  104 MHz. They are quasi-static.

`btnc` is the reset. It is synchronised separately into each domain.

## Audio path: PDM to 10 kHz PCM

| Step | What happens | Rate |
|---|---|---|
| Mic clock | 104 MHz ÷ 42 (50 % duty). A one-cycle strobe marks each rising edge. | 2.476 MHz |
| PDM → ±1 | Bit 1 → +1 and bit 0 → −1, as signed 8-bit samples. | 2.476 MHz |
| `cic_decimator` | 5 integrators, decimate by R = 15, then 5 combs. Impulse response is a 15-tap box filter applied five times; gain 15⁵ = 759 375. | 165 kHz |
| output scaling | The top 8 of 21 bits, with the sign bit flipped to offset binary and 4 zero bits appended. | 12 bit |
| `oversample16` | Sum of 16 samples, then (sum + 2) >> 2. | 10 317 Hz, 14 bit |

The ratio R is an input of the CIC, so it can be changed at run time.

The 21-bit register width is the minimum that keeps the wrapping integrators
exact: 1 + 5·log2(15) ≈ 20.5 bits. Full-scale levels come out as follows:
- a PDM stream of all ones gives 14080;
- all zeros gives 2240;
- silence (50 % density) lands in between.

Each sample goes to three places:
- the 4096-entry circular **frame RAM**;
- a 1024-entry **trace RAM** for the waveform display;
- an 11-bit **audio PWM** output at 51 kHz, for listening to the path.

## Spectrum and pitch

The FFT core itself is not part of this RTL. The top brings out its
AXI-stream ports:
- `fft_in_*` carries the input frame;
- `fft_cfg_*` carries the configuration word: forward transform, with the
  scaling schedule taken from `sw[12:7]`;
- `fft_out_*` carries the result, with the bin index on `tuser`.

`bram_to_fft` streams the 4096 most recent samples, oldest first. It starts at
the RAM's write pointer. It converts samples to two's complement by flipping
the top bit and obeys `tready`. `tlast` is on sample 4095. A
`last_missing` event from the core aborts the frame. An assertion checks that
data holds while `tvalid` is high and `tready` is low.

Only the **real part** of bins 0..1023 is stored; the magnitude is never
computed. This is the original design's choice. It was judged sufficient with
pure tones played into the microphone. One bin is
10 317 Hz / 4096 = **2.5186 Hz**.

Pitch detection reads the spectrum as the display reads it. The histogram
reads the result RAM column by column as the beam scans the screen:
- column x reads bin x >> 3 in continuous mode (bins 0..127);
- column x reads bin x >> 2 in discrete mode (bins 0..255).

The same data stream, with negative values cleared, feeds `freq_det`. Every
bin above 50 whose value exceeds the threshold (4·value > 249) overwrites the
stored result. At the end of a sweep the pitch is the **highest** bin above
the threshold. Bins 0..50 (below about 126 Hz) are ignored because they are
noisy.

Two consequences follow, and they are easy to miss:
- The screen zoom also limits which pitches can be detected: up to 320 Hz in
  continuous mode and up to 642 Hz in discrete mode.
- The detected bin is never cleared. If no bin crosses the threshold, the
  last pitch stays.

`bin_to_hz` turns the bin into Hz for the 7-segment display:
floor(bin·2579/1024).

## Pitch to height reference

`reference_gen` has two modes, selected by `sw15`.

| Mode | Bins used (Hz) | Reference | When it changes |
|---|---|---|---|
| Continuous (`sw15`=1) | 65..120 (164..302 Hz) | bin − 65. Bins at or below 65 give 0; bins at or above 120 give 63. | every sweep |
| Discrete (`sw15`=0) | 65..190 (164..479 Hz) | candidate = (bin − 65)/2, with the same limits | only on a rising edge of the debounced `btnd` ("send") |

`sw6` picks which reference the controller uses: the pitch reference, or a
value set on `sw[5:0]`.

## Measuring the ball

`adc_reader` polls an MCP3008 once per millisecond. It reads channels 0..4 in
turn, one 17-bit SPI frame each: start bit, single-ended bit, 3-bit channel,
then 12 clocks for the reply. `spi_master` does the transfer in SPI mode 0. It
is paced by a clock enable every 32 cycles of 65 MHz, so the SPI clock is
1.02 MHz. MISO passes through a synchroniser.

`ir_sensor` linearises channel 0, the IR sensor voltage, with four line
pieces:

| ADC code | α | γ |
|---|---|---|
| ≥ 669 | −6 | 34 |
| 481..668 | −11 | 47 |
| 355..480 | −27 | 77 |
| < 355 | −57 | 118 |

The steps are:
1. distance_cm = floor(α·code/256) + γ
2. height_cm = 60 − distance_cm, limited to 15..50
3. height = floor((height_cm − 15)·234/128), giving 0..63

The module has 3 pipeline stages. With this calibration the upper limit of
50 cm is only just reached, at codes near 1023.

## The controller

`psd_controller` waits in IDLE until the reference or the measured height
differs from its registered copy. It then runs one pass, taking under
20 cycles:

1. **`calc_error`:** e = r − h, 7-bit signed.
2. **Three terms in parallel.** All are 9-bit signed and saturate to
   −256..255 (results that do not fit are clipped):
   * `proportional_term`: p = Kp·e.
   * `delta_term`: d = Kd·(e[n] − e[n−4]). The error history advances once
     per controller run, so the difference spans four updates. This gives
     more signal than a one-step difference at these small integer values.
   * `sum_term`: a running error total clipped to 9 bits (anti-windup), times
     Ki, clipped again.
3. **`command_calc`:** u = p + d + 10·bias, clipped to the 11-bit range. The
   sum term is built and updated but **not added** unless the `USE_SUM`
   parameter is 1. The finished system ran as a PD controller plus bias.

Each gain is a small integer: a default plus an offset from its knob. The
**`gain_tuner`** maps a 10-bit knob reading onto an offset range [min, max]:

    offset = min + floor((ADC + b) · (max − min) / 1024)

Here b is a buffer that makes both ends of the range reachable without
hitting exactly 0 or 1023. Its value is roughly half a step,
1024/(max − min)/2:

| Knob | Default | Offset range | b | Gain limits |
|---|---|---|---|---|
| Kp | 2 | −5..5 | 51 | 0..31 |
| Ki | 1 | −5..5 | 51 | 0..31 |
| Kd | 2 | −5..15 | 26 | 0..32 |
| bias | 0 | 0..31 | 17 | 0..31 |

Kd can reach 32, so that gain register is one bit wider than the others. The
tuner has 3 pipeline stages.

`pwm_generator` prescales 65 MHz by 108. It counts a duty counter 0..599,
which gives a 1003 Hz period. The output is high while the counter is below
the command. A command of 0 or less gives 0 % duty; 300 gives 50 %; 600 or
more gives 100 %.

## Screen and displays

The 1024x768 frame has 1344x806 total timing, with active-low syncs. Four
layers are ORed together:

| Layer | Colour | Where |
|---|---|---|
| waveform (`sound_display`) | magenta | 4-line trace around line 470; larger samples are drawn higher |
| spectrum (`histogram`) | red | bars from the bottom; height = (value/32)·8 pixels |
| pitch (`freq_disp`) | green | bar at the detected bin, lines 650..699 |
| range (`freq_disp`) | blue | bars at bin 65 and at bin 120 or 190, lines 600..699 |
| ball (`ball_marker`, `sw13`) | magenta | square at line 515. Continuous mode: 20 px at x = 517 + 8t. Discrete mode: 15 px at x = 261 + 8t. |

For the ball square, t is the measured height, or the controller reference
when `sw14` is set.

The layers have pipelines of 1 to 4 cycles. Sync and blank are delayed by
4 cycles, so some layers sit up to 3 pixels left of their nominal position.

The 7-segment display shows one of two words:

| `sw14` | Digits 7..4 | Digits 3..2 | Digits 1..0 |
|---|---|---|---|
| 0 | pitch in Hz | measured height | controller reference |
| 1 | controller reference (digits 7..6) | pitch reference (sent) | discrete candidate |

Switches and `btnd` are debounced: a change must hold for 1 000 000 cycles,
about 15 ms. At reset the current switch settings are taken as they are.

## Top-level ports

`levitator_top` has these ports:
- `clk_104`, `clk_65`;
- `sw[15:0]`, `btnc` (reset), `btnd` (send);
- microphone `m_clk`, `m_data` and `m_lrsel`;
- the FFT core's streams;
- the MCP3008 pins `adc_sck`, `adc_mosi`, `adc_cs_n` and `adc_miso`;
- `fan_pwm`, audio out (`aud_pwm`, `aud_sd`);
- VGA (4 bits per colour and two syncs);
- `seg`, `an`.

Its parameters are `DEBOUNCE_DELAY` (1 000 000) and `ADC_START_DIV` (65 000
cycles, i.e. 1 ms).

Switch map:
- `sw15`: mode;
- `sw14`: display and ball-marker source;
- `sw13`: ball marker on;
- `sw12..7`: FFT scaling;
- `sw6`: reference source;
- `sw5..0`: manual reference.

## Where this RTL departs from the original design, and why

* **The FFT core, clock generator, microphone, ADC chip, sensor and fan
  driver are external.** Their signals are ports.
* **The FFT result RAM holds 1024 entries (bins 0..1023), not 4096.** Only
  those bins are stored and addressed.
* **Range limits follow the bin numbers, not the round Hz figures.** The
  continuous range ends at bin 120 (302 Hz). The prose quotes 314 Hz, which
  would be bin 125. So the continuous reference climbs 0..54 over bins
  66..119 and then steps to 63 at bin 120.
* **IR linearisation uses the piecewise table above.** A simpler formula in
  the original prose disagrees with it.
* **Proportional saturation compares the full product against the limits.**
  The original overflow test misses some
  overflowing products.
* **`command_calc` pulses `o_done` when it finishes.** `psd_controller` waits
  until it has seen `done` from all three terms before it combines them.
* **The gain tuner applies the formula to the ADC code as is.** The original
  code inverted the code so that a clockwise turn raises the gain. That is a
  wiring matter; invert the knob or the code if you want it.
* **The mic clock divider is 42 and the CIC register width is 21 bits.** The
  divider reproduces the stated 163..314 Hz and 163..478 Hz bin mapping
  exactly (2.5186 Hz/bin). The original CIC was 12 bits wide, which wraps at
  R = 15.
* **`adc_reader` keeps all 10 bits of each conversion.** The original prose
  says the bottom nine bits are stored. The channel ports and the IR and
  tuning formulas are all 10-bit, so this design keeps ten.
* **17 debounced inputs instead of 21.** The other buttons have no function
  here.
* **The waveform trace compares signed line offsets.** This avoids a ghost
  trace from wrap-around below the base line.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench:
- computes expected values independently, such as a direct convolution for
  the CIC and formula models for the controller and sensor;
- checks latencies and rates;
- prints `TB_RESULT checks=N failures=M`.

The testbenches use two-state simulation and `$urandom`. They run with plain
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/levitator_pkg.sv tb/tb_cic_decimator.sv --top-module tb_cic_decimator
./obj_dir/Vtb_cic_decimator
```

`tb/tb_levitator_top.sv` runs the whole design at its default parameters: real
debounce time, 1 ms ADC polling and real video timing. It covers 176 ms of
operation in about 20 s and checks only the top's ports. Its models are:
- a sigma-delta PDM source playing a 250 Hz tone;
- `tb/mcp3008_model.sv`, a behavioural MCP3008;
- `tb/fft_model.sv`, an FFT stand-in that captures the input frames and
  returns a synthetic spectrum with a peak at a bin chosen by the testbench,
  plus a large negative value that must be ignored.

The testbench does the following:
- checks that successive FFT input frames are continuous;
- checks that they carry the 250 Hz tone;
- reads pitch, height and references back from the 7-segment display;
- measures the fan duty cycle over whole periods;
- walks through continuous mode, saturation, fan off, and discrete mode with
  send;
- counts each mechanism and fails if one never happens.

### What is not covered

The FFT stand-in does not transform the audio, so the chain from a sung note
to a detected bin is covered only in pieces:
- PDM to PCM, including the tone check above;
- frame streaming;
- pitch logic on a given spectrum.

Nothing here models the fan and ball dynamics, so the loop is not simulated
closed.
