# Musical-note recognition with a 16-point FFT

This is a small FPGA design that names the note being played. It takes one
octave of the diatonic scale, C4 (261.63 Hz) to C5 (523.25 Hz), and lights a
pattern of nine LEDs for the note. Audio samples come in as 8-bit signed
bytes on a serial line. The last 16 samples are kept in a sliding window, a
16-point radix-2 FFT is run on the window, and each FFT bin's squared
magnitude is compared with a threshold. Each bin turns one LED on or off.

The trick that makes such a small FFT work is deliberate aliasing. The
samples are taken at fs = 523.25 Hz, which is only once the frequency of the
highest note instead of twice. The design simply assumes that the input lies
between fs/2 and fs. Each note then folds back onto a well-defined FFT bin,
and the 16-point transform separates the eight notes with nothing more than
8-bit arithmetic.

The SystemVerilog follows the frequency identifier described in *FPGA
Implementation of Musical Notes Recognition for Automatic Transcription
System*. That paper describes the system's blocks, sizes and number formats.
This RTL fills in what the paper leaves open: the UART internals, the LED
threshold, the reset and the clocking. Each of these choices is marked below.

## How a note becomes an LED pattern

A tone of frequency f sampled at fs lands on FFT bin k = 16·f/fs. For
fs/2 < f < fs that is between 8 and 16. A real input gives a mirror-image
spectrum, so bin k and bin 16 − k hold the same magnitude. The design
therefore looks only at bins 0..8, and reads bin b as the frequency
f = (16 − b)·fs/16:

| bin | frequency (Hz) | LED |
|-----|----------------|-----|
| 8   | 261.6          | 1   |
| 7   | 294.3          | 2   |
| 6   | 327.0          | 3   |
| 5   | 359.7          | 4   |
| 4   | 392.4          | 5   |
| 3   | 425.2          | 6   |
| 2   | 457.9          | 7   |
| 1   | 490.6          | 8   |
| 0   | 523.25         | 9   |

So LED i shows bin 9 − i. The bins are spaced linearly, 32.7 Hz apart, but
the notes are spaced logarithmically. Most notes fall on or near one bin.
F (349.23 Hz, k = 10.68) and A (440 Hz, k = 13.45) fall between two bins, so
two LEDs light for them:

| note | f (Hz) | k = 16·f/fs | LEDs lit |
|------|--------|-------------|----------|
| C    | 261.63 | 8.00        | 1        |
| D    | 293.66 | 8.98        | 2        |
| E    | 329.63 | 10.08       | 3        |
| F    | 349.23 | 10.68       | 3 and 4  |
| G    | 392.00 | 11.99       | 5        |
| A    | 440.00 | 13.45       | 6 and 7  |
| B    | 493.88 | 15.10       | 8        |
| C'   | 523.25 | 16.00       | 9        |

Every note still has its own pattern. Silence (all-zero samples) lights no
LED.

### The threshold

A bin counts as present when its squared magnitude is greater than
`THRESHOLD` (default 448). The original design only says that the outputs are
turned into 0/1 values, so this rule is this design's choice. The value comes
from the fixed-point spectra of full-scale notes (amplitude 127):

- A note that sits on one bin gives 3,100 to 4,000 there, and more for C
  and C'.
- The two bins of F and of A give 480 to 3,000 each. The lowest value is
  F's weaker bin.
- Leakage into an unrelated bin reaches about 400, in bin 1 for A with a
  pure sine.

448 sits between those last two values, so the margin is narrow. Quieter
inputs need a lower threshold, which is why it is a parameter.

### Two notes that a pure sine cannot show

If the samples are a pure sine with zero phase, round(127·sin(2π·n·f/fs)),
then C (f = fs/2) and C' (f = fs) sample to zero at every n. Neither note
can light an LED. With any other phase, for example a cosine, they show
normally, as LED 1 and LED 9. The testbench therefore plays the full scale
with a quarter-period phase shift, and D to B with zero phase as well.

## Data path and timing

```
uart_rx (pin) -> uart_rx -> sample_shift_reg -> bit-reversed wiring -> fft16 -> mag_sq -> led_output -> led_n[8:0]
                    ^
              clock_divider (16x baud enable)
```

Everything runs on one 100 MHz clock with synchronous, active-high reset.

- **clock_divider**: a counter from 0 to `terminal` (324) gives a one-clock
  enable every 325 clocks. That is 16 × 19,231 Hz, 0.16 % above 16 × 19,200
  baud. The terminal count is an input, so the baud rate can be changed at
  run time.
- **uart_rx**: receives 8N1 frames, LSB first, with 16× oversampling. The
  start bit is confirmed at mid-bit, and each data bit and the stop bit are
  sampled 16 ticks apart. A frame with a low stop bit is dropped. Each good
  byte gives a one-clock `data_ready` strobe.
- **sample_shift_reg**: sixteen 8-bit registers. On each strobe the new byte
  enters `window[0]` and the rest move up one, so `window[15]` is the oldest
  sample.
- **Bit-reversed wiring** (in `freq_identifier`): the oldest sample is
  sample n = 0. FFT input p gets sample bitrev(p) as its real part, and every
  imaginary part is zero.
- **fft16**: four registered stages of eight butterflies each, decimation in
  time. It takes a new input every clock and delivers the result 4 clocks
  later, in natural bin order.
- **mag_sq**: re² + im² for all 16 bins, in one registered stage.
- **led_output**: applies the threshold and the bin-to-LED map, and loads
  the active-low LED register. The LEDs hold until the next result.

A byte's `sample_ready` strobe is followed by `led_update` exactly 7 clocks
later: 1 window register, 4 FFT stages, 1 magnitude stage and 1 LED
register. The next byte arrives about 52,000 clocks later. An assertion in
the top checks that no byte arrives while a window is still in the pipeline.

The window slides one sample at a time, so a new note shows correctly only
from its 16th sample on. The 15 windows before that mix the old input with
the new one, and their LED patterns mean nothing. Nothing in the hardware
marks them; whatever reads the LEDs must ignore them.

## Number formats and scaling in the FFT

Samples, the data between stages and the FFT outputs are all 8-bit signed.
The butterfly inside works in 17 bits:

- The twiddles W16^k = cos(2πk/16) − j·sin(2πk/16), k = 0..7, are stored
  as round(127·cos) and round(127·sin) (`twiddle_rom`).
- t = W·b is formed from two 8×8-bit products. Each product is 16 bits and
  their sum is 17 bits.
- `a` is shifted left by 7 to the same scale. Then a·128 ± t also fits in 17
  bits for every possible input.
- The sums are shifted right arithmetically by 8. That divides by 128 for
  the twiddle scale and by 2 for the stage. Anything outside −128..127
  saturates.

Halving in every stage keeps each stage at 8 bits. The FFT output is
therefore the DFT divided by 16. The rounding is floor, and the twiddles are
127/128 of their true size. Over four stages the error stays within about
±4 LSB of DFT/16, and the testbench checks that bound.

A full-scale tone on one bin gives a magnitude of about 63 (squared about
3,900). At DC or fs/2 the magnitude is about 127. Saturation needs inputs
well beyond what a single tone produces.

The 8-bit data, the 17-bit intermediates and the four one-clock stages are
the original design's. Where the scaling happens, the twiddle scale of 127,
floor rounding and saturation are this design's choices.

## Where this RTL departs from the original

- **One clock edge.** The original clocks the FFT on the falling edge of
  the 100 MHz clock. It also moves the shift registers on the two edges of
  the UART's ready signal, and updates the LEDs on the ready signal's falling
  edge. Here everything uses the rising edge of one clock, with one-clock
  enables and a valid flag that travels with the data. The results are the
  same, and the timing is the fixed 7-clock latency above.
- **Divider output.** The original produces a divided clock of about
  3.26 µs from a count of 324. Here the same count gives a 3.25 µs
  (325-clock) period as a clock enable.
- **Reset.** Reset clears the window and the valid flags, and turns all
  LEDs off. In the original, the LEDs are undefined until the first result.
- **Threshold and UART internals** are this design's own, as described
  above.
- **LED count.** Nine LEDs are driven, as the original's tables and
  simulation use. One sentence of the original speaks of eight.

## Not included

- The microphone amplifier and the ADC of the full transcription system.
  For testing, the original replaces them with a file of samples sent from a
  PC terminal over the serial line. The testbench does the same.
- The PC software that turns notes into a score.
- Further FFTs at other sampling rates for other octaves, and note-duration
  detection from the silences between notes. The original mentions both only
  as future work and gives no design for them.

## Files

`rtl/` (synthesizable):

| file | contents |
|------|----------|
| `freqid_pkg.sv` | sizes, `sample_t`, `cplx_t`, `mag_t`, `bitrev()` |
| `clock_divider.sv` | 16×-baud enable |
| `uart_rx.sv` | serial receiver |
| `sample_shift_reg.sv` | 16-sample window |
| `twiddle_rom.sv` | eight FFT constants |
| `fft_butterfly.sv` | radix-2 DIT butterfly, 17-bit inside, 8-bit out |
| `fft16.sv` | four-stage pipelined 16-point FFT |
| `mag_sq.sv` | squared magnitude |
| `led_output.sv` | threshold, bin-to-LED map, LED register |
| `freq_identifier.sv` | top level |

Top-level parameters: `DIV_TERMINAL` (324, for 19200 baud at 100 MHz) and
`THRESHOLD` (448).

Top-level ports:

- `clk`: 100 MHz clock.
- `rst`: synchronous reset, active high.
- `uart_rx`: serial input, 8N1, idle high.
- `led_n[8:0]`: bit i−1 drives LED i; low means lit.
- `sample_ready`: one-clock strobe per received byte.
- `led_update`: one-clock strobe when the LED register loads.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_freq_identifier` runs the whole design at its default parameters. It
  sends real 19200-baud frames at 100 MHz and plays D, G and silence with
  pure sines. It then plays the full scale C..C' with a quarter-period phase
  shift, D..B with zero phase, and silence again. It checks every LED
  pattern of the table above, the 7-clock latency of every update, and the
  divider rate.
- `tb_fft16` compares the pipeline against a bit-exact model written in
  natural index order, and against the exact DFT/16. It does this for tones,
  constants and random vectors, both back to back and spaced out.
- The other testbenches check their module against values computed in the
  testbench.

To run one testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/freqid_pkg.sv tb/tb_freq_identifier.sv --top-module tb_freq_identifier
./obj_dir/Vtb_freq_identifier
```

The end-to-end run simulates 150 ms of design time in about 15 s. The unit
testbenches finish in well under a second.
