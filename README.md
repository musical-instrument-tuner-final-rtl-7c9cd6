# Guitar tuner: FPGA comparison and display logic

A guitar tuner built from a microcontroller and a small FPGA. The microcontroller
samples a microphone, takes a 256-point FFT and reports the bin that holds the
strongest frequency. The user picks a string on a 4x4 keypad. The FPGA logic in
this repository compares the reported bin with the bin where that string's note
should fall, and lights one LED of eight: out of range, three steps flat, in tune,
three steps sharp. It also shows the chosen note as a letter on a seven-segment
digit.

The idea that makes the FPGA side small is this: the comparison is done in FFT
bins, not in hertz. Each string's note is stored as the bin number where the
microcontroller's FFT places it, so tuning becomes one 8-bit subtraction.

```
 microphone -> amplifier -> [microcontroller: A/D, 8-bit FFT, peak search] --8-bit port B--+
                                                                                          |
 keypad --> poll_kb (scan, key, hold) --key--> freq_decoder --ref bin--> compare <-- portb_sync
                          |                                                 |
                          +--key--> seven_seg_display (2-digit mux) --> 7-seg   +--> 8 LEDs
```

`tuner_top` holds everything inside the FPGA. The microcontroller, the microphone
and amplifier, and the keypad, LED and display parts are outside the RTL.

## Bins and notes

The microcontroller takes 256 samples at about 1.77 kHz, so one FFT bin is about
6.9 Hz wide (roughly "7 Hz per bin"). Bin *k* holds frequencies near
*k* x fs / 256. The table below gives each string's bin. These bins were found by
measuring the real FFT code with a signal generator; they are not computed from a
formula.

| String | Note (Hz) | Key | Bin (hex) | Letter shown |
|--------|-----------|-----|-----------|--------------|
| low E  | 164.81    | E   | 18        | E            |
| A      | 220.00    | A   | 20        | A            |
| D      | 293.66    | D   | 2B        | d            |
| G      | 392.00    | 0   | 39        | G            |
| B      | 493.88    | B   | 48        | b            |
| high e | 659.26    | F   | 5F        | e            |

All other keys show a dash and select no string. The bins are constants in
`rtl/tuner_pkg.sv` (`BIN_*`). To tune other notes, or to use another sampling
rate, change those constants. The same applies to another keypad layout
(`KEYMAP`).

A note about the numbers: f x 256 / 7 gives values one lower than the measured
bins (23, 31, 42, 56, 71, 94). The RTL uses the measured bins. All six are the
nearest bins for a sampling rate between 1767.2 and 1768.3 Hz. Counting the
instructions of the sampling loop (about 1130-1140 cycles of a 2 MHz clock per
sample) gives roughly the same rate.

## The compare and the LED code

`compare` forms `d = reference_bin - measured_bin` in 8 bits, wrapping, and
decodes it:

| d (decimal) | d (hex) | LED (hex) | meaning                |
|-------------|---------|-----------|------------------------|
| +3 / +2 / +1 | 03 / 02 / 01 | 40 / 20 / 10 | flat by 3 / 2 / 1 bins  |
| 0           | 00      | 08        | in tune                |
| -1 / -2 / -3 | FF / FE / FD | 04 / 02 / 01 | sharp by 1 / 2 / 3 bins |
| other       | other   | 80        | out of range           |

Bit 7 is the leftmost LED, so the row reads from left to right: out of range,
flat, in tune, sharp. The sign follows from the physics. A note that is too low
lands in a lower bin, so `d` is positive, which means flat. Exactly one LED is lit
at any time. While no string is selected (after reset, or after a key that names
no string), the out-of-range LED is forced. `tuner_top` registers the LED row once.
A new port-B value reaches the LEDs within 5 clock cycles.

One bin is about 4% of the low E note and about 1% of the high e note. The tuner
is therefore coarse on the low strings. Its resolution is set by the FFT, not by
this logic.

## Keypad scanning (`poll_kb`)

- **Scanning.** One column is driven high at a time. The rows are pulled low on
  the board and pass through a two-flop synchronizer. Every `SCAN_DIV` clock
  cycles (default 4096) the scanner looks at the rows.
- **Encoding a press.** If exactly one row is high, the 8-bit press code
  {rows, columns} is encoded to a 4-bit key through `KEYMAP`. The key is then
  latched, and the scan waits on that column until the key is released.
- **Holding the selection.** The key stays selected after release, until another
  key is pressed.
- **Bounce and multiple keys.** The long scan step covers contact bounce: a
  bounce can only latch the same key again. A press that raises two rows is
  ignored.
- **Latency.** A press is seen within 4 x `SCAN_DIV` + 3 cycles.

`poll_kb` contains `freq_decoder`. It gives both the 4-bit key (for the display)
and the 8-bit reference bin with `ref_valid`.

## Port B input (`portb_sync`)

The microcontroller writes the bin to an 8-bit parallel port with no strobe. The
lines change at any time relative to the FPGA clock. `portb_sync` samples them
through two flops. It accepts a value only when two successive samples agree, so a
word whose bits change with skew is not taken half old and half new. It has
4 cycles of latency and pulses `update` when the value changes.

## Display (`seven_seg_display`, `seven_seg_decoder`)

A two-digit multiplexed driver. The top bit of a `REFRESH_BITS`-bit counter
selects the digit. Each digit is lit for 2^(REFRESH_BITS-1) cycles in turn. One
decoder serves both digits. The top feeds the same key to both digits; on the
board only one digit is powered. Segments are active low, in the order
{g,f,e,d,c,b,a}. Digit enables are active high.

## The microcontroller side

This part is not in the RTL. It is software on a bought-in board. It is modelled
in `tb/hc11_model.sv`, which repeats the program's 8-bit arithmetic byte for byte:

- 256 samples;
- bit-reversed reordering;
- a first pass of sums and differences;
- seven passes with a 256-entry table of round(127 cos(2 pi i / 256)) and a signed
  8x8 multiply that keeps round(|ab|/256) x 2;
- before each pass, one halving of all points if any lies outside -63..+64;
- real entries 0 and 64 cleared before each pass, to keep the large DC term from
  forcing the scaling;
- absolute value;
- a search of bins 127 down to 2 for a value larger than bin 1.

That program has quirks that the tuner inherits, and the model shows them:

- **Off by one bin.** The exact high e (659.26 Hz) comes out in bin 96, one bin
  above its table value. It lights the first sharp LED. The other five strings
  read in tune.
- **Spurious peaks.** For some tones the clearing of entry 64 produces a peak in
  the wrong place, often bin 96. In `tb_tuner_notes`, 9 of 42 tones, each played
  up to 10% off its note, land more than two bins from f x 256 / fs.
- **No peak found.** If no bin beats bin 1, the previous result is sent again.

## How far to trust it

What the testbenches check:

- Every block has a self-checking testbench, and each testbench fails when a fault
  is put into its block.
- `tb_compare` tries all 2 x 256 x 256 inputs against a closed formula.
- `tb_poll_kb` presses all 16 keys on a keypad model, and also tries a two-row
  press, a bouncing press and reset.
- `tb_tuner_top` runs the whole FPGA at a short scan period. For each key it
  checks the LED row and the letter at bins around the key's note. It counts
  these events and requires each at least once:
  - a key latched;
  - each of the 8 LEDs lit;
  - a dash shown;
  - the out-of-range LED forced while no string is selected;
  - the two display digits taking turns;
  - a one-cycle skewed port-B word ignored.
- `tb_tuner_notes` runs the design at its default sizes with the microcontroller
  model. For each of the six strings it plays the exact note and tones 2%, 4% and
  10% low and high. It checks the LED row against the bin the model produced, and
  checks that a low tone never reads sharp and a high tone never reads flat.

Two assertions are also checked during simulation: `compare` asserts that its LED
code is one-hot, and `poll_kb` asserts that exactly one column is driven.

What the source design does not give, and what this RTL therefore chose:

- clock and reset scheme;
- keypad wiring polarity and layout;
- scan and refresh periods;
- segment polarity;
- the port-B synchronizer;
- holding the selected key;
- the forced out-of-range LED with no string selected.

Each module's opening comment says which of its parts follow the original design
and which are choices.

## Files

- `rtl/tuner_pkg.sv`: types, note bins, LED codes, segment patterns, keypad layout.
- `rtl/tuner_top.sv`: the FPGA top. Its parameters are `SCAN_DIV` and `REFRESH_BITS`.
- `rtl/poll_kb.sv`, `rtl/freq_decoder.sv`, `rtl/compare.sv`,
  `rtl/seven_seg_display.sv`, `rtl/seven_seg_decoder.sv`, `rtl/portb_sync.sv`:
  the blocks described above.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
- `tb/tb_tuner_notes.sv`: the six-string test at default sizes.
- `tb/keypad_model.sv`: model of the keypad matrix.
- `tb/hc11_model.sv`: model of the microcontroller program.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tuner_pkg.sv tb/tb_tuner_notes.sv --top-module tb_tuner_notes
./obj_dir/Vtb_tuner_notes
```

Replace `tb_tuner_notes` with any other `tb_*` name to run that testbench.
`tb_tuner_notes` also prints one line per tone: the string, the tone, the bin the
model found and the LED row.
