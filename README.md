# Digital piano: one sine table, one serial multiplier, eight voices

This is a small polyphonic synthesizer built as a datapath with a control
state machine. It is a SystemVerilog rendering of the "6.004 Digital Piano"
teaching lab (MIT, 1998), where students wired it from prebuilt FPGA
modules. Eight keys (the white keys C D E F G A B C) can sound together.
Every note is read from the same 256-entry table holding one period of a
sine wave. The pitch of a note is set only by how fast its table index
advances. Those indices are not kept in eight phase accumulators. They are
all computed on demand from one shared free-running sample counter,
multiplied by each note's frequency:

    index = bits [15:8] of (freq x count) mod 2^16

A control FSM visits the eight notes in turn. For each note that is held it
runs one multiplication, reads the sine table and adds the sample into a
running sum. After the eighth note it sends the sum to the D/A converter.

## From a frequency to a table index

The arithmetic is the least obvious part of the design, so here it is in
full.

* `freq` is 13 bits of unsigned fixed point with 2 fractional bits
  (`bbbbbbbbbbb.bb`). The value is Hertz x 4, so 440 Hz is 1760. The range
  is 0 to 2047.75 Hz in steps of 0.25 Hz.
* `count` is a 16-bit counter. It steps once every 1221 clocks of the
  20 MHz system clock, which is 16 380 times a second, close to 2^14. It is
  never loaded or reset and wraps every 4 s.
* After t seconds, count is about 2^14 t. So freq x count is about
  (4f)(2^14 t) = 2^16 f t. Bits 15:8 of this product are 256 f t mod 256.
  That is the position within the sine period, counted in table entries.
  The index therefore sweeps the table f times per second.
* The low 8 bits of the product are the fractional part of the index and
  are dropped. Bits above 15 count whole periods and are dropped too.
  Taking the product mod 2^16 is exact. When the counter wraps from 65535
  to 0, the product changes by freq x 2^16, which is 0 mod 2^16. So the
  index steps on exactly as before and the waveform stays continuous.

Nothing in this depends on how often a pass over the notes happens. A
faster control loop only gives the output waveform more points per period.
Pitch is fixed by the sample counter alone.

The white-key frequencies are 440 x 2^(n/12) Hz for n = -9, -7, -5, -4, -2,
0, 2, 3. Rounded to quarter Hertz they are 1047, 1175, 1319, 1397, 1568,
1760, 1976 and 2093 (`piano_pkg::key_freq`).

## The bit-serial multiplier (`freq_index_counter`)

The multiplier is spread over two modules, as on the original kit.

* `freq_index_a` holds the sample counter and its divide-by-1221
  prescaler. It also holds a 13-bit right shift register for the frequency
  and two spare gates, one AND and one OR.
* `freq_index_b` holds a 16-bit left shift register for the count and a
  16-bit accumulator. Only the accumulator's top byte is brought out.

A shift register loads when its `load` input is 1 and shifts otherwise,
filling with zeros. `start` loads both shift registers and clears the
accumulator. In every later cycle the accumulator adds the left register
if the right register's low bit is 1, and both registers move one place.
This is ordinary shift-and-add multiplication.

The multiplier has no counter or state register of its own: its state is
the data. Once either shift register is all zeros, nothing more can be
added. The OR of the two zero flags is therefore `ready`. The AND gate
combines `start` with `ready`, so a start is taken only when the multiplier
is idle. A start that arrives during a product is ignored.

The number of cycles depends on the operands. Counting from the start
edge, `ready` rises after 1 + min(bit length of freq, 16 − trailing zeros
of count) cycles. That is 1 cycle if either operand is zero and at most 14
cycles for a 13-bit frequency. The left register feeds the accumulator
over a full-width path inside `freq_index_b`. The original design added
this internal path for speed. The external `acc_din` port (`acc_sel = 1`)
still lets the accumulator be used on its own.

## The control loop (`control_fsm`)

The FSM is a Mealy machine with three generic inputs and four generic
outputs, like the prebuilt control ROM the lab handed out. The top module
wires them as follows:

| port | wired to |
|------|----------|
| in1  | note enabled (note interpreter) |
| in2  | multiplier ready |
| in3  | note index counter is zero |
| out1 | count enable of the note index counter |
| out2 | multiplier start |
| out3 | superposition load (add the sample) |
| out4 | superposition clear **and** D/A load (end of pass) |

Arcs are written `condition | outputs asserted before the arc is taken`:

    INDEX : -          | out4 = in3   -> CHECK
    CHECK : in1 & in2  | out2         -> MULT
            in1 & !in2 | -            -> CHECK   (multiplier busy; lights LED 14)
            !in1       | out1         -> INDEX
    MULT  : in2        | -            -> ADD
            !in2       | -            -> MULT
    ADD   : -          | out3, out1   -> INDEX

There are two wait states, because the parts around the FSM have
registered outputs. INDEX gives the note interpreter one cycle to answer
for the new index. ADD uses the waveform ROM's data, which comes one cycle
after the multiplier's final index. A note that is not held takes 2
cycles. A held note takes 3 cycles plus the multiplication. A pass over
eight held notes takes at most 136 cycles (6.8 µs). The D/A level is
therefore refreshed more than 140 000 times a second, far above the
16 384 /s sample rate the design aims for.

out4 does two jobs in one cycle. The D/A register loads the finished sum
while the accumulator is cleared, because both are registers and sample
the same edge. The FSM drives `state` and `next_state` out as 4-bit codes
for observation.

## Choosing the notes (`note_interpreter`, `index_counter`, `button_sensor`)

`button_sensor` passes each button through a two-flop synchronizer. Bit 0
is the leftmost key. `index_counter` is the 3-bit note counter the FSM
steps. Its `zero` flag marks the start of a pass.

For index k, `note_interpreter` returns three things, each registered, one
cycle after the index:

* `enable`: the note is held
* `freq`: the note's frequency
* `volume`: the gain for the mixer

It has three modes:

* **piano**: key k plays white key k while its button is held.
* **stopped**: entered by holding the two rightmost buttons (B and C) for
  `HOLD_CYCLES`, two seconds by default. It is silent until every button
  is released.
* **song**: the buttons pick stored patterns. The leftmost button gives the
  beat test: 440 Hz and 441 Hz together, heard as a swell once a second.
  The other six pattern buttons give silence. The rightmost button returns
  to piano mode.

`volume` depends on how many notes are enabled. It is 2 (x4) for up to two
notes, 1 (x2) for up to four, and 0 (x1) beyond that.

## Mixing and output (`superposition_proc`, `da_interface`)

`superposition_proc` adds the sine samples (−127…127), each shifted left
by `volume`, into an 11-bit signed accumulator. Its output is the top 8 of
those 11 bits. Together with the volume rule this keeps the sum in range
for any number of notes. A single note reaches half of full scale, and
eight notes at gain 1 reach at most 8 x 127 = 1016.

`da_interface` is an 8-bit register with load enable that drives the
external converter in parallel. The bus is offset binary (sign bit
inverted), so silence is 0x80. The converter chip, amplifier and speaker
are outside this RTL.

## Testing module (`multest`)

This module is a self-test source for the multiplier. With `mult_test = 1`
the top hands the multiplier's start and operands to it. It multiplies 4
(1.00 in 11.2) by a character code x 64, so the product's top byte is the
character. It then shifts each result into a 4-character marquee
(`test_display`). A working multiplier makes "6.004 PIANO " scroll past.
While `mult_test` is 1 the piano output is meaningless.

## LEDs and module identification

Every module has a 16-bit LED row, brought out on the top's `leds[8:0]`.
On each row, LED 15 blinks the module's number and then pauses
(`module_flasher`), so the loaded module can be told at a glance:

| ID | module |
|----|--------|
| 1  | note interpreter |
| 2  | control FSM |
| 3  | superposition |
| 4  | buttons |
| 5  | module B |
| 6  | D/A |
| 7  | testing module |
| 8  | module A |

The waveform ROM keeps LED 15 lit steadily. The other LEDs show each
module's main values: notes held, FSM state, shift registers, the D/A
level. The header of each module says which.

## Files

| file | contents |
|------|----------|
| `rtl/piano_pkg.sv` | types, note frequencies, module IDs, FSM and mode enums, default timing |
| `rtl/digital_piano.sv` | top level |
| `rtl/control_fsm.sv` | Mealy control FSM |
| `rtl/note_interpreter.sv`, `rtl/index_counter.sv`, `rtl/button_sensor.sv` | note selection |
| `rtl/freq_index_counter.sv`, `rtl/freq_index_a.sv`, `rtl/freq_index_b.sv` | serial multiplier and sample counter |
| `rtl/waveform_rom.sv` | sine table, computed at elaboration as round(127 sin(2πk/256)) |
| `rtl/superposition_proc.sv`, `rtl/da_interface.sv` | mixer and D/A register |
| `rtl/multest.sv`, `rtl/module_flasher.sv` | multiplier test source, ID blinker |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_digital_piano.sv` | end-to-end test at reduced timing |
| `tb/tb_digital_piano_full.sv` | end-to-end test with every parameter at its default |

## Parameters of the top

| parameter | default | meaning |
|-----------|---------|---------|
| `SAMPLE_DIV` | 1221 | system clocks per sample-counter step (20 MHz → 16.38 kHz) |
| `HOLD_CYCLES` | 40 000 000 | B+C hold time before the piano stops (2 s) |
| `FLASH_CYCLES` | 2 500 000 | length of one ID-blink half period (125 ms) |
| `TEST_STEP` | 5 000 000 | testing module: clocks between characters |
| `DISP_CHARS` | 4 | testing module: marquee width |

## Simulating

The testbenches need no files beyond `rtl/` and `tb/`. Each ends by
printing `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/piano_pkg.sv rtl/*.sv tb/tb_digital_piano.sv \
        --top-module tb_digital_piano -o sim
    ./obj_dir/sim

`tb_digital_piano` runs at a reduced timing: the sample counter steps
every 3 clocks and the hold time is 300 clocks. It checks every pass's
D/A value against its own model, which works from the counter value each
multiplication took, its own sine and frequency formulas, and the gain
rule. It then drives the B+C hold, song mode, the beat test, the return
to piano mode and the testing-module marquee. It counts each of these
events, plus multiplier waits, skipped notes and counter wrap-arounds,
and fails if any never happened.

`tb_digital_piano_full` leaves every parameter at its default. It holds
two chords for 600 000 clocks and checks every pass. It checks that the
sample counter steps 491 ± 1 times in that span (20 MHz / 1221). It then
holds B and C for the full two seconds, checks that the piano stops after
40 million clocks, and enters song mode. In all it checks close to a
million passes. It runs in well under a minute; the reduced test takes a
few seconds.

## How this differs from the original lab, and what is not here

* **Control FSM.** The original transition table is not reproduced. The
  four-state graph and the assignment of in1..in3 and out1..out4 above are
  this design's own, written to the stated behaviour: loop over the notes,
  play the enabled ones, output the sum.
* **Fractional bits.** The original write-up describes the product's
  fractional part in two ways. The 2 fractional bits of the frequency plus
  the 6 of the counter give 8 dropped bits; elsewhere the write-up counts
  7. This design follows the stated parameters (16-bit counter at 2^14/s,
  256-entry table, top 8 of a 16-bit accumulator), which fix 8.
* **Songs.** The stored song ROM and the other test patterns are not
  included, because their contents are unknown. Only the 440/441 Hz beat
  test is built.
* **Volume control.** The original gives no meaning or width for this
  signal. The 2-bit gain-by-note-count rule is this design's own. The
  mixer's range scaling is the simple one the original suggests: take the
  top 8 of 11 bits.
* **Inter-module links.** On the kit, multi-bit signals between modules
  were serialized over single wires. That limited the multiplier's speed
  and made the original output audibly jagged. Here every connection is a
  parallel wire, and the multiplier shifts one bit per system clock.
* **Kit pin wrappers, alphanumeric display driver, D/A chip and audio
  amplifier.** These are not modelled. The testing module brings its
  marquee register out instead of driving a display.
* **Design choices made here.** The testing module's operand pattern and
  message, most module ID numbers (only module A = 8 and D/A = 6 are from
  the original), LED details, blink timing, reset behaviour, the offset-
  binary D/A bus and the one-cycle ROM read are this design's own.
