// freq_index_counter: the frequency indexing counter, a bit-serial multiplier.
//
// It turns a note frequency into a waveform ROM index that advances at a
// rate proportional to that frequency:
//     index = bits [15:8] of (freq * count) mod 2^16
// where freq is 11.2 fixed-point Hertz and count is the free-running sample
// counter (2^14 counts per second). Per second the index then moves by
// 256 * f table entries, which is f periods of the stored sine wave.
//
// The multiplication is shift-and-add over modules A and B. start loads the
// frequency into the right shifter and the multiplicand into the left
// shifter and clears the accumulator. Each later cycle the accumulator adds
// the left shifter when the right shifter's low bit is 1, and both shifters
// move one place. The multiplier holds no other state: it is done as soon as
// either shifter is zero (OR gate -> ready), and a start is only accepted
// while ready is high (AND gate of start and ready), so a product in
// progress cannot be disturbed. A product takes between 1 and 14 cycles
// after the start edge, depending on the operands.
// The operand roles, the zero-detect completion and the internal 16-bit
// path from the left shifter to the accumulator follow the design. Gating
// start with ready is this design's own use of the spare AND gate.
// ext_sel = 1 replaces the sample counter by ext_count as the multiplicand,
// as wiring the testing module to the multiplier does.
//
// Interface: start, freq[12:0], ext_sel, ext_count[15:0] in; index[7:0],
// ready, count[15:0] out. Timing: ready is decoded from registers; index is
// valid in every cycle where ready is high after a start.
module freq_index_counter
  import piano_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV   = piano_pkg::DEF_SAMPLE_DIV,
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  freq_t       freq,
  input  logic        ext_sel,
  input  count_t      ext_count,
  output rom_idx_t    index,
  output logic        ready,
  output count_t      count,
  output logic [15:0] led_a,
  output logic [15:0] led_b
);
  logic   load;
  logic   rs_low, rs_zero, ls_zero;
  logic   sample_tick;
  count_t ls_dout;
  count_t mcand;

  assign mcand = ext_sel ? ext_count : count;

  freq_index_a #(.SAMPLE_DIV(SAMPLE_DIV), .FLASH_CYCLES(FLASH_CYCLES)) u_a (
    .clk, .rst,
    .cnt_out(count), .sample_tick,
    .and_a(start), .and_b(ready), .and_y(load),
    .or_a(rs_zero), .or_b(ls_zero), .or_y(ready),
    .rs_din(freq), .rs_load(load), .rs_low, .rs_zero,
    .led(led_a)
  );

  freq_index_b #(.FLASH_CYCLES(FLASH_CYCLES)) u_b (
    .clk, .rst,
    .ls_din(mcand), .ls_load(load), .ls_dout, .ls_zero,
    .acc_sel(1'b0), .acc_din(ls_dout), .acc_load(rs_low), .acc_clear(load),
    .acc_out(index),
    .led(led_b)
  );

  logic unused_tick;
  assign unused_tick = sample_tick;
endmodule
