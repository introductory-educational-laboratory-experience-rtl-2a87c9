// digital_piano: an eight-key, multi-note digital piano datapath.
//
// One waveform ROM holding a single sine period serves every note. A note
// of frequency f is played by reading the ROM at an index that advances
// 256 * f entries per second; that index is the top byte of frequency x
// sample counter, formed by a bit-serial multiplier. The control FSM polls
// the eight note indices in turn. For each enabled note it runs one
// multiplication, reads the ROM and adds the sample into the superposition
// processor. After the eighth index the sum goes to the D/A register and a
// new sum starts. The sample counter advances at about 16.4 kHz whatever
// the pass rate, so pitch depends only on the counter; a faster pass only
// refines the output waveform.
//
// Blocks and wiring (signal names as used below):
//   button_sensor  -> buttons        -> note_interpreter
//   index_counter  -> note index     -> note_interpreter; zero -> FSM in3
//   note_interpreter enable -> FSM in1, freq -> multiplier, volume -> SP
//   freq_index_counter ready -> FSM in2, index -> waveform_rom
//   waveform_rom sample -> superposition_proc -> da_interface -> dac_bus
//   control_fsm out1 -> index count enable, out2 -> multiplier start,
//               out3 -> SP load, out4 -> SP clear and D/A load
// mult_test = 1 hands the multiplier to the testing module (its operands
// and start), as rewiring the multiplier to the test source does; the piano
// output is then not meaningful. The external D/A chip and amplifier are
// not part of this RTL: dac_bus is their 8-bit parallel input.
//
// Interface: clk (20 MHz system clock), rst (synchronous, active high),
// buttons_async[7:0] (bit 0 leftmost key), mult_test in; dac_bus[7:0]
// (offset binary), test_display, fsm_state, ni_mode, sample_count and the
// LED rows of all modules out.
module digital_piano
  import piano_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV    = piano_pkg::DEF_SAMPLE_DIV,
  parameter int unsigned HOLD_CYCLES   = piano_pkg::DEF_HOLD_CYCLES,
  parameter int unsigned FLASH_CYCLES  = piano_pkg::DEF_FLASH_CYCLES,
  parameter int unsigned TEST_STEP     = CLK_HZ / 4,
  parameter int unsigned DISP_CHARS    = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [7:0]               buttons_async,
  input  logic                     mult_test,
  output logic [7:0]               dac_bus,
  output logic [8*DISP_CHARS-1:0]  test_display,
  output logic [3:0]               fsm_state,
  output ni_mode_t                 ni_mode,
  output count_t                   sample_count,
  // LED rows: 0 buttons, 1 note interpreter, 2 control FSM, 3 module A,
  // 4 module B, 5 waveform ROM, 6 superposition, 7 D/A, 8 testing module
  output logic [8:0][15:0]         leds
);
  logic [7:0] buttons;
  note_idx_t  note_idx;
  logic       idx_zero;
  logic       note_en;
  freq_t      note_freq;
  volume_t    volume;
  logic       cnt_en, fsm_start, sp_load, dump;
  logic [3:0] fsm_next;
  logic       mul_start, mul_ready;
  freq_t      mul_freq;
  rom_idx_t   rom_index;
  sample_t    sample, mix;
  logic       mt_start;
  count_t     mt_op16;
  freq_t      mt_op13;

  button_sensor #(.FLASH_CYCLES(FLASH_CYCLES)) u_buttons (
    .clk, .rst, .buttons_async, .buttons, .led(leds[0])
  );

  index_counter u_index (
    .clk, .rst, .cnt_en, .count(note_idx), .zero(idx_zero)
  );

  note_interpreter #(.HOLD_CYCLES(HOLD_CYCLES), .FLASH_CYCLES(FLASH_CYCLES)) u_ni (
    .clk, .rst, .buttons, .index(note_idx),
    .enable(note_en), .freq(note_freq), .volume, .mode(ni_mode), .led(leds[1])
  );

  control_fsm #(.FLASH_CYCLES(FLASH_CYCLES)) u_fsm (
    .clk, .rst,
    .in1(note_en), .in2(mul_ready), .in3(idx_zero),
    .out1(cnt_en), .out2(fsm_start), .out3(sp_load), .out4(dump),
    .state(fsm_state), .next_state(fsm_next), .led(leds[2])
  );

  assign mul_start = mult_test ? mt_start : fsm_start;
  assign mul_freq  = mult_test ? mt_op13  : note_freq;

  freq_index_counter #(.SAMPLE_DIV(SAMPLE_DIV), .FLASH_CYCLES(FLASH_CYCLES)) u_mul (
    .clk, .rst, .start(mul_start), .freq(mul_freq),
    .ext_sel(mult_test), .ext_count(mt_op16),
    .index(rom_index), .ready(mul_ready), .count(sample_count),
    .led_a(leds[3]), .led_b(leds[4])
  );

  waveform_rom u_rom (
    .clk, .addr(rom_index), .instr_sel(3'd0), .data(sample), .led(leds[5])
  );

  superposition_proc #(.FLASH_CYCLES(FLASH_CYCLES)) u_sp (
    .clk, .rst, .din(sample), .load(sp_load), .clear(dump), .volume,
    .dout(mix), .led(leds[6])
  );

  da_interface #(.FLASH_CYCLES(FLASH_CYCLES)) u_da (
    .clk, .rst, .din(mix), .load(dump), .dac_bus, .led(leds[7])
  );

  multest #(.STEP_CYCLES(TEST_STEP), .DISP_CHARS(DISP_CHARS),
            .FLASH_CYCLES(FLASH_CYCLES)) u_test (
    .clk, .rst, .ready(mul_ready), .result(rom_index),
    .start(mt_start), .op16(mt_op16), .op13(mt_op13),
    .display(test_display), .led(leds[8])
  );

  logic unused_next;
  assign unused_next = ^fsm_next;
endmodule
