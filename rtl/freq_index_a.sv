// freq_index_a: frequency indexing counter, module A.
//
// Holds the parts of the bit-serial multiplier that sit on the first module:
//  * a free-running 16-bit sample counter. A prescaler divides the system
//    clock by SAMPLE_DIV (20 MHz / 1221 = 16.38 kHz, about 2^14 per second)
//    and the counter steps once per prescaler period. The counter is never
//    loaded or reset and rolls over every four seconds.
//  * a 13-bit right shift register for the frequency operand. With load = 1
//    it takes rs_din; otherwise it shifts right, filling with 0 at the top.
//    rs_low is its current bit 0 and rs_zero is high when it holds zero.
//  * one two-input AND gate and one two-input OR gate, left free for the
//    user to wire into the multiplier control.
// The parts, widths, divider and load/shift rule follow the design. The
// LED use of bits 14:0 and the reset of the prescaler and shift register
// (so the multiplier starts idle) are this design's own.
//
// Interface: see the port list. Timing: cnt_out, rs_low and rs_zero come
// from registers; the gate outputs are combinational.
module freq_index_a
  import piano_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV   = piano_pkg::DEF_SAMPLE_DIV,
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  // free-running counter
  output count_t      cnt_out,
  output logic        sample_tick,
  // spare gates
  input  logic        and_a,
  input  logic        and_b,
  output logic        and_y,
  input  logic        or_a,
  input  logic        or_b,
  output logic        or_y,
  // right shift register
  input  freq_t       rs_din,
  input  logic        rs_load,
  output logic        rs_low,
  output logic        rs_zero,
  output logic [15:0] led
);
  localparam int unsigned DIV_W = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;

  logic [DIV_W-1:0] prescale;
  freq_t            rs_q;

  // Prescaler: sample_tick is high for one cycle every SAMPLE_DIV cycles.
  always_ff @(posedge clk) begin
    if (rst || sample_tick) prescale <= '0;
    else                    prescale <= prescale + 1'b1;
  end
  assign sample_tick = (prescale == DIV_W'(SAMPLE_DIV - 1));

  // Free-running counter: no load and no reset.
  always_ff @(posedge clk) begin
    if (sample_tick) cnt_out <= cnt_out + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)          rs_q <= '0;
    else if (rs_load) rs_q <= rs_din;
    else              rs_q <= rs_q >> 1;
  end

  assign rs_low  = rs_q[0];
  assign rs_zero = (rs_q == '0);
  assign and_y   = and_a & and_b;
  assign or_y    = or_a | or_b;

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_FREQ_A), .led(led[15])
  );
  assign led[14:4] = rs_q[10:0];
  assign led[3:0]  = cnt_out[15:12];
endmodule
