// freq_index_b: frequency indexing counter, module B.
//
// Holds the other two parts of the bit-serial multiplier:
//  * a 16-bit left shift register for the counter operand. With load = 1 it
//    takes ls_din; otherwise it shifts left, filling with 0 at the bottom.
//    Bits shifted out of the top are lost, so every product is taken modulo
//    2^16. ls_zero is high when the register holds zero.
//  * a 16-bit adder/accumulator. With clear = 1 it is set to zero; otherwise
//    with load = 1 it adds acc_din to its contents. Only its top 8 bits are
//    brought out: they are the waveform ROM index, the low 8 bits being the
//    fractional part of the index.
// The left shift output feeds the accumulator input inside this module over
// a full 16-bit path, as the design does for speed; acc_din stays a port so
// the accumulator can also be used on its own (acc_sel = 1 selects it).
// Widths, the load/shift and load/clear rules and the top-8-bit output
// follow the design. Clear taking priority over load, the acc_sel choice,
// the register resets and the LED use are this design's own.
//
// Interface: see the port list. Timing: all outputs come from registers.
module freq_index_b
  import piano_pkg::*;
#(
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  // left shift register
  input  count_t      ls_din,
  input  logic        ls_load,
  output count_t      ls_dout,
  output logic        ls_zero,
  // adder/accumulator
  input  logic        acc_sel,
  input  count_t      acc_din,
  input  logic        acc_load,
  input  logic        acc_clear,
  output rom_idx_t    acc_out,
  output logic [15:0] led
);
  count_t ls_q;
  count_t acc_q;
  count_t addend;

  always_ff @(posedge clk) begin
    if (rst)          ls_q <= '0;
    else if (ls_load) ls_q <= ls_din;
    else              ls_q <= ls_q << 1;
  end

  assign addend = acc_sel ? acc_din : ls_q;

  always_ff @(posedge clk) begin
    if (rst || acc_clear) acc_q <= '0;
    else if (acc_load)    acc_q <= acc_q + addend;
  end

  assign ls_dout = ls_q;
  assign ls_zero = (ls_q == '0);
  assign acc_out = acc_q[15:8];

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_FREQ_B), .led(led[15])
  );
  assign led[14:8] = ls_q[15:9];
  assign led[7:0]  = acc_out;
endmodule
