// button_sensor: reports the state of the eight kit buttons.
//
// The buttons are asynchronous to the system clock, so each one passes
// through a two-stage synchronizer before it is used. Bit 0 is the leftmost
// button (low C), bit 7 the rightmost (high C). The LEDs mirror the button
// state and LED 15 carries the module identification flasher.
// That the module outputs the button state follows the design; the
// synchronizer, the bit order and the LED use are this design's own.
//
// Interface: clk, rst, buttons_async[7:0] in; buttons[7:0], led[15:0] out.
// Timing: buttons lags the pins by two clock cycles.
module button_sensor
  import piano_pkg::*;
#(
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  buttons_async,
  output logic [7:0]  buttons,
  output logic [15:0] led
);
  logic [7:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta    <= '0;
      buttons <= '0;
    end else begin
      meta    <= buttons_async;
      buttons <= meta;
    end
  end

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_BUTTONS), .led(led[15])
  );
  assign led[14:8] = '0;
  assign led[7:0]  = buttons;
endmodule
