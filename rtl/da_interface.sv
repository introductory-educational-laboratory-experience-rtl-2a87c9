// da_interface: output register in front of the digital-to-analog converter.
//
// An 8-bit register with load enable holds the audio level. It is presented
// in parallel (not serialized) to the external D/A chip. The register keeps
// the two's-complement sample; the chip bus carries it in offset binary
// (sign bit inverted), so that silence sits at mid-scale, 0x80.
// The LEDs show the chip bus bits (LED 7:0), keep LED 14:8 dark and flash
// the module number on LED 15.
// The register with load enable, the parallel bus and the LED layout follow
// the design. Offset binary on the chip bus is this design's own choice.
//
// Interface: din[7:0] signed, load in; dac_bus[7:0], led[15:0] out.
// Timing: load takes effect on the next clock edge.
module da_interface
  import piano_pkg::*;
#(
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  input  sample_t     din,
  input  logic        load,
  output logic [7:0]  dac_bus,
  output logic [15:0] led
);
  sample_t level_q;

  always_ff @(posedge clk) begin
    if (rst)       level_q <= '0;
    else if (load) level_q <= din;
  end

  assign dac_bus = {~level_q[7], level_q[6:0]};

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_DA), .led(led[15])
  );
  assign led[14:8] = '0;
  assign led[7:0]  = dac_bus;
endmodule
