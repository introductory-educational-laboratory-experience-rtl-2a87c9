// module_flasher: identification blinker for the leftmost LED of a module.
//
// The LED flashes ID times, then stays dark for PAUSE_SLOTS slots, and the
// pattern repeats, so that a glance at LED 15 tells which module personality
// is loaded. Time is divided into slots of FLASH_CYCLES clock cycles; flash k
// occupies slot 2k (on) and slot 2k+1 (off). ID = 0 keeps the LED dark.
// The 4-bit ID input and the repeating count-and-pause behaviour follow the
// design; slot length and pause length are this design's own choices.
//
// Interface: clk, rst (synchronous, active high), id[3:0], led.
// Timing: led is a registered output.
module module_flasher #(
  parameter int unsigned FLASH_CYCLES = 2_500_000,
  parameter int unsigned PAUSE_SLOTS  = 6
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] id,
  output logic       led
);
  localparam int unsigned CYC_W = (FLASH_CYCLES > 1) ? $clog2(FLASH_CYCLES) : 1;

  logic [CYC_W-1:0] cyc;
  logic [5:0]       slot;
  logic [5:0]       last_slot;

  assign last_slot = 6'({id, 1'b0} + 5'(PAUSE_SLOTS) - 5'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc  <= '0;
      slot <= '0;
      led  <= 1'b0;
    end else begin
      if (cyc == CYC_W'(FLASH_CYCLES - 1)) begin
        cyc  <= '0;
        slot <= (slot >= last_slot) ? 6'd0 : slot + 6'd1;
      end else begin
        cyc <= cyc + 1'b1;
      end
      led <= (slot < 6'({id, 1'b0})) && !slot[0];
    end
  end
endmodule
