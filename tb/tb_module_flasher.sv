// tb_module_flasher: counts flashes per repetition for several IDs.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_module_flasher;
  `TB_COUNTERS
  localparam int FC = 3, PS = 6;
  logic clk = 0, rst = 1;
  logic [3:0] id;
  logic led;

  module_flasher #(.FLASH_CYCLES(FC), .PAUSE_SLOTS(PS)) dut (.clk, .rst, .id, .led);
  always #5 clk = ~clk;
  `TB_WATCHDOG(20000)

  initial begin
    for (int n = 0; n <= 9; n += 3) begin
      int period, rises, on_cycles;
      logic prev;
      rst <= 1; id <= 4'(n);
      repeat (2) @(posedge clk);
      rst <= 0;
      // led is registered: after the k-th edge out of reset it shows slot
      // (k-1)/FC
      period = (2 * n + PS) * FC;
      for (int rep = 0; rep < 3; rep++) begin
        rises = 0; on_cycles = 0; prev = 0;
        for (int c = 0; c < period; c++) begin
          @(posedge clk); #1;
          if (led && !prev) rises++;
          if (led) on_cycles++;
          // expected level from the slot number
          `CHECK_EQ(led, ((c / FC) < 2 * n) && ((c / FC) % 2 == 0), "led level")
          prev = led;
        end
        `CHECK_EQ(rises, n, "flashes per repetition")
        `CHECK_EQ(on_cycles, n * FC, "on time")
      end
    end
    `TB_FINISH
  end
endmodule
