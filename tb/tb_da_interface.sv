// tb_da_interface: load enable, offset-binary bus and LEDs.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_da_interface;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  sample_t din;
  logic load;
  logic [7:0] dac_bus;
  logic [15:0] led;
  int m;

  da_interface #(.FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(20000)

  initial begin
    din = 0; load = 0;
    repeat (2) @(posedge clk);
    rst <= 0; #1;
    `CHECK_EQ(dac_bus, 8'h80, "silence is mid-scale")
    m = 0;
    repeat (1000) begin
      din <= sample_t'($urandom); load <= 1'($urandom);
      @(posedge clk);
      if (load) m = int'(din);
      #1;
      `CHECK_EQ(int'(dac_bus), m + 128, "offset binary level")
      `CHECK_EQ(led[7:0], dac_bus, "level LEDs")
      `CHECK_EQ(led[14:8], 7'd0, "dark LEDs")
    end
    `TB_FINISH
  end
endmodule
