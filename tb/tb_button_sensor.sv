// tb_button_sensor: buttons must appear at the output two cycles later.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_button_sensor;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic [7:0] buttons_async = 0, buttons;
  logic [15:0] led;
  logic [7:0] hist [3];

  button_sensor #(.FLASH_CYCLES(4)) dut (.clk, .rst, .buttons_async, .buttons, .led);
  always #5 clk = ~clk;
  `TB_WATCHDOG(5000)

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    hist = '{default: 8'h00};
    repeat (500) begin
      buttons_async <= 8'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = buttons_async;
      #1;
      `CHECK_EQ(buttons, hist[1], "synchronized buttons")
      `CHECK_EQ(led[7:0], hist[1], "button LEDs")
    end
    `TB_FINISH
  end
endmodule
