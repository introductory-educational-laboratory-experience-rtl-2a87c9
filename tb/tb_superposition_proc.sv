// tb_superposition_proc: random load/clear/volume against a reference sum.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_superposition_proc;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  sample_t din, dout;
  logic load, clear;
  volume_t volume;
  logic [15:0] led;
  int acc_m, scaled;

  superposition_proc #(.FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(20000)

  initial begin
    din = 0; load = 0; clear = 0; volume = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    acc_m = 0;
    repeat (3000) begin
      din    <= sample_t'($urandom);
      load   <= 1'($urandom);
      clear  <= ($urandom_range(0, 5) == 0);
      volume <= 2'($urandom);
      @(posedge clk);
      scaled = int'(din) * ((volume == 0) ? 1 : (volume == 1) ? 2 : 4);
      if (clear)     acc_m = load ? scaled : 0;
      else if (load) acc_m = acc_m + scaled;
      // 11-bit two's-complement wrap
      acc_m = ((acc_m + 1024) % 2048 + 2048) % 2048 - 1024;
      #1;
      `CHECK_EQ(int'(dout), (acc_m >= 0) ? acc_m / 8 : -((-acc_m + 7) / 8), "top 8 of 11 bits")
    end
    // one full-volume note per pass stays within range: eight notes of 127
    clear <= 1; load <= 0; @(posedge clk);
    clear <= 0; load <= 1; din <= 127; volume <= 0;
    repeat (8) @(posedge clk);
    load <= 0; #1;
    `CHECK_EQ(int'(dout), 127, "eight full-scale notes")
    `TB_FINISH
  end
endmodule
