// tb_freq_index_b: left shifter, accumulator add/clear and top-8 output.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_freq_index_b;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  count_t ls_din, ls_dout, acc_din;
  logic ls_load, ls_zero, acc_sel, acc_load, acc_clear;
  rom_idx_t acc_out;
  logic [15:0] led;
  count_t ls_m, acc_m;

  freq_index_b #(.FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(20000)

  initial begin
    ls_din = 0; ls_load = 0; acc_sel = 0; acc_din = 0; acc_load = 0; acc_clear = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    ls_m = 0; acc_m = 0;
    repeat (2000) begin
      ls_din    <= count_t'($urandom);
      acc_din   <= count_t'($urandom);
      ls_load   <= ($urandom_range(0, 7) == 0);
      acc_sel   <= 1'($urandom);
      acc_load  <= 1'($urandom);
      acc_clear <= ($urandom_range(0, 15) == 0);
      @(posedge clk);
      if (acc_clear)     acc_m = 0;
      else if (acc_load) acc_m = acc_m + (acc_sel ? acc_din : ls_m);
      ls_m = ls_load ? ls_din : count_t'(ls_m << 1);
      #1;
      `CHECK_EQ(ls_dout, ls_m, "left shifter")
      `CHECK_EQ(ls_zero, (ls_m == 0), "left zero flag")
      `CHECK_EQ(acc_out, acc_m[15:8], "accumulator top byte")
    end
    `TB_FINISH
  end
endmodule
