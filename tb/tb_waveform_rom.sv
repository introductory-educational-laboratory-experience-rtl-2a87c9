// tb_waveform_rom: every entry against the sine formula, the symmetry of
// the table, and the one-cycle read latency.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_waveform_rom;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  rom_idx_t addr = 0;
  logic [2:0] instr_sel = 0;
  sample_t data;
  logic [15:0] led;
  sample_t got [256];

  waveform_rom dut (.clk, .addr, .instr_sel, .data, .led);
  always #5 clk = ~clk;
  `TB_WATCHDOG(5000)

  function automatic int expected(int k);
    real x = 127.0 * $sin(6.283185307179586 * k / 256.0);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  initial begin
    for (int k = 0; k < 256; k++) begin
      addr <= 8'(k);
      instr_sel <= 3'($urandom);
      @(posedge clk); #1;
      got[k] = data;
      `CHECK_EQ(int'(data), expected(k), "sine entry")
    end
    // latency: data changes only after the edge that samples addr
    addr <= 8'd64;
    @(posedge clk); #1;
    addr <= 8'd192;
    #1;
    `CHECK_EQ(int'(data), 127, "held before edge")
    @(posedge clk); #1;
    `CHECK_EQ(int'(data), -127, "after edge")
    for (int k = 0; k < 128; k++) `CHECK_EQ(int'(got[k + 128]), -int'(got[k]), "odd symmetry")
    `CHECK_EQ(int'(got[0]), 0, "sin 0")
    `TB_FINISH
  end
endmodule
