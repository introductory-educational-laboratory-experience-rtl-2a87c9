// tb_multest: the testing module against a behavioural multiplier in the
// testbench (busy for a random number of cycles, then the top byte of the
// 16-bit product). The marquee must scroll the message "6.004 PIANO ".
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_multest;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic ready;
  rom_idx_t result;
  logic start;
  count_t op16;
  freq_t op13;
  logic [31:0] display;
  logic [15:0] led;
  int busy = 0, starts = 0, shown = 0;
  string msg = "6.004 PIANO ";

  multest #(.STEP_CYCLES(3), .DISP_CHARS(4), .FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(20000)

  assign ready = (busy == 0);
  always @(posedge clk) begin
    if (start && ready) begin
      busy   <= $urandom_range(1, 14);
      result <= 8'((32'(op16) * 32'(op13)) >> 8);
      starts <= starts + 1;
    end else if (busy > 0) busy <= busy - 1;
  end

  initial begin
    logic [31:0] prev;
    result = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    prev = 32'h20202020;
    @(negedge clk);
    `CHECK_EQ(display, 32'h20202020, "blank display")
    while (shown < 30) begin
      @(negedge clk);
      if (display != prev) begin
        `CHECK_EQ(display, {prev[23:0], 8'(msg[shown % 12])}, "next character")
        prev = display;
        shown++;
      end
    end
    `CHECK_EQ(starts - shown <= 1 && starts >= shown, 1'b1, "one start per character")
    `TB_FINISH
  end
endmodule
