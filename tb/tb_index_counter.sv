// tb_index_counter: random count enables against a reference count.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_index_counter;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1, cnt_en = 0;
  note_idx_t count;
  logic zero;
  int model;
  int zeros_seen = 0;

  index_counter dut (.clk, .rst, .cnt_en, .count, .zero);
  always #5 clk = ~clk;
  `TB_WATCHDOG(5000)

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    model = 0;
    repeat (1000) begin
      cnt_en <= 1'($urandom_range(0, 1));
      @(posedge clk);
      if (cnt_en) model = (model + 1) % 8;
      #1;
      `CHECK_EQ(int'(count), model, "count")
      `CHECK_EQ(zero, (model == 0), "zero flag")
      if (zero) zeros_seen++;
    end
    `CHECK_EQ(zeros_seen > 10, 1'b1, "wrap seen")
    `TB_FINISH
  end
endmodule
