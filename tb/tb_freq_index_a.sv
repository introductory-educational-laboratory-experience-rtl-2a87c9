// tb_freq_index_a: prescaler period, counter steps, right shifter and gates.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_freq_index_a;
  import piano_pkg::*;
  `TB_COUNTERS
  localparam int DIV = 7;
  logic clk = 0, rst = 1;
  count_t cnt_out;
  logic sample_tick;
  logic and_a, and_b, and_y, or_a, or_b, or_y;
  freq_t rs_din;
  logic rs_load, rs_low, rs_zero;
  logic [15:0] led;
  freq_t model;

  freq_index_a #(.SAMPLE_DIV(DIV), .FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(20000)

  initial begin
    int last_tick, ticks;
    count_t c0;
    rs_load = 0; rs_din = 0; and_a = 0; and_b = 0; or_a = 0; or_b = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    #1 c0 = cnt_out;
    // counter: one step every DIV cycles
    last_tick = -1; ticks = 0;
    for (int c = 0; c < 50 * DIV; c++) begin
      @(posedge clk); #1;
      if (cnt_out != c0) begin
        `CHECK_EQ(cnt_out, count_t'(c0 + 1), "counter step of one")
        if (last_tick >= 0) `CHECK_EQ(c - last_tick, DIV, "counter period")
        last_tick = c; ticks++;
        c0 = cnt_out;
      end
    end
    `CHECK_EQ(ticks >= 49, 1'b1, "counter advanced")
    // gates
    for (int v = 0; v < 4; v++) begin
      {and_a, and_b} = 2'(v); {or_a, or_b} = 2'(v); #1;
      `CHECK_EQ(and_y, (v == 3), "AND gate")
      `CHECK_EQ(or_y, (v != 0), "OR gate")
    end
    // right shifter
    repeat (40) begin
      rs_din <= freq_t'($urandom); rs_load <= 1;
      @(posedge clk); #1 model = rs_din;
      rs_load <= 0;
      for (int s = 0; s < 15; s++) begin
        `CHECK_EQ(rs_low, model[0], "shifter low bit")
        `CHECK_EQ(rs_zero, (model == 0), "shifter zero flag")
        @(posedge clk); #1 model = model >> 1;
      end
    end
    `TB_FINISH
  end
endmodule
