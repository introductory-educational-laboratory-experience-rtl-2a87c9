// tb_freq_index_counter: products and latencies of the serial multiplier.
// Random frequency/multiplicand pairs through the external operand path
// check index = bits 15:8 of (f * c) mod 2^16 and the cycle count to ready,
// 1 + min(bit length of f, 16 - trailing zeros of c) (1 for a zero operand).
// Then starts on the free-running counter are checked against the counter
// value seen at the start, and a start while busy must be ignored.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_freq_index_counter;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic start = 0, ext_sel = 1;
  freq_t freq = 0;
  count_t ext_count = 0, count;
  rom_idx_t index;
  logic ready;
  logic [15:0] led_a, led_b;

  freq_index_counter #(.SAMPLE_DIV(3), .FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(200000)

  function automatic int exp_latency(int f, int c);
    int bl = 0, tz = 0;
    if (f == 0 || c == 0) return 1;
    while ((f >> bl) != 0) bl++;
    while (((c >> tz) & 1) == 0) tz++;
    return 1 + ((bl < 16 - tz) ? bl : 16 - tz);
  endfunction

  // Stimulus changes on the falling edge; the design samples on the rising.
  task automatic run_one(input int f, input int c, input bit ext, input bit poke);
    int cycles = 0;
    @(negedge clk);
    freq = freq_t'(f); ext_count = count_t'(c); ext_sel = ext; start = 1;
    if (!ext) c = int'(count);   // the counter value the load will take
    @(negedge clk);              // rising edge in between: operands loaded
    start = 0;
    while (!ready && cycles < 40) begin
      // an extra start during the product must change nothing
      if (poke && cycles == 1) begin
        start = 1; freq = freq_t'($urandom); ext_count = count_t'($urandom);
      end else start = 0;
      @(negedge clk);
      cycles++;
    end
    start = 0;
    `CHECK_EQ(int'(index), ((f * c) % 65536) / 256, "product top byte")
    if (ext) `CHECK_EQ(cycles + 1, exp_latency(f, c), "multiply latency")
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    `CHECK_EQ(ready, 1'b1, "idle after reset")
    run_one(1760, 16384, 1, 0);   // 440 Hz one second in: whole periods
    run_one(0, 1234, 1, 0);
    run_one(8191, 65535, 1, 0);
    run_one(8191, 0, 1, 0);
    for (int i = 0; i < 300; i++) run_one($urandom_range(0, 8191), $urandom_range(0, 65535), 1, (i % 5) == 0);
    for (int i = 0; i < 100; i++) run_one($urandom_range(0, 8191), 0, 0, 0);
    `TB_FINISH
  end
endmodule
