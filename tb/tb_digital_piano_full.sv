// tb_digital_piano_full: the piano at its default parameters (20 MHz clock,
// divide-by-1221 sample counter, two-second mode hold).
// A C-E-G chord and then a single A are held while every pass's D/A level
// is checked against the testbench's own sine, frequency and gain
// computation, from the sample counter value each multiplication took.
// Each pass is one complete operation of the design: poll eight notes,
// multiply, look up, sum and output. Then B and C are held for the full
// two seconds (40 million clocks) until the piano stops, and released to
// enter song mode.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_digital_piano_full;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic [7:0] buttons_async = 0;
  logic mult_test = 0;
  logic [7:0] dac_bus;
  logic [31:0] test_display;
  logic [3:0] fsm_state;
  ni_mode_t ni_mode;
  count_t sample_count;
  logic [8:0][15:0] leds;

  digital_piano dut (.*);
  always #25 clk = ~clk;    // 20 MHz
  `TB_WATCHDOG(50_000_000)

  function automatic int sine(int k);
    real x = 127.0 * $sin(6.283185307179586 * k / 256.0);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction
  function automatic int key_q(int k);
    int n [8] = '{-9, -7, -5, -4, -2, 0, 2, 3};
    return int'($floor(440.0 * (2.0 ** (real'(n[k]) / 12.0)) * 4.0 + 0.5));
  endfunction

  logic [7:0] exp_en = 0;
  int settle = 0, n_pass = 0, n_ticks = 0;
  int starts [$];
  count_t prev_count;

  // Sample mid-cycle, where the Mealy outputs are settled: a load seen now
  // takes the counter value seen now at the next rising edge, and a dump
  // seen now puts the finished sum on the D/A bus at that edge.
  logic check_now = 0;
  always @(negedge clk) begin
        if (sample_count != prev_count) n_ticks++;
    prev_count <= sample_count;
    
    if (check_now) begin
      automatic int sum = 0, j = 0, nn = $countones(exp_en);
      automatic int gain = (nn <= 2) ? 4 : (nn <= 4) ? 2 : 1;
      if (settle > 0) settle--;
      else begin
        `CHECK_EQ(int'(starts.size()), nn, "one multiply per enabled note")
        if (starts.size() == nn) begin
          for (int k = 0; k < 8; k++) if (exp_en[k]) begin
            sum += gain * sine(((key_q(k) * starts[j]) % 65536) / 256);
            j++;
          end
          sum = (sum >= 0) ? sum / 8 : -((-sum + 7) / 8);
          `CHECK_EQ(int'(dac_bus), sum + 128, "D/A level of a pass")
          n_pass++;
        end
      end
      starts.delete();
    end
    if (!rst && !mult_test && dut.u_mul.load) starts.push_back(int'(sample_count));
    check_now = !rst && dut.dump;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk); buttons_async = 8'h15; exp_en = 8'h15; settle = 2;
    repeat (300_000) @(negedge clk);
    buttons_async = 8'h20; exp_en = 8'h20; settle = 2;
    repeat (300_000) @(negedge clk);
    // 600k cycles at 20 MHz / 1221: about 491 sample counter steps
    `CHECK_EQ(n_ticks >= 490 && n_ticks <= 492, 1'b1, "sample rate 16.38 kHz")
    // the mode change at its real timing: B+C for two seconds
    begin
      int held = 0;
      buttons_async = 8'hc0; exp_en = 8'hc0; settle = 2;
      while (ni_mode != NI_STOPPED && held < 45_000_000) begin
        @(negedge clk); held++;
      end
      `CHECK_EQ(ni_mode, NI_STOPPED, "B+C hold stops the piano")
      // 40,000,000 cycles of hold plus two of input synchronization
      `CHECK_EQ(held >= 40_000_000 && held <= 40_000_004, 1'b1, "hold lasts two seconds")
      exp_en = 8'h00; settle = 2;
      repeat (5000) @(negedge clk);
      buttons_async = 8'h00;
      repeat (10) @(negedge clk);
      `CHECK_EQ(ni_mode, NI_SONG, "song mode after release")
    end
    `CHECK_EQ(n_pass > 1000, 1'b1, "passes checked")
    $display("passes=%0d counter steps=%0d", n_pass, n_ticks);
    `TB_FINISH
  end
endmodule
