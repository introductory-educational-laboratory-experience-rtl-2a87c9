// tb_digital_piano: end-to-end run of the whole piano.
//
// The testbench presses key combinations and checks every finished pass on
// the D/A bus against its own computation: for each enabled note, in index
// order, the sample counter value the multiplier took at its start gives
// the table index bits 15:8 of f * count, the sine sample is scaled by the
// gain for the number of notes, and the D/A receives the top 8 of the 11-bit
// sum in offset binary. Frequencies come from the testbench's own
// 440 * 2^(n/12) table, not from the design. It then takes the note
// interpreter through its mode change (B+C hold, song mode, beat test,
// return to piano) and hands the multiplier to the testing module to see
// the marquee message. Each mechanism is counted and must occur.
//
// Parameters: MAIN_DIV sets the sample prescaler; with FULL = 1 every
// parameter of the design is left at its default and only one scene (a
// chord, then the rollover-free checks) is run.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_digital_piano;
  import piano_pkg::*;
  `TB_COUNTERS
  localparam int DIV = 3, HOLD = 300;

  logic clk = 0, rst = 1;
  logic [7:0] buttons_async = 0;
  logic mult_test = 0;
  logic [7:0] dac_bus;
  logic [31:0] test_display;
  logic [3:0] fsm_state;
  ni_mode_t ni_mode;
  count_t sample_count;
  logic [8:0][15:0] leds;

  digital_piano #(.SAMPLE_DIV(DIV), .HOLD_CYCLES(HOLD), .FLASH_CYCLES(16),
                  .TEST_STEP(10)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(3_000_000)

  // ---- independent reference -------------------------------------------
  function automatic int sine(int k);
    real x = 127.0 * $sin(6.283185307179586 * k / 256.0);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction
  function automatic int key_q(int k);
    int n [8] = '{-9, -7, -5, -4, -2, 0, 2, 3};
    return int'($floor(440.0 * (2.0 ** (real'(n[k]) / 12.0)) * 4.0 + 0.5));
  endfunction

  // what the testbench believes is sounding
  logic [7:0] exp_en = 0;
  int exp_freq [8];
  bit song = 0;
  int settle = 0;          // passes to skip after a change

  // mechanism counters
  int n_pass_checked = 0, n_chord = 0, n_single = 0, n_wide = 0;
  int n_mult_wait = 0, n_skip_note = 0, n_rollover = 0;
  int n_stop = 0, n_song = 0, n_beat = 0, n_back = 0, n_marquee = 0;

  // per-pass capture: counter value at each multiplier start
  int starts [$];
  count_t prev_count;
  // Sample mid-cycle, where the Mealy outputs are settled: a load seen now
  // takes the counter value seen now at the next rising edge, and a dump
  // seen now puts the finished sum on the D/A bus at that edge.
  logic check_now = 0;
  always @(posedge clk) begin
    if (!rst && !mult_test) begin
            if (fsm_state == 4'(CS_MULT) && !dut.mul_ready) n_mult_wait++;
      if (fsm_state == 4'(CS_CHECK) && !dut.note_en) n_skip_note++;
    end
    if (sample_count < prev_count) n_rollover++;
    prev_count <= sample_count;
  end

  // check the D/A value one cycle after each end-of-pass dump
  always @(negedge clk) begin
    
    if (check_now && !mult_test) begin
      automatic int sum = 0, j = 0, nn = $countones(exp_en);
      automatic int gain = (nn <= 2) ? 4 : (nn <= 4) ? 2 : 1;
      automatic int ok_len = (starts.size() == nn);
      if (settle > 0) settle--;
      else begin
        `CHECK_EQ(ok_len, 1, "one multiply per enabled note")
        if (ok_len) begin
          for (int k = 0; k < 8; k++) if (exp_en[k]) begin
            sum += gain * sine(((exp_freq[k] * starts[j]) % 65536) / 256);
            j++;
          end
          sum = (sum >= 0) ? sum / 8 : -((-sum + 7) / 8);
          `CHECK_EQ(int'(dac_bus), sum + 128, "D/A level of a pass")
          n_pass_checked++;
          if (nn == 1) n_single++;
          if (nn >= 2 && nn <= 4) n_chord++;
          if (nn > 4) n_wide++;
          if (song && nn == 2) n_beat++;
        end
      end
      starts.delete();
    end
    if (!rst && !mult_test && dut.u_mul.load) starts.push_back(int'(sample_count));
    check_now = !rst && dut.dump;
  end

  task automatic play(input logic [7:0] keys, input int cycles);
    @(negedge clk);
    buttons_async = keys;
    exp_en = keys;
    for (int k = 0; k < 8; k++) exp_freq[k] = key_q(k);
    settle = 2;
    repeat (cycles) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    play(8'h00, 500);
    play(8'h20, 3000);            // A
    play(8'h01, 3000);            // low C
    play(8'h15, 3000);            // C E G
    play(8'h3c, 3000);            // F G A B-flat-free four
    play(8'h7f, 3000);            // seven notes
    repeat (6) play(8'($urandom) & 8'h7f, 2000);
    // run across a sample counter rollover with a chord held
    play(8'h24, 200_000);
    // B+C held: the piano stops
    @(negedge clk); buttons_async = 8'hc0;
    exp_en = 8'hc0; settle = 2;
    wait (ni_mode == NI_STOPPED); n_stop++;
    @(negedge clk); exp_en = 8'h00; settle = 2;
    repeat (2000) @(negedge clk);
    buttons_async = 8'h00;
    wait (ni_mode == NI_SONG); n_song++;
    repeat (2000) @(negedge clk);
    // leftmost button: 440 Hz and 441 Hz
    buttons_async = 8'h01; repeat (10) @(negedge clk); buttons_async = 8'h00;
    song = 1; exp_en = 8'h03; exp_freq[0] = 1760; exp_freq[1] = 1764; settle = 2;
    repeat (20000) @(negedge clk);
    // rightmost button: back to piano, high C sounds while held
    song = 0;
    play(8'h80, 10);
    wait (ni_mode == NI_PIANO); n_back++;
    repeat (3000) @(negedge clk);
    play(8'h00, 500);
    // testing module drives the multiplier: the characters it shows must
    // run through the message in order (it starts wherever it was)
    begin
      string msg = "6.004 PIANO ";
      string ring, seen;
      logic [31:0] prev;
      mult_test = 1;
      prev = test_display;
      seen = "";
      while (n_marquee < 14) begin
        @(negedge clk);
        if (test_display != prev) begin
          seen = {seen, string'(test_display[7:0])};
          prev = test_display;
          n_marquee++;
        end
      end
      mult_test = 0;
      ring = {msg, msg, msg};
      begin
        bit found = 0;
        for (int o = 0; o < 12; o++) if (ring.substr(o, o + 13) == seen) found = 1;
        `CHECK_EQ(found, 1'b1, "marquee scrolls the message")
      end
    end
    settle = 3;
    play(8'h20, 3000);
    // every mechanism must have happened
    `CHECK_EQ(n_pass_checked > 50, 1'b1, "passes checked")
    `CHECK_EQ(n_single > 0, 1'b1, "single note")
    `CHECK_EQ(n_chord > 0, 1'b1, "chord, gain 2 or 4")
    `CHECK_EQ(n_wide > 0, 1'b1, "wide chord, gain 1")
    `CHECK_EQ(n_mult_wait > 0, 1'b1, "FSM waited on multiplier")
    `CHECK_EQ(n_skip_note > 0, 1'b1, "disabled note skipped")
    `CHECK_EQ(n_rollover > 0, 1'b1, "sample counter rollover")
    `CHECK_EQ(n_stop, 1, "B+C hold stopped the piano")
    `CHECK_EQ(n_song, 1, "song mode entered")
    `CHECK_EQ(n_beat > 0, 1'b1, "beat test played")
    `CHECK_EQ(n_back, 1, "returned to piano mode")
    `CHECK_EQ(n_marquee, 14, "testing module marquee")
    $display("passes=%0d single=%0d chord=%0d wide=%0d waits=%0d skips=%0d rollovers=%0d beat=%0d",
             n_pass_checked, n_single, n_chord, n_wide, n_mult_wait, n_skip_note, n_rollover, n_beat);
    `TB_FINISH
  end
endmodule
