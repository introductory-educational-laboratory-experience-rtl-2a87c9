// tb_note_interpreter: piano-mode answers for every index, the volume rule,
// the B+C hold into song mode, the 440/441 Hz beat pattern and the return
// to piano mode with the rightmost button.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_note_interpreter;
  import piano_pkg::*;
  `TB_COUNTERS
  localparam int HOLD = 20;
  logic clk = 0, rst = 1;
  logic [7:0] buttons = 0;
  note_idx_t index = 0;
  logic enable;
  freq_t freq;
  volume_t volume;
  ni_mode_t mode;
  logic [15:0] led;

  note_interpreter #(.HOLD_CYCLES(HOLD), .FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(50000)

  // white keys: 440 * 2^(n/12) Hz, n = -9 -7 -5 -4 -2 0 2 3, in quarter Hz
  function automatic int key_q(int k);
    int n [8] = '{-9, -7, -5, -4, -2, 0, 2, 3};
    real hz = 440.0 * (2.0 ** (real'(n[k]) / 12.0));
    return int'($floor(hz * 4.0 + 0.5));
  endfunction

  function automatic int vol_of(logic [7:0] en);
    int n = $countones(en);
    return (n <= 2) ? 2 : (n <= 4) ? 1 : 0;
  endfunction

  task automatic poll_all(input logic [7:0] exp_en, input bit song);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); index = 3'(k);
      @(negedge clk);
      `CHECK_EQ(enable, exp_en[k], "note enable")
      if (song) `CHECK_EQ(int'(freq), (k == 0) ? 1760 : 1764, "beat frequency")
      else      `CHECK_EQ(int'(freq), key_q(k), "key frequency")
      `CHECK_EQ(int'(volume), vol_of(exp_en), "volume")
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // piano mode
    repeat (30) begin
      buttons = 8'($urandom) & 8'h7f;   // leave B+C alone here
      poll_all(buttons, 0);
      `CHECK_EQ(led[7:0], buttons, "note LEDs")
    end
    buttons = 8'hff; poll_all(8'hff, 0);
    buttons = 0; @(negedge clk);
    // short B+C press stays in piano mode
    buttons = 8'b1100_0000;
    repeat (HOLD / 2) @(negedge clk);
    buttons = 0; @(negedge clk);
    `CHECK_EQ(mode, NI_PIANO, "short hold keeps piano")
    // long B+C press stops the piano
    buttons = 8'b1100_0000;
    repeat (HOLD + 2) @(negedge clk);
    `CHECK_EQ(mode, NI_STOPPED, "long hold stops")
    poll_all(8'h00, 0);
    buttons = 0; @(negedge clk); @(negedge clk);
    `CHECK_EQ(mode, NI_SONG, "song mode after release")
    poll_all(8'h00, 1);
    // leftmost button: beat test
    buttons = 8'h01; @(negedge clk); @(negedge clk); buttons = 0;
    poll_all(8'h03, 1);
    // another pattern button: silence
    buttons = 8'h08; @(negedge clk); @(negedge clk); buttons = 0;
    poll_all(8'h00, 1);
    // rightmost button returns to piano mode
    buttons = 8'h80; @(negedge clk); @(negedge clk);
    `CHECK_EQ(mode, NI_PIANO, "back to piano")
    poll_all(8'h80, 0);
    `TB_FINISH
  end
endmodule
