// tb_control_fsm: the control FSM run against a small model of the piano
// datapath. The model holds eight note enables, an index counter and a
// multiplier that is busy for a random number of cycles. The testbench
// checks that every enabled note of a pass gets exactly one start and one
// add, disabled notes none, that a dump happens once per pass, at index 0,
// and that the FSM waits out the multiplier. It also checks the arc table
// directly with random inputs in every state.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_control_fsm;
  import piano_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic in1, in2, in3, out1, out2, out3, out4;
  logic [3:0] state, next_state;
  logic [15:0] led;

  control_fsm #(.FLASH_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(100000)

  // datapath model
  logic [7:0] notes;
  int idx, idx_q, busy, adds_this_pass, starts_this_pass, passes, waits;
  int started [8];
  int added [8];

  assign in3 = (idx == 0);
  always @(posedge clk) idx_q <= idx;     // registered note interpreter
  assign in1 = notes[idx_q];
  assign in2 = (busy == 0);

  initial begin
    notes = 8'b1010_0110;
    idx = 0; busy = 0; passes = 0; waits = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 8; k++) begin started[k] = 0; added[k] = 0; end
    repeat (4000) begin
      logic o1, o2, o3, o4;
      // sample the Mealy outputs mid-cycle, update the model after the edge
      @(negedge clk);
      {o1, o2, o3, o4} = {out1, out2, out3, out4};
      if (o2) `CHECK_EQ(idx, idx_q, "start for the polled note")
      if (o3) `CHECK_EQ(busy, 0, "add only after the multiplier is ready")
      if (state == 4'(CS_MULT) && !in2) waits++;
      @(posedge clk); #1;
      if (o2) begin started[idx]++; busy = $urandom_range(0, 13); end
      else if (busy > 0) busy--;
      if (o3) added[idx]++;
      if (o4) begin
        `CHECK_EQ(idx, 0, "dump at index 0")
        if (passes > 0)
          for (int k = 0; k < 8; k++) begin
            `CHECK_EQ(started[k], int'(notes[k]), "one start per enabled note")
            `CHECK_EQ(added[k], int'(notes[k]), "one add per enabled note")
          end
        for (int k = 0; k < 8; k++) begin started[k] = 0; added[k] = 0; end
        passes++;
        if (passes % 5 == 0) notes = 8'($urandom);
      end
      if (o1) idx = (idx + 1) % 8;
    end
    `CHECK_EQ(passes > 20, 1'b1, "passes completed")
    `CHECK_EQ(waits > 20, 1'b1, "waited on the multiplier")
    `TB_FINISH
  end
endmodule
