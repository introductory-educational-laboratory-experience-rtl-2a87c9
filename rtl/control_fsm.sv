// control_fsm: the piano's control finite state machine (Mealy).
//
// It loops over the eight note indices. For each index it asks the note
// interpreter whether the note is enabled; if so it starts the multiplier,
// waits for its ready signal, and has the superposition processor add the
// waveform sample. After the last note the finished sum goes to the D/A
// register and the sum is restarted.
//
// The block has three generic inputs and four generic outputs, as a
// preprogrammed part would; in this design they are used as:
//   in1  note enabled            (note interpreter)
//   in2  multiplier ready        (frequency indexing counter)
//   in3  index counter is zero   (start of a new pass)
//   out1 count enable of the note index counter
//   out2 multiplier start
//   out3 superposition load
//   out4 superposition clear and D/A load (end of a pass)
// States and arcs ("conditions | outputs before the arc is taken"):
//   INDEX : -            | out4 = in3        -> CHECK
//   CHECK : in1 & in2    | out2              -> MULT
//           in1 & !in2   | -                 -> CHECK (multiplier busy)
//           !in1         | out1              -> INDEX
//   MULT  : in2          | -                 -> ADD
//           !in2         | -                 -> MULT
//   ADD   : -            | out3, out1        -> INDEX
// INDEX exists because the note interpreter's outputs are registered: they
// answer for a new index one cycle after the counter moves. ADD exists
// because the waveform ROM read is registered too.
// The 3-in/4-out Mealy form, the 4-bit current and next state outputs and
// the note loop follow the design; the state graph above, the signal
// assignment and the encoding are this design's own.
//
// Interface: in1..in3 in; out1..out4, state[3:0], next_state[3:0],
// led[15:0] out. Timing: outputs are combinational in state and inputs.
module control_fsm
  import piano_pkg::*;
#(
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in1,
  input  logic        in2,
  input  logic        in3,
  output logic        out1,
  output logic        out2,
  output logic        out3,
  output logic        out4,
  output logic [3:0]  state,
  output logic [3:0]  next_state,
  output logic [15:0] led
);
  ctl_state_t cur, nxt;
  logic       unexpected;

  always_ff @(posedge clk) begin
    if (rst) cur <= CS_INDEX;
    else     cur <= nxt;
  end

  always_comb begin
    nxt        = cur;
    out1       = 1'b0;
    out2       = 1'b0;
    out3       = 1'b0;
    out4       = 1'b0;
    unexpected = 1'b0;
    unique case (cur)
      CS_INDEX: begin
        out4 = in3;
        nxt  = CS_CHECK;
      end
      CS_CHECK: begin
        if (in1 && in2) begin
          out2 = 1'b1;
          nxt  = CS_MULT;
        end else if (in1) begin
          unexpected = 1'b1;
        end else begin
          out1 = 1'b1;
          nxt  = CS_INDEX;
        end
      end
      CS_MULT: begin
        if (in2) nxt = CS_ADD;
      end
      CS_ADD: begin
        out3 = 1'b1;
        out1 = 1'b1;
        nxt  = CS_INDEX;
      end
      default: begin
        unexpected = 1'b1;
        nxt        = CS_INDEX;
      end
    endcase
  end

  assign state      = cur;
  assign next_state = nxt;

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_CTL_FSM), .led(led[15])
  );
  assign led[14]    = unexpected;
  assign led[13:8]  = '0;
  assign led[7:4]   = next_state;
  assign led[3:0]   = state;

  // A start is only ever issued while the multiplier is idle.
  always_ff @(posedge clk) begin
    if (!rst) assert (!out2 || in2) else $error("control_fsm: start while busy");
  end
endmodule
