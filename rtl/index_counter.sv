// index_counter: the 3-bit note index counter of the note interpreter module.
//
// The control FSM steps this counter through note indices 0..7; the count
// drives the note interpreter's index input. The counter advances by one on
// a clock edge where cnt_en is high and wraps from 7 to 0. The zero flag is
// high whenever the count is 0, which marks the start of a new pass over
// the notes (the design calls it the overflow output).
// Count enable, wrap and zero detection follow the design; the synchronous
// reset to 0 is this design's own.
//
// Interface: clk, rst, cnt_en in; count[2:0], zero out.
// Timing: count is a register; zero is decoded from it in the same cycle.
module index_counter
  import piano_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      cnt_en,
  output note_idx_t count,
  output logic      zero
);
  always_ff @(posedge clk) begin
    if (rst)         count <= '0;
    else if (cnt_en) count <= count + 3'd1;
  end

  assign zero = (count == 3'd0);
endmodule
