// multest: test source and display for the frequency indexing multiplier.
//
// The testing module feeds the multiplier a sequence of operand pairs and
// shows each result on an alphanumeric display. The pairs are chosen so
// that the results spell a message: the 13-bit operand is 4 (1.00 in 11.2
// fixed point) and the 16-bit operand is a character code times 64, so the
// top byte of the 16-bit product is the character itself. Each result is
// shifted into a DISP_CHARS-wide marquee register, so a working multiplier
// makes the message "6.004 PIANO " scroll across the display and a broken
// one shows garbage.
// Sequence: wait STEP_CYCLES, raise start for one cycle while ready is
// high, wait for ready, shift the result into the marquee, next character.
// The start/ready/operand outputs, the result input and the scrolling test
// pattern follow the design; the message, the operand choice and the
// display width are this design's own.
//
// Interface: ready, result[7:0] in; start, op16[15:0], op13[12:0],
// display[8*DISP_CHARS-1:0], led[15:0] out. Timing: all outputs registered.
module multest
  import piano_pkg::*;
#(
  parameter int unsigned STEP_CYCLES  = CLK_HZ / 4,
  parameter int unsigned DISP_CHARS   = 4,
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      ready,
  input  rom_idx_t                  result,
  output logic                      start,
  output count_t                    op16,
  output freq_t                     op13,
  output logic [8*DISP_CHARS-1:0]   display,
  output logic [15:0]               led
);
  localparam int unsigned MSG_LEN = 12;
  localparam logic [8*MSG_LEN-1:0] MSG = "6.004 PIANO ";
  localparam int unsigned STEP_W = $clog2(STEP_CYCLES + 1);

  typedef enum logic [1:0] {MT_GAP, MT_START, MT_ISSUED, MT_WAIT} mt_state_t;

  mt_state_t         st;
  logic [STEP_W-1:0] gap;
  logic [3:0]        pos;
  logic [7:0]        ch;

  assign ch   = MSG[8*(MSG_LEN-1-int'(pos)) +: 8];
  assign op13 = 13'd4;

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= MT_GAP;
      gap     <= '0;
      pos     <= '0;
      start   <= 1'b0;
      op16    <= '0;
      display <= {DISP_CHARS{8'h20}};
    end else begin
      start <= 1'b0;
      unique case (st)
        MT_GAP: begin
          op16 <= {2'b00, ch, 6'b00_0000};
          if (gap == STEP_W'(STEP_CYCLES - 1)) begin
            gap <= '0;
            st  <= MT_START;
          end else begin
            gap <= gap + 1'b1;
          end
        end
        MT_START: if (ready) begin
          start <= 1'b1;
          st    <= MT_ISSUED;
        end
        MT_ISSUED: st <= MT_WAIT;    // the multiplier loads on this edge
        MT_WAIT: if (ready) begin
          display <= {display[8*DISP_CHARS-9:0], result};
          pos     <= (pos == 4'(MSG_LEN - 1)) ? 4'd0 : pos + 4'd1;
          st      <= MT_GAP;
        end
        default: st <= MT_GAP;
      endcase
    end
  end

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_MULTEST), .led(led[15])
  );
  assign led[14]   = start;
  assign led[13]   = ready;
  assign led[12:8] = '0;
  assign led[7:0]  = result;
endmodule
