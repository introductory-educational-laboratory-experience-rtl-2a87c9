// note_interpreter: decides which notes sound and at what frequency.
//
// For a note index 0..7 it answers whether that note should be played
// (enable), its frequency in 11.2 fixed-point Hertz (freq) and a volume
// control for the superposition processor. In piano mode index k is the
// k-th white key, C D E F G A B C from left to right, and is enabled while
// that button is held. Holding the two rightmost buttons (B and C) for
// HOLD_CYCLES stops the piano; once every button is released the buttons
// select stored patterns instead, and the rightmost button returns to piano
// mode. The one stored pattern is the beat test: 440 Hz and 441 Hz
// together (indices 0 and 1), heard as a 1 Hz swell. The other six pattern
// buttons select silence.
// The volume control is a gain chosen from the number of enabled notes:
// shift by 2 for up to two notes, by 1 for up to four, by 0 beyond. With
// the superposition processor's top-8-of-11 output this keeps one note at
// half of full scale and never lets the sum overflow.
// Index/enable/frequency/volume outputs, the white-key frequencies, the
// B+C hold to change mode, the rightmost-button return and the 440/441 Hz
// test follow the design. The volume rule, the hold time of two seconds,
// the choice of the leftmost button for the beat test and the silence of
// the other pattern buttons are this design's own.
//
// Interface: buttons[7:0] (bit 0 leftmost), index[2:0] in; enable,
// freq[12:0], volume[1:0], mode, led[15:0] out.
// Timing: enable, freq and volume are registered: they answer the index
// presented one clock edge earlier.
module note_interpreter
  import piano_pkg::*;
#(
  parameter int unsigned HOLD_CYCLES  = piano_pkg::DEF_HOLD_CYCLES,
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  buttons,
  input  note_idx_t   index,
  output logic        enable,
  output freq_t       freq,
  output volume_t     volume,
  output ni_mode_t    mode,
  output logic [15:0] led
);
  localparam int unsigned HOLD_W = $clog2(HOLD_CYCLES + 1);

  logic [HOLD_W-1:0] hold_cnt;
  logic              bc_held;
  logic [2:0]        pattern;
  logic [7:0]        note_en;
  logic [3:0]        n_notes;

  assign bc_held = buttons[7] && buttons[6];

  // Mode control.
  always_ff @(posedge clk) begin
    if (rst) begin
      mode     <= NI_PIANO;
      hold_cnt <= '0;
      pattern  <= 3'd7;
    end else begin
      unique case (mode)
        NI_PIANO: begin
          if (!bc_held) begin
            hold_cnt <= '0;
          end else if (hold_cnt == HOLD_W'(HOLD_CYCLES - 1)) begin
            hold_cnt <= '0;
            mode     <= NI_STOPPED;
          end else begin
            hold_cnt <= hold_cnt + 1'b1;
          end
        end
        NI_STOPPED: begin
          pattern <= 3'd7;
          if (buttons == '0) mode <= NI_SONG;
        end
        NI_SONG: begin
          if (buttons[7]) begin
            mode <= NI_PIANO;
          end else begin
            for (int b = 6; b >= 0; b--) begin
              if (buttons[b]) pattern <= 3'(b);
            end
          end
        end
        default: mode <= NI_PIANO;
      endcase
    end
  end

  // The set of notes sounding now.
  always_comb begin
    unique case (mode)
      NI_PIANO: note_en = buttons;
      NI_SONG:  note_en = (pattern == 3'd0) ? 8'b0000_0011 : 8'b0000_0000;
      default:  note_en = '0;
    endcase
  end

  always_comb begin
    n_notes = '0;
    for (int k = 0; k < 8; k++) n_notes += 4'(note_en[k]);
  end

  // Registered answer for the index being polled.
  always_ff @(posedge clk) begin
    if (rst) begin
      enable <= 1'b0;
      freq   <= '0;
      volume <= '0;
    end else begin
      enable <= note_en[index];
      if (mode == NI_SONG) freq <= (index == 3'd0) ? FREQ_A4 : FREQ_BEAT_HI;
      else                 freq <= key_freq(index);
      volume <= (n_notes <= 4'd2) ? 2'd2 : (n_notes <= 4'd4) ? 2'd1 : 2'd0;
    end
  end

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_NOTE_INTERP), .led(led[15])
  );
  assign led[14:10] = '0;
  assign led[9:8]   = mode;
  assign led[7:0]   = note_en;
endmodule
