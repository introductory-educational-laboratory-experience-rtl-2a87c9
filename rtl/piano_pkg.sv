// piano_pkg: types and constants shared by the digital piano modules.
//
// Number formats used across the datapath:
//   freq_t    13-bit unsigned note frequency in Hertz, 11 integer bits and
//             2 fractional bits (bbbbbbbbbbb.bb), as the design specifies.
//   count_t   16-bit free-running sample count, advancing at about 16384 Hz.
//   rom_idx_t 8-bit index into the 256-entry one-period sine table.
//   sample_t  8-bit two's-complement waveform sample.
//   volume_t  2-bit gain (a left shift of 0..2) applied to each note by the
//             superposition processor; the encoding is this design's own.
// The eight white-key frequencies are 440 * 2^(n/12) Hz for n = -9, -7, -5,
// -4, -2, 0, 2, 3 (C D E F G A B C), rounded to the nearest quarter Hertz.
package piano_pkg;

  localparam int unsigned FREQ_W    = 13;
  localparam int unsigned COUNT_W   = 16;
  localparam int unsigned IDX_W     = 8;
  localparam int unsigned SAMPLE_W  = 8;
  localparam int unsigned SUM_W     = 11;

  typedef logic [2:0]                 note_idx_t;
  typedef logic [FREQ_W-1:0]          freq_t;
  typedef logic [COUNT_W-1:0]         count_t;
  typedef logic [IDX_W-1:0]           rom_idx_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [1:0]                 volume_t;

  // Frequencies in 11.2 fixed point (Hz * 4, rounded).
  localparam freq_t FREQ_C4 = 13'd1047;  // 261.63 Hz
  localparam freq_t FREQ_D4 = 13'd1175;  // 293.66 Hz
  localparam freq_t FREQ_E4 = 13'd1319;  // 329.63 Hz
  localparam freq_t FREQ_F4 = 13'd1397;  // 349.23 Hz
  localparam freq_t FREQ_G4 = 13'd1568;  // 392.00 Hz
  localparam freq_t FREQ_A4 = 13'd1760;  // 440.00 Hz
  localparam freq_t FREQ_B4 = 13'd1976;  // 493.88 Hz
  localparam freq_t FREQ_C5 = 13'd2093;  // 523.25 Hz
  localparam freq_t FREQ_BEAT_HI = 13'd1764;  // 441.00 Hz, beat test partner of A

  // Frequency of white key k, k = 0 (leftmost C) .. 7 (rightmost C).
  function automatic freq_t key_freq(input note_idx_t k);
    unique case (k)
      3'd0: key_freq = FREQ_C4;
      3'd1: key_freq = FREQ_D4;
      3'd2: key_freq = FREQ_E4;
      3'd3: key_freq = FREQ_F4;
      3'd4: key_freq = FREQ_G4;
      3'd5: key_freq = FREQ_A4;
      3'd6: key_freq = FREQ_B4;
      default: key_freq = FREQ_C5;
    endcase
  endfunction

  // Module identification numbers: how many times LED 15 of each module
  // flashes before it pauses.
  localparam logic [3:0] ID_NOTE_INTERP = 4'd1;
  localparam logic [3:0] ID_CTL_FSM     = 4'd2;
  localparam logic [3:0] ID_SUPERPOS    = 4'd3;
  localparam logic [3:0] ID_BUTTONS     = 4'd4;
  localparam logic [3:0] ID_FREQ_B      = 4'd5;
  localparam logic [3:0] ID_DA          = 4'd6;
  localparam logic [3:0] ID_MULTEST     = 4'd7;
  localparam logic [3:0] ID_FREQ_A      = 4'd8;

  // Control FSM states; the 4-bit code is shown on the FSM's state outputs.
  typedef enum logic [3:0] {
    CS_INDEX = 4'd0,   // wait for the note interpreter to answer a new index
    CS_CHECK = 4'd1,   // play the note or skip it
    CS_MULT  = 4'd2,   // multiplier running
    CS_ADD   = 4'd3    // add the waveform sample, next index
  } ctl_state_t;

  // Note interpreter operating modes.
  typedef enum logic [1:0] {
    NI_PIANO   = 2'd0,   // the eight buttons are the keys C D E F G A B C
    NI_STOPPED = 2'd1,   // B+C held long enough: silent until all released
    NI_SONG    = 2'd2    // buttons select stored test patterns
  } ni_mode_t;

  // Default timing at the 20 MHz kit clock.
  localparam int unsigned CLK_HZ        = 20_000_000;
  localparam int unsigned DEF_SAMPLE_DIV   = 1221;          // 20 MHz / 1221 = 16.38 kHz
  localparam int unsigned DEF_HOLD_CYCLES  = 2 * CLK_HZ;    // "a couple of seconds"
  localparam int unsigned DEF_FLASH_CYCLES = CLK_HZ / 8;    // 125 ms per flash half-period

endpackage
