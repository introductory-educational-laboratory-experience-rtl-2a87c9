// waveform_rom: one period of a sine wave, 256 samples of 8 bits.
//
// Entry k holds round(127 * sin(2*pi*k/256)) as a two's-complement number,
// so the table spans -127..127 and is symmetric about zero. The table is
// computed at elaboration time from that formula. The read is synchronous:
// data shows the entry for the address presented one clock edge earlier,
// matching the registered outputs of the other piano parts.
// Size, word width, one-period content and the reserved instrument-select
// input follow the design; the amplitude of 127 and the one-cycle read
// latency are this design's own. instr_sel is reserved for future
// waveforms and does not affect the output, as the design specifies.
//
// Interface: clk, addr[7:0], instr_sel[2:0] in; data[7:0] signed, led[15:0] out.
// Timing: one cycle from addr to data.
module waveform_rom
  import piano_pkg::*;
(
  input  logic        clk,
  input  rom_idx_t    addr,
  input  logic [2:0]  instr_sel,
  output sample_t     data,
  output logic [15:0] led
);
  localparam real PI = 3.14159265358979323846;

  typedef sample_t table_t [256];

  function automatic table_t sine_table();
    table_t t;
    for (int k = 0; k < 256; k++) begin
      t[k] = sample_t'($rtoi($floor(127.0 * $sin(2.0 * PI * real'(k) / 256.0) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t SINE = sine_table();

  logic unused_instr;
  assign unused_instr = ^instr_sel;  // reserved input, no function yet

  always_ff @(posedge clk) data <= SINE[addr];

  // A steady identification LED; the low LEDs show the sample being read.
  assign led[15]   = 1'b1;
  assign led[14:8] = '0;
  assign led[7:0]  = data;
endmodule
