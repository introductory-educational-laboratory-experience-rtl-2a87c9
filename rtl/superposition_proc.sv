// superposition_proc: adds the samples of all notes sounding in one pass.
//
// An 11-bit signed accumulator collects one waveform sample per played note.
// Each sample is first scaled by the note interpreter's volume control, a
// left shift by 0, 1 or 2 places (a volume of 3 is treated as 2). The output
// is the top 8 of the 11 accumulator bits, which keeps a sum of up to eight
// full-scale samples inside the 8-bit range of the D/A converter.
// clear = 1 restarts the sum: with load also high the new sum is the scaled
// input, otherwise zero. The register presented at dout is the one being
// cleared, so a D/A register loaded in the same cycle captures the finished
// sum.
// Load/clear inputs, the volume input and the top-8-of-11 range scaling
// follow the design. The meaning and width of the volume control and the
// clear-with-load rule are this design's own.
//
// Interface: din[7:0] signed, load, clear, volume[1:0] in; dout[7:0] signed,
// led[15:0] out. Timing: dout is taken from the accumulator register.
module superposition_proc
  import piano_pkg::*;
#(
  parameter int unsigned FLASH_CYCLES = piano_pkg::DEF_FLASH_CYCLES
) (
  input  logic        clk,
  input  logic        rst,
  input  sample_t     din,
  input  logic        load,
  input  logic        clear,
  input  volume_t     volume,
  output sample_t     dout,
  output logic [15:0] led
);
  typedef logic signed [SUM_W-1:0] sum_t;

  sum_t acc_q;
  sum_t scaled;

  always_comb begin
    unique case (volume)
      2'd0:    scaled = sum_t'(din);
      2'd1:    scaled = sum_t'(din) <<< 1;
      default: scaled = sum_t'(din) <<< 2;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)        acc_q <= '0;
    else if (clear) acc_q <= load ? scaled : '0;
    else if (load)  acc_q <= acc_q + scaled;
  end

  assign dout = acc_q[SUM_W-1 -: SAMPLE_W];

  module_flasher #(.FLASH_CYCLES(FLASH_CYCLES)) u_id (
    .clk, .rst, .id(ID_SUPERPOS), .led(led[15])
  );
  assign led[14]   = load;
  assign led[13]   = clear;
  assign led[12:8] = '0;
  assign led[7:0]  = dout;
endmodule
