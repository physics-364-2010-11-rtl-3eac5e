// phase_acc_synth: direct digital synthesizer of a triangle wave.
//
// A phase accumulator of ACC_BITS bits adds the increment freq (set by DIP
// switches in the lab) on every clock. Its top DAC_BITS+1 bits form a phase
// that is folded into a triangle exactly as in triangle_counter, so the
// output period is 2^ACC_BITS / freq clocks: freq = 8 with the default
// 10-bit accumulator reproduces the 128-clock triangle of the plain 7-bit
// counter, and larger freq values raise the pitch. freq = 0 holds the
// output still. Widths (10-bit accumulator, 6-bit increment, 6-bit DAC) are
// the lab notes'; the reset to phase 0 is this design's addition.
//
// Timing: dac is combinational from the accumulator register.
module phase_acc_synth
  import wave_pkg::*;
#(
  parameter int unsigned ACC_BITS  = 10,
  parameter int unsigned FREQ_BITS = 6,
  parameter int unsigned DAC_BITS  = 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [FREQ_BITS-1:0] freq,
  output logic [DAC_BITS-1:0]  dac
);

  logic [ACC_BITS-1:0] accum;
  logic [ACC_BITS-1:0] accum_next;
  logic [DAC_BITS:0]   phase;

  // The phase taken from the accumulator must have room for the fold bit.
  if (ACC_BITS < DAC_BITS + 1) begin : g_bad_width
    $error("phase_acc_synth: ACC_BITS must be at least DAC_BITS+1");
  end

  assign accum_next = accum + ACC_BITS'(freq);

  dffe_nbit #(.N(ACC_BITS)) accum_ff (
    .clk(clk), .rst(rst), .ena(1'b1), .d(accum_next), .q(accum)
  );

  assign phase = accum[ACC_BITS-1 -: DAC_BITS+1];
  assign dac   = DAC_BITS'(tri_fold(32'(phase), DAC_BITS));

endmodule
