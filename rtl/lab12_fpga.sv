// lab12_fpga: the synthesizable logic of the lab, as loaded into the FPGA
// board.
//
// It holds the three waveform generators (6-bit sawtooth counter, folded
// 7-bit triangle counter, phase-accumulator synthesizer) and the two ADC
// controllers (single-slope and successive-approximation). Each controller
// sends a DAC code out to its resistor ladder and takes back one comparator
// bit; it also drives the sample & hold switch and a conversion-done strobe.
// The module only groups these blocks; the split between FPGA and board
// components follows the lab's wiring sketch, the grouping into one module
// is this design's. All outputs are registered or decoded from registers;
// the comparator inputs are sampled on the rising clock edge.
module lab12_fpga #(
  parameter int unsigned BITS = 6
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [BITS-1:0] freq,
  output logic [BITS-1:0] saw_code,
  output logic [BITS-1:0] tri_code,
  output logic [BITS-1:0] synth_code,
  input  logic            ramp_cmp,
  output logic [BITS-1:0] ramp_dac,
  output logic [BITS-1:0] ramp_adc,
  output logic            ramp_conv_done,
  output logic            ramp_sample_hold,
  input  logic            sar_cmp,
  output logic [BITS-1:0] sar_dac,
  output logic [BITS-1:0] sar_adc,
  output logic            sar_conv_done,
  output logic            sar_sample_hold
);

  sawtooth_counter #(.DAC_BITS(BITS)) u_saw (.clk(clk), .rst(rst), .dac(saw_code));
  triangle_counter #(.DAC_BITS(BITS)) u_tri (.clk(clk), .rst(rst), .dac(tri_code));
  phase_acc_synth  #(.ACC_BITS(BITS + 4), .FREQ_BITS(BITS), .DAC_BITS(BITS))
    u_synth (.clk(clk), .rst(rst), .freq(freq), .dac(synth_code));

  adc_ramp #(.BITS(BITS)) u_ramp (
    .clk(clk), .rst(rst), .cmp(ramp_cmp), .dac(ramp_dac), .adc(ramp_adc),
    .conv_done(ramp_conv_done), .sample_hold(ramp_sample_hold)
  );

  adc_sar #(.BITS(BITS)) u_sar (
    .clk(clk), .rst(rst), .cmp(sar_cmp), .dac(sar_dac), .adc(sar_adc),
    .conv_done(sar_conv_done), .sample_hold(sar_sample_hold)
  );

endmodule
