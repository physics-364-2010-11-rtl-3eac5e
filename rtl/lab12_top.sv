// lab12_top: the analog <-> digital conversion lab, all designs side by side.
//
// Four independent systems share only the clock and reset:
//
//  1. Waveform generators on 6-bit R-2R DACs: a 6-bit counter (sawtooth,
//     64-clock period), a 7-bit counter folded into a triangle (128-clock
//     period) and a phase-accumulator synthesizer whose increment freq sets
//     the triangle's frequency (period 1024/freq clocks).
//  2. A single-slope (Wilkinson) ADC: adc_ramp sweeps an R-2R DAC, a
//     comparator checks the held sample against it, and a sample & hold
//     takes a new sample after each conversion. One conversion every 68
//     clocks (1 kHz at the lab's 68 kHz clock).
//  3. A successive-approximation ADC with the same analog loop around
//     adc_sar: one conversion every 10 clocks (6.8 kHz at 68 kHz).
//     Both ADCs drive a second R-2R DAC that shows their output code.
//  4. A 3-bit flash ADC: a resistor string and comparator bank
//     (flash_ladder) feed a 74F148-style active-low priority encoder
//     (flash_encoder); the code is valid with no clock at all.
//
// Analog signals are real-valued ports; the DAC, sample & hold, comparator
// and flash ladder are behavioural models. The generators and ADC
// controllers are synthesizable and grouped in lab12_fpga, the part that
// goes into the FPGA; the flash encoder stands for a separate logic chip. In the ADC loops the DAC follows the controller's
// code within the same clock, as when the FPGA pins drive the resistor
// ladder directly, so the comparator result is ready at the next edge. The
// display DACs keep their input register. Which parts exist and how they
// connect follows the lab notes; placing the lab's successive exercises in
// one top, with a separate analog input per ADC, is this design's.
//
// Full-scale ranges: ramp and SAR ADC 0 .. 3.3 V in 64 steps of 51.6 mV
// (code = floor(vin * 64 / 3.3), clipped to 63); flash ADC 0 .. 10 V in
// 8 codes, 1.43 V apart, with thresholds half a step above each code.
module lab12_top #(
  parameter int unsigned BITS       = 6,
  parameter int unsigned FLASH_BITS = 3,
  parameter real         VHIGH      = 3.3,
  parameter real         FLASH_VREF = 10.0
) (
  input  logic                  clk,
  input  logic                  rst,
  // waveform generators
  input  logic [BITS-1:0]       freq,
  output logic [BITS-1:0]       saw_code,
  output logic [BITS-1:0]       tri_code,
  output logic [BITS-1:0]       synth_code,
  output real                   saw_vout,
  output real                   tri_vout,
  output real                   synth_vout,
  // single-slope ADC
  input  real                   ramp_vin,
  output logic [BITS-1:0]       ramp_adc,
  output logic                  ramp_conv_done,
  output logic                  ramp_sample_hold,
  output logic [BITS-1:0]       ramp_dac,
  output real                   ramp_disp_vout,
  // successive-approximation ADC
  input  real                   sar_vin,
  output logic [BITS-1:0]       sar_adc,
  output logic                  sar_conv_done,
  output logic                  sar_sample_hold,
  output logic [BITS-1:0]       sar_dac,
  output real                   sar_disp_vout,
  // flash ADC
  input  real                   flash_vin,
  output logic [FLASH_BITS-1:0] flash_code
);

  real  ramp_held, ramp_dac_v, sar_held, sar_dac_v;
  logic ramp_cmp, sar_cmp;

  // ------------------------------------------------------- FPGA logic
  lab12_fpga #(.BITS(BITS)) u_fpga (
    .clk(clk), .rst(rst), .freq(freq),
    .saw_code(saw_code), .tri_code(tri_code), .synth_code(synth_code),
    .ramp_cmp(ramp_cmp), .ramp_dac(ramp_dac), .ramp_adc(ramp_adc),
    .ramp_conv_done(ramp_conv_done), .ramp_sample_hold(ramp_sample_hold),
    .sar_cmp(sar_cmp), .sar_dac(sar_dac), .sar_adc(sar_adc),
    .sar_conv_done(sar_conv_done), .sar_sample_hold(sar_sample_hold)
  );

  // ---------------------------------------------- 1. generator DACs
  r2r_dac #(.BITS(BITS), .VHIGH(VHIGH)) u_saw_dac   (.clk(clk), .d(saw_code),   .vout(saw_vout));
  r2r_dac #(.BITS(BITS), .VHIGH(VHIGH)) u_tri_dac   (.clk(clk), .d(tri_code),   .vout(tri_vout));
  r2r_dac #(.BITS(BITS), .VHIGH(VHIGH)) u_synth_dac (.clk(clk), .d(synth_code), .vout(synth_vout));

  // ------------------------------------ 2. single-slope ADC analog loop
  sample_hold u_ramp_sh (.close(ramp_sample_hold), .vin(ramp_vin), .vout(ramp_held));
  r2r_dac #(.BITS(BITS), .VHIGH(VHIGH), .REGISTERED(1'b0))
    u_ramp_dac (.clk(clk), .d(ramp_dac), .vout(ramp_dac_v));
  comparator u_ramp_cmp (.vplus(ramp_held), .vminus(ramp_dac_v), .out(ramp_cmp));
  r2r_dac #(.BITS(BITS), .VHIGH(VHIGH)) u_ramp_disp (.clk(clk), .d(ramp_adc), .vout(ramp_disp_vout));

  // ------------------------- 3. successive-approximation ADC analog loop
  sample_hold u_sar_sh (.close(sar_sample_hold), .vin(sar_vin), .vout(sar_held));
  r2r_dac #(.BITS(BITS), .VHIGH(VHIGH), .REGISTERED(1'b0))
    u_sar_dac (.clk(clk), .d(sar_dac), .vout(sar_dac_v));
  comparator u_sar_cmp (.vplus(sar_held), .vminus(sar_dac_v), .out(sar_cmp));
  r2r_dac #(.BITS(BITS), .VHIGH(VHIGH)) u_sar_disp (.clk(clk), .d(sar_adc), .vout(sar_disp_vout));

  // ------------------------------------------------------------ 4. flash ADC
  logic [(1<<FLASH_BITS)-2:0] flash_cmp_n;
  logic [FLASH_BITS-1:0]      flash_code_n;

  flash_ladder #(.BITS(FLASH_BITS), .VREF(FLASH_VREF)) u_flash_ladder (.vin(flash_vin), .cmp_n(flash_cmp_n));
  // Input 0 of the encoder and its enable are tied low (asserted).
  flash_encoder #(.BITS(FLASH_BITS)) u_flash_enc (
    .in_n({flash_cmp_n, 1'b0}), .ei_n(1'b0), .code_n(flash_code_n)
  );
  assign flash_code = ~flash_code_n;

endmodule
