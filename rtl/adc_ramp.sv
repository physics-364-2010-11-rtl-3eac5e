// adc_ramp: controller of a single-slope ("Wilkinson") ramp-compare ADC.
//
// A step counter runs modulo 2^BITS + EXTRA_TICKS (68 for the lab's 6-bit
// ADC; with a 68 kHz clock that is 1000 conversions per second). During
// steps 0 .. 2^BITS-1 the counter value is played on the DAC, so the DAC
// voltage ramps up one LSB per clock; in the remaining steps the DAC code is
// 0. An external comparator reports cmp = 1 while the held sample is at or
// above the DAC voltage, and every clock with cmp = 1 the current DAC code is
// stored. On a rising ramp the stored code is therefore the largest code not
// above the sample, floor(Vin / LSB). Then:
//   step 2^BITS     the stored code is copied into the output register adc,
//   step 2^BITS+1   conv_done is high for one clock (adc is already valid),
//   step 2^BITS+2   sample_hold is high for one clock to take a new sample
//                   before the next ramp starts.
// The schedule, widths and the two enabled registers follow the lab notes.
// Parameterising the width and the extra steps, and the synchronous
// active-high reset (step 0, registers 0), are this design's own.
//
// Timing: dac, conv_done and sample_hold are decoded combinationally from
// the step counter; cmp is sampled on the rising clock edge that ends the
// step in which the DAC showed the code it is compared with. The analog
// path DAC -> comparator must settle within one clock.
module adc_ramp #(
  parameter int unsigned BITS        = 6,
  parameter int unsigned EXTRA_TICKS = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cmp,
  output logic [BITS-1:0] dac,
  output logic [BITS-1:0] adc,
  output logic            conv_done,
  output logic            sample_hold
);

  localparam int unsigned STEPS  = (1 << BITS) + EXTRA_TICKS;
  localparam int unsigned CW     = $clog2(STEPS);
  localparam logic [CW-1:0] LAST     = CW'(STEPS - 1);
  localparam logic [CW-1:0] S_LOAD   = CW'(1 << BITS);
  localparam logic [CW-1:0] S_DONE   = CW'((1 << BITS) + 1);
  localparam logic [CW-1:0] S_SAMPLE = CW'((1 << BITS) + 2);

  // Load, done and sample steps all have to fit after the ramp.
  if (EXTRA_TICKS < 3) begin : g_bad_ticks
    $error("adc_ramp: EXTRA_TICKS must be at least 3");
  end

  logic [CW-1:0]   step;
  logic [CW-1:0]   step_next;
  logic            ramping;
  logic [BITS-1:0] newadc;

  assign step_next = (step == LAST) ? '0 : step + 1'b1;

  dffe_nbit #(.N(CW)) step_ff (
    .clk(clk), .rst(rst), .ena(1'b1), .d(step_next), .q(step)
  );

  assign ramping = (step < S_LOAD);
  assign dac     = ramping ? step[BITS-1:0] : '0;

  // Largest DAC code seen so far with the sample at or above it.
  dffe_nbit #(.N(BITS)) newadc_ff (
    .clk(clk), .rst(rst), .ena(cmp), .d(dac), .q(newadc)
  );

  // Output register, updated once per conversion at the end of the ramp.
  dffe_nbit #(.N(BITS)) adc_ff (
    .clk(clk), .rst(rst), .ena(step == S_LOAD), .d(newadc), .q(adc)
  );

  assign conv_done   = (step == S_DONE);
  assign sample_hold = (step == S_SAMPLE);

  // The two strobes never overlap and never fall inside the ramp.
  a_strobes : assert property (@(posedge clk) disable iff (rst)
                               !(conv_done && sample_hold) && !(ramping && (conv_done || sample_hold)));

endmodule
