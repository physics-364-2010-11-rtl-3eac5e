// adc_sar: controller of a successive-approximation ADC.
//
// A step counter runs modulo BITS + EXTRA_TICKS (10 for the lab's 6-bit ADC;
// with a 68 kHz clock that is 6800 conversions per second). The DAC code is
// a register that carries out a binary search, one bit per clock, from the
// most significant bit down:
//   step k (0 .. BITS-1)  DAC bit BITS-1-k is set to 1 (a trial),
//   step k+1              that bit is replaced by cmp, the comparator's
//                         verdict on the trial (1 = sample at or above the
//                         DAC voltage, keep the bit), while the next bit is
//                         tried in the same clock,
//   step BITS+1           the finished code is copied to adc and the DAC
//                         register is cleared,
//   step BITS+2           conv_done is high for one clock,
//   step BITS+3           sample_hold is high for one clock.
// The result is the largest code whose DAC voltage is not above the sample,
// the same floor(Vin / LSB) as the ramp ADC, in BITS clocks instead of
// 2^BITS. The schedule follows the lab notes for 6 bits (trials on steps
// 0..5, decisions on 1..6, load/clear on 7, done on 8, sample on 9); the
// generalisation to BITS bits and the synchronous active-high reset are
// this design's own.
//
// Timing: dac and adc are register outputs; conv_done and sample_hold are
// decoded from the step counter. cmp must reflect the current dac output
// before the next rising edge.
module adc_sar #(
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

  localparam int unsigned STEPS  = BITS + EXTRA_TICKS;
  localparam int unsigned CW     = $clog2(STEPS);
  localparam logic [CW-1:0] LAST     = CW'(STEPS - 1);
  localparam logic [CW-1:0] S_LOAD   = CW'(BITS + 1);
  localparam logic [CW-1:0] S_DONE   = CW'(BITS + 2);
  localparam logic [CW-1:0] S_SAMPLE = CW'(BITS + 3);

  if (EXTRA_TICKS < 4) begin : g_bad_ticks
    $error("adc_sar: EXTRA_TICKS must be at least 4");
  end

  logic [CW-1:0]   step;
  logic [CW-1:0]   step_next;
  logic [BITS-1:0] dac_next;

  assign step_next = (step == LAST) ? '0 : step + 1'b1;

  dffe_nbit #(.N(CW)) step_ff (
    .clk(clk), .rst(rst), .ena(1'b1), .d(step_next), .q(step)
  );

  // Per bit: trial, then decision one step later, cleared at the load step.
  always_comb begin
    for (int unsigned i = 0; i < BITS; i++) begin
      if (step == S_LOAD)                       dac_next[i] = 1'b0;
      else if (32'(step) == BITS - 1 - i)       dac_next[i] = 1'b1;
      else if (32'(step) == BITS - i)           dac_next[i] = cmp;
      else                                      dac_next[i] = dac[i];
    end
  end

  dffe_nbit #(.N(BITS)) dac_ff (
    .clk(clk), .rst(rst), .ena(1'b1), .d(dac_next), .q(dac)
  );

  dffe_nbit #(.N(BITS)) adc_ff (
    .clk(clk), .rst(rst), .ena(step == S_LOAD), .d(dac), .q(adc)
  );

  assign conv_done   = (step == S_DONE);
  assign sample_hold = (step == S_SAMPLE);

  // After the load step the DAC register is idle at zero until the next trial.
  a_dac_idle : assert property (@(posedge clk) disable iff (rst)
                                (step > S_LOAD) |-> (dac == '0));

endmodule
