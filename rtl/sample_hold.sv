// sample_hold: behavioural model (not synthesizable) of a sample & hold
// built from a FET analog switch (the lab uses a DG403) and a capacitor.
//
// While close is 1 the switch conducts and the capacitor voltage vout
// follows vin; when close returns to 0 the capacitor keeps the last value.
// The model is ideal: no droop, no charge injection and no settling time.
// The switch-and-capacitor structure is the notes'; the ideal behaviour is
// this design's. The held value is written as a level-sensitive latch on
// purpose: that is what a track-and-hold is.
// The hold capacitor starts at 0 V.
//
// Timing: vout follows vin with no delay while close is 1.
module sample_hold (
  input  logic close,
  input  real  vin,
  output real  vout
);

  real held;

  always_latch begin
    if (close) held = vin;
  end

  assign vout = held;

endmodule
