// comparator: behavioural model (not synthesizable) of a voltage comparator
// with an open-collector output pulled up to the 3.3 V logic supply.
//
// out is 1 when the + input is at or above the - input and 0 otherwise. In
// the ADC loops the + input takes the held sample and the - input the DAC,
// so out = 1 means "sample >= DAC". Treating equality as 1 is this design's
// choice (a real comparator's offset decides it); it makes an input exactly
// on a code boundary read as that code. No offset, hysteresis or delay.
module comparator (
  input  real  vplus,
  input  real  vminus,
  output logic out
);

  always_comb out = (vplus >= vminus);

endmodule
