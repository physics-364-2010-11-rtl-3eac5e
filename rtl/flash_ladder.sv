// flash_ladder: behavioural model (not synthesizable) of the reference
// string and comparator bank of a flash ADC.
//
// A resistor string from VREF to ground, made of 0.5R at each end and
// 2^BITS-2 resistors R in between, gives 2^BITS-1 taps at
//   V(k) = (k - 0.5) / (2^BITS - 1) * VREF,   k = 1 .. 2^BITS-1,
// that is, thresholds half an LSB above each code's nominal voltage, with
// LSB = VREF / (2^BITS - 1) (1.43 V for the 3-bit, 10 V example). Tap k
// feeds the + input of comparator k and vin its - input, so cmp_n[k-1] goes
// low once vin rises above V(k). The resistor values and the 10 V reference
// of the 3-bit example are the notes'; extending the same string shape to
// other BITS, and the ideal comparators, are this design's.
module flash_ladder #(
  parameter int unsigned BITS = 3,
  parameter real         VREF = 10.0
) (
  input  real                  vin,
  output logic [(1<<BITS)-2:0] cmp_n
);

  localparam int unsigned NCMP = (1 << BITS) - 1;

  always_comb begin
    for (int unsigned k = 1; k <= NCMP; k++) begin
      cmp_n[k-1] = !(vin > (real'(k) - 0.5) / real'(NCMP) * VREF);
    end
  end

endmodule
