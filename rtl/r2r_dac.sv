// r2r_dac: behavioural model (not synthesizable) of the lab's 6-bit R-2R
// ladder DAC.
//
// The real part is a bank of BITS D flip-flops clocked by clk, whose outputs
// drive a ladder of 2K series and 1K shunt resistors (2K at the far end) and
// a unity-gain opamp follower. Seen from the follower each bit weighs half
// the bit above it, so the output is VHIGH * code / 2^BITS: 0 V for code 0,
// VHIGH - 1 LSB for all ones, with LSB = VHIGH / 2^BITS (about 51.6 mV for
// 3.3 V and 6 bits). Resistors, opamp and logic levels are ideal.
// The bit count, the ladder values and the 3.3 V logic high are the notes'.
// REGISTERED = 1 keeps the input flip-flops of the ladder schematic (vout
// follows d one clock later); REGISTERED = 0 drops them, as when the FPGA
// drives the ladder directly, and vout follows d at once. The switch is
// this design's; like the real flip-flops, the register starts undefined.
module r2r_dac #(
  parameter int unsigned BITS       = 6,
  parameter real         VHIGH      = 3.3,
  parameter bit          REGISTERED = 1'b1
) (
  input  logic            clk,
  input  logic [BITS-1:0] d,
  output real             vout
);

  logic [BITS-1:0] q;
  logic [BITS-1:0] code;

  always_ff @(posedge clk) q <= d;

  assign code = REGISTERED ? q : d;

  always_comb vout = VHIGH * real'(code) / real'(1 << BITS);

endmodule
