// triangle_counter: (DAC_BITS+1)-bit free-running counter folded into a
// triangle wave for a DAC_BITS-bit DAC.
//
// While the counter's top bit is 0 its lower bits go to the DAC unchanged
// (0 up to 2^DAC_BITS-1); while it is 1 they are mirrored, 2^DAC_BITS-1
// minus the value, so the code comes back down. For the lab's 6-bit DAC
// this is a 7-bit counter and a triangle of period 128 clocks that holds
// each of its end codes (0 and 63) for two clocks. The folding follows the
// lab notes; the reset is this design's addition.
//
// Timing: dac is combinational from the counter register.
module triangle_counter
  import wave_pkg::*;
#(
  parameter int unsigned DAC_BITS = 6
) (
  input  logic                clk,
  input  logic                rst,
  output logic [DAC_BITS-1:0] dac
);

  logic [DAC_BITS:0] count;

  dffe_nbit #(.N(DAC_BITS+1)) count_ff (
    .clk(clk), .rst(rst), .ena(1'b1), .d(count + 1'b1), .q(count)
  );

  assign dac = DAC_BITS'(tri_fold(32'(count), DAC_BITS));

endmodule
