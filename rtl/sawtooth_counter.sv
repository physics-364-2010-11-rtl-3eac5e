// sawtooth_counter: DAC_BITS-bit free-running counter whose value is played
// on a DAC, which makes a sawtooth of period 2^DAC_BITS clocks (64 for the
// 6-bit DAC of the lab).
//
// The code rises by one each clock from 0 to 2^DAC_BITS-1 and then wraps to
// 0. The counter itself is what the lab notes describe; the synchronous,
// active-high reset to 0 is this design's addition.
//
// Timing: dac is a register output; it changes one clock after each edge.
module sawtooth_counter #(
  parameter int unsigned DAC_BITS = 6
) (
  input  logic                clk,
  input  logic                rst,
  output logic [DAC_BITS-1:0] dac
);

  logic [DAC_BITS-1:0] count;

  dffe_nbit #(.N(DAC_BITS)) count_ff (
    .clk(clk), .rst(rst), .ena(1'b1), .d(count + 1'b1), .q(count)
  );

  assign dac = count;

endmodule
