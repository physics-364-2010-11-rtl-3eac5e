// flash_encoder: priority encoder that turns the comparator outputs of a
// flash ADC into a binary code.
//
// The 2^BITS inputs are active low, like the comparator outputs of a flash
// converter whose reference string feeds the comparators' + inputs: input k
// is low when Vin is above tap k, so the asserted inputs form a thermometer
// from 1 up to the code. Input 0 is tied low, standing for the bottom of the
// range, which needs no comparator. The output is the index of the highest
// asserted input, itself active low (code_n = ~code), as on the 74F148
// 8-line-to-3-line encoder the notes' 3-bit example uses. With ei_n high, or
// no input asserted, every output is high. The encoder's function, the
// active-low pins and the 3-bit default are the notes'; the behaviour when
// disabled, and the absence of the 74F148's GS and EO pins, are this
// design's choices. The same module encodes a 6-bit flash with BITS = 6.
//
// Timing: purely combinational.
module flash_encoder #(
  parameter int unsigned BITS = 3
) (
  input  logic [(1<<BITS)-1:0] in_n,
  input  logic                 ei_n,
  output logic [BITS-1:0]      code_n
);

  logic [BITS-1:0] code;

  always_comb begin
    code = '0;
    if (!ei_n) begin
      for (int unsigned k = 0; k < (1 << BITS); k++) begin
        if (!in_n[k]) code = BITS'(k);
      end
    end
    code_n = ~code;
  end

endmodule
