// dffe_nbit: N-bit D-type register with clock enable.
//
// This is the storage element every design of the lab is built from: on a
// rising clock edge q takes d when ena is high and keeps its value
// otherwise. The width N and the enable follow the lab notes. The notes
// rely on an FPGA power-up value of zero; this version has a synchronous,
// active-high rst that clears q to zero instead (rst wins over ena), so it
// starts in a known state in simulation and in an ASIC flow.
//
// Timing: q changes one clock after d and ena are presented.
module dffe_nbit #(
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ena,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)      q <= '0;
    else if (ena) q <= d;
  end

endmodule
