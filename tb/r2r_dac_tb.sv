// r2r_dac_tb: checks the R-2R DAC model against a node-by-node solution of
// the ladder of the schematic (2K series arms, 1K links, 2K termination,
// 3.3 V logic high). Walking from the terminated end, each node is reduced
// to a Thevenin source: the bit's 2K arm in parallel with the 2K seen
// through the link halves the sum of the two voltages, and the resistance
// stays 1K. The registered instance must show a code one clock after it is
// presented, the unregistered one at once. All 64 codes and random codes.
module r2r_dac_tb;
  logic clk = 1'b0;
  logic [5:0] d = '0;
  real vreg, vdir;
  int checks = 0, failures = 0;

  r2r_dac dut_reg (.clk(clk), .d(d), .vout(vreg));
  r2r_dac #(.REGISTERED(1'b0)) dut_dir (.clk(clk), .d(d), .vout(vdir));

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ladder(input logic [5:0] code);
    real vth, rth, vbit;
    // terminating 2K to ground in parallel with bit 0's 2K arm
    vbit = code[0] ? 3.3 : 0.0;
    vth  = vbit * 2000.0 / (2000.0 + 2000.0);
    rth  = 1000.0;
    for (int i = 1; i < 6; i++) begin
      real rleft;
      vbit  = code[i] ? 3.3 : 0.0;
      rleft = rth + 1000.0;                      // through the 1K link
      vth   = (vth * 2000.0 + vbit * rleft) / (rleft + 2000.0);
      rth   = rleft * 2000.0 / (rleft + 2000.0);
    end
    return vth;
  endfunction

  function automatic bit close_to(input real a, input real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  initial begin
    logic [5:0] prev;
    @(negedge clk);
    prev = d;
    for (int i = 0; i < 200; i++) begin
      d = (i < 64) ? 6'(i) : 6'($urandom);
      #1;
      checks++;
      if (!close_to(vdir, ladder(d))) begin
        failures++;
        if (failures < 10) $display("direct code %0d: %f expected %f", d, vdir, ladder(d));
      end
      checks++;
      if (!close_to(vreg, ladder(prev))) begin
        failures++;
        if (failures < 10) $display("registered before edge, code %0d: %f expected %f", prev, vreg, ladder(prev));
      end
      @(posedge clk); #1;
      checks++;
      if (!close_to(vreg, ladder(d))) begin
        failures++;
        if (failures < 10) $display("registered code %0d: %f expected %f", d, vreg, ladder(d));
      end
      prev = d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
