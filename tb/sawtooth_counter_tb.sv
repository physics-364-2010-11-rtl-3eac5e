// sawtooth_counter_tb: checks the 6-bit sawtooth generator.
// After reset the code must equal the number of clocks since reset modulo
// 64, i.e. rise by one per clock and wrap from 63 to 0 every 64 clocks.
// Runs 300 clocks (several periods) and counts the wraps seen.
module sawtooth_counter_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] dac;
  int checks = 0, failures = 0, wraps = 0;

  sawtooth_counter dut (.clk(clk), .rst(rst), .dac(dac));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      checks++;
      if (int'(dac) != n % 64) begin
        failures++;
        if (failures < 10) $display("clock %0d: dac=%0d expected %0d", n, dac, n % 64);
      end
      if (n > 0 && dac == 0) wraps++;
      @(negedge clk);
    end
    checks++;
    if (wraps != 4) begin
      failures++;
      $display("expected 4 wraps in 300 clocks, saw %0d", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
