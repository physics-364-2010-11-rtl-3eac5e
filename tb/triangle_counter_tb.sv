// triangle_counter_tb: checks the folded 7-bit counter.
// The expected code after n clocks is c = n mod 128 while c < 64 and 127 - c
// afterwards: a 128-clock triangle between 0 and 63. Runs three periods
// and also checks that both turning points are reached.
module triangle_counter_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] dac;
  int checks = 0, failures = 0, tops = 0, bottoms = 0;

  triangle_counter dut (.clk(clk), .rst(rst), .dac(dac));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 3 * 128; n++) begin
      c = n % 128;
      e = (c < 64) ? c : 127 - c;
      checks++;
      if (int'(dac) != e) begin
        failures++;
        if (failures < 10) $display("clock %0d: dac=%0d expected %0d", n, dac, e);
      end
      if (dac == 63) tops++;
      if (dac == 0) bottoms++;
      @(negedge clk);
    end
    // each end code is held for two clocks per period
    checks++;
    if (tops != 6 || bottoms != 6) begin
      failures++;
      $display("turning points: tops=%0d bottoms=%0d, expected 6 and 6", tops, bottoms);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
