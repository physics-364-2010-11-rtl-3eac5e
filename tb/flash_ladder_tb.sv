// flash_ladder_tb: checks the reference string and comparator bank model.
// For the 3-bit, 10 V string the thresholds lie at 0.714, 2.143, ...,
// 9.286 V (half a 1.43 V step above each code). The input is swept from
// -0.5 V to 10.5 V in 10 mV steps, avoiding the exact thresholds; at each
// point the outputs must form a thermometer (all low outputs below all high
// ones) whose count of low outputs is the input rounded to the nearest
// code, round(vin * 7 / 10), clipped to 0..7.
module flash_ladder_tb;
  real vin;
  logic [6:0] cmp_n;
  int checks = 0, failures = 0;

  flash_ladder dut (.vin(vin), .cmp_n(cmp_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lows, e;
    real x;
    for (int i = -50; i <= 1050; i++) begin
      vin = real'(i) * 0.01 + 0.0013;
      #1;
      lows = 0;
      for (int k = 0; k < 7; k++) if (!cmp_n[k]) lows++;
      x = vin * 7.0 / 10.0;
      e = (x < 0.0) ? 0 : int'($floor(x + 0.5));
      if (e > 7) e = 7;
      checks++;
      if (lows != e || cmp_n != ~7'((8'd1 << lows) - 8'd1)) begin
        failures++;
        if (failures < 10) $display("vin=%f cmp_n=%b expected %0d low", vin, cmp_n, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
