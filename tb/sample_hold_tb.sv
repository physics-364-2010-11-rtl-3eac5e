// sample_hold_tb: checks the ideal sample & hold model. The input is
// changed every time unit and the switch closed for random spans; while
// closed the output must equal the input, while open it must keep the
// input's value at the moment the switch opened.
module sample_hold_tb;
  logic close = 1'b0;
  real vin = 0.0, vout, expected;
  int checks = 0, failures = 0, holds = 0;

  sample_hold dut (.close(close), .vin(vin), .vout(vout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // start by taking a sample so the held value is known
    close = 1'b1; vin = 1.25; #1;
    expected = 1.25;
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 7) == 0) close = !close;
      vin = real'($urandom_range(0, 3300)) / 1000.0;
      #1;
      if (close) expected = vin;
      else holds++;
      checks++;
      if (vout != expected) begin
        failures++;
        if (failures < 10) $display("step %0d close=%b vin=%f vout=%f expected %f", i, close, vin, vout, expected);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("switch never opened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
