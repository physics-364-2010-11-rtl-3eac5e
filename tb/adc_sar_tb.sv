// adc_sar_tb: self-checking test of the successive-approximation ADC
// controller.
//
// As in adc_ramp_tb, the analog side is an integer sample in LSB units and
// an ideal comparator cmp = (sample >= dac). The first five conversions use
// the samples 0, 13, 26, 39, 52 and their DAC code on every step of the
// search is compared with a hand-worked binary search table
// (e.g. for 13: 32, 16, 8, 12, 14, 13, 13). Then 200 random samples, some
// above full scale, are converted. Also checked: first conv_done 8 clocks
// after reset, then one every 10 clocks, and sample_hold one clock after it.
module adc_sar_tb;
  localparam int PERIOD = 10;
  logic clk = 1'b0, rst = 1'b1;
  logic cmp;
  logic [5:0] dac, adc;
  logic conv_done, sample_hold;
  int sample = 0;
  int checks = 0, failures = 0;

  adc_sar dut (.clk(clk), .rst(rst), .cmp(cmp), .dac(dac), .adc(adc),
               .conv_done(conv_done), .sample_hold(sample_hold));

  always_comb cmp = (sample >= int'(dac));
  always #5 clk = ~clk;

  // DAC code seen on steps 1..7 of the search for the first five samples.
  int trace [5][7] = '{
    '{32, 16,  8,  4,  2,  1,  0},   // sample 0
    '{32, 16,  8, 12, 14, 13, 13},   // sample 13
    '{32, 16, 24, 28, 26, 27, 26},   // sample 26
    '{32, 48, 40, 36, 38, 39, 39},   // sample 39
    '{32, 48, 56, 52, 54, 53, 52}    // sample 52
  };

  initial begin : watchdog
    repeat (PERIOD * 300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    int n, step, last_done, conversions, held;
    bit prev_done;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    held = sample; last_done = -1; conversions = 0; prev_done = 0;
    for (n = 0; conversions < 205; n++) begin
      step = n % PERIOD;
      if (conversions < 5) begin
        if (step >= 1 && step <= 7)
          check(int'(dac) == trace[conversions][step-1],
                $sformatf("sample %0d step %0d: dac=%0d expected %0d", held, step, dac, trace[conversions][step-1]));
        else
          check(dac == 0, $sformatf("step %0d: dac=%0d expected 0", step, dac));
      end
      if (conv_done) begin
        check(int'(adc) == ((held > 63) ? 63 : held),
              $sformatf("conversion %0d: adc=%0d sample=%0d", conversions, adc, held));
        if (last_done < 0) check(n == 8, $sformatf("first conv_done at %0d", n));
        else               check(n - last_done == PERIOD, $sformatf("conv_done spacing %0d", n - last_done));
        last_done = n;
        conversions++;
      end
      check(sample_hold == prev_done, "sample_hold must follow conv_done by one clock");
      prev_done = conv_done;
      if (sample_hold) begin
        if (conversions < 5) sample = conversions * 13;
        else                 sample = $urandom_range(0, 70);
        held = sample;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
