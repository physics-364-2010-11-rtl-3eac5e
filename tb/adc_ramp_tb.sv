// adc_ramp_tb: self-checking test of the single-slope ADC controller.
//
// The analog side is replaced by an integer "sample" in LSB units and an
// ideal comparator, cmp = (sample >= dac). The testbench changes the sample
// whenever the controller pulses sample_hold, first with the sequence
// 0, 13, 26, 39, 52, 1, 14, ... (steps of 13 modulo 64), then with random
// values, some above full scale. Checked:
//   - the DAC ramp 0..63 and the idle code 0 on steps 64..67,
//   - every conversion result equals min(sample, 63) of the sample held
//     for that conversion,
//   - conv_done comes 65 clocks after reset and then every 68 clocks,
//   - sample_hold follows conv_done after exactly one clock.
module adc_ramp_tb;
  localparam int PERIOD = 68;
  logic clk = 1'b0, rst = 1'b1;
  logic cmp;
  logic [5:0] dac, adc;
  logic conv_done, sample_hold;
  int sample = 0;
  int checks = 0, failures = 0;

  adc_ramp dut (.clk(clk), .rst(rst), .cmp(cmp), .dac(dac), .adc(adc),
                .conv_done(conv_done), .sample_hold(sample_hold));

  always_comb cmp = (sample >= int'(dac));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (PERIOD * 80) @(posedge clk);
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
    int n, last_done, conversions, held, next_seq;
    bit prev_done;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    held = sample; next_seq = 13; last_done = -1; conversions = 0; prev_done = 0;
    for (n = 0; conversions < 60; n++) begin
      // first ramp: the DAC must count up, then rest at 0
      if (n < PERIOD)
        check(int'(dac) == ((n < 64) ? n : 0), $sformatf("step %0d dac=%0d", n, dac));
      if (conv_done) begin
        check(int'(adc) == ((held > 63) ? 63 : held),
              $sformatf("conversion %0d: adc=%0d sample=%0d", conversions, adc, held));
        if (last_done < 0) check(n == 65, $sformatf("first conv_done at %0d", n));
        else               check(n - last_done == PERIOD, $sformatf("conv_done spacing %0d", n - last_done));
        last_done = n;
        conversions++;
      end
      check(sample_hold == prev_done, "sample_hold must follow conv_done by one clock");
      prev_done = conv_done;
      if (sample_hold) begin
        // new sample for the next ramp
        if (conversions < 20) begin sample = next_seq; next_seq = (next_seq + 13) % 64; end
        else                    sample = $urandom_range(0, 70);
        held = sample;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
