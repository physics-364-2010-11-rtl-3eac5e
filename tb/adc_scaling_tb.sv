// adc_scaling_tb: conversion time against resolution for both ADC
// controllers. Instances with 4, 7 and 8 bits (besides the default 6
// covered elsewhere) convert random samples through an ideal integer
// comparator. A single-slope conversion must take 2^BITS + 4 clocks (each
// extra bit doubles the ramp) and a successive-approximation conversion
// BITS + 4 clocks (each extra bit adds one), and every result must equal
// the sample, clipped to full scale.
module adc_scaling_tb;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300 * 40) @(posedge clk);
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

  // One converter plus its sample source and result checker.
  `define ADC_UNDER_TEST(NAME, MOD, B, PER)                                   \
    logic [B-1:0] NAME``_dac, NAME``_adc;                                      \
    logic NAME``_done, NAME``_sh;                                              \
    int NAME``_sample = 0, NAME``_held = 0, NAME``_last = -1, NAME``_count = 0;\
    MOD #(.BITS(B)) NAME (.clk(clk), .rst(rst),                                \
      .cmp(NAME``_sample >= int'(NAME``_dac)), .dac(NAME``_dac),               \
      .adc(NAME``_adc), .conv_done(NAME``_done), .sample_hold(NAME``_sh));     \
    always @(negedge clk) if (!rst) begin                                     \
      if (NAME``_done) begin                                                   \
        if (NAME``_last >= 0) begin                                            \
          check(cycle - NAME``_last == (PER),                                  \
                $sformatf("%s: conversion took %0d clocks, expected %0d",      \
                          `"NAME`", cycle - NAME``_last, (PER)));              \
          check(int'(NAME``_adc) == ((NAME``_held > (1 << B) - 1) ?            \
                                     (1 << B) - 1 : NAME``_held),              \
                $sformatf("%s: code %0d for sample %0d", `"NAME`",             \
                          NAME``_adc, NAME``_held));                          \
        end                                                                    \
        NAME``_last = cycle;                                                   \
        NAME``_count++;                                                        \
      end                                                                      \
      if (NAME``_sh) begin                                                     \
        NAME``_sample = $urandom_range(0, (1 << B) + 3);                       \
        NAME``_held = NAME``_sample;                                           \
      end                                                                      \
    end

  int cycle = 0;
  always @(negedge clk) if (!rst) cycle++;

  `ADC_UNDER_TEST(ramp4, adc_ramp, 4, 20)
  `ADC_UNDER_TEST(ramp7, adc_ramp, 7, 132)
  `ADC_UNDER_TEST(ramp8, adc_ramp, 8, 260)
  `ADC_UNDER_TEST(sar4,  adc_sar,  4, 8)
  `ADC_UNDER_TEST(sar7,  adc_sar,  7, 11)
  `ADC_UNDER_TEST(sar8,  adc_sar,  8, 12)

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (260 * 30) @(negedge clk);
    check(ramp8_count >= 25 && sar8_count >= 600, "too few conversions");
    $display("conversions: ramp %0d/%0d/%0d, SAR %0d/%0d/%0d",
             ramp4_count, ramp7_count, ramp8_count, sar4_count, sar7_count, sar8_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
