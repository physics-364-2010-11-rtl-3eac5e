// aliasing_tb: sampling and aliasing through both ADC loops of lab12_top.
//
// The ADC inputs are sine waves, 1.65 V +- 1.5 V, at a frequency f_in given
// as a ratio r = f_in / fs of each converter's own sample rate (fs = clock/68
// for the single-slope ADC, clock/10 for the SAR ADC). Frequencies above
// fs/2 must appear folded down to the apparent frequency
//   f_app = | f_in - round(f_in / fs) * fs |,
// a triangle in f_in with zeros at 0, fs, 2fs and peaks fs/2 at fs/2,
// 3fs/2. For each ratio the testbench converts 200 samples with each ADC,
// checks every code against floor(held * 64 / 3.3), and counts how often
// the codes cross mid-scale; the count must be 2 * 200 * f_app / fs within
// +-2.
module aliasing_tb;
  localparam real PI2 = 6.283185307179586;
  localparam int  SAMPLES = 200;

  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] saw_code, tri_code, synth_code, ramp_adc, ramp_dac, sar_adc, sar_dac;
  logic ramp_conv_done, ramp_sample_hold, sar_conv_done, sar_sample_hold;
  logic [2:0] flash_code;
  real saw_vout, tri_vout, synth_vout, ramp_disp_vout, sar_disp_vout;
  real ramp_vin = 1.65, sar_vin = 1.65, flash_vin = 0.0;

  lab12_top dut (
    .clk(clk), .rst(rst), .freq(6'd1),
    .saw_code(saw_code), .tri_code(tri_code), .synth_code(synth_code),
    .saw_vout(saw_vout), .tri_vout(tri_vout), .synth_vout(synth_vout),
    .ramp_vin(ramp_vin), .ramp_adc(ramp_adc), .ramp_conv_done(ramp_conv_done),
    .ramp_sample_hold(ramp_sample_hold), .ramp_dac(ramp_dac), .ramp_disp_vout(ramp_disp_vout),
    .sar_vin(sar_vin), .sar_adc(sar_adc), .sar_conv_done(sar_conv_done),
    .sar_sample_hold(sar_sample_hold), .sar_dac(sar_dac), .sar_disp_vout(sar_disp_vout),
    .flash_vin(flash_vin), .flash_code(flash_code)
  );

  always #5 clk = ~clk;

  real ratios [6] = '{0.1, 0.4, 0.6, 0.9, 1.1, 1.45};

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (68 * (SAMPLES + 4) * 6 + 100) @(posedge clk);
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

  function automatic int adc_ref(input real v);
    int c;
    if (v <= 0.0) return 0;
    c = int'($floor(v * 64.0 / 3.3));
    return (c > 63) ? 63 : c;
  endfunction

  function automatic real f_apparent(input real r);
    real d = r - $floor(r + 0.5);
    return (d < 0.0) ? -d : d;
  endfunction

  initial begin
    for (int ri = 0; ri < 6; ri++) begin
      real r, ramp_held, sar_held;
      int ramp_n, sar_n, ramp_x, sar_x, expected_x;
      bit ramp_hi, sar_hi, ramp_skip, sar_skip;
      r = ratios[ri];
      ramp_held = 1.65; sar_held = 1.65;
      ramp_n = 0; sar_n = 0; ramp_x = 0; sar_x = 0;
      ramp_skip = 1; sar_skip = 1; ramp_hi = 0; sar_hi = 0;
      rst = 1'b1;
      repeat (2) @(posedge clk);
      @(negedge clk) rst = 1'b0;
      for (int n = 0; ramp_n < SAMPLES; n++) begin
        // the first conversion after reset uses the old held value: skip it
        if (ramp_conv_done) begin
          if (ramp_skip) ramp_skip = 0;
          else begin
            check(int'(ramp_adc) == adc_ref(ramp_held), $sformatf("ramp r=%f: %0d, expected %0d", r, ramp_adc, adc_ref(ramp_held)));
            if (ramp_n > 0 && ((ramp_adc >= 32) != ramp_hi)) ramp_x++;
            ramp_hi = (ramp_adc >= 32);
            ramp_n++;
          end
        end
        if (sar_conv_done && sar_n < SAMPLES) begin
          if (sar_skip) sar_skip = 0;
          else begin
            check(int'(sar_adc) == adc_ref(sar_held), $sformatf("SAR r=%f: %0d, expected %0d", r, sar_adc, adc_ref(sar_held)));
            if (sar_n > 0 && ((sar_adc >= 32) != sar_hi)) sar_x++;
            sar_hi = (sar_adc >= 32);
            sar_n++;
          end
        end
        ramp_vin = 1.65 + 1.5 * $sin(PI2 * r * real'(n) / 68.0 + 0.3);
        sar_vin  = 1.65 + 1.5 * $sin(PI2 * r * real'(n) / 10.0 + 0.3);
        if (ramp_sample_hold) ramp_held = ramp_vin;
        if (sar_sample_hold)  sar_held  = sar_vin;
        @(negedge clk);
      end
      expected_x = int'(2.0 * real'(SAMPLES) * f_apparent(r));
      check(ramp_x >= expected_x - 2 && ramp_x <= expected_x + 2,
            $sformatf("ramp r=%f: %0d mid-scale crossings, expected about %0d", r, ramp_x, expected_x));
      check(sar_x >= expected_x - 2 && sar_x <= expected_x + 2,
            $sformatf("SAR r=%f: %0d mid-scale crossings, expected about %0d", r, sar_x, expected_x));
      $display("f_in = %4.2f fs: apparent %4.2f fs, crossings ramp %0d SAR %0d (expected %0d)",
               r, f_apparent(r), ramp_x, sar_x, expected_x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
