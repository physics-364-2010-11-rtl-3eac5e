// lab12_top_tb: end-to-end test of the whole lab at its default sizes
// (6-bit DACs and ramp/SAR ADCs, 3-bit flash ADC, 10-bit phase accumulator).
//
// Stimulus: the ramp and SAR ADC inputs follow slow sine waves plus noise
// that cover 0 V to slightly above the 3.3 V full scale, changing every
// clock, so the sample & hold must keep the value it took; the flash input
// is random between 0 and 10.5 V; the synthesizer's increment changes every
// 512 clocks. Reference models in the testbench predict:
//   - sawtooth, triangle and synthesizer codes on every clock and the DAC
//     voltages (3.3 V * code / 64, one clock after the code),
//   - each ramp and SAR conversion: floor(held * 64 / 3.3), clipped to 63,
//     where held is the input at the sample & hold pulse before it,
//   - conversion spacing: 68 clocks (ramp) and 10 clocks (SAR),
//   - the flash code: round(vin * 7 / 10), clipped to 7.
// Each mechanism is counted and must occur at least once: sawtooth wrap,
// triangle top and bottom, synthesizer increment change, sample & hold
// pulses with the input moving during the hold, conversions of both ADCs,
// full-scale clipping and zero codes, SAR trial bits kept and dropped, and
// every flash code.
module lab12_top_tb;
  localparam real VH  = 3.3;
  localparam real PI2 = 6.283185307179586;

  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] freq = 6'd8;
  logic [5:0] saw_code, tri_code, synth_code;
  real saw_vout, tri_vout, synth_vout;
  real ramp_vin = 1.0, sar_vin = 1.0, flash_vin = 0.0;
  logic [5:0] ramp_adc, ramp_dac, sar_adc, sar_dac;
  logic ramp_conv_done, ramp_sample_hold, sar_conv_done, sar_sample_hold;
  real ramp_disp_vout, sar_disp_vout;
  logic [2:0] flash_code;

  lab12_top dut (
    .clk(clk), .rst(rst), .freq(freq),
    .saw_code(saw_code), .tri_code(tri_code), .synth_code(synth_code),
    .saw_vout(saw_vout), .tri_vout(tri_vout), .synth_vout(synth_vout),
    .ramp_vin(ramp_vin), .ramp_adc(ramp_adc), .ramp_conv_done(ramp_conv_done),
    .ramp_sample_hold(ramp_sample_hold), .ramp_dac(ramp_dac), .ramp_disp_vout(ramp_disp_vout),
    .sar_vin(sar_vin), .sar_adc(sar_adc), .sar_conv_done(sar_conv_done),
    .sar_sample_hold(sar_sample_hold), .sar_dac(sar_dac), .sar_disp_vout(sar_disp_vout),
    .flash_vin(flash_vin), .flash_code(flash_code)
  );

  always #5 clk = ~clk;

  localparam int CLOCKS = 68 * 70;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_saw_wrap = 0, n_tri_top = 0, n_tri_bottom = 0, n_freq_change = 0;
  int n_ramp_conv = 0, n_sar_conv = 0, n_ramp_sh = 0, n_sar_sh = 0, n_moved_in_hold = 0;
  int n_clip = 0, n_zero = 0, n_bit_kept = 0, n_bit_dropped = 0;
  int flash_seen [8];

  initial begin : watchdog
    repeat (CLOCKS + 1000) @(posedge clk);
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

  function automatic bit near(input real a, input real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  function automatic int adc_ref(input real v);
    int c;
    if (v <= 0.0) return 0;
    c = int'($floor(v * 64.0 / VH));
    return (c > 63) ? 63 : c;
  endfunction

  function automatic int tri_ref(input int phase7);
    return (phase7 < 64) ? phase7 : 127 - phase7;
  endfunction

  function automatic real wave(input int n, input int period, input real phase);
    real v;
    v = 1.7 + 1.75 * $sin(PI2 * real'(n) / real'(period) + phase)
        + real'($urandom_range(0, 100)) * 0.0005;
    return (v < 0.0) ? 0.0 : v;
  endfunction

  initial begin
    int acc, ramp_last, sar_last, e;
    real ramp_held, sar_held, ramp_next, sar_next;
    logic [5:0] prev_saw, prev_tri, prev_synth, prev_sar_dac;
    int sar_step;
    bit ramp_first, sar_first;
    ramp_held = 0.0; sar_held = 0.0; ramp_next = 0.0; sar_next = 0.0;
    ramp_last = -1; sar_last = -1; ramp_first = 1; sar_first = 1; acc = 0;
    foreach (flash_seen[i]) flash_seen[i] = 0;

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    prev_saw = saw_code; prev_tri = tri_code; prev_synth = synth_code; prev_sar_dac = '0;
    for (int n = 0; n < CLOCKS; n++) begin
      // ---------------- waveform generators (state after n clocks)
      check(int'(saw_code) == n % 64, $sformatf("saw %0d at %0d", saw_code, n));
      check(int'(tri_code) == tri_ref(n % 128), $sformatf("tri %0d at %0d", tri_code, n));
      check(int'(synth_code) == tri_ref(acc / 8), $sformatf("synth %0d, expected %0d", synth_code, tri_ref(acc / 8)));
      if (n > 0) begin
        check(near(saw_vout, VH * real'(prev_saw) / 64.0), "saw DAC voltage");
        check(near(tri_vout, VH * real'(prev_tri) / 64.0), "triangle DAC voltage");
        check(near(synth_vout, VH * real'(prev_synth) / 64.0), "synth DAC voltage");
      end
      if (n > 0 && saw_code == 0) n_saw_wrap++;
      if (tri_code == 63 && prev_tri == 62) n_tri_top++;
      if (tri_code == 0 && prev_tri == 1) n_tri_bottom++;
      prev_saw = saw_code; prev_tri = tri_code; prev_synth = synth_code;

      // ---------------- single-slope ADC
      if (ramp_conv_done) begin
        if (!ramp_first) begin
          e = adc_ref(ramp_held);
          check(int'(ramp_adc) == e, $sformatf("ramp adc=%0d expected %0d (held %f)", ramp_adc, e, ramp_held));
          if (e == 63) n_clip++;
          if (e == 0) n_zero++;
          check(ramp_last < 0 || n - ramp_last == 68, "ramp conversion spacing");
        end
        ramp_first = 0; ramp_last = n; n_ramp_conv++;
      end

      // ---------------- SAR ADC
      sar_step = (n % 10);
      if (sar_step >= 2 && sar_step <= 7) begin
        // the bit tried on the previous step is now decided
        if ((sar_dac & prev_sar_dac) == prev_sar_dac) n_bit_kept++;
        else n_bit_dropped++;
      end
      prev_sar_dac = sar_dac;
      if (sar_conv_done) begin
        if (!sar_first) begin
          e = adc_ref(sar_held);
          check(int'(sar_adc) == e, $sformatf("sar adc=%0d expected %0d (held %f)", sar_adc, e, sar_held));
          if (e == 63) n_clip++;
          if (e == 0) n_zero++;
          check(sar_last < 0 || n - sar_last == 10, "SAR conversion spacing");
        end
        sar_first = 0; sar_last = n; n_sar_conv++;
      end

      // ---------------- flash ADC (combinational: check the current input)
      begin
        real x;
        x = flash_vin * 7.0 / 10.0;
        e = int'($floor(x + 0.5));
        if (e > 7) e = 7;
        check(int'(flash_code) == e, $sformatf("flash code %0d for %f V, expected %0d", flash_code, flash_vin, e));
        flash_seen[flash_code]++;
      end

      // display DACs show the new code one clock after conv_done
      if (ramp_sample_hold)
        check(near(ramp_disp_vout, VH * real'(ramp_adc) / 64.0), "ramp display DAC");
      if (sar_sample_hold)
        check(near(sar_disp_vout, VH * real'(sar_adc) / 64.0), "SAR display DAC");

      // ---------------- new inputs for the next clock
      ramp_vin  = wave(n, 68 * 23, 0.0);
      sar_vin   = wave(n, 10 * 37, 1.0);
      flash_vin = real'($urandom_range(0, 10500)) / 1000.0;
      if (ramp_sample_hold) begin ramp_held = ramp_vin; n_ramp_sh++; end
      if (sar_sample_hold)  begin sar_held  = sar_vin;  n_sar_sh++;  end
      if (!ramp_sample_hold && ramp_vin != ramp_held) n_moved_in_hold++;
      if (n % 512 == 511) begin
        freq = 6'($urandom_range(1, 63));
        n_freq_change++;
      end

      @(posedge clk);
      acc = (acc + int'(freq)) % 1024;
      @(negedge clk);
    end

    // ---------------- every mechanism must have happened
    check(n_saw_wrap > 0,      "sawtooth never wrapped");
    check(n_tri_top > 0,       "triangle never reached its top");
    check(n_tri_bottom > 0,    "triangle never returned to 0");
    check(n_freq_change > 0,   "synthesizer increment never changed");
    check(n_ramp_sh > 0 && n_sar_sh > 0, "sample & hold never pulsed");
    check(n_moved_in_hold > 0, "input never moved while held");
    check(n_ramp_conv > 10,    "too few ramp conversions");
    check(n_sar_conv > 100,    "too few SAR conversions");
    check(n_clip > 0,          "full-scale clipping never happened");
    check(n_zero > 0,          "zero code never produced");
    check(n_bit_kept > 0,      "SAR never kept a trial bit");
    check(n_bit_dropped > 0,   "SAR never dropped a trial bit");
    foreach (flash_seen[i]) check(flash_seen[i] > 0, $sformatf("flash code %0d never seen", i));
    $display("mechanisms: saw wraps %0d, triangle tops %0d bottoms %0d, freq changes %0d",
             n_saw_wrap, n_tri_top, n_tri_bottom, n_freq_change);
    $display("mechanisms: ramp conversions %0d, SAR conversions %0d, S&H pulses %0d/%0d, input moved while held %0d",
             n_ramp_conv, n_sar_conv, n_ramp_sh, n_sar_sh, n_moved_in_hold);
    $display("mechanisms: clipped %0d, zero %0d, SAR bits kept %0d dropped %0d",
             n_clip, n_zero, n_bit_kept, n_bit_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
