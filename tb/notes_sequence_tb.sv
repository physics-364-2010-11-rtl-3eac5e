// notes_sequence_tb: the lab's reference test sequence through both ADC
// loops of lab12_top at default sizes.
//
// The held input steps by 13 LSB (modulo 64) at every sample & hold pulse,
// starting from 0: 0, 13, 26, 39, 52, 1, 14, ... which visits all 64 codes
// once in 64 conversions. The voltage put on each ADC input is the middle
// of the code's step, (code + 0.5) * 3.3 V / 64. Checked, for 66
// conversions of each ADC:
//   - the result equals the code of the held sample,
//   - conv_done of conversion k comes at clock 65 + 68 k (single-slope) and
//     8 + 10 k (successive approximation) after reset, so at a 68 kHz clock
//     the converters deliver 1000 and 6800 samples per second.
module notes_sequence_tb;
  localparam real LSB = 3.3 / 64.0;
  localparam int  CONVERSIONS = 66;

  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] saw_code, tri_code, synth_code, ramp_adc, ramp_dac, sar_adc, sar_dac;
  logic ramp_conv_done, ramp_sample_hold, sar_conv_done, sar_sample_hold;
  logic [2:0] flash_code;
  real saw_vout, tri_vout, synth_vout, ramp_disp_vout, sar_disp_vout;
  real ramp_vin = 0.5 * LSB, sar_vin = 0.5 * LSB, flash_vin = 0.0;

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

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (68 * (CONVERSIONS + 5)) @(posedge clk);
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
    int ramp_code, sar_code, ramp_k, sar_k;
    int ramp_held, sar_held;
    ramp_code = 0; sar_code = 0; ramp_held = 0; sar_held = 0; ramp_k = 0; sar_k = 0;
    // The first conversion after power-up sees the hold capacitor at its
    // starting value, so take the first sample while in reset.
    force dut.u_ramp_sh.close = 1'b1;
    force dut.u_sar_sh.close  = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    release dut.u_ramp_sh.close;
    release dut.u_sar_sh.close;
    rst = 1'b0;
    for (int n = 0; ramp_k < CONVERSIONS || sar_k < CONVERSIONS; n++) begin
      if (ramp_conv_done && ramp_k < CONVERSIONS) begin
        check(int'(ramp_adc) == ramp_held, $sformatf("ramp conversion %0d: %0d, expected %0d", ramp_k, ramp_adc, ramp_held));
        check(n == 65 + 68 * ramp_k, $sformatf("ramp conversion %0d at clock %0d", ramp_k, n));
        ramp_k++;
      end
      if (sar_conv_done && sar_k < CONVERSIONS) begin
        check(int'(sar_adc) == sar_held, $sformatf("SAR conversion %0d: %0d, expected %0d", sar_k, sar_adc, sar_held));
        check(n == 8 + 10 * sar_k, $sformatf("SAR conversion %0d at clock %0d", sar_k, n));
        sar_k++;
      end
      if (ramp_sample_hold) begin
        ramp_code = (ramp_code + 13) % 64;
        ramp_vin  = (real'(ramp_code) + 0.5) * LSB;
        ramp_held = ramp_code;
      end
      if (sar_sample_hold) begin
        sar_code = (sar_code + 13) % 64;
        sar_vin  = (real'(sar_code) + 0.5) * LSB;
        sar_held = sar_code;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
