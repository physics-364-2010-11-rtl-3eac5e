// flash_encoder_tb: checks the active-low priority encoder.
// The 3-bit instance is tried with all 256 input patterns, enabled and
// disabled; the expected code is the index of the highest low input, found
// by a downward search in the testbench, and everything high when disabled
// or when no input is low. A 6-bit instance (64 inputs, the size of a 6-bit
// flash converter) is tried with every thermometer code, input 0 tied low,
// plus random patterns.
module flash_encoder_tb;
  logic [7:0]  in3_n;
  logic        ei3_n;
  logic [2:0]  code3_n;
  logic [63:0] in6_n;
  logic [5:0]  code6_n;
  int checks = 0, failures = 0;

  flash_encoder #(.BITS(3)) dut3 (.in_n(in3_n), .ei_n(ei3_n), .code_n(code3_n));
  flash_encoder #(.BITS(6)) dut6 (.in_n(in6_n), .ei_n(1'b0), .code_n(code6_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int highest_low(input logic [63:0] v, input int width);
    for (int k = width - 1; k >= 0; k--) if (v[k] == 1'b0) return k;
    return 0;
  endfunction

  initial begin
    int e;
    for (int en = 0; en < 2; en++) begin
      for (int p = 0; p < 256; p++) begin
        in3_n = 8'(p); ei3_n = (en == 1);
        #1;
        e = (en == 1) ? 0 : highest_low(64'(p), 8);
        checks++;
        if (int'(3'(~code3_n)) != e) begin
          failures++;
          if (failures < 10) $display("3-bit: in_n=%b ei_n=%b code_n=%b expected code %0d", in3_n, ei3_n, code3_n, e);
        end
      end
    end
    // 6-bit thermometer codes: inputs 0..c low, the rest high
    for (int c = 0; c < 64; c++) begin
      in6_n = ~((64'd2 << c) - 64'd1);
      #1;
      checks++;
      if (int'(6'(~code6_n)) != c) begin
        failures++;
        if (failures < 10) $display("6-bit thermometer %0d: code_n=%b", c, code6_n);
      end
    end
    for (int i = 0; i < 500; i++) begin
      in6_n = {$urandom, $urandom};
      #1;
      checks++;
      if (int'(6'(~code6_n)) != highest_low(in6_n, 64)) begin
        failures++;
        if (failures < 10) $display("6-bit random %h: code_n=%b", in6_n, code6_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
