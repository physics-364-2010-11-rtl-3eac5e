// dffe_nbit_tb: self-checking test of the enabled register.
// Drives random data, enable and reset for 2000 clocks on an 8-bit instance
// and compares q each clock with a reference kept in the testbench
// (reset -> 0, enable -> d, else hold).
module dffe_nbit_tb;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst = 1'b1, ena = 1'b0;
  logic [N-1:0] d = '0, q, expected;
  int checks = 0, failures = 0;

  dffe_nbit #(.N(N)) dut (.clk(clk), .rst(rst), .ena(ena), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected = '0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      rst = ($urandom_range(0, 19) == 0);
      ena = $urandom_range(0, 1) == 1;
      d   = N'($urandom);
      @(posedge clk);
      if (rst) expected = '0;
      else if (ena) expected = d;
      @(negedge clk);
      checks++;
      if (q !== expected) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: q=%h expected=%h", i, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
