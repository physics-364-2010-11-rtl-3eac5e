// phase_acc_synth_tb: checks the phase-accumulator triangle synthesizer.
// A reference accumulator (integer, modulo 1024) runs beside the design;
// its top 7 bits give the expected triangle code. Several increments are
// played, including 0 (frozen output), 8 (the plain 128-clock triangle),
// odd values and the maximum 63, and the period for freq = 8 and 16 is
// measured between successive returns to code 0 from above.
module phase_acc_synth_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] freq = '0;
  logic [5:0] dac;
  int checks = 0, failures = 0;

  phase_acc_synth dut (.clk(clk), .rst(rst), .freq(freq), .dac(dac));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int acc;
  function automatic int tri_of(int a);
    int ph = a / 8;
    return (ph < 64) ? ph : 127 - ph;
  endfunction

  task automatic run(input int f, input int clocks);
    int last_zero, prev;
    freq = 6'(f);
    last_zero = -1; prev = -1;
    for (int n = 0; n < clocks; n++) begin
      @(posedge clk);
      acc = (acc + f) % 1024;
      @(negedge clk);
      checks++;
      if (int'(dac) != tri_of(acc)) begin
        failures++;
        if (failures < 10) $display("freq=%0d clock %0d: dac=%0d expected %0d", f, n, dac, tri_of(acc));
      end
      // period measurement: first clock at 0 after being above 0
      if ((f == 8 || f == 16) && dac == 0 && prev > 0) begin
        if (last_zero >= 0) begin
          checks++;
          if (n - last_zero != 1024 / f) begin
            failures++;
            $display("freq=%0d: period %0d, expected %0d", f, n - last_zero, 1024 / f);
          end
        end
        last_zero = n;
      end
      prev = int'(dac);
    end
  endtask

  initial begin
    acc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // first clock after reset: phase 0
    checks++;
    if (dac != 0) begin failures++; $display("dac not 0 after reset"); end
    run(8, 400);
    run(16, 300);
    run(0, 20);
    run(1, 1100);
    run(13, 500);
    run(63, 300);
    for (int i = 0; i < 10; i++) run($urandom_range(0, 63), 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
