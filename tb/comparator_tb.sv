// comparator_tb: checks the comparator model: 1 when the + input is at or
// above the - input, on a grid of voltage pairs including equal ones.
module comparator_tb;
  real vp, vm;
  logic out;
  int checks = 0, failures = 0;

  comparator dut (.vplus(vp), .vminus(vm), .out(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 40; a++) begin
      for (int b = 0; b <= 40; b++) begin
        vp = real'(a) * 0.0825;
        vm = real'(b) * 0.0825;
        #1;
        checks++;
        if (out !== (a >= b)) begin
          failures++;
          if (failures < 10) $display("vplus=%f vminus=%f out=%b", vp, vm, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
