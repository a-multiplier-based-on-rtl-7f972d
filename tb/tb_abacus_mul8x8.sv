// tb_abacus_mul8x8 -- exhaustive self-check of the 8x8 multiplier.
//
// Sweeps all 65536 operand pairs and compares P with A*B computed by the
// simulator.
module tb_abacus_mul8x8;

  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  abacus_mul8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 65536; n++) begin
      {a, b} = 16'(n);
      #1;
      checks++;
      if (p !== 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 20) $display("FAIL %0d x %0d = %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
