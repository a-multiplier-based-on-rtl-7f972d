// tb_abacus_mul4x4 -- exhaustive self-check of the 4x4 multiplier.
//
// Sweeps all 256 operand pairs, as a counter over A3..A0,B3..B0, and compares
// P with A*B computed by the simulator. The worked example 14 x 13 = 182 is
// part of the sweep; for it the two partial products inside are also checked
// against their published bead patterns, (001|011|011) and (011|001|111).
module tb_abacus_mul4x4;

  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  abacus_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      {a, b} = 8'(n);
      #1;
      checks++;
      if (p !== 8'(int'(a) * int'(b))) begin
        failures++; $display("FAIL %0d x %0d = %0d", a, b, p);
      end
    end
    a = 4'd14; b = 4'd13;
    #1;
    checks += 3;
    if (dut.bpa_lo !== 9'b001_011_011) begin
      failures++; $display("FAIL 13 x A1A0 partial product %b", dut.bpa_lo);
    end
    if (dut.bpa_hi !== 9'b011_001_111) begin
      failures++; $display("FAIL 13 x A3A2 partial product %b", dut.bpa_hi);
    end
    if (p !== 8'd182) begin
      failures++; $display("FAIL 14 x 13 = %0d", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
