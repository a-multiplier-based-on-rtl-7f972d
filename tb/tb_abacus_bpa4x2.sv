// tb_abacus_bpa4x2 -- exhaustive self-check of the 4x2 binary-to-abacus
// converter.
//
// For all 64 pairs (B, A) the three output digits must be the thermometer
// codes of the radix-4 digits of B*A. The paper's worked example,
// 13 x 2 = (001|011|011), is among them and is also checked by name.
module tb_abacus_bpa4x2;
  import abacus_pkg::*;

  logic [3:0] b;
  logic [1:0] a;
  abacus3_t   bpa;
  int checks = 0, failures = 0;

  abacus_bpa4x2 dut (.b(b), .a(a), .bpa(bpa));

  function automatic logic [5:0] therm(int n);
    return 6'((1 << n) - 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bv = 0; bv < 16; bv++) begin
      for (int av = 0; av < 4; av++) begin
        int prod;
        b = 4'(bv); a = 2'(av);
        #1;
        prod = bv * av;
        checks += 3;
        if (bpa.l !== 3'(therm(prod % 4)))        begin failures++; $display("FAIL %0d*%0d L=%b", bv, av, bpa.l); end
        if (bpa.m !== 3'(therm((prod / 4) % 4)))  begin failures++; $display("FAIL %0d*%0d M=%b", bv, av, bpa.m); end
        if (bpa.h !== 3'(therm(prod / 16)))       begin failures++; $display("FAIL %0d*%0d H=%b", bv, av, bpa.h); end
      end
    end
    b = 4'd13; a = 2'd2;
    #1;
    checks++;
    if (bpa !== 9'b001_011_011) begin
      failures++; $display("FAIL worked example 13x2: %b", bpa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
