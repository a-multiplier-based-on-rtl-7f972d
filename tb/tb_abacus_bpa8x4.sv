// tb_abacus_bpa8x4 -- exhaustive self-check of the 8x4 binary-to-abacus
// converter.
//
// For all 4096 pairs (B, A) each of the six output digits must be the
// thermometer code of the matching radix-4 digit of B*A.
module tb_abacus_bpa8x4;
  import abacus_pkg::*;

  logic   [7:0] b;
  logic   [3:0] a;
  bead3_t [5:0] o;
  int checks = 0, failures = 0;

  abacus_bpa8x4 dut (.b(b), .a(a), .o(o));

  function automatic logic [5:0] therm(int n);
    return 6'((1 << n) - 1);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bv = 0; bv < 256; bv++) begin
      for (int av = 0; av < 16; av++) begin
        int prod;
        b = 8'(bv); a = 4'(av);
        #1;
        prod = bv * av;
        for (int j = 0; j < 6; j++) begin
          checks++;
          if (o[j] !== 3'(therm((prod >> (2 * j)) % 4))) begin
            failures++; $display("FAIL %0d*%0d digit %0d = %b", bv, av, j, o[j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
