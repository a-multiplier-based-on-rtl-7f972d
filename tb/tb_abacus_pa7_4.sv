// tb_abacus_pa7_4 -- exhaustive self-check of the PA7_4 cell.
//
// All 32 combinations of two three-bead digits and a carry: S must be the
// thermometer code of (X+Y+Cin) mod 4 and Cout set when the sum is >= 4.
module tb_abacus_pa7_4;
  import abacus_pkg::*;

  bead3_t x, y, s;
  logic   cin, cout;
  int checks = 0, failures = 0;

  abacus_pa7_4 dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

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
    for (int xv = 0; xv <= 3; xv++) begin
      for (int yv = 0; yv <= 3; yv++) begin
        for (int c = 0; c <= 1; c++) begin
          int sum;
          x = 3'(therm(xv)); y = 3'(therm(yv)); cin = 1'(c);
          #1;
          sum = xv + yv + c;
          checks += 2;
          if (s !== 3'(therm(sum % 4))) begin
            failures++; $display("FAIL %0d+%0d+%0d s=%b", xv, yv, c, s);
          end
          if (cout !== (sum >= 4)) begin
            failures++; $display("FAIL %0d+%0d+%0d cout=%b", xv, yv, c, cout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
