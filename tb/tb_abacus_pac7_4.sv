// tb_abacus_pac7_4 -- exhaustive self-check of the PAC7_4 cell.
//
// X = 0..3, Y = 0..2 and both carries: S must be the thermometer code of the
// sum mod 4 and Cout set when the sum is >= 4.
module tb_abacus_pac7_4;
  import abacus_pkg::*;

  bead3_t x, s;
  bead2_t y;
  logic   cin1, cin2, cout;
  int checks = 0, failures = 0;

  abacus_pac7_4 dut (.x(x), .y(y), .cin1(cin1), .cin2(cin2), .s(s), .cout(cout));

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
    for (int xv = 0; xv <= 3; xv++)
    for (int yv = 0; yv <= 2; yv++)
    for (int c1 = 0; c1 <= 1; c1++)
    for (int c2 = 0; c2 <= 1; c2++) begin
      int sum;
      x = 3'(therm(xv)); y = 2'(therm(yv)); cin1 = 1'(c1); cin2 = 1'(c2);
      #1;
      sum = xv + yv + c1 + c2;
      checks += 2;
      if (s !== 3'(therm(sum % 4))) begin
        failures++; $display("FAIL %0d+%0d+%0d+%0d s=%b", xv, yv, c1, c2, s);
      end
      if (cout !== (sum >= 4)) begin
        failures++; $display("FAIL %0d+%0d+%0d+%0d cout=%b", xv, yv, c1, c2, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
