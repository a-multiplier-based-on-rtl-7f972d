// tb_abacus_pa11_5 -- exhaustive self-check of the PA11_5 cell.
//
// X takes the two-bead values 0..2 it receives inside a converter; Y and Z
// take 0..3 and both carries 0/1. The output must represent the sum: S is the
// thermometer code of the sum mod 4 and Cout1 + Cout2 its quotient by 4.
// Cout1 must also be the carry of the first stage, X + Y + Cin1 >= 4.
module tb_abacus_pa11_5;
  import abacus_pkg::*;

  bead3_t x, y, z, s;
  logic   cin1, cin2, cout1, cout2;
  int checks = 0, failures = 0;

  abacus_pa11_5 dut (
    .x(x), .y(y), .z(z), .cin1(cin1), .cin2(cin2),
    .s(s), .cout1(cout1), .cout2(cout2)
  );

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
    for (int xv = 0; xv <= 2; xv++)
    for (int yv = 0; yv <= 3; yv++)
    for (int zv = 0; zv <= 3; zv++)
    for (int c1 = 0; c1 <= 1; c1++)
    for (int c2 = 0; c2 <= 1; c2++) begin
      int sum;
      x = 3'(therm(xv)); y = 3'(therm(yv)); z = 3'(therm(zv));
      cin1 = 1'(c1); cin2 = 1'(c2);
      #1;
      sum = xv + yv + zv + c1 + c2;
      checks += 3;
      if (s !== 3'(therm(sum % 4))) begin
        failures++; $display("FAIL %0d+%0d+%0d+%0d+%0d s=%b", xv, yv, zv, c1, c2, s);
      end
      if (2'(int'(cout1) + int'(cout2)) !== 2'(sum / 4)) begin
        failures++; $display("FAIL %0d+%0d+%0d+%0d+%0d carries=%b%b", xv, yv, zv, c1, c2, cout1, cout2);
      end
      if (cout1 !== (xv + yv + c1 >= 4)) begin
        failures++; $display("FAIL %0d+%0d+%0d cout1=%b", xv, yv, c1, cout1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
