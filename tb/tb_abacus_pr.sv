// tb_abacus_pr -- exhaustive self-check of the PR cell.
//
// Drives every thermometer code of X (0..3) and Y (0..2) and checks that K is
// the thermometer code of (X+Y) mod 4 and Cout is set exactly when X+Y >= 4.
module tb_abacus_pr;
  import abacus_pkg::*;

  bead3_t x, k;
  bead2_t y;
  logic   cout;
  int checks = 0, failures = 0;

  abacus_pr dut (.x(x), .y(y), .k(k), .cout(cout));

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
      for (int yv = 0; yv <= 2; yv++) begin
        x = 3'(therm(xv)); y = 2'(therm(yv));
        #1;
        checks += 2;
        if (k !== 3'(therm((xv + yv) % 4))) begin
          failures++; $display("FAIL X=%0d Y=%0d k=%b", xv, yv, k);
        end
        if (cout !== (xv + yv >= 4)) begin
          failures++; $display("FAIL X=%0d Y=%0d cout=%b", xv, yv, cout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
