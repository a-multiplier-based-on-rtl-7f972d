// tb_abacus_pa -- exhaustive self-check of the PA cell.
//
// All 16 pairs of three-bead digits; K must be the six-bead thermometer code
// of X + Y.
module tb_abacus_pa;
  import abacus_pkg::*;

  bead3_t x, y;
  bead6_t k;
  int checks = 0, failures = 0;

  abacus_pa dut (.x(x), .y(y), .k(k));

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
        x = 3'(therm(xv)); y = 3'(therm(yv));
        #1;
        checks++;
        if (k !== therm(xv + yv)) begin
          failures++; $display("FAIL X=%0d Y=%0d k=%b", xv, yv, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
