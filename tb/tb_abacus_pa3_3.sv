// tb_abacus_pa3_3 -- exhaustive self-check of the PA3_3 cell.
//
// Every two-bead Y with and without a carry: S must be the thermometer code
// of Y + Cin.
module tb_abacus_pa3_3;
  import abacus_pkg::*;

  bead2_t y;
  logic   cin;
  bead3_t s;
  int checks = 0, failures = 0;

  abacus_pa3_3 dut (.y(y), .cin(cin), .s(s));

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
    for (int yv = 0; yv <= 2; yv++) begin
      for (int c = 0; c <= 1; c++) begin
        y = 2'(therm(yv)); cin = 1'(c);
        #1;
        checks++;
        if (s !== 3'(therm(yv + c))) begin
          failures++; $display("FAIL Y=%0d Cin=%0d s=%b", yv, c, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
