// tb_abacus_ps -- self-check of the PS cell.
//
// Drives every two-bead X with and without a carry, skipping X=2 with a
// carry (that sum cannot occur in a 4x2 converter and the cell has no fourth
// state for it), and checks O against the thermometer code of X + Cin.
module tb_abacus_ps;
  import abacus_pkg::*;

  bead2_t x;
  logic   cin;
  bead3_t o;
  int checks = 0, failures = 0;

  abacus_ps dut (.x(x), .cin(cin), .o(o));

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
    for (int xv = 0; xv <= 2; xv++) begin
      for (int c = 0; c <= 1; c++) begin
        if (xv + c <= 2) begin
          x = 2'(therm(xv)); cin = 1'(c);
          #1;
          checks++;
          if (o !== 3'(therm(xv + c))) begin
            failures++; $display("FAIL X=%0d Cin=%0d o=%b", xv, c, o);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
