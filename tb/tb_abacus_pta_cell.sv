// tb_abacus_pta_cell -- exhaustive self-check of the PTA cell.
//
// The fourteen valid inputs (K = 0..6, Cin = 0/1): O must be the thermometer
// code of (K + Cin) mod 4 and Cout must be set when K + Cin >= 4.
module tb_abacus_pta_cell;
  import abacus_pkg::*;

  bead6_t k;
  logic   cin, cout;
  bead3_t o;
  int checks = 0, failures = 0;

  abacus_pta_cell dut (.k(k), .cin(cin), .o(o), .cout(cout));

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
    for (int kv = 0; kv <= 6; kv++) begin
      for (int c = 0; c <= 1; c++) begin
        k = therm(kv); cin = 1'(c);
        #1;
        checks += 2;
        if (o !== 3'(therm((kv + c) % 4))) begin
          failures++; $display("FAIL K=%0d Cin=%0d o=%b", kv, c, o);
        end
        if (cout !== (kv + c >= 4)) begin
          failures++; $display("FAIL K=%0d Cin=%0d cout=%b", kv, c, cout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
