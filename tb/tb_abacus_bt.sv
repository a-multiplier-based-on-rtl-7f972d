// tb_abacus_bt -- exhaustive self-check of the BT cell.
//
// Applies all 16 combinations of I and S and compares the beads with the
// radix-4 digits of the integer product I*S, computed here with plain
// arithmetic: L must be the thermometer code of (I*S) mod 4 and H that of
// (I*S) / 4. A watchdog ends the run with a failure if it hangs.
module tb_abacus_bt;
  import abacus_pkg::*;

  logic [1:0] i, s;
  bead3_t     l;
  bead2_t     h;
  int checks = 0, failures = 0;

  abacus_bt dut (.i(i), .s(s), .l(l), .h(h));

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
    for (int ii = 0; ii < 4; ii++) begin
      for (int ss = 0; ss < 4; ss++) begin
        int prod;
        i = 2'(ii); s = 2'(ss);
        #1;
        prod = ii * ss;
        checks += 2;
        if (l !== 3'(therm(prod % 4))) begin
          failures++; $display("FAIL I=%0d S=%0d l=%b", ii, ss, l);
        end
        if (h !== 2'(therm(prod / 4))) begin
          failures++; $display("FAIL I=%0d S=%0d h=%b", ii, ss, h);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
