// tb_abacus_therm2bin -- exhaustive self-check of the TB cell.
//
// Every six-bead count K (0..6) with and without a carry: S must be
// (K + Cin) mod 4 in binary and Cout must be set when K + Cin >= 4.
module tb_abacus_therm2bin;
  import abacus_pkg::*;

  bead6_t     k;
  logic       cin, cout;
  logic [1:0] s;
  int checks = 0, failures = 0;

  abacus_therm2bin dut (.k(k), .cin(cin), .s(s), .cout(cout));

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
        if (s !== 2'((kv + c) % 4)) begin
          failures++; $display("FAIL K=%0d Cin=%0d s=%0d", kv, c, s);
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
