// tb_abacus_therm2bin_top -- exhaustive self-check of the TB1 cell.
//
// Every three-bead digit with and without a carry: S must be
// (K + Cin) mod 4 in binary.
module tb_abacus_therm2bin_top;
  import abacus_pkg::*;

  bead3_t     k;
  logic       cin;
  logic [1:0] s;
  int checks = 0, failures = 0;

  abacus_therm2bin_top dut (.k(k), .cin(cin), .s(s));

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
    for (int kv = 0; kv <= 3; kv++) begin
      for (int c = 0; c <= 1; c++) begin
        k = 3'(therm(kv)); cin = 1'(c);
        #1;
        checks++;
        if (s !== 2'((kv + c) % 4)) begin
          failures++; $display("FAIL K=%0d Cin=%0d s=%0d", kv, c, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
