// tb_abacus_bead3_to_bin -- exhaustive self-check of the lowest-digit decoder.
//
// Each of the four three-bead codes must decode to its count in binary.
module tb_abacus_bead3_to_bin;
  import abacus_pkg::*;

  bead3_t     l;
  logic [1:0] p;
  int checks = 0, failures = 0;

  abacus_bead3_to_bin dut (.l(l), .p(p));

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
    for (int lv = 0; lv <= 3; lv++) begin
      l = 3'(therm(lv));
      #1;
      checks++;
      if (p !== 2'(lv)) begin
        failures++; $display("FAIL L=%0d p=%0d", lv, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
