// tb_abacus_top -- end-to-end check of both multipliers at full size.
//
// Sweeps every operand pair of the 4x4 multiplier (256) and of the 8x8
// multiplier (65536) in parallel, the 4x4 sweep repeating, and compares each
// product with the simulator's own multiplication. It also counts how often
// each carry mechanism of the bead adders was exercised and counts a failure
// for any that never was:
//   - the PR carry inside a 4x2 converter,
//   - the TB carry chain reaching the top digit (4x4 and 8x8),
//   - the PA7_4 carry and a double carry out of a PA11_5 in the 8x4 converter,
//   - the PAC7_4 carry into the PA3_3 top digit,
//   - a full six-bead PA count (both digits 3).
module tb_abacus_top;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;
  int n_pr_carry = 0, n_tb_carry4 = 0, n_tb_carry8 = 0;
  int n_pa7_4_carry = 0, n_pa11_5_double = 0, n_pac7_4_carry = 0, n_pa_full = 0;

  abacus_top dut (.a4(a4), .b4(b4), .p4(p4), .a8(a8), .b8(b8), .p8(p8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seen(string what, int count);
    checks++;
    $display("%-34s %0d", what, count);
    if (count == 0) begin
      failures++; $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 65536; n++) begin
      {a8, b8} = 16'(n);
      {a4, b4} = 8'(n);
      #1;
      checks += 2;
      if (p8 !== 16'(int'(a8) * int'(b8))) begin
        failures++;
        if (failures < 20) $display("FAIL 8x8: %0d x %0d = %0d", a8, b8, p8);
      end
      if (p4 !== 8'(int'(a4) * int'(b4))) begin
        failures++;
        if (failures < 20) $display("FAIL 4x4: %0d x %0d = %0d", a4, b4, p4);
      end
      if (dut.u_mul4.u_bpa_lo.c_pr || dut.u_mul4.u_bpa_hi.c_pr) n_pr_carry++;
      if (dut.u_mul4.c_tb2)                                      n_tb_carry4++;
      if (dut.u_mul8.c_tb[7])                                    n_tb_carry8++;
      if (dut.u_mul8.u_bpa_lo.c1)                                n_pa7_4_carry++;
      if (dut.u_mul8.u_bpa_lo.c3_1 && dut.u_mul8.u_bpa_lo.c3_2)  n_pa11_5_double++;
      if (dut.u_mul8.u_bpa_lo.c4)                                n_pac7_4_carry++;
      if (dut.u_mul8.k_sum[3][5])                                n_pa_full++;
    end
    expect_seen("PR carry (4x2 converter)", n_pr_carry);
    expect_seen("TB carry into top digit, 4x4", n_tb_carry4);
    expect_seen("TB carry into top digit, 8x8", n_tb_carry8);
    expect_seen("PA7_4 carry (8x4 converter)", n_pa7_4_carry);
    expect_seen("PA11_5 double carry", n_pa11_5_double);
    expect_seen("PAC7_4 carry into PA3_3", n_pac7_4_carry);
    expect_seen("PA six-bead count", n_pa_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
