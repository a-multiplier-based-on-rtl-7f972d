// abacus_ps -- adds the PR carry to the two higher beads (the PS cell).
//
// X (two beads, 0..2) plus the carry bead Cin, returned as three beads O.
// Inside a 4x2 converter this sum never exceeds 2 (the largest product,
// 15 x 3 = 45, has a top digit of 2), so, as in the paper's equations
// (12)-(14), the third bead O2 is constant zero and the case X=2, Cin=1 is
// not handled.
//
// Interface: x = X1X0, cin = carry in, o = O2O1O0.
// A deferred assertion reports bead inputs that are not thermometer codes.
// Timing: combinational.
module abacus_ps
  import abacus_pkg::*;
(
  input  bead2_t x,
  input  logic   cin,
  output bead3_t o
);

  always_comb begin
    o[0] = x[0] | cin;
    o[1] = x[1] | (cin & x[0]);
    o[2] = 1'b0;
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((x & (x + 2'd1)) == 2'd0))
      else $error("abacus_ps: x not a thermometer code");
  always_comb
    assert final (!(x[1] && cin))
      else $error("abacus_ps: X=2 with a carry exceeds two beads");

endmodule
