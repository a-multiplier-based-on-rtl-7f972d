// abacus_pa3_3 -- two beads plus a carry to three beads (PA3_3).
//
// Y (two beads, 0..2) plus Cin, returned as three beads S (0..3), all of
// weight 1. With Cin = 1 every bead of Y moves up one place and S0 is set;
// with Cin = 0, Y passes. Equations (30)-(32) of the paper. The paper's truth
// table shows S = 110 for Y = 11, Cin = 1; the equations give 111, which is
// the correct sum, and are followed.
//
// Interface: y = Y1Y0 (thermometer code), cin, s = S2S1S0.
// A deferred assertion reports bead inputs that are not thermometer codes.
// Timing: combinational, one 2:1 selection per output.
module abacus_pa3_3
  import abacus_pkg::*;
(
  input  bead2_t y,
  input  logic   cin,
  output bead3_t s
);

  always_comb begin
    s[0] = cin | (y[0] & ~cin);
    s[1] = (y[0] & cin) | (y[1] & ~cin);
    s[2] = y[1] & cin;
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((y & (y + 2'd1)) == 2'd0))
      else $error("abacus_pa3_3: y not a thermometer code");

endmodule
