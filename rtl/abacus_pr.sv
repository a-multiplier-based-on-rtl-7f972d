// abacus_pr -- adds a 3-bead and a 2-bead group of equal weight (the PR cell).
//
// X (three beads, 0..3) plus Y (two beads, 0..2) gives 0..5. The sum is
// returned as three beads K (0..3) of the same weight and a carry bead Cout
// worth four of them. The cell decodes X into one of four one-hot cases
// (X=0: ~X0, X=1: f2, X=2: f1, X=3: X2) and, for each case, routes a function
// of Y onto every output, in the style of a multiplexer; this is the paper's
// PR structure (equations (6)-(11) and the detailed PR circuit).
// For the K1 output in the X=3 case the circuit drawing inverts Y0 while the
// printed equation does not; the inverted form is the one that gives a correct
// sum (X=3, Y=1 must give K=000 with a carry) and is used here.
//
// Interface: x = X2X1X0, y = Y1Y0, k = K2K1K0, cout = carry (weight 4).
// Inputs must be thermometer codes; a deferred assertion reports any that
// is not. Timing: combinational.
module abacus_pr
  import abacus_pkg::*;
(
  input  bead3_t x,
  input  bead2_t y,
  output bead3_t k,
  output logic   cout
);

  logic f1, f2, x_zero, x_three;  // X = 2, 1, 0, 3

  always_comb begin
    f1      = ~x[2] & x[1];
    f2      = ~x[1] & x[0];
    x_zero  = ~x[0];
    x_three =  x[2];

    cout = (y[1] & f1) | (y[0] & x_three);
    k[0] = (~y[1] & f1) | f2 | (y[0] & x_zero) | ((y[1] | ~y[0]) & x_three);
    k[1] = (~y[1] & f1) | (y[0] & f2) | (y[1] & x_zero) | (~y[0] & x_three);
    k[2] = (~y[1] & y[0] & f1) | (y[1] & f2) | (~y[0] & x_three);
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((x & (x + 3'd1)) == 3'd0) && ((y & (y + 2'd1)) == 2'd0))
      else $error("abacus_pr: x, y not a thermometer code");

endmodule
