// abacus_pa -- parallel addition of two 3-bead digits (the PA module).
//
// X and Y (three beads each, 0..3) are added into a six-bead thermometer sum
// K (0..6). As in the paper's equations (15)-(22), X is decoded into one of
// four one-hot cases (X=0, 1, 2, 3) and each case shifts the beads of Y up
// by X positions, filling the positions below with ones: the cell works like
// a multiplexer and counts all beads at once, with no carry chain.
//
// Interface: x = X2X1X0, y = Y2Y1Y0, k = K5..K0. Inputs must be thermometer
// codes; a deferred assertion reports any that is not.
// Timing: combinational, two gate levels.
module abacus_pa
  import abacus_pkg::*;
(
  input  bead3_t x,
  input  bead3_t y,
  output bead6_t k
);

  logic f1, f2, x_zero, x_three;  // X = 2, 1, 0, 3

  always_comb begin
    f1      = ~x[2] & x[1];
    f2      = ~x[1] & x[0];
    x_zero  = ~x[0];
    x_three =  x[2];

    k[0] = f1 | f2 | (y[0] & x_zero) | x_three;
    k[1] = f1 | (y[0] & f2) | (y[1] & x_zero) | x_three;
    k[2] = (y[0] & f1) | (y[1] & f2) | (y[2] & x_zero) | x_three;
    k[3] = (y[1] & f1) | (y[2] & f2) | (y[0] & x_three);
    k[4] = (y[2] & f1) | (y[1] & x_three);
    k[5] = y[2] & x_three;
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((x & (x + 3'd1)) == 3'd0) && ((y & (y + 3'd1)) == 3'd0))
      else $error("abacus_pa: x, y not a thermometer code");

endmodule
