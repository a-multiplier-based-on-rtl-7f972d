// abacus_bt -- 2-bit by 2-bit product in bead form (the BT cell).
//
// Multiplies the two multiplicand bits I1I0 by the two multiplier bits S1S0
// (product 0..9) and returns it as three lower beads L (weight 1, value 0..3)
// and two higher beads H (weight 4, value 0..2). The multiplier pair acts as a
// selector: S=01 passes I, S=10 doubles it, S=11 triples it, S=00 gives zero.
// The sum-of-products below is the BT description of the paper, its equations
// (1)-(5), unchanged.
//
// Interface: i = I1I0, s = S1S0, l = L2L1L0, h = H1H0 (thermometer codes).
// Timing: combinational, no clock.
module abacus_bt
  import abacus_pkg::*;
(
  input  logic [1:0] i,
  input  logic [1:0] s,
  output bead3_t     l,
  output bead2_t     h
);

  logic sel_x1, sel_x2, sel_x3;  // multiplier value 1, 2 or 3

  always_comb begin
    sel_x1 = ~s[1] &  s[0];
    sel_x2 =  s[1] & ~s[0];
    sel_x3 =  s[1] &  s[0];

    l[0] = ((i[1] | i[0]) & sel_x1) | (i[0] & sel_x2) | ((i[1] | i[0]) & sel_x3);
    l[1] = (i[1] & sel_x1) | (i[0] & sel_x2) | ((i[1] ^ i[0]) & sel_x3);
    l[2] = (i[1] & i[0] & sel_x1) | (~i[1] & i[0] & sel_x3);
    h[0] = i[1] & s[1];
    h[1] = i[1] & i[0] & sel_x3;
  end

endmodule
