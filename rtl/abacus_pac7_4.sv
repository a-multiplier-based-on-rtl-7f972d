// abacus_pac7_4 -- a 3-bead digit, a 2-bead digit and two carries to one digit
// and one carry (PAC7_4).
//
// A PA3_3 cell merges the two-bead digit Y with Cin1 into three beads; a
// PA7_4 cell adds those to the three-bead digit X and Cin2, giving three
// beads S and one carry bead Cout of weight 4. The sum is at most 7, so one
// carry is enough. Structure as in the paper's PAC7_4 block diagram.
//
// Interface: x = X2X1X0, y = Y1Y0, cin1, cin2, s = S2S1S0, cout.
// Timing: combinational, PA3_3 then PA7_4.
module abacus_pac7_4
  import abacus_pkg::*;
(
  input  bead3_t x,
  input  bead2_t y,
  input  logic   cin1,
  input  logic   cin2,
  output bead3_t s,
  output logic   cout
);

  bead3_t y_merged;

  abacus_pa3_3 u_pa3_3 (.y(y), .cin(cin1), .s(y_merged));
  abacus_pa7_4 u_pa7_4 (.x(x), .y(y_merged), .cin(cin2), .s(s), .cout(cout));

endmodule
