// abacus_pa7_4 -- two digits and a carry to one digit and a carry (PA7_4).
//
// X + Y + Cin (0..7) of one weight: a PA cell counts X and Y into six beads,
// a PTA cell adds Cin and splits the count into three beads S (weight 1) and
// a carry bead Cout (weight 4). Seven input beads, four output beads, as the
// paper's name says. Structure as in the paper's PA7_4 block diagram.
//
// Interface: x, y = three-bead digits, cin, s = S2S1S0, cout.
// Timing: combinational, PA then PTA.
module abacus_pa7_4
  import abacus_pkg::*;
(
  input  bead3_t x,
  input  bead3_t y,
  input  logic   cin,
  output bead3_t s,
  output logic   cout
);

  bead6_t k;

  abacus_pa       u_pa  (.x(x), .y(y), .k(k));
  abacus_pta_cell u_pta (.k(k), .cin(cin), .o(s), .cout(cout));

endmodule
