// abacus_pa11_5 -- three digits and two carries to one digit and two carries.
//
// X + Y + Z + Cin1 + Cin2 of one weight (eleven input beads) becomes three
// beads S of that weight and two carry beads Cout1, Cout2 of weight 4 (five
// output beads). Two PA7_4 cells in a row: the first adds X, Y and Cin1, the
// second adds Z, the first one's digit and Cin2. Each cell emits its own
// carry, so no carry has to be merged. Structure as in the paper's PA11_5
// block diagram. Within a converter X carries at most two beads, which keeps
// every intermediate sum inside the range of the PA7_4 cells.
//
// Interface: x, y, z = three-bead digits, cin1, cin2, s = S2S1S0, cout1, cout2.
// Timing: combinational, two PA7_4 cells deep.
module abacus_pa11_5
  import abacus_pkg::*;
(
  input  bead3_t x,
  input  bead3_t y,
  input  bead3_t z,
  input  logic   cin1,
  input  logic   cin2,
  output bead3_t s,
  output logic   cout1,
  output logic   cout2
);

  bead3_t s_first;

  abacus_pa7_4 u_first  (.x(x), .y(y), .cin(cin1), .s(s_first), .cout(cout1));
  abacus_pa7_4 u_second (.x(z), .y(s_first), .cin(cin2), .s(s), .cout(cout2));

endmodule
