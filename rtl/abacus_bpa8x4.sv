// abacus_bpa8x4 -- 8-bit by 4-bit binary product to abacus form.
//
// Turns B7..B0 x A3..A0 (0..3825) into six radix-4 digits of three beads each,
// O17..O0, with digit j worth 4^j. Four 4x2 converters form the partial
// products of each nibble of B with each bit pair of A; they overlap as
//
//   digit:        5     4     3     2     1     0
//   B lo x A lo                     H     M     L
//   B lo x A hi               H     M     L
//   B hi x A lo               M     L            (shifted by 2 digits)
//   B hi x A hi         H     M     L            (shifted by 3 digits)
//                 H
//
// (the last row continues the first at the left: B hi x A hi gives digits
// 3, 4 and 5). Digit 0 is passed on; digit 1 is a PA7_4 (two digits); digits
// 2 and 3 are PA11_5 cells (three digits, carries from below); digit 4 is a
// PAC7_4 (a 2-bead H, a digit and two carries); digit 5 is a PA3_3 (the last
// H and one carry). The column cells and their wiring follow the paper's 8x4
// BPA block diagram; the unused carry inputs of the lowest cells are zero.
// The H digit of a 4x2 converter has at most two beads, so it enters the
// two-bead port of PAC7_4 and PA3_3 and the X port of PA11_5.
//
// Interface: b = multiplicand, a = multiplier nibble, o = six three-bead
// digits (o[j][n] is output bead O(3j+n)).
// Timing: combinational; the carries ripple through digits 1 to 5.
module abacus_bpa8x4
  import abacus_pkg::*;
(
  input  logic   [7:0] b,
  input  logic   [3:0] a,
  output bead3_t [5:0] o
);

  abacus3_t bpa_ll, bpa_lh, bpa_hl, bpa_hh;  // B nibble x A bit pair
  logic     c1;            // PA7_4 carry into digit 2
  logic     c2_1, c2_2;    // PA11_5 carries into digit 3
  logic     c3_1, c3_2;    // PA11_5 carries into digit 4
  logic     c4;            // PAC7_4 carry into digit 5

  abacus_bpa4x2 u_bpa_ll (.b(b[3:0]), .a(a[1:0]), .bpa(bpa_ll));
  abacus_bpa4x2 u_bpa_lh (.b(b[3:0]), .a(a[3:2]), .bpa(bpa_lh));
  abacus_bpa4x2 u_bpa_hl (.b(b[7:4]), .a(a[1:0]), .bpa(bpa_hl));
  abacus_bpa4x2 u_bpa_hh (.b(b[7:4]), .a(a[3:2]), .bpa(bpa_hh));

  always_comb o[0] = bpa_ll.l;

  abacus_pa7_4 u_col1 (
    .x(bpa_ll.m), .y(bpa_lh.l), .cin(1'b0), .s(o[1]), .cout(c1)
  );

  abacus_pa11_5 u_col2 (
    .x(bpa_ll.h), .y(bpa_lh.m), .z(bpa_hl.l), .cin1(c1), .cin2(1'b0),
    .s(o[2]), .cout1(c2_1), .cout2(c2_2)
  );

  abacus_pa11_5 u_col3 (
    .x(bpa_lh.h), .y(bpa_hl.m), .z(bpa_hh.l), .cin1(c2_1), .cin2(c2_2),
    .s(o[3]), .cout1(c3_1), .cout2(c3_2)
  );

  abacus_pac7_4 u_col4 (
    .x(bpa_hh.m), .y(bpa_hl.h[1:0]), .cin1(c3_1), .cin2(c3_2),
    .s(o[4]), .cout(c4)
  );

  abacus_pa3_3 u_col5 (.y(bpa_hh.h[1:0]), .cin(c4), .s(o[5]));

endmodule
