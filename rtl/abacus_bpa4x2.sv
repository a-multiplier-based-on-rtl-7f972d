// abacus_bpa4x2 -- 4-bit by 2-bit binary product to abacus form (the BPA module).
//
// Turns B3..B0 x A1A0 (0..45) into three radix-4 digits H|M|L, each three
// beads, with value 16*H + 4*M + L. Two BT cells multiply the low and the
// high multiplicand bit pair by A; the low BT's lower beads are the L digit.
// The PR cell adds the low BT's higher beads to the high BT's lower beads
// (both of weight 4) into the M digit; its carry and the high BT's higher
// beads are merged by the PS cell into the H digit. This wiring is the BPA
// block diagram of the paper.
//
// Interface: b = multiplicand, a = multiplier bit pair, bpa = {h, m, l}.
// Timing: combinational, three cell levels (BT, PR, PS).
module abacus_bpa4x2
  import abacus_pkg::*;
(
  input  logic [3:0] b,
  input  logic [1:0] a,
  output abacus3_t   bpa
);

  bead3_t l_lo, l_hi, m_sum, h_sum;
  bead2_t h_lo, h_hi;
  logic   c_pr;

  abacus_bt u_bt_lo (.i(b[1:0]), .s(a), .l(l_lo), .h(h_lo));
  abacus_bt u_bt_hi (.i(b[3:2]), .s(a), .l(l_hi), .h(h_hi));
  abacus_pr u_pr    (.x(l_hi), .y(h_lo), .k(m_sum), .cout(c_pr));
  abacus_ps u_ps    (.x(h_hi), .cin(c_pr), .o(h_sum));

  always_comb bpa = '{h: h_sum, m: m_sum, l: l_lo};

endmodule
