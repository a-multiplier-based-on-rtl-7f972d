// abacus_mul4x4 -- 4x4-bit unsigned multiplier on the Chinese-abacus principle.
//
// P = A x B is formed in three steps. (1) Two 4x2 binary-to-abacus converters
// (BPA) turn B x A1A0 and B x A3A2 into three radix-4 digits each, every digit
// held as three beads. The second partial product is worth 4 times the first,
// so its digits line up one digit higher. (2) In the two middle digit
// positions a PA cell adds the two overlapping digits into a six-bead count,
// with no carries. (3) TB cells turn each count into two product bits and a
// carry into the next digit; the lowest digit is decoded alone and the top
// digit (the high converter's H plus the last carry) by the TB1 cell.
// The cells and their wiring follow the paper's 4x4 block diagram. The unused
// third bead of the low converter's H digit (always zero) is wired to the PA
// input Y2, and the lowest TB's carry in is tied to zero as drawn there.
//
// Interface: a = multiplier A3..A0, b = multiplicand B3..B0, p = P7..P0.
// Timing: combinational. The longest path runs BT, PR, PS, PA, TB, TB, TB1.
module abacus_mul4x4
  import abacus_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  abacus3_t bpa_lo, bpa_hi;  // B x A1A0 and B x A3A2
  bead6_t   k_mid, k_high;   // PA sums of digit positions 1 and 2
  logic     c_tb1, c_tb2;    // TB carries into digit positions 2 and 3

  abacus_bpa4x2 u_bpa_lo (.b(b), .a(a[1:0]), .bpa(bpa_lo));
  abacus_bpa4x2 u_bpa_hi (.b(b), .a(a[3:2]), .bpa(bpa_hi));

  // digit 0: decoded directly
  abacus_bead3_to_bin u_dec0 (.l(bpa_lo.l), .p(p[1:0]));

  // digit 1: low M + high L
  abacus_pa        u_pa1 (.x(bpa_hi.l), .y(bpa_lo.m), .k(k_mid));
  abacus_therm2bin u_tb1 (.k(k_mid), .cin(1'b0), .s(p[3:2]), .cout(c_tb1));

  // digit 2: low H + high M
  abacus_pa        u_pa2 (.x(bpa_hi.m), .y(bpa_lo.h), .k(k_high));
  abacus_therm2bin u_tb2 (.k(k_high), .cin(c_tb1), .s(p[5:4]), .cout(c_tb2));

  // digit 3: high H + carry
  abacus_therm2bin_top u_tb_top (.k(bpa_hi.h), .cin(c_tb2), .s(p[7:6]));

endmodule
