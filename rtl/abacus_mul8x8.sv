// abacus_mul8x8 -- 8x8-bit unsigned multiplier on the Chinese-abacus principle.
//
// The same three steps as the 4x4 multiplier, one size up. (1) Two 8x4
// binary-to-abacus converters form B x A3..A0 and B x A7..A4 as six radix-4
// digits of three beads each; the second is worth 16 times the first, so it
// lines up two digits higher. (2) In the four digit positions where both
// overlap (2 to 5) a PA cell counts the two digits into six beads. (3) A
// chain of TB cells turns each count into two product bits and a carry.
// Digits 0 and 1 come from the low converter alone and are only decoded.
// Digit 6 (the high converter's digit 4 plus the carry) uses a TB cell whose
// beads K3..K5 are zero, and digit 7 a TB1 cell, as the top digit of the 4x4
// multiplier does.
// The paper gives this multiplier's make-up (two 8x4 converters, four PA and
// four TB modules) and its three steps but no wiring diagram; the handling of
// digits 0, 1, 6 and 7 is this design's choice, modelled on the 4x4 version.
//
// Interface: a = multiplier A7..A0, b = multiplicand B7..B0, p = P15..P0.
// Timing: combinational; the TB carry chain runs from digit 2 to digit 7.
module abacus_mul8x8
  import abacus_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  bead3_t [5:0] dig_lo, dig_hi;  // B x A lo, B x A hi (weight 16)
  bead6_t [5:2] k_sum;           // PA counts of digit positions 2..5
  logic   [7:2] c_tb;            // c_tb[j]: carry into digit j (c_tb[2] = 0)

  abacus_bpa8x4 u_bpa_lo (.b(b), .a(a[3:0]), .o(dig_lo));
  abacus_bpa8x4 u_bpa_hi (.b(b), .a(a[7:4]), .o(dig_hi));

  abacus_bead3_to_bin u_dec0 (.l(dig_lo[0]), .p(p[1:0]));
  abacus_bead3_to_bin u_dec1 (.l(dig_lo[1]), .p(p[3:2]));

  always_comb c_tb[2] = 1'b0;

  for (genvar j = 2; j <= 5; j++) begin : g_col
    abacus_pa u_pa (.x(dig_hi[j-2]), .y(dig_lo[j]), .k(k_sum[j]));
    abacus_therm2bin u_tb (
      .k(k_sum[j]), .cin(c_tb[j]), .s(p[2*j+1:2*j]), .cout(c_tb[j+1])
    );
  end

  abacus_therm2bin u_tb6 (
    .k({3'b000, dig_hi[4]}), .cin(c_tb[6]), .s(p[13:12]), .cout(c_tb[7])
  );
  abacus_therm2bin_top u_tb7 (.k(dig_hi[5]), .cin(c_tb[7]), .s(p[15:14]));

endmodule
