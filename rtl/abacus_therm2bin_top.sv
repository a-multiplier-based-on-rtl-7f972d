// abacus_therm2bin_top -- top product digit to binary (the TB1 cell).
//
// The last, most significant digit of a product is three beads K (0..3) plus
// the carry from the digit below. Its binary value S1S0 = (K + Cin) mod 4 is
// the top two product bits; no carry leaves the product, because a product
// of two n-bit numbers fits in 2n bits. The paper only draws this cell; its
// equations here are those of the TB cell with beads K3..K5 absent.
//
// Interface: k = K2K1K0 (thermometer code), cin, s = S1S0.
// A deferred assertion reports bead inputs that are not thermometer codes.
// Timing: combinational.
module abacus_therm2bin_top
  import abacus_pkg::*;
(
  input  bead3_t     k,
  input  logic       cin,
  output logic [1:0] s
);

  always_comb begin
    s[0] = (~cin & ((~k[1] & k[0]) | k[2])) | (cin & (~k[0] | (~k[2] & k[1])));
    s[1] = (~cin & k[1]) | (cin & ~k[2] & k[0]);
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((k & (k + 3'd1)) == 3'd0))
      else $error("abacus_therm2bin_top: k not a thermometer code");

endmodule
