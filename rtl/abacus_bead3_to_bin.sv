// abacus_bead3_to_bin -- lowest product digit to binary.
//
// The lowest radix-4 digit of a product comes straight from a converter as
// three beads L (0..3) with nothing to add, so it only needs decoding:
// P1 = L1 (value 2 or 3) and P0 = L0 & ~L1 | L2 (value 1 or 3). This is the
// small gate network in front of P0 and P1 in the paper's 4x4 block diagram;
// the 8x8 multiplier uses it for its two lowest digits.
//
// Interface: l = L2L1L0 (thermometer code), p = binary value.
// A deferred assertion reports bead inputs that are not thermometer codes.
// Timing: combinational.
module abacus_bead3_to_bin
  import abacus_pkg::*;
(
  input  bead3_t     l,
  output logic [1:0] p
);

  always_comb begin
    p[1] = l[1];
    p[0] = (l[0] & ~l[1]) | l[2];
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((l & (l + 3'd1)) == 3'd0))
      else $error("abacus_bead3_to_bin: l not a thermometer code");

endmodule
