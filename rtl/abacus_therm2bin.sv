// abacus_therm2bin -- thermometer sum to binary digit (the TB module).
//
// Adds a carry Cin to a six-bead sum K (0..6) and returns the result 0..7 as
// a binary radix-4 digit S1S0 plus a carry Cout of weight 4. Cout is set when
// K reaches 4, or 3 with a carry in; S0 is the parity and S1 the second bit of
// K + Cin, both read off the edges of the thermometer code. These are the
// paper's TB equations (23)-(25). Chained from digit to digit through Cin and
// Cout, TB cells form the ripple part of the multiplier.
//
// Interface: k = K5..K0 (thermometer code), cin, s = S1S0, cout.
// A deferred assertion reports bead inputs that are not thermometer codes.
// Timing: combinational; Cin to Cout is one AND-OR level.
module abacus_therm2bin
  import abacus_pkg::*;
(
  input  bead6_t     k,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  always_comb begin
    cout = (cin & k[2]) | k[3];
    s[0] = (~cin & ((~k[1] & k[0]) | (~k[3] & k[2]) | (~k[5] & k[4])))
         | ( cin & (~k[0] | (~k[2] & k[1]) | (~k[4] & k[3]) | k[5]));
    s[1] = (~cin & ~k[3] & k[1]) | (cin & ~k[2] & k[0]) | (cin & k[4]) | k[5];
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((k & (k + 6'd1)) == 6'd0))
      else $error("abacus_therm2bin: k not a thermometer code");

endmodule
