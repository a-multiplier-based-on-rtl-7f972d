// abacus_pta_cell -- thermometer sum plus carry back to one digit (PTA cell).
//
// Adds a carry Cin to a six-bead sum K (0..6). The result 0..7 leaves as three
// beads O (the value mod 4, weight 1) and a carry bead Cout (weight 4), so the
// output stays in bead form for a following adder instead of becoming binary
// as in the TB cell. Only the fourteen thermometer inputs can occur; the
// equations are the paper's (26)-(29), with Cin selecting between two
// functions of K.
//
// Interface: k = K5..K0, cin, o = O2O1O0 (thermometer code), cout.
// A deferred assertion reports bead inputs that are not thermometer codes.
// Timing: combinational.
module abacus_pta_cell
  import abacus_pkg::*;
(
  input  bead6_t k,
  input  logic   cin,
  output bead3_t o,
  output logic   cout
);

  always_comb begin
    cout = (k[2] & cin) | (k[3] & ~cin);
    o[0] = ((k[3] | ~k[2]) & cin) | (k[0] & (k[4] | ~k[3]) & ~cin);
    o[1] = (k[0] & (k[4] | ~k[2]) & cin) | (k[5] & ~cin) | (~k[3] & k[1] & ~cin);
    o[2] = (k[1] & (k[5] | ~k[2]) & cin) | (~k[3] & k[2] & ~cin);
  end

  // Input rule: bead inputs carry thermometer codes.
  always_comb
    assert final (((k & (k + 6'd1)) == 6'd0))
      else $error("abacus_pta_cell: k not a thermometer code");

endmodule
