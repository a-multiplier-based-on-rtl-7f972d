// abacus_pkg -- bead-group types shared by the abacus multiplier cells.
//
// Every number inside the multiplier is held as groups of "beads": wires that
// are set from bit 0 upward, so a group of n wires holds a value 0..n as a
// thermometer code (3 beads: 000, 001, 011, 111). The value of a group is the
// number of set wires. One radix-4 digit of a partial product is a group of
// three beads; the adders produce six-bead sums. Bit 0 of each type is the
// first bead to be set (the paper-style name K0, L0, ...).
//
// abacus3_t is the output of one 4x2 binary-to-abacus converter: three radix-4
// digits H|M|L with weights 16, 4 and 1. This package holds types only; there
// is no timing, every cell of the design is combinational.
package abacus_pkg;

  typedef logic [1:0] bead2_t;  // two beads, value 0..2
  typedef logic [2:0] bead3_t;  // three beads, value 0..3 (one radix-4 digit)
  typedef logic [5:0] bead6_t;  // six beads, value 0..6 (sum of two digits)

  typedef struct packed {
    bead3_t h;  // weight 16
    bead3_t m;  // weight 4
    bead3_t l;  // weight 1
  } abacus3_t;

endpackage
