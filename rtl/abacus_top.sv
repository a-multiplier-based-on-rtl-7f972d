// abacus_top -- the 4x4 and the 8x8 abacus multipliers side by side.
//
// The two multipliers are independent circuits of the same family; each has
// its own operands and product. Both are purely combinational: the product is
// valid one propagation delay after the operands change, with no clock,
// reset or handshake.
//
// Interface: a4 x b4 = p4 (4x4 bits), a8 x b8 = p8 (8x8 bits), unsigned.
module abacus_top (
  input  logic [3:0]  a4,
  input  logic [3:0]  b4,
  output logic [7:0]  p4,
  input  logic [7:0]  a8,
  input  logic [7:0]  b8,
  output logic [15:0] p8
);

  abacus_mul4x4 u_mul4 (.a(a4), .b(b4), .p(p4));
  abacus_mul8x8 u_mul8 (.a(a8), .b(b8), .p(p8));

endmodule
