// wallace_mult8: 8x8 signed multiplier with a 16-bit product.
//
// As in the design, the multiplier is split into four 4x4 multiplier blocks
// and a Wallace (carry-save) tree: the four 8-bit partial products, placed at
// bit offsets 0, 4, 4 and 8, are reduced by two levels of 3:2 carry-save
// adders and one final carry-propagate adder. Operands are two's complement
// (this design's choice): the tree multiplies magnitudes and the sign is
// applied at the end, which also covers -128 x -128 = 16384. Purely
// combinational; a pipeline register between the blocks and the tree could
// be added as the design suggests, but is not.
module wallace_mult8 (
  input  logic signed [7:0]  a,
  input  logic signed [7:0]  b,
  output logic signed [15:0] p
);
  logic [7:0]  ma, mb;
  logic [7:0]  pp0, pp1, pp2, pp3;
  logic [15:0] x0, x1, x2, x3;
  logic [15:0] s1, c1, s2, c2, mag;
  logic        neg;

  assign neg = a[7] ^ b[7];
  assign ma  = a[7] ? 8'(-a) : a;   // -(-128) = 128 fits unsigned
  assign mb  = b[7] ? 8'(-b) : b;

  mult4x4 u_ll (.a(ma[3:0]), .b(mb[3:0]), .p(pp0));
  mult4x4 u_hl (.a(ma[7:4]), .b(mb[3:0]), .p(pp1));
  mult4x4 u_lh (.a(ma[3:0]), .b(mb[7:4]), .p(pp2));
  mult4x4 u_hh (.a(ma[7:4]), .b(mb[7:4]), .p(pp3));

  assign x0 = 16'(pp0);
  assign x1 = 16'(pp1) << 4;
  assign x2 = 16'(pp2) << 4;
  assign x3 = 16'(pp3) << 8;

  // Carry-save level 1: x0 + x1 + x2 -> s1 + c1
  assign s1 = x0 ^ x1 ^ x2;
  assign c1 = ((x0 & x1) | (x0 & x2) | (x1 & x2)) << 1;
  // Carry-save level 2: s1 + c1 + x3 -> s2 + c2
  assign s2 = s1 ^ c1 ^ x3;
  assign c2 = ((s1 & c1) | (s1 & x3) | (c1 & x3)) << 1;
  // Final carry-propagate adder
  assign mag = s2 + c2;

  assign p = neg ? -$signed(mag) : $signed(mag);
endmodule
