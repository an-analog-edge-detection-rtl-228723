// adder20: the PE's 20-bit adder/subtractor.
//
// y = a + b, or a - b when sub = 1 (two's complement, wrapping). neg is the
// sign bit of the result, used by the PE to set its compare flag. The width
// is the design's; the subtract input and the flag are this design's choice,
// needed for the error terms and the distortion comparison of the mapped
// learning algorithms. Combinational.
module adder20 #(
  parameter int W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y,
  output logic         neg
);
  assign y   = a + (sub ? ~b : b) + W'(sub);
  assign neg = y[W-1];
endmodule
