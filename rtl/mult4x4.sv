// mult4x4: unsigned 4x4 multiplier block, the building block of the
// 8-bit Wallace-tree multiplier. Combinational: its 16 AND-gate partial
// products are summed with shifted additions.
module mult4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p = p + (8'(a) << i);
  end
endmodule
