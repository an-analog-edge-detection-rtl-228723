// group_mux: the 6:1 multiplexer of the edge chip's output path.
//
// The 48-bit row is arranged in GROUPS = 6 groups of 8 bits; sel picks group
// sel, i.e. bits 8*sel .. 8*sel+7 (columns 8*sel .. 8*sel+7 of the
// effective array, the lowest column in bit 0). A select value beyond the
// last group gives zero. Combinational.
module group_mux #(
  parameter int GROUPS = 6,
  parameter int GW     = 8,
  localparam int SW    = $clog2(GROUPS)
) (
  input  logic [GROUPS*GW-1:0] d,
  input  logic [SW-1:0]        sel,
  output logic [GW-1:0]        y
);
  always_comb begin
    y = '0;
    for (int g = 0; g < GROUPS; g++)
      if (int'(sel) == g) y = d[g*GW +: GW];
  end
endmodule
