// row_decoder: selects one row of the cell array for readout.
//
// addr counts the effective rows 0 .. 2**AW-1; effective row n is physical
// row n + FIRST, because the outermost rows only serve as neighbours (their
// own outputs suffer from the missing cells beyond the edge). With en low no
// row is selected. Combinational; one-hot output. The offset mapping is this
// design's reading of "the number of effective data are 48 by 64".
module row_decoder #(
  parameter int ROWS  = 66,
  parameter int AW    = 6,
  parameter int FIRST = 1
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] row_sel
);
  always_comb begin
    row_sel = '0;
    for (int r = 0; r < ROWS; r++)
      if (en && r == int'(addr) + FIRST) row_sel[r] = 1'b1;
  end
endmodule
