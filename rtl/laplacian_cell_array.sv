// laplacian_cell_array: BEHAVIOURAL MODEL of the analog mesh of
// photosensor cells of the edge detection chip. It is not synthesizable
// circuitry in the real chip: each cell is a current-mode circuit
// (phototransistor, cascoded current mirrors) and this model reproduces its
// terminal behaviour with integers.
//
// Currents are in picoamperes. iph[r][c] is the photocurrent of cell (r, c).
// Each cell mirrors its photocurrent to its four nearest neighbours and sinks
// four times its own current, so its output current is
//     I_out(r,c) = I(r-1,c) + I(r+1,c) + I(r,c-1) + I(r,c+1) - 4 I(r,c),
// the 3 x 3 Laplacian stencil (0 1 0 / 1 -4 1 / 0 1 0). A neighbour outside
// the array contributes nothing (its input is grounded). When row_sel[r] is
// high, row r's row-select switch puts each cell's output current on its
// column line; the currents of all selected rows add on the line (one row is
// selected in normal use). Outputs change immediately with the inputs:
// column-line settling is accounted for by the readout controller.
module laplacian_cell_array #(
  parameter int ROWS = 66,
  parameter int COLS = 50,
  parameter int I_W  = 16,   // photocurrent, unsigned pA
  parameter int O_W  = 24    // column current, signed pA
) (
  input  logic [I_W-1:0]        iph    [ROWS][COLS],
  input  logic [ROWS-1:0]       row_sel,
  output logic signed [O_W-1:0] col_i  [COLS]
);
  // Each cell: its Laplacian current, switched onto the column line by its
  // row-select transistor.
  logic signed [O_W-1:0] cell_i [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic signed [O_W-1:0] up, dn, lf, rt, lap;
      assign up  = (r > 0)        ? $signed(O_W'(iph[(r > 0) ? r - 1 : 0][c])) : '0;
      assign dn  = (r < ROWS - 1) ? $signed(O_W'(iph[(r < ROWS - 1) ? r + 1 : r][c])) : '0;
      assign lf  = (c > 0)        ? $signed(O_W'(iph[r][(c > 0) ? c - 1 : 0])) : '0;
      assign rt  = (c < COLS - 1) ? $signed(O_W'(iph[r][(c < COLS - 1) ? c + 1 : c])) : '0;
      assign lap = up + dn + lf + rt - 4 * $signed(O_W'(iph[r][c]));
      assign cell_i[r][c] = row_sel[r] ? lap : '0;
    end
  end

  // Kirchhoff's current law on each column line
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      col_i[c] = '0;
      for (int r = 0; r < ROWS; r++) col_i[c] = col_i[c] + cell_i[r][c];
    end
  end
endmodule
