// tb_laplacian_cell_array: random photocurrents on the full 66 x 50 array;
// for every row, the column currents must equal the Laplacian stencil
// computed on a zero-padded copy of the image. Also checks that with no row
// selected the lines carry nothing, and that two selected rows add.
module tb_laplacian_cell_array;
  localparam int R = 66, C = 50;
  logic [15:0] iph [R][C];
  logic [R-1:0] row_sel;
  logic signed [23:0] col_i [C];
  int pad [R+2][C+2];
  int checks = 0, failures = 0;

  laplacian_cell_array #(.ROWS(R), .COLS(C)) dut (.iph, .row_sel, .col_i);

  function automatic int lap(int r, int c);  // r, c in image coordinates
    return pad[r][c+1] + pad[r+2][c+1] + pad[r+1][c] + pad[r+1][c+2] - 4 * pad[r+1][c+1];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < R + 2; r++) for (int c = 0; c < C + 2; c++) pad[r][c] = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        iph[r][c] = 16'($urandom_range(100, 10000));
        pad[r+1][c+1] = int'(iph[r][c]);
      end
    row_sel = '0;
    #1;
    for (int c = 0; c < C; c++) begin
      checks++;
      if (col_i[c] != 0) failures++;
    end
    for (int r = 0; r < R; r++) begin
      row_sel = '0; row_sel[r] = 1'b1;
      #1;
      for (int c = 0; c < C; c++) begin
        checks++;
        if (int'(col_i[c]) != lap(r, c)) begin
          failures++;
          if (failures < 5) $display("FAIL r=%0d c=%0d got %0d exp %0d", r, c, col_i[c], lap(r, c));
        end
      end
    end
    row_sel = '0; row_sel[3] = 1'b1; row_sel[40] = 1'b1;
    #1;
    for (int c = 0; c < C; c++) begin
      checks++;
      if (int'(col_i[c]) != lap(3, c) + lap(40, c)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
