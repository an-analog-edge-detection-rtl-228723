// tb_row_decoder: every address selects exactly physical row addr + 1;
// with the enable low no row is selected.
module tb_row_decoder;
  logic        en;
  logic [5:0]  addr;
  logic [65:0] row_sel;
  int checks = 0, failures = 0;

  row_decoder dut (.en, .addr, .row_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 64; a++) begin
        en = 1'(e); addr = 6'(a);
        #1;
        checks++;
        if (row_sel !== (e ? (66'd1 << (a + 1)) : 66'd0)) begin
          failures++;
          $display("FAIL en=%0d addr=%0d sel=%h", e, a, row_sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
