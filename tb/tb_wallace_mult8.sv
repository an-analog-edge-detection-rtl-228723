// tb_wallace_mult8: exhaustive check of the 8x8 signed Wallace-tree
// multiplier against the integer product of all 65536 operand pairs.
module tb_wallace_mult8;
  logic signed [7:0]  a, b;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  wallace_mult8 dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 5) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
