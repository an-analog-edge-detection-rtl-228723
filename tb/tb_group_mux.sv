// tb_group_mux: each select value returns its own byte of the 48-bit row;
// out-of-range selects return zero.
module tb_group_mux;
  logic [47:0] d;
  logic [2:0]  sel;
  logic [7:0]  y;
  int checks = 0, failures = 0;

  group_mux dut (.d, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      d = {16'($urandom), 32'($urandom)};
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (y !== ((s < 6) ? d[s*8 +: 8] : 8'h00)) begin
          failures++;
          $display("FAIL d=%h sel=%0d y=%h", d, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
