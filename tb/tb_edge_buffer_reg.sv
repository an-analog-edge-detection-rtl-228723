// tb_edge_buffer_reg: stage 1 follows load1, stage 2 takes stage 1's old
// value on load2, so a new row can be captured while the previous one is
// held in stage 2.
module tb_edge_buffer_reg;
  logic clk = 0, rst, load1, load2;
  logic [47:0] d, q1, q2;
  int checks = 0, failures = 0;

  edge_buffer_reg dut (.clk, .rst, .load1, .d, .load2, .q1, .q2);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] e1, e2;
    rst = 1; load1 = 0; load2 = 0; d = 0;
    @(posedge clk); #1 rst = 0;
    e1 = 0; e2 = 0;
    for (int t = 0; t < 400; t++) begin
      load1 = 1'($urandom); load2 = 1'($urandom); d = {16'($urandom), 32'($urandom)};
      @(posedge clk); #1;
      if (load2) e2 = e1;
      if (load1) e1 = d;
      checks++;
      if (q1 !== e1 || q2 !== e2) begin
        failures++;
        $display("FAIL t=%0d q1=%h q2=%h", t, q1, q2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
