// tb_output_reg: a load captures byte and address on the clock edge and
// raises valid for exactly the following cycle; without load the register
// holds its value and valid stays low.
module tb_output_reg;
  logic clk = 0, rst, load;
  logic [7:0] d, q;
  logic [8:0] d_addr, q_addr;
  logic valid;
  int checks = 0, failures = 0;

  output_reg dut (.clk, .rst, .load, .d, .d_addr, .q, .q_addr, .valid);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ed; logic [8:0] ea; logic el;
    rst = 1; load = 0; d = 0; d_addr = 0;
    @(posedge clk); #1 rst = 0;
    ed = 0; ea = 0; el = 0;
    for (int t = 0; t < 300; t++) begin
      load = 1'($urandom); d = 8'($urandom); d_addr = 9'($urandom);
      @(posedge clk); #1;
      if (load) begin ed = d; ea = d_addr; end
      el = load;
      checks++;
      if (valid !== el || q !== ed || q_addr !== ea) begin
        failures++;
        $display("FAIL t=%0d valid=%b q=%h addr=%0d", t, valid, q, q_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
