// tb_data_cache: random writes and combinational reads of the 256 x 8 cache
// against a reference array.
module tb_data_cache;
  logic clk = 0, we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] ref_mem [256];
  int checks = 0, failures = 0;

  data_cache dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 2000; t++) begin
      we = 1'($urandom); addr = 8'($urandom); wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin failures++; $display("FAIL addr=%0d", addr); end
      @(posedge clk); #1;
      if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
