// tb_buffer_sram: both ports write and read a 512-word instance against a
// reference array; read data appears one cycle after the address.
module tb_buffer_sram;
  localparam int D = 512;
  logic clk = 0;
  logic a_we, b_we;
  logic [8:0] a_addr, b_addr;
  logic [7:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [7:0] ref_mem [D];
  int checks = 0, failures = 0;

  buffer_sram #(.DEPTH(D), .W(8)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
                                       .b_we, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea, eb;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port A (even) and port B (odd)
    for (int i = 0; i < D; i += 2) begin
      a_we = 1; a_addr = 9'(i); a_wdata = 8'($urandom); ref_mem[i] = a_wdata;
      b_we = 1; b_addr = 9'(i + 1); b_wdata = 8'($urandom); ref_mem[i + 1] = b_wdata;
      @(posedge clk); #1;
    end
    a_we = 0; b_we = 0;
    for (int t = 0; t < 1000; t++) begin
      a_addr = 9'($urandom); b_addr = 9'($urandom);
      ea = ref_mem[a_addr]; eb = ref_mem[b_addr];
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== ea) begin failures++; $display("FAIL A addr=%0d", a_addr); end
      if (b_rdata !== eb) begin failures++; $display("FAIL B addr=%0d", b_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
