// tb_register_file: random traffic on both write ports and both read ports
// against a reference model: r0 reads zero, the adder port wins a same-
// register conflict, reset clears every register.
module tb_register_file;
  logic clk = 0, rst;
  logic [2:0] ra, rb, wa_m, wa_a;
  logic [19:0] rd1, rd2, wd_m, wd_a;
  logic we_m, we_a;
  logic [19:0] ref_r [8];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst, .ra, .rb, .rd1, .rd2, .we_m, .wa_m, .wd_m, .we_a, .wa_a, .wd_a);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we_m = 0; we_a = 0; wa_m = 0; wa_a = 0; wd_m = 0; wd_a = 0; ra = 0; rb = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) ref_r[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      we_m = 1'($urandom); wa_m = 3'($urandom); wd_m = 20'($urandom);
      we_a = 1'($urandom); wa_a = 3'($urandom); wd_a = 20'($urandom);
      if (t % 7 == 0) wa_a = wa_m;
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks += 2;
      if (rd1 !== ref_r[ra]) begin failures++; $display("FAIL rd1 r%0d", ra); end
      if (rd2 !== ref_r[rb]) begin failures++; $display("FAIL rd2 r%0d", rb); end
      @(posedge clk); #1;
      if (we_m && wa_m != 0) ref_r[wa_m] = wd_m;
      if (we_a && wa_a != 0) ref_r[wa_a] = wd_a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
