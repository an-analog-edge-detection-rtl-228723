// tb_adder20: random and corner-case check of the 20-bit adder/subtractor
// and its sign output against integer arithmetic modulo 2**20.
module tb_adder20;
  logic [19:0] a, b, y;
  logic sub, neg;
  int checks = 0, failures = 0;

  adder20 dut (.a, .b, .sub, .y, .neg);

  task automatic try(input logic [19:0] x, input logic [19:0] z, input logic s);
    logic [19:0] e;
    a = x; b = z; sub = s;
    #1;
    e = s ? x - z : x + z;
    checks++;
    if (y !== e || neg !== e[19]) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b y=%h exp=%h", x, z, s, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(20'h00000, 20'h00001, 1'b1);
    try(20'h7FFFF, 20'h00001, 1'b0);
    try(20'hFFFFF, 20'h00001, 1'b0);
    try(20'h00005, 20'h00005, 1'b1);
    for (int i = 0; i < 2000; i++) try(20'($urandom), 20'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
