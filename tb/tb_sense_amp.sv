// tb_sense_amp: S0 gives I * R and S1 flags an edge exactly when the current
// reaches the threshold current (vth / R), including the equality case.
module tb_sense_amp;
  logic signed [23:0] i_pa;
  logic signed [47:0] vth_pv, v0_pv;
  logic edge_o;
  int checks = 0, failures = 0;

  sense_amp #(.I_W(24), .R_OHM(5000)) dut (.i_pa, .vth_pv, .v0_pv, .edge_o);

  task automatic try(input int i, input longint ith);
    i_pa = 24'(i); vth_pv = 48'(ith * 5000);
    #1;
    checks++;
    if (v0_pv != 48'(longint'(i) * 5000) || edge_o !== (longint'(i) >= ith)) begin
      failures++;
      $display("FAIL i=%0d ith=%0d v0=%0d edge=%b", i, ith, v0_pv, edge_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 0); try(-1, 0); try(5000, 5000); try(4999, 5000); try(-40000, -39999);
    for (int k = 0; k < 500; k++) try(int'($urandom_range(0, 200000)) - 100000, longint'($urandom_range(0, 40000)) - 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
