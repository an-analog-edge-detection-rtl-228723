// tb_edge_readout_ctrl: runs a frame with the default settle time and one
// with a settle time shorter than the byte output (which forces stalls).
// Checks: rows are selected in order, each selected for SETTLE cycles
// before load1; every row's six bytes leave in order with addresses
// row*6+g; the frame ends ROWS*(SETTLE+1)+GROUPS cycles after start when no stall
// occurs; stalls happen only when SETTLE < GROUPS.
module tb_edge_readout_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst, start_a, start_b;

  // instance A: default timing, 64 rows
  logic row_en_a, load1_a, load2_a, out_load_a, stall_a, busy_a, done_a;
  logic [5:0] row_addr_a; logic [2:0] grp_a; logic [8:0] oaddr_a;
  edge_readout_ctrl dut_a (.clk, .rst, .start(start_a), .row_en(row_en_a), .row_addr(row_addr_a),
    .load1(load1_a), .load2(load2_a), .grp_sel(grp_a), .out_load(out_load_a), .out_addr(oaddr_a),
    .stall(stall_a), .busy(busy_a), .frame_done(done_a));

  // instance B: 8 rows, SETTLE = 2 < 6 groups
  logic row_en_b, load1_b, load2_b, out_load_b, stall_b, busy_b, done_b;
  logic [2:0] row_addr_b; logic [2:0] grp_b; logic [5:0] oaddr_b;
  edge_readout_ctrl #(.ROWS_EFF(8), .GROUPS(6), .SETTLE(2)) dut_b (.clk, .rst, .start(start_b),
    .row_en(row_en_b), .row_addr(row_addr_b), .load1(load1_b), .load2(load2_b), .grp_sel(grp_b),
    .out_load(out_load_b), .out_addr(oaddr_b), .stall(stall_b), .busy(busy_b), .frame_done(done_b));

  task automatic run_a();
    int cyc = 0, bytes = 0, sel_run = 0, rows_loaded = 0, stalls = 0;
    start_a = 1; @(posedge clk); #1 start_a = 0; cyc = 0;
    while (!done_a && cyc < 5000) begin
      if (row_en_a) sel_run++;
      if (load1_a) begin
        checks++;
        if (sel_run != 10 || int'(row_addr_a) != rows_loaded) begin
          failures++; $display("FAIL A load1 row %0d after %0d", row_addr_a, sel_run);
        end
        rows_loaded++;
      end
      if (load2_a) sel_run = 0;
      if (stall_a) stalls++;
      if (out_load_a) begin
        checks++;
        if (int'(oaddr_a) != bytes || int'(grp_a) != bytes % 6) begin
          failures++; $display("FAIL A byte %0d addr %0d grp %0d", bytes, oaddr_a, grp_a);
        end
        bytes++;
      end
      @(posedge clk); #1; cyc++;
    end
    checks += 3;
    if (bytes != 384) begin failures++; $display("FAIL A bytes=%0d", bytes); end
    if (cyc != 64 * 11 + 6) begin failures++; $display("FAIL A cycles=%0d", cyc); end
    if (stalls != 0) begin failures++; $display("FAIL A stalls=%0d", stalls); end
    $display("frame A: %0d cycles, %0d bytes", cyc, bytes);
  endtask

  task automatic run_b();
    int cyc = 0, bytes = 0, stalls = 0, rows_loaded = 0;
    start_b = 1; @(posedge clk); #1 start_b = 0;
    while (!done_b && cyc < 5000) begin
      if (stall_b) stalls++;
      if (load1_b) begin
        checks++;
        if (int'(row_addr_b) != rows_loaded) failures++;
        rows_loaded++;
      end
      if (out_load_b) begin
        checks++;
        if (int'(oaddr_b) != bytes) begin failures++; $display("FAIL B byte %0d", bytes); end
        bytes++;
      end
      @(posedge clk); #1; cyc++;
    end
    checks += 2;
    if (bytes != 48) begin failures++; $display("FAIL B bytes=%0d", bytes); end
    if (stalls == 0) begin failures++; $display("FAIL B: no stall happened"); end
    $display("frame B: %0d cycles, %0d stalls", cyc, stalls);
  endtask

  initial begin
    rst = 1; start_a = 0; start_b = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    run_a();
    run_b();
    checks++;
    if (busy_a || busy_b) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
