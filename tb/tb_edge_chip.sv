// tb_edge_chip: full-size (66 x 50) edge chip. Two frames: a bright
// rectangle (10 nA) on a dark background (100 pA), the contrast of the
// design's 8 x 8 circuit simulation, and a random image. The 384 output bytes
// of each frame are collected by address and compared with edge bits worked
// out in the testbench from the stencil and the threshold (I_out >= I_th on
// the 64 x 48 inner cells). The frame must end 64 * 11 + 6 clocks after the edge that takes start.
module tb_edge_chip;
  localparam int R = 66, C = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, start;
  logic [15:0] iph [R][C];
  logic signed [47:0] vth_pv;
  logic [7:0] out_data;
  logic [8:0] out_addr;
  logic out_valid, stall, busy, frame_done;
  logic [7:0] got [384];
  int checks = 0, failures = 0;

  edge_chip dut (.clk, .rst, .start, .iph, .vth_pv, .out_data, .out_addr, .out_valid,
                 .stall, .busy, .frame_done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(int r, int c);
    if (r < 0 || r >= R || c < 0 || c >= C) return 0;
    return int'(iph[r][c]);
  endfunction

  task automatic frame(input int ith, input string name);
    int cyc = 0, nbytes = 0, edges = 0;
    vth_pv = 48'(longint'(ith) * 5000);
    start = 1; @(posedge clk); #1 start = 0;
    while (!frame_done && cyc < 3000) begin
      @(posedge clk); #1; cyc++;
      if (out_valid) begin got[out_addr] = out_data; nbytes++; end
    end
    checks += 2;
    if (nbytes != 384) begin failures++; $display("FAIL %s bytes=%0d", name, nbytes); end
    if (cyc != 64 * 11 + 6) begin failures++; $display("FAIL %s cycles=%0d", name, cyc); end
    for (int er = 0; er < 64; er++)
      for (int ec = 0; ec < 48; ec++) begin
        int r = er + 1, c = ec + 1, lap;
        logic e, g;
        lap = px(r-1, c) + px(r+1, c) + px(r, c-1) + px(r, c+1) - 4 * px(r, c);
        e = (lap >= ith);
        g = got[er * 6 + ec / 8][ec % 8];
        edges += int'(e);
        checks++;
        if (g !== e) begin
          failures++;
          if (failures < 6) $display("FAIL %s pixel (%0d,%0d) got %b exp %b lap %0d", name, er, ec, g, e, lap);
        end
      end
    $display("%s: %0d cycles, %0d edge pixels", name, cyc, edges);
  endtask

  initial begin
    rst = 1; start = 0; vth_pv = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        iph[r][c] = (r >= 20 && r < 45 && c >= 10 && c < 30) ? 16'd10000 : 16'd100;
    repeat (2) @(posedge clk); #1 rst = 0;
    frame(5000, "rectangle");
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) iph[r][c] = 16'($urandom_range(100, 10000));
    frame(3000, "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
