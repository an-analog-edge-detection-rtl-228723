// tb_neural_mp_chip: the 20-PE chip runs one neural-network layer the way
// the host would drive it: load the control store, load every PE's cache
// from system memory (weights in skewed order, its input activation and the
// activation table), run the ring systolic feed-forward routine, and store
// each PE's output back to system memory. The 20 outputs are compared with
// f(sum_j w_ij a_j) worked out in the testbench. The multiply-accumulate
// phase must take exactly N + 1 = 21 consecutive clocks for all 400
// connections. A second part switches to mesh mode and checks that a
// north-shift reaches the PE one row up. Memories are testbench models.
module tb_neural_mp_chip;
  import mp_pkg::*;
  import tb_prog_pkg::*;
  localparam int N = 20;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, mesh_mode;
  logic ucode_we; logic [7:0] ucode_addr; mcode_t ucode_wdata;
  logic macro_valid; macro_t macro_in; logic macro_ready, busy;
  logic [15:0] sm_addr, fb_addr; logic sm_we; logic [7:0] sm_wdata, sm_rdata, fb_rdata;
  logic [7:0] west_in [4], east_in [4], west_out [4], east_out [4];
  logic [N-1:0] flags;
  logic [7:0] sm_mem [65536];
  int checks = 0, failures = 0, mac_cycles = 0, full_cycles = 0;

  neural_mp_chip dut (.clk, .rst, .mesh_mode, .ucode_we, .ucode_addr, .ucode_wdata, .macro_valid,
    .macro_in, .macro_ready, .busy, .sm_addr, .sm_we, .sm_wdata, .sm_rdata, .fb_addr, .fb_rdata,
    .west_in, .east_in, .west_out, .east_out, .flags);

  always_ff @(posedge clk) begin
    sm_rdata <= sm_mem[sm_addr];
    if (sm_we) sm_mem[sm_addr] <= sm_wdata;
  end
  assign fb_rdata = 8'h00;

  // count clocks in which the broadcast word multiplies (the MAC phase)
  always @(posedge clk) if (dut.mc.mul_en && dut.mc.mul_b_cpu) mac_cycles++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic push(macro_op_e op, int a, int b, int len);
    macro_valid = 1;
    macro_in.op = op; macro_in.a = 16'(a); macro_in.b = 16'(b); macro_in.len = 9'(len);
    while (!macro_ready) begin full_cycles++; tick(); end
    tick();
    macro_valid = 0;
  endtask
  task automatic wait_idle();
    int n;
    n = 0;
    while (busy && n < 20000) begin tick(); n++; end
  endtask

  initial begin
    int w [N][N], a [N], expo [N];
    int t0, mac_span;
    rst = 1; mesh_mode = 0; ucode_we = 0; ucode_addr = 0; ucode_wdata = '0;
    macro_valid = 0; macro_in = '0;
    for (int r = 0; r < 4; r++) begin west_in[r] = 0; east_in[r] = 0; end
    for (int i = 0; i < 65536; i++) sm_mem[i] = 8'd0;
    // layer data
    for (int i = 0; i < N; i++) begin
      a[i] = int'($urandom_range(0, 8)) - 4;
      for (int j = 0; j < N; j++) w[i][j] = int'($urandom_range(0, 8)) - 4;
    end
    for (int i = 0; i < N; i++) begin
      int s;
      s = 0;
      for (int j = 0; j < N; j++) s += w[i][j] * a[j];
      expo[i] = act(idx(s));
      for (int k = 1; k <= N; k++) sm_mem[i * 256 + k] = 8'(w[i][(i - k + N) % N]);
      sm_mem[i * 256 + A_ADDR] = 8'(a[i]);
      for (int x = -16; x < 16; x++) sm_mem[i * 256 + ((LUT_BASE + x) & 255)] = 8'(act(x));
    end
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < U_LEN; n++) begin
      ucode_we = 1; ucode_addr = 8'(n); ucode_wdata = ucode(n); tick();
    end
    ucode_we = 0;
    // load all caches: one 256-byte LOAD per PE (the FIFO fills meanwhile)
    for (int i = 0; i < N; i++) push(M_LOAD, i * 256, i * 256, 256);
    wait_idle();
    // run the layer
    push(M_EXEC, U_INIT, 2, 1);
    t0 = mac_cycles;
    push(M_EXEC, U_STEP, 1, N + 1);
    push(M_EXEC, U_ACT, U_ACT_LEN, 1);
    wait_idle();
    mac_span = mac_cycles - t0;
    for (int i = 0; i < N; i++) push(M_STORE, 32768 + i, i * 256 + OUT_ADDR, 1);
    wait_idle();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(sm_mem[32768 + i]) != expo[i]) begin
        failures++;
        $display("FAIL neuron %0d: got %0d exp %0d", i, sm_mem[32768 + i], expo[i]);
      end
    end
    checks++;
    if (mac_span != N + 1) begin failures++; $display("FAIL MAC phase took %0d clocks", mac_span); end
    $display("layer: %0d connections in %0d MAC clocks (%0.2f G connections/s at 100 MHz)",
             N * N, mac_span, real'(N * N) / real'(mac_span) * 0.1);

    // mesh mode: each PE sends its output and receives its upper neighbour's
    mesh_mode = 1;
    for (int n = 0; n < 3; n++) begin
      mcode_t m;
      m = MCODE_NOP;
      case (n)
        0: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd6; m.cache_addr = 8'(OUT_ADDR); end
        1: begin m.send_en = 1; m.ra = 3'd6; end
        2: begin m.recv_en = 1; m.recv_dir = DIR_N; end
        default: ;
      endcase
      ucode_we = 1; ucode_addr = 8'(20 + n); ucode_wdata = m; tick();
    end
    begin
      mcode_t m;
      m = MCODE_NOP; m.add_en = 1; m.add_b_cpu = 1; m.add_dst = 3'd7;
      ucode_addr = 8'd23; ucode_wdata = m; tick();
      m = MCODE_NOP; m.cache_wr = 1; m.ra = 3'd7; m.cache_addr = 8'd203;
      ucode_addr = 8'd24; ucode_wdata = m; tick();
    end
    ucode_we = 0;
    push(M_EXEC, 20, 5, 1);
    wait_idle();
    for (int i = 0; i < N; i++) push(M_STORE, 36864 + i, i * 256 + 203, 1);
    wait_idle();
    for (int i = 0; i < N; i++) begin
      int up;
      up = ((i / 5 + 3) % 4) * 5 + i % 5;
      checks++;
      if (int'(sm_mem[36864 + i]) != expo[up]) begin
        failures++; $display("FAIL mesh PE %0d got %0d exp %0d", i, sm_mem[36864 + i], expo[up]);
      end
    end
    checks++;
    if (full_cycles == 0) begin failures++; $display("FAIL macro FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
