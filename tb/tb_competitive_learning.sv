// tb_competitive_learning: competitive (winner-take-all) learning for
// vector-quantiser codebook design, run on the 20-PE chip in ring mode.
//
// Each PE holds one 4-dimensional code vector c_i in its cache. For every
// training vector x the host loads x into all caches and runs one
// microprogram that
//   1. computes the distortion E_i = sum_d (c_id - x_d)^2 in every PE
//      (multiplier on REG1 x REG2, adder accumulating),
//   2. scales it to a byte, e_i = sat(E_i >>> 1), and finds the smallest e
//      by passing a running minimum 19 times round the ring (a conditional
//      write keeps the smaller of the own and the received value),
//   3. sets the flag only in the PE whose e equals the minimum: the winner,
//   4. moves the winner's code vector toward x, c += sat((x - c) >>> 1),
//      i.e. a learning rate of 1/2, with conditional cache writes so that
//      only the winner's vector changes.
// The document maps this algorithm onto the mesh, passing a winner index
// to the right; passing the minimum distortion round the ring and letting
// the winner recognise itself is this test's own mapping, chosen because it
// needs only broadcast microinstructions. After each vector the testbench
// reads every code vector back through M_STORE and checks it, and checks
// that exactly the winner's flag is set, against a reference computed here.
// Training vectors are drawn until the minimum is unique.
module tb_competitive_learning;
  import mp_pkg::*;
  localparam int N = 20, D = 4, T = 6;
  localparam int X_ADDR = 0, C_ADDR = 16, ONE_ADDR = 32, EB_ADDR = 40, TMP_ADDR = 41;
  localparam int XBUF = 32768, CBUF = 36864;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, mesh_mode;
  logic ucode_we; logic [7:0] ucode_addr; mcode_t ucode_wdata;
  logic macro_valid; macro_t macro_in; logic macro_ready, busy;
  logic [15:0] sm_addr, fb_addr; logic sm_we; logic [7:0] sm_wdata, sm_rdata, fb_rdata;
  logic [7:0] west_in [4], east_in [4], west_out [4], east_out [4];
  logic [N-1:0] flags;
  logic [7:0] sm_mem [65536];
  int checks = 0, failures = 0, cond_writes = 0;

  neural_mp_chip dut (.clk, .rst, .mesh_mode, .ucode_we, .ucode_addr, .ucode_wdata, .macro_valid,
    .macro_in, .macro_ready, .busy, .sm_addr, .sm_we, .sm_wdata, .sm_rdata, .fb_addr, .fb_rdata,
    .west_in, .east_in, .west_out, .east_out, .flags);

  always_ff @(posedge clk) begin
    sm_rdata <= sm_mem[sm_addr];
    if (sm_we) sm_mem[sm_addr] <= sm_wdata;
  end
  assign fb_rdata = 8'h00;

  // conditional cache writes actually performed (by winners)
  always @(posedge clk) if (dut.mc.cache_wr && dut.mc.cond) cond_writes += $countones(flags);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic push(macro_op_e op, int a, int b, int len);
    macro_valid = 1;
    macro_in.op = op; macro_in.a = 16'(a); macro_in.b = 16'(b); macro_in.len = 9'(len);
    while (!macro_ready) tick();
    tick();
    macro_valid = 0;
  endtask
  task automatic wait_idle();
    int n;
    n = 0;
    while (busy && n < 20000) begin tick(); n++; end
  endtask

  function automatic int sat8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  // control store: address, routine lengths and repetition counts
  localparam int P_INIT = 0, P_DIST = 1, P_EB = 5, P_MIN = 9, P_WIN = 14, P_UPD = 17, P_LEN = 23;

  function automatic mcode_t prog(int n);
    mcode_t m;
    m = MCODE_NOP;
    case (n)
      // r4 = 0
      0: begin m.add_en = 1; m.add_dst = 3'd4; end
      // distortion, run D times: r1 = x_k; r2 = c_k - r1; r3 = r2 * r2; r4 += r3
      1: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd1; m.cache_addr = 8'(X_ADDR); m.idx_add = 1; end
      2: begin m.add_en = 1; m.add_a_cpu = 1; m.add_sub = 1; m.rb = 3'd1; m.add_dst = 3'd2;
               m.cache_addr = 8'(C_ADDR); m.idx_add = 1; end
      3: begin m.mul_en = 1; m.ra = 3'd2; m.rb = 3'd2; m.mul_dst = 3'd3; end
      4: begin m.add_en = 1; m.ra = 3'd4; m.rb = 3'd3; m.add_dst = 3'd4; end
      // e = sat(r4 >>> 1) into the cache; r5 = e (own), r6 = e (running min); send r6
      5: begin m.cache_wr = 1; m.ra = 3'd4; m.shamt = 4'd1; m.cache_addr = 8'(EB_ADDR); end
      6: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd5; m.cache_addr = 8'(EB_ADDR); end
      7: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd6; m.cache_addr = 8'(EB_ADDR); end
      8: begin m.send_en = 1; m.ra = 3'd6; end
      // ring minimum, run N-1 times: receive; r2 = in; flag = (r2 < r6);
      // if flag r6 = r2; send r6 (the input buffer is a B operand only, hence r2)
      9: begin m.recv_en = 1; m.recv_dir = DIR_W; end
      10: begin m.add_en = 1; m.add_b_cpu = 1; m.add_dst = 3'd2; end
      11: begin m.add_sub = 1; m.ra = 3'd2; m.rb = 3'd6; m.flag_wr = 1; end
      12: begin m.add_en = 1; m.cond = 1; m.ra = 3'd2; m.add_dst = 3'd6; end
      13: begin m.send_en = 1; m.ra = 3'd6; end
      // winner: r7 = r5 - r6 (0 only in the winner); r1 = 1; flag = (r7 - 1 < 0)
      14: begin m.add_en = 1; m.add_sub = 1; m.ra = 3'd5; m.rb = 3'd6; m.add_dst = 3'd7; end
      15: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd1; m.cache_addr = 8'(ONE_ADDR); end
      16: begin m.add_sub = 1; m.ra = 3'd7; m.rb = 3'd1; m.flag_wr = 1; end
      // update, run D times: r1 = x_k; r3 = c_k; r2 = r1 - r3; tmp = sat(r2 >>> 1);
      // r2 = tmp + r3; if flag c_k = sat(r2)
      17: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd1; m.cache_addr = 8'(X_ADDR); m.idx_add = 1; end
      18: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd3; m.cache_addr = 8'(C_ADDR); m.idx_add = 1; end
      19: begin m.add_en = 1; m.add_sub = 1; m.ra = 3'd1; m.rb = 3'd3; m.add_dst = 3'd2; end
      20: begin m.cache_wr = 1; m.ra = 3'd2; m.shamt = 4'd1; m.cache_addr = 8'(TMP_ADDR); end
      21: begin m.add_en = 1; m.add_a_cpu = 1; m.rb = 3'd3; m.add_dst = 3'd2; m.cache_addr = 8'(TMP_ADDR); end
      22: begin m.cache_wr = 1; m.cond = 1; m.ra = 3'd2; m.cache_addr = 8'(C_ADDR); m.idx_add = 1; end
      default: ;
    endcase
    return m;
  endfunction

  initial begin
    int c [N][D], x [D], e [N];
    int emin, nmin, win, tries;
    rst = 1; mesh_mode = 0; ucode_we = 0; ucode_addr = 0; ucode_wdata = '0;
    macro_valid = 0; macro_in = '0;
    for (int r = 0; r < 4; r++) begin west_in[r] = 0; east_in[r] = 0; end
    for (int i = 0; i < 65536; i++) sm_mem[i] = 8'd0;
    for (int i = 0; i < N; i++) begin
      for (int d = 0; d < D; d++) begin
        c[i][d] = int'($urandom_range(0, 6)) - 3;
        sm_mem[i * 256 + C_ADDR + d] = 8'(c[i][d]);
      end
      sm_mem[i * 256 + ONE_ADDR] = 8'd1;
    end
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < P_LEN; n++) begin
      ucode_we = 1; ucode_addr = 8'(n); ucode_wdata = prog(n); tick();
    end
    ucode_we = 0;
    for (int i = 0; i < N; i++) push(M_LOAD, i * 256, i * 256, 64);
    wait_idle();

    for (int t = 0; t < T; t++) begin
      // draw a training vector whose nearest code vector is unique
      tries = 0;
      do begin
        for (int d = 0; d < D; d++) x[d] = int'($urandom_range(0, 6)) - 3;
        emin = 1000; nmin = 0; win = 0;
        for (int i = 0; i < N; i++) begin
          int s;
          s = 0;
          for (int d = 0; d < D; d++) s += (c[i][d] - x[d]) * (c[i][d] - x[d]);
          e[i] = sat8(s >>> 1);
          if (e[i] < emin) begin emin = e[i]; nmin = 1; win = i; end
          else if (e[i] == emin) nmin++;
        end
        tries++;
      end while (nmin != 1 && tries < 1000);
      for (int d = 0; d < D; d++) sm_mem[XBUF + d] = 8'(x[d]);
      for (int i = 0; i < N; i++) push(M_LOAD, XBUF, i * 256 + X_ADDR, D);
      push(M_EXEC, P_INIT, 1, 1);
      push(M_EXEC, P_DIST, 4, D);
      push(M_EXEC, P_EB, 4, 1);
      push(M_EXEC, P_MIN, 5, N - 1);
      push(M_EXEC, P_WIN, 3, 1);
      push(M_EXEC, P_UPD, 6, D);
      wait_idle();
      // reference update of the winner
      for (int d = 0; d < D; d++) c[win][d] = sat8(sat8((x[d] - c[win][d]) >>> 1) + c[win][d]);
      checks++;
      if (flags != N'(1) << win) begin
        failures++; $display("FAIL vector %0d: flags %b, winner %0d", t, flags, win);
      end
      for (int i = 0; i < N; i++) push(M_STORE, CBUF + i * D, i * 256 + C_ADDR, D);
      wait_idle();
      for (int i = 0; i < N; i++)
        for (int d = 0; d < D; d++) begin
          checks++;
          if (int'($signed(sm_mem[CBUF + i * D + d])) != c[i][d]) begin
            failures++;
            $display("FAIL vector %0d PE %0d c[%0d]: got %0d exp %0d", t, i, d,
                     $signed(sm_mem[CBUF + i * D + d]), c[i][d]);
          end
        end
    end
    checks++;
    if (cond_writes != T * D) begin
      failures++; $display("FAIL %0d conditional cache writes, expected %0d", cond_writes, T * D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
