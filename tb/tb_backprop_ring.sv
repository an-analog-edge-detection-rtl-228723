// tb_backprop_ring: the back-propagation phase of one 20 x 20 layer on the
// 20-PE chip in ring mode, one PE per neuron j of the upper layer.
//
// PE j holds row j of the weight matrix in skewed order (cache[k] =
// w(j, (j-k) mod N), k = 1..N, as for the feed-forward pass), its error
// term delta_j and its own lower-layer activation a_j. delta_j is supplied
// by the host, as the document has the host compute it. One microprogram then
// runs two systolic loops:
//   1. Error back-propagation, e_i = sum_j delta_j w(j, i): a partial sum
//      travels east round the ring; at step k PE j adds w(j, j-k) delta_j
//      to the partial it receives and passes it on. The partial for column
//      i collects its N terms and arrives complete in PE i after N steps
//      (3 clocks per step). Partials travel as saturated bytes; the test
//      values keep them within range.
//   2. Weight update, w(j, i) = w(j, i) - sat((delta_j a_i) >>> 2): the
//      activations circulate as in the feed-forward pass (eq. 3 and 4 with
//      eta = 1/4; the subtraction follows eq. 4 as printed), 7 clocks per
//      step.
// The testbench reads back all e_i and all 400 weights through M_STORE and
// compares them with values computed here, and checks both loops' lengths
// from the broadcast microinstruction stream.
module tb_backprop_ring;
  import mp_pkg::*;
  localparam int N = 20;
  localparam int D_ADDR = 100, A_ADDR = 101, TMP_ADDR = 102, E_ADDR = 103;
  localparam int WBUF = 32768, EBUF = 40960;
  localparam int ETA_SH = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, mesh_mode;
  logic ucode_we; logic [7:0] ucode_addr; mcode_t ucode_wdata;
  logic macro_valid; macro_t macro_in; logic macro_ready, busy;
  logic [15:0] sm_addr, fb_addr; logic sm_we; logic [7:0] sm_wdata, sm_rdata, fb_rdata;
  logic [7:0] west_in [4], east_in [4], west_out [4], east_out [4];
  logic [N-1:0] flags;
  logic [7:0] sm_mem [65536];
  int checks = 0, failures = 0, back_clocks = 0, upd_clocks = 0;

  neural_mp_chip dut (.clk, .rst, .mesh_mode, .ucode_we, .ucode_addr, .ucode_wdata, .macro_valid,
    .macro_in, .macro_ready, .busy, .sm_addr, .sm_we, .sm_wdata, .sm_rdata, .fb_addr, .fb_rdata,
    .west_in, .east_in, .west_out, .east_out, .flags);

  always_ff @(posedge clk) begin
    sm_rdata <= sm_mem[sm_addr];
    if (sm_we) sm_mem[sm_addr] <= sm_wdata;
  end
  assign fb_rdata = 8'h00;

  // receive words of each loop, one per step
  always @(posedge clk) begin
    if (dut.mc.recv_en && !dut.mc.send_fwd) back_clocks++;
    if (dut.mc.recv_en && dut.mc.send_fwd) upd_clocks++;
  end

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

  localparam int P_INIT = 0, P_BACK = 2, P_MID = 5, P_UPD = 7, P_LEN = 14;

  function automatic mcode_t prog(int n);
    mcode_t m;
    m = MCODE_NOP;
    case (n)
      // r1 = delta, out_buf = 0 (the first partial); r5 = a
      0: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd1; m.cache_addr = 8'(D_ADDR);
               m.send_en = 1; end
      1: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd5; m.cache_addr = 8'(A_ADDR); end
      // back-propagation step, run N times (cache address 1 + step):
      // receive partial; r2 = w * delta; r3 = r2 + partial; send r3
      2: begin m.recv_en = 1; m.recv_dir = DIR_W;
               m.mul_en = 1; m.mul_a_cpu = 1; m.rb = 3'd1; m.mul_dst = 3'd2;
               m.cache_addr = 8'd1; m.idx_add = 1; end
      3: begin m.add_en = 1; m.ra = 3'd2; m.add_b_cpu = 1; m.add_dst = 3'd3; end
      4: begin m.send_en = 1; m.ra = 3'd3; end
      // e = r3; out_buf = a
      5: begin m.cache_wr = 1; m.ra = 3'd3; m.cache_addr = 8'(E_ADDR); end
      6: begin m.send_en = 1; m.ra = 3'd5; end
      // weight-update step, run N times: receive and forward a; r2 = delta * a;
      // tmp = sat(r2 >>> 2); r4 = w; r6 = tmp; r3 = r4 - r6; w = sat(r3)
      7: begin m.recv_en = 1; m.recv_dir = DIR_W; m.send_en = 1; m.send_fwd = 1; end
      8: begin m.mul_en = 1; m.ra = 3'd1; m.mul_b_cpu = 1; m.mul_dst = 3'd2; end
      9: begin m.cache_wr = 1; m.ra = 3'd2; m.shamt = 4'(ETA_SH); m.cache_addr = 8'(TMP_ADDR); end
      10: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd4; m.cache_addr = 8'd1; m.idx_add = 1; end
      11: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd6; m.cache_addr = 8'(TMP_ADDR); end
      12: begin m.add_en = 1; m.add_sub = 1; m.ra = 3'd4; m.rb = 3'd6; m.add_dst = 3'd3; end
      13: begin m.cache_wr = 1; m.ra = 3'd3; m.cache_addr = 8'd1; m.idx_add = 1; end
      default: ;
    endcase
    return m;
  endfunction

  initial begin
    int w [N][N], a [N], dl [N], e [N];
    int b0, u0;
    rst = 1; mesh_mode = 0; ucode_we = 0; ucode_addr = 0; ucode_wdata = '0;
    macro_valid = 0; macro_in = '0;
    for (int r = 0; r < 4; r++) begin west_in[r] = 0; east_in[r] = 0; end
    for (int i = 0; i < 65536; i++) sm_mem[i] = 8'd0;
    for (int j = 0; j < N; j++) begin
      a[j]  = int'($urandom_range(0, 16)) - 8;
      dl[j] = int'($urandom_range(0, 4)) - 2;
      for (int i = 0; i < N; i++) w[j][i] = int'($urandom_range(0, 6)) - 3;
    end
    for (int j = 0; j < N; j++) begin
      for (int k = 1; k <= N; k++) sm_mem[j * 256 + k] = 8'(w[j][(j - k + N) % N]);
      sm_mem[j * 256 + D_ADDR] = 8'(dl[j]);
      sm_mem[j * 256 + A_ADDR] = 8'(a[j]);
    end
    // reference: errors from the old weights, then the update
    for (int i = 0; i < N; i++) begin
      e[i] = 0;
      for (int j = 0; j < N; j++) e[i] += dl[j] * w[j][i];
      e[i] = sat8(e[i]);
    end
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) w[j][i] = sat8(w[j][i] - sat8((dl[j] * a[i]) >>> ETA_SH));

    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < P_LEN; n++) begin
      ucode_we = 1; ucode_addr = 8'(n); ucode_wdata = prog(n); tick();
    end
    ucode_we = 0;
    for (int j = 0; j < N; j++) push(M_LOAD, j * 256, j * 256, 128);
    wait_idle();
    b0 = back_clocks; u0 = upd_clocks;
    push(M_EXEC, P_INIT, 2, 1);
    push(M_EXEC, P_BACK, 3, N);
    push(M_EXEC, P_MID, 2, 1);
    push(M_EXEC, P_UPD, 7, N);
    wait_idle();
    checks++;
    if (back_clocks - b0 != N || upd_clocks - u0 != N) begin
      failures++;
      $display("FAIL steps: back %0d, update %0d, expected %0d each", back_clocks - b0, upd_clocks - u0, N);
    end
    for (int j = 0; j < N; j++) begin
      push(M_STORE, WBUF + j * 32, j * 256 + 1, N);
      push(M_STORE, EBUF + j, j * 256 + E_ADDR, 1);
    end
    wait_idle();
    for (int j = 0; j < N; j++) begin
      checks++;
      if (int'($signed(sm_mem[EBUF + j])) != e[j]) begin
        failures++; $display("FAIL e[%0d]: got %0d exp %0d", j, $signed(sm_mem[EBUF + j]), e[j]);
      end
      for (int k = 1; k <= N; k++) begin
        int i;
        i = (j - k + N) % N;
        checks++;
        if (int'($signed(sm_mem[WBUF + j * 32 + k - 1])) != w[j][i]) begin
          failures++;
          $display("FAIL w[%0d][%0d]: got %0d exp %0d", j, i, $signed(sm_mem[WBUF + j * 32 + k - 1]), w[j][i]);
        end
      end
    end
    $display("back-propagation: %0d clocks for %0d error terms, update: %0d clocks for %0d weights",
             3 * N, N * N, 7 * N, N * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
