// tb_vision_system: the whole system end to end at its default size
// (66 x 50 sensor, 20 PEs, 64 K system memory), driven as the host would.
//  1. The edge chip reads one frame of a bright rectangle on a dark
//     background into the image buffer.
//  2. The host writes the control store and, through the system memory's
//     host port, each PE's weights and activation table; LOAD macros copy
//     them into the PE caches (filling the macro FIFO on the way).
//  3. LOADIMG macros give PE j the image byte j of a band across the
//     rectangle's top edge as its input activation.
//  4. The ring feed-forward routine computes f(W x) over those 20 bytes;
//     STORE macros return the outputs and the loaded bytes to system memory,
//     where the host reads them and compares them with values worked out
//     here from the photocurrents (Laplacian, threshold, packing, layer).
//  5. The array switches to mesh mode and shifts the outputs one row down
//     the 4 x 5 mesh, with wrap-around.
//  6. Each PE compares its output with the one received from the north
//     (compare flag) and keeps its own only where it is the larger
//     (conditional cache write); the flags and kept values are checked.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_vision_system;
  import mp_pkg::*;
  import tb_prog_pkg::*;
  localparam int R = 66, C = 50, N = 20, SHV = 10, ITH = 5000;
  localparam int IMG0 = 17 * 6;   // first image byte used: effective row 17
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, frame_start, edge_busy, edge_stall, frame_done;
  logic [15:0] iph [R][C];
  logic signed [47:0] vth_pv;
  logic mesh_mode, ucode_we, macro_valid, macro_ready, mp_busy;
  logic [7:0] ucode_addr;
  mcode_t ucode_wdata;
  macro_t macro_in;
  logic [7:0] west_in [4], east_in [4], west_out [4], east_out [4];
  logic [N-1:0] flags;
  logic host_we;
  logic [15:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;
  int n_frames = 0, n_load = 0, n_loadimg = 0, n_exec = 0, n_store = 0, n_full = 0,
      n_ring = 0, n_mesh = 0, n_lut = 0, n_cond = 0;

  vision_system dut (.clk, .rst, .frame_start, .iph, .vth_pv, .edge_busy, .edge_stall, .frame_done,
    .mesh_mode, .ucode_we, .ucode_addr, .ucode_wdata, .macro_valid, .macro_in, .macro_ready,
    .mp_busy, .west_in, .east_in, .west_out, .east_out, .flags,
    .host_we, .host_addr, .host_wdata, .host_rdata);

  // mechanism counters on the broadcast microinstruction
  always @(posedge clk) begin
    if (dut.u_mp.mc.recv_en && dut.u_mp.mc.send_fwd && !mesh_mode) n_ring++;
    if (dut.u_mp.mc.recv_en && mesh_mode) n_mesh++;
    if (dut.u_mp.mc.cache_ind) n_lut++;
    if (dut.u_mp.mc.cond && dut.u_mp.mc.cache_wr) n_cond += $countones(flags);
  end

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
    while (!macro_ready) begin n_full++; tick(); end
    tick();
    macro_valid = 0;
    case (op)
      M_LOAD: n_load++;
      M_LOADIMG: n_loadimg++;
      M_EXEC: n_exec++;
      default: n_store++;
    endcase
  endtask
  task automatic wait_idle();
    int n;
    n = 0;
    while (mp_busy && n < 50000) begin tick(); n++; end
  endtask
  task automatic host_write(int addr, int data);
    host_we = 1; host_addr = 16'(addr); host_wdata = 8'(data); tick(); host_we = 0;
  endtask
  task automatic host_read(int addr, output int data);
    host_addr = 16'(addr); tick(); data = int'(host_rdata);
  endtask
  function automatic int px(int r, int c);
    if (r < 0 || r >= R || c < 0 || c >= C) return 0;
    return int'(iph[r][c]);
  endfunction

  initial begin
    int img [384], w [N][N], a [N], expo [N], got, cyc;
    rst = 1; frame_start = 0; vth_pv = 48'(longint'(ITH) * 5000); mesh_mode = 0;
    ucode_we = 0; ucode_addr = 0; ucode_wdata = '0; macro_valid = 0; macro_in = '0;
    host_we = 0; host_addr = 0; host_wdata = 0;
    for (int r = 0; r < 4; r++) begin west_in[r] = 0; east_in[r] = 0; end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        iph[r][c] = (r >= 19 && r < 45 && c >= 5 && c < 41) ? 16'd10000 : 16'd100;
    // expected image bytes
    for (int b = 0; b < 384; b++) img[b] = 0;
    for (int er = 0; er < 64; er++)
      for (int ec = 0; ec < 48; ec++) begin
        int r, c, lap;
        r = er + 1; c = ec + 1;
        lap = px(r-1, c) + px(r+1, c) + px(r, c-1) + px(r, c+1) - 4 * px(r, c);
        if (lap >= ITH) img[er * 6 + ec / 8] |= (1 << (ec % 8));
      end
    repeat (3) @(posedge clk); #1 rst = 0;

    // 1. one frame
    frame_start = 1; tick(); frame_start = 0;
    cyc = 0;
    while (!frame_done && cyc < 5000) begin tick(); cyc++; end
    if (frame_done) n_frames++;
    checks++;
    if (cyc != 64 * (10 + 1) + 6) begin failures++; $display("FAIL frame took %0d clocks", cyc); end

    // 2. control store, weights and tables
    for (int n = 0; n < U_LEN; n++) begin
      ucode_we = 1; ucode_addr = 8'(n); ucode_wdata = ucode(n, SHV); tick();
    end
    ucode_we = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) w[i][j] = int'($urandom_range(0, 8)) - 4;
    for (int i = 0; i < N; i++) begin
      host_write(i * 256, 0);
      for (int k = 1; k <= N; k++) host_write(i * 256 + k, w[i][(i - k + N) % N]);
      for (int x = -16; x < 16; x++) host_write(i * 256 + ((LUT_BASE + x) & 255), act(x));
    end
    for (int i = 0; i < N; i++) push(M_LOAD, i * 256, i * 256, LUT_BASE + 16);
    // 3. image bytes as activations
    for (int j = 0; j < N; j++) push(M_LOADIMG, IMG0 + j, j * 256 + A_ADDR, 1);
    // 4. the layer
    push(M_EXEC, U_INIT, 2, 1);
    push(M_EXEC, U_STEP, 1, N + 1);
    push(M_EXEC, U_ACT, U_ACT_LEN, 1);
    for (int i = 0; i < N; i++) push(M_STORE, 32768 + i, i * 256 + OUT_ADDR, 1);
    for (int i = 0; i < N; i++) push(M_STORE, 33024 + i, i * 256 + A_ADDR, 1);
    wait_idle();
    for (int j = 0; j < N; j++) a[j] = int'($signed(8'(img[IMG0 + j])));
    for (int i = 0; i < N; i++) begin
      int s;
      s = 0;
      for (int j = 0; j < N; j++) s += w[i][j] * a[j];
      expo[i] = act(idx(s, SHV));
    end
    for (int i = 0; i < N; i++) begin
      host_read(33024 + i, got);
      checks++;
      if (got != img[IMG0 + i]) begin failures++; $display("FAIL image byte %0d got %h exp %h", IMG0 + i, got, img[IMG0 + i]); end
      host_read(32768 + i, got);
      checks++;
      if (got != expo[i]) begin failures++; $display("FAIL neuron %0d got %0d exp %0d", i, got, expo[i]); end
    end

    // 5. mesh mode: shift the outputs south by one row (receive from north)
    mesh_mode = 1;
    begin
      mcode_t m;
      m = MCODE_NOP; m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd6; m.cache_addr = 8'(OUT_ADDR);
      ucode_we = 1; ucode_addr = 8'd20; ucode_wdata = m; tick();
      m = MCODE_NOP; m.send_en = 1; m.ra = 3'd6; ucode_addr = 8'd21; ucode_wdata = m; tick();
      m = MCODE_NOP; m.recv_en = 1; m.recv_dir = DIR_N; ucode_addr = 8'd22; ucode_wdata = m; tick();
      m = MCODE_NOP; m.add_en = 1; m.add_b_cpu = 1; m.add_dst = 3'd7; ucode_addr = 8'd23; ucode_wdata = m; tick();
      m = MCODE_NOP; m.cache_wr = 1; m.ra = 3'd7; m.cache_addr = 8'd203; ucode_addr = 8'd24; ucode_wdata = m; tick();
      ucode_we = 0;
    end
    push(M_EXEC, 20, 5, 1);
    for (int i = 0; i < N; i++) push(M_STORE, 36864 + i, i * 256 + 203, 1);
    wait_idle();
    for (int i = 0; i < N; i++) begin
      int up;
      up = ((i / 5 + 3) % 4) * 5 + i % 5;
      host_read(36864 + i, got);
      checks++;
      if (got != expo[up]) begin failures++; $display("FAIL mesh PE %0d got %0d exp %0d", i, got, expo[up]); end
    end

    // 6. flag = (north < own); cache[204] = 0, then own output where flagged
    begin
      mcode_t m;
      m = MCODE_NOP; m.cache_wr = 1; m.cache_addr = 8'd204;
      ucode_we = 1; ucode_addr = 8'd25; ucode_wdata = m; tick();
      m = MCODE_NOP; m.add_sub = 1; m.ra = 3'd7; m.rb = 3'd6; m.flag_wr = 1;
      ucode_addr = 8'd26; ucode_wdata = m; tick();
      m = MCODE_NOP; m.cache_wr = 1; m.cond = 1; m.ra = 3'd6; m.cache_addr = 8'd204;
      ucode_addr = 8'd27; ucode_wdata = m; tick();
      ucode_we = 0;
    end
    push(M_EXEC, 25, 3, 1);
    for (int i = 0; i < N; i++) push(M_STORE, 40960 + i, i * 256 + 204, 1);
    wait_idle();
    begin
      logic [N-1:0] fexp;
      for (int i = 0; i < N; i++) begin
        int up;
        up = ((i / 5 + 3) % 4) * 5 + i % 5;
        fexp[i] = expo[up] < expo[i];
        host_read(40960 + i, got);
        checks++;
        if (got != (fexp[i] ? expo[i] : 0)) begin
          failures++; $display("FAIL kept value PE %0d got %0d", i, got);
        end
      end
      checks++;
      if (flags != fexp) begin failures++; $display("FAIL flags %b exp %b", flags, fexp); end
    end

    $display("frames %0d, LOAD %0d, LOADIMG %0d, EXEC %0d, STORE %0d, FIFO-full clocks %0d",
             n_frames, n_load, n_loadimg, n_exec, n_store, n_full);
    $display("ring shifts %0d, mesh shifts %0d, table look-ups %0d, conditional writes %0d",
             n_ring, n_mesh, n_lut, n_cond);
    foreach (img[b]) if (b >= IMG0 && b < IMG0 + N) $write("%02h ", img[b]);
    $display("");
    checks += 10;
    if (n_frames == 0)  begin failures++; $display("FAIL no frame"); end
    if (n_load == 0)    failures++;
    if (n_loadimg == 0) failures++;
    if (n_exec == 0)    failures++;
    if (n_store == 0)   failures++;
    if (n_full == 0)    begin failures++; $display("FAIL macro FIFO never full"); end
    if (n_ring == 0)    begin failures++; $display("FAIL no ring shift"); end
    if (n_mesh == 0)    begin failures++; $display("FAIL no mesh shift"); end
    if (n_lut == 0)     begin failures++; $display("FAIL no table look-up"); end
    if (n_cond == 0)    begin failures++; $display("FAIL no conditional write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
