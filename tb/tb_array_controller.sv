// tb_array_controller: the controller against memory and PE-cache models
// kept in the testbench.
//  - EXEC: a 3-word routine run 4 times must appear on mc as 12 consecutive
//    words starting the cycle after the macro is taken, with the
//    repetition index added to cache_addr only in words marked idx_add.
//  - LOAD / LOADIMG: bytes from system memory or the image buffer must be
//    written, in order, to {PE, cache address} across a PE boundary.
//  - STORE: bytes read from PE caches must be written to system memory.
//  - The macro FIFO must report full (macro_ready low) when the host keeps
//    pushing while a long routine runs, and lose no macro.
module tb_array_controller;
  import mp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  logic ucode_we; logic [7:0] ucode_addr; mcode_t ucode_wdata;
  logic macro_valid; macro_t macro_in; logic macro_ready, busy;
  mcode_t mc;
  logic ext_en, ext_we; logic [4:0] ext_pe; logic [7:0] ext_addr, ext_wdata, ext_rdata;
  logic [15:0] sm_addr, fb_addr; logic sm_we; logic [7:0] sm_wdata, sm_rdata, fb_rdata;
  int checks = 0, failures = 0, full_seen = 0;

  logic [7:0] sm_mem [4096];
  logic [7:0] fb_mem [512];
  logic [7:0] pe_mem [20][256];

  array_controller dut (.clk, .rst, .ucode_we, .ucode_addr, .ucode_wdata, .macro_valid, .macro_in,
    .macro_ready, .busy, .mc, .ext_en, .ext_pe, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .sm_addr, .sm_we, .sm_wdata, .sm_rdata, .fb_addr, .fb_rdata);

  // memory models: registered reads, synchronous writes
  always_ff @(posedge clk) begin
    sm_rdata <= sm_mem[sm_addr[11:0]];
    fb_rdata <= fb_mem[fb_addr[8:0]];
    if (sm_we) sm_mem[sm_addr[11:0]] <= sm_wdata;
    if (ext_en && ext_we) pe_mem[ext_pe][ext_addr] <= ext_wdata;
  end
  assign ext_rdata = pe_mem[ext_pe][ext_addr];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic push(macro_op_e op, int a, int b, int len);
    macro_valid = 1;
    macro_in.op = op; macro_in.a = 16'(a); macro_in.b = 16'(b); macro_in.len = 9'(len);
    while (!macro_ready) begin full_seen++; tick(); end
    tick();
    macro_valid = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    while (busy && n < 10000) begin tick(); n++; end
  endtask

  initial begin
    mcode_t u [3];
    rst = 1; ucode_we = 0; ucode_addr = 0; ucode_wdata = '0; macro_valid = 0; macro_in = '0;
    for (int i = 0; i < 4096; i++) sm_mem[i] = 8'($urandom);
    for (int i = 0; i < 512; i++) fb_mem[i] = 8'($urandom);
    for (int p = 0; p < 20; p++) for (int i = 0; i < 256; i++) pe_mem[p][i] = 8'($urandom);
    repeat (2) @(posedge clk); #1 rst = 0;

    // control store: three distinct words at 10..12
    for (int i = 0; i < 3; i++) begin
      u[i] = mcode_t'({11'($urandom), 32'($urandom)});
      u[i].idx_add = (i == 1); u[i].spare = 0; u[i].cache_addr = 8'(16 * i);
      ucode_we = 1; ucode_addr = 8'(10 + i); ucode_wdata = u[i]; tick();
    end
    ucode_we = 0;

    // EXEC: ustart 10, ulen 3, reps 4
    begin
      int seen, first, cyc;
      seen = 0; first = -1; cyc = 0;
      push(M_EXEC, 10, 3, 4);
      while (cyc < 40) begin
        if (mc != MCODE_NOP) begin
          mcode_t e;
          e = u[seen % 3];
          if (e.idx_add) e.cache_addr = e.cache_addr + 8'(seen / 3);
          if (first < 0) first = cyc;
          checks++;
          if (mc !== e || cyc != first + seen) begin
            failures++; $display("FAIL exec word %0d at cycle %0d", seen, cyc);
          end
          seen++;
        end
        tick(); cyc++;
      end
      checks += 2;
      if (seen != 12) begin failures++; $display("FAIL exec issued %0d words", seen); end
      if (first != 2) begin failures++; $display("FAIL exec first word at cycle %0d", first); end
    end

    // LOAD 40 bytes sm[100..] -> PE 3 cache 240.. (crosses into PE 4)
    push(M_LOAD, 100, 3 * 256 + 240, 40);
    wait_idle();
    for (int i = 0; i < 40; i++) begin
      int pa;
      pa = 3 * 256 + 240 + i;
      checks++;
      if (pe_mem[pa / 256][pa % 256] !== sm_mem[100 + i]) begin
        failures++; $display("FAIL load byte %0d", i);
      end
    end
    // LOADIMG 30 bytes fb[7..] -> PE 19 cache 0..
    push(M_LOADIMG, 7, 19 * 256, 30);
    wait_idle();
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (pe_mem[19][i] !== fb_mem[7 + i]) begin failures++; $display("FAIL loadimg byte %0d", i); end
    end
    // STORE 25 bytes PE 0 cache 250.. -> sm[2000..]
    push(M_STORE, 2000, 250, 25);
    wait_idle();
    for (int i = 0; i < 25; i++) begin
      int pa;
      pa = 250 + i;
      checks++;
      if (sm_mem[2000 + i] !== pe_mem[pa / 256][pa % 256]) begin failures++; $display("FAIL store byte %0d", i); end
    end

    // FIFO full: a long EXEC followed by 10 LOADs of one byte each
    push(M_EXEC, 10, 3, 100);
    for (int k = 0; k < 10; k++) push(M_LOAD, 3000 + k, 10 * 256 + k, 1);
    wait_idle();
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (pe_mem[10][k] !== sm_mem[3000 + k]) begin failures++; $display("FAIL queued load %0d", k); end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL macro FIFO never filled"); end
    $display("FIFO full for %0d cycles", full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
