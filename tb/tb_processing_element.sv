// tb_processing_element: one PE driven by random microinstructions and
// random neighbour words for 3000 cycles, compared every cycle with a
// reference model written here (register file with r0 = 0, CPU1/CPU2/REG1/
// REG2 operand choice, product and sum write-back, conditional writes,
// indirect cache addressing, saturating output format, I/O buffers and
// flag). The cache is loaded and finally read back over the peripheral bus.
// A directed part then computes an 8-term dot product, one multiply-
// accumulate per clock, from cache weights times words arriving from the
// west neighbour, and checks the result and the 9 + 1 clock schedule.
module tb_processing_element;
  import mp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  mcode_t mc;
  logic ext_sel, ext_we;
  logic [7:0] ext_addr, ext_wdata, ext_rdata;
  logic [7:0] in_n, in_e, in_s, in_w, out_buf;
  logic flag;
  int checks = 0, failures = 0;

  processing_element dut (.clk, .rst, .mc, .ext_sel, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
                          .in_n, .in_e, .in_s, .in_w, .out_buf, .flag);

  // reference state
  logic [19:0] m_regs [8];
  logic [7:0]  m_cache [256];
  logic [7:0]  m_in, m_out;
  logic        m_flag;

  function automatic logic [7:0] m_fmt(logic [19:0] x, logic [3:0] sh);
    int v;
    v = int'($signed(x)) >>> sh;
    if (v > 127) return 8'd127;
    if (v < -128) return 8'h80;
    return 8'(v);
  endfunction

  task automatic m_step();
    logic [19:0] r1, r2, aa, ab, y, prod;
    logic [7:0] ea, c1, inc;
    logic ok;
    r1 = (mc.ra == 0) ? 20'd0 : m_regs[mc.ra];
    r2 = (mc.rb == 0) ? 20'd0 : m_regs[mc.rb];
    ea = mc.cache_addr + (mc.cache_ind ? r2[7:0] : 8'd0);
    c1 = m_cache[ea];
    prod = 20'(int'($signed(mc.mul_a_cpu ? c1 : r1[7:0])) * int'($signed(mc.mul_b_cpu ? m_in : r2[7:0])));
    aa = mc.add_a_cpu ? 20'($signed(c1)) : r1;
    ab = mc.add_b_cpu ? 20'($signed(m_in)) : r2;
    y  = mc.add_sub ? aa - ab : aa + ab;
    ok = !mc.cond || m_flag;
    case (mc.recv_dir)
      DIR_N: inc = in_n;
      DIR_E: inc = in_e;
      DIR_S: inc = in_s;
      default: inc = in_w;
    endcase
    if (mc.cache_wr && ok) m_cache[ea] = m_fmt(r1, mc.shamt);
    if (mc.mul_en && ok && mc.mul_dst != 0) m_regs[mc.mul_dst] = prod;
    if (mc.add_en && ok && mc.add_dst != 0) m_regs[mc.add_dst] = y;
    if (mc.flag_wr) m_flag = y[19];
    if (mc.send_en) m_out = mc.send_fwd ? inc : m_fmt(r1, mc.shamt);
    if (mc.recv_en) m_in = inc;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; mc = MCODE_NOP; ext_sel = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    in_n = 0; in_e = 0; in_s = 0; in_w = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) m_regs[i] = 0;
    m_in = 0; m_out = 0; m_flag = 0;
    // load the cache over the peripheral bus
    ext_sel = 1; ext_we = 1;
    for (int i = 0; i < 256; i++) begin
      ext_addr = 8'(i); ext_wdata = 8'($urandom); m_cache[i] = ext_wdata;
      @(posedge clk); #1;
    end
    ext_sel = 0; ext_we = 0;
    // random microinstructions
    for (int t = 0; t < 3000; t++) begin
      mc = mcode_t'({11'($urandom), 32'($urandom)});
      mc.spare = 0; mc.idx_add = 0;
      in_n = 8'($urandom); in_e = 8'($urandom); in_s = 8'($urandom); in_w = 8'($urandom);
      #1 m_step();
      @(posedge clk); #1;
      checks++;
      if (out_buf !== m_out || flag !== m_flag) begin
        failures++;
        if (failures < 6) $display("FAIL t=%0d out=%h/%h flag=%b/%b", t, out_buf, m_out, flag, m_flag);
      end
    end
    mc = MCODE_NOP;
    ext_sel = 1;
    for (int i = 0; i < 256; i++) begin
      ext_addr = 8'(i); #1;
      checks++;
      if (ext_rdata !== m_cache[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cache[%0d]=%h exp %h", i, ext_rdata, m_cache[i]);
      end
    end
    // directed dot product: sum_k w[k] * x[k], k = 0..7
    begin
      int w [8], x [8], expect_sum, cyc;
      expect_sum = 0; cyc = 0;
      ext_we = 1;
      ext_addr = 8'd0; ext_wdata = 8'd0; @(posedge clk); #1;   // cache[0] = 0 (pipeline fill)
      for (int k = 0; k < 8; k++) begin
        w[k] = int'($urandom_range(0, 6)) - 3; x[k] = int'($urandom_range(0, 6)) - 3;
        expect_sum += w[k] * x[k];
        ext_addr = 8'(k + 1); ext_wdata = 8'(w[k]); @(posedge clk); #1;
      end
      ext_sel = 0; ext_we = 0;
      // clear r1 (acc) and r2 (product): r1 = r0 + r0, r2 = r0 * r0
      mc = MCODE_NOP; mc.add_en = 1; mc.add_dst = 3'd1; mc.mul_en = 1; mc.mul_dst = 3'd2;
      @(posedge clk); #1;
      // MAC word: recv W; r2 = cache[k] * in_buf; r1 = r1 + r2
      for (int k = 0; k <= 8; k++) begin
        mc = MCODE_NOP;
        mc.recv_en = 1; mc.recv_dir = DIR_W;
        mc.mul_en = 1; mc.mul_a_cpu = 1; mc.mul_b_cpu = 1; mc.mul_dst = 3'd2;
        mc.add_en = 1; mc.ra = 3'd1; mc.rb = 3'd2; mc.add_dst = 3'd1;
        mc.cache_addr = 8'(k);
        in_w = (k < 8) ? 8'(x[k]) : 8'd0;
        @(posedge clk); #1; cyc++;
      end
      mc = MCODE_NOP; mc.add_en = 1; mc.ra = 3'd1; mc.rb = 3'd2; mc.add_dst = 3'd1;
      @(posedge clk); #1; cyc++;
      mc = MCODE_NOP; mc.send_en = 1; mc.ra = 3'd1;
      @(posedge clk); #1;
      mc = MCODE_NOP;
      checks += 2;
      if (int'($signed(out_buf)) != expect_sum) begin
        failures++; $display("FAIL dot product %0d exp %0d", $signed(out_buf), expect_sum);
      end
      if (cyc != 10) begin failures++; $display("FAIL dot product took %0d cycles", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
