// tb_pe_array: the 20-PE array in both configurations. Each PE k first
// places its tag k+1 in its output buffer. Ring mode: shifting eastward
// (receive from west, forward) s times leaves PE k holding the tag of PE
// (k - s) mod 20, closing over the ring's data link; shifting westward
// likewise. Mesh mode (4 x 5): receiving from the north gives the tag of
// the PE one row up, with the top row wrapping to the bottom; receiving from
// the west gives column 0 the west edge input, and the east edge outputs show
// the last column. Results are read back through the peripheral bus.
module tb_pe_array;
  import mp_pkg::*;
  localparam int N = 20, MC = 5, NR = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, mesh_mode;
  mcode_t mc;
  logic ext_en, ext_we;
  logic [4:0] ext_pe;
  logic [7:0] ext_addr, ext_wdata, ext_rdata;
  logic [7:0] west_in [NR], east_in [NR], west_out [NR], east_out [NR];
  logic [N-1:0] flags;
  int checks = 0, failures = 0, ring_shifts = 0, mesh_shifts = 0;

  pe_array dut (.clk, .rst, .mesh_mode, .mc, .ext_en, .ext_pe, .ext_we, .ext_addr, .ext_wdata,
                .ext_rdata, .west_in, .east_in, .west_out, .east_out, .flags);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  // every PE: r1 = cache[0]; out_buf = r1
  task automatic tag_out();
    ext_en = 1; ext_we = 1; ext_addr = 0;
    for (int k = 0; k < N; k++) begin ext_pe = 5'(k); ext_wdata = 8'(k + 1); tick(); end
    ext_en = 0; ext_we = 0;
    mc = MCODE_NOP; mc.add_en = 1; mc.add_a_cpu = 1; mc.add_dst = 3'd1; mc.cache_addr = 0; tick();
    mc = MCODE_NOP; mc.send_en = 1; mc.ra = 3'd1; tick();
    mc = MCODE_NOP;
  endtask

  task automatic shift(dir_e d, int steps);
    for (int s = 0; s < steps; s++) begin
      mc = MCODE_NOP; mc.recv_en = 1; mc.recv_dir = d; mc.send_en = 1; mc.send_fwd = 1; tick();
      if (mesh_mode) mesh_shifts++; else ring_shifts++;
    end
    mc = MCODE_NOP;
  endtask

  // store in_buf to cache[1] and read every PE's cache[1]
  task automatic check_inbuf(input int expv [N], input string what);
    mc = MCODE_NOP; mc.add_en = 1; mc.add_b_cpu = 1; mc.add_dst = 3'd2; tick();
    mc = MCODE_NOP; mc.cache_wr = 1; mc.ra = 3'd2; mc.cache_addr = 8'd1; tick();
    mc = MCODE_NOP;
    ext_en = 1; ext_addr = 8'd1;
    for (int k = 0; k < N; k++) begin
      ext_pe = 5'(k); #1;
      checks++;
      if (int'(ext_rdata) != expv[k]) begin
        failures++;
        $display("FAIL %s PE%0d got %0d exp %0d", what, k, ext_rdata, expv[k]);
      end
    end
    ext_en = 0;
  endtask

  initial begin
    int e [N];
    rst = 1; mesh_mode = 0; mc = MCODE_NOP; ext_en = 0; ext_we = 0; ext_pe = 0; ext_addr = 0; ext_wdata = 0;
    for (int r = 0; r < NR; r++) begin west_in[r] = 8'(100 + r); east_in[r] = 8'(200 + r); end
    repeat (2) @(posedge clk); #1 rst = 0;

    // ring, eastward by 7
    tag_out(); shift(DIR_W, 7);
    for (int k = 0; k < N; k++) e[k] = ((k - 7 + N) % N) + 1;
    check_inbuf(e, "ring east");
    // ring, westward by 3
    tag_out(); shift(DIR_E, 3);
    for (int k = 0; k < N; k++) e[k] = ((k + 3) % N) + 1;
    check_inbuf(e, "ring west");

    // mesh
    mesh_mode = 1;
    tag_out(); shift(DIR_N, 1);
    for (int k = 0; k < N; k++) e[k] = (((k / MC + NR - 1) % NR) * MC + k % MC) + 1;
    check_inbuf(e, "mesh north");
    tag_out(); shift(DIR_S, 1);
    for (int k = 0; k < N; k++) e[k] = (((k / MC + 1) % NR) * MC + k % MC) + 1;
    check_inbuf(e, "mesh south");
    tag_out();
    for (int r = 0; r < NR; r++) begin
      checks += 2;
      if (int'(east_out[r]) != r * MC + MC) failures++;
      if (int'(west_out[r]) != r * MC + 1) failures++;
    end
    shift(DIR_W, 1);
    for (int k = 0; k < N; k++) e[k] = (k % MC == 0) ? 100 + k / MC : k;
    check_inbuf(e, "mesh west edge");

    checks += 2;
    if (ring_shifts == 0) begin failures++; $display("FAIL no ring shift"); end
    if (mesh_shifts == 0) begin failures++; $display("FAIL no mesh shift"); end
    $display("ring shifts %0d, mesh shifts %0d", ring_shifts, mesh_shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
