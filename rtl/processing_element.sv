// processing_element: one PE of the neural multiprocessor.
//
// Datapath (after the design's block diagram): a 256 x 8-bit data cache, a
// register file, an 8-bit Wallace-tree multiplier, a 20-bit adder and a
// four-port I/O unit, joined by four buses. CPU1 carries the cache word at
// the effective address, CPU2 the I/O input buffer, REG1/REG2 the two
// register read ports. The multiplier takes operand A from CPU1 or REG1 and
// operand B from CPU2 or REG2 (low 8 bits of a register) and writes its
// 16-bit product, sign-extended, back over REG1. The adder takes the same
// choice of sources (cache and buffer bytes sign-extended) and writes back
// over REG2. So a single microinstruction can multiply a cache word by the
// word just received from a neighbour while accumulating the previous
// product: one multiply-accumulate per PE per clock.
//
// Every field of the broadcast microinstruction (mp_pkg::mcode_t) takes
// effect on the next rising clock edge: register writes, cache write
// (fmt(REG1) = REG1 shifted right by shamt and saturated to 8 bits), output
// and input buffers and the compare flag (sign of the adder result). With
// cond set, register and cache writes happen only in PEs whose flag is 1.
// The effective cache address is cache_addr, plus REG2[7:0] when cache_ind is
// set (table look-up, as the design uses for the nonlinear transfer
// function).
//
// ext_* is the peripheral bus by which the array controller loads and
// unloads the cache: ext_sel selects this PE, and for that cycle the cache
// port serves the external address instead of the microinstruction. The
// controller broadcasts only no-op microinstructions while it loads.
module processing_element
  import mp_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  mcode_t              mc,
  // peripheral (load/unload) bus
  input  logic                ext_sel,
  input  logic                ext_we,
  input  logic [CACHE_AW-1:0] ext_addr,
  input  logic [DATA_W-1:0]   ext_wdata,
  output logic [DATA_W-1:0]   ext_rdata,
  // neighbour ports
  input  logic [DATA_W-1:0]   in_n,
  input  logic [DATA_W-1:0]   in_e,
  input  logic [DATA_W-1:0]   in_s,
  input  logic [DATA_W-1:0]   in_w,
  output logic [DATA_W-1:0]   out_buf,
  output logic                flag
);
  logic [ACC_W-1:0]    reg1, reg2;       // REG1 / REG2 buses
  logic [DATA_W-1:0]   cpu1, cpu2;       // CPU1 / CPU2 buses
  logic [CACHE_AW-1:0] ea, cache_addr;
  logic                cache_we;
  logic [DATA_W-1:0]   cache_wdata, in_buf;
  logic                wr_ok;
  logic signed [7:0]   mul_a, mul_b;
  logic signed [15:0]  prod;
  logic [ACC_W-1:0]    add_a, add_b, add_y;
  logic                add_neg;

  assign wr_ok = !mc.cond || flag;

  // Data cache: microinstruction access, or the peripheral bus when selected
  assign ea          = mc.cache_addr + (mc.cache_ind ? reg2[CACHE_AW-1:0] : '0);
  assign cache_addr  = ext_sel ? ext_addr : ea;
  assign cache_we    = ext_sel ? ext_we : (mc.cache_wr && wr_ok);
  assign cache_wdata = ext_sel ? ext_wdata : fmt8(reg1, mc.shamt);
  assign ext_rdata   = cpu1;

  data_cache #(.WORDS(CACHE_WORDS), .W(DATA_W)) u_cache (
    .clk, .we(cache_we), .addr(cache_addr), .wdata(cache_wdata), .rdata(cpu1)
  );

  assign cpu2 = in_buf;

  register_file #(.NREGS(NREGS), .W(ACC_W)) u_rf (
    .clk, .rst,
    .ra(mc.ra), .rb(mc.rb), .rd1(reg1), .rd2(reg2),
    .we_m(mc.mul_en && wr_ok), .wa_m(mc.mul_dst), .wd_m(ACC_W'(prod)),
    .we_a(mc.add_en && wr_ok), .wa_a(mc.add_dst), .wd_a(add_y)
  );

  assign mul_a = mc.mul_a_cpu ? cpu1 : reg1[7:0];
  assign mul_b = mc.mul_b_cpu ? cpu2 : reg2[7:0];

  wallace_mult8 u_mul (.a(mul_a), .b(mul_b), .p(prod));

  assign add_a = mc.add_a_cpu ? ACC_W'($signed(cpu1)) : reg1;
  assign add_b = mc.add_b_cpu ? ACC_W'($signed(cpu2)) : reg2;

  adder20 #(.W(ACC_W)) u_add (.a(add_a), .b(add_b), .sub(mc.add_sub), .y(add_y), .neg(add_neg));

  always_ff @(posedge clk) begin
    if (rst)             flag <= 1'b0;
    else if (mc.flag_wr) flag <= add_neg;
  end

  pe_io_unit u_io (
    .clk, .rst,
    .send_en(mc.send_en), .send_fwd(mc.send_fwd), .send_data(fmt8(reg1, mc.shamt)),
    .recv_en(mc.recv_en), .recv_dir(mc.recv_dir),
    .in_n, .in_e, .in_s, .in_w,
    .out_buf, .in_buf
  );
endmodule
