// mp_pkg: types and constants shared by the neural multiprocessor blocks.
//
// The PE datapath follows the widths the design states: 8-bit data bus and
// data cache words, an 8-bit multiplier with a 16-bit product, a 20-bit
// adder, a 16-bit address bus and 43 microcode (Mcode) lines broadcast from
// the array controller to every PE. The field layout of the 43-bit
// microinstruction and of the macroinstruction is this design's own choice:
// only the line count is given.
package mp_pkg;

  localparam int DATA_W      = 8;    // data bus / cache word
  localparam int PROD_W      = 16;   // multiplier product
  localparam int ACC_W       = 20;   // adder and register width
  localparam int CACHE_WORDS = 256;  // data cache per PE
  localparam int CACHE_AW    = 8;
  localparam int NREGS       = 8;    // register file entries (r0 reads as 0)
  localparam int REG_AW      = 3;
  localparam int ADDR_W      = 16;   // external / peripheral address bus
  localparam int MCODE_W     = 43;   // microcode lines

  // Direction of a neighbour port. N is the row above (wraps in the mesh).
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // One broadcast microinstruction (43 bits). Operand A of the multiplier
  // and the adder comes from REG1 (register ra) or CPU1 (the data cache word
  // at the effective address); operand B from REG2 (register rb) or CPU2
  // (the I/O input buffer). The multiplier result returns on REG1, the adder
  // result on REG2, so one of each can be written per cycle.
  typedef struct packed {
    logic              mul_en;
    logic              mul_a_cpu;
    logic              mul_b_cpu;
    logic [REG_AW-1:0] mul_dst;
    logic              add_en;
    logic              add_sub;    // 1: A - B, 0: A + B
    logic              add_a_cpu;
    logic              add_b_cpu;
    logic [REG_AW-1:0] add_dst;
    logic              flag_wr;    // flag <= sign of the adder result
    logic              cond;       // register and cache writes only where flag = 1
    logic [REG_AW-1:0] ra;
    logic [REG_AW-1:0] rb;
    logic              cache_wr;   // cache[ea] <= fmt(REG1)
    logic              cache_ind;  // ea = cache_addr + REG2[7:0]
    logic [CACHE_AW-1:0] cache_addr;
    logic              send_en;    // output buffer <= fmt(REG1) or forwarded word
    logic              send_fwd;   // forward the word received this cycle
    logic              recv_en;    // input buffer <= word on port recv_dir
    dir_e              recv_dir;
    logic [3:0]        shamt;      // fmt(x) = saturate8(x >>> shamt)
    logic              idx_add;    // controller adds the loop index to cache_addr
    logic [1:0]        spare;
  } mcode_t;

  localparam mcode_t MCODE_NOP = '0;

  typedef enum logic [1:0] {
    M_EXEC    = 2'd0,  // run ulen microwords from ustart, reps times
    M_LOAD    = 2'd1,  // copy len bytes system memory -> PE caches
    M_STORE   = 2'd2,  // copy len bytes PE caches -> system memory
    M_LOADIMG = 2'd3   // copy len bytes image buffer -> PE caches
  } macro_op_e;

  // Macroinstruction (43 bits). EXEC: a[7:0] = ustart, b[8:0] = ulen,
  // len = reps. LOAD/STORE/LOADIMG: a = memory address, b = PE address
  // ({PE index, cache address}), len = byte count.
  typedef struct packed {
    macro_op_e         op;
    logic [ADDR_W-1:0] a;
    logic [ADDR_W-1:0] b;
    logic [8:0]        len;
  } macro_t;

  // Saturate a register value, shifted right arithmetically, to a signed byte.
  function automatic logic [DATA_W-1:0] fmt8(input logic signed [ACC_W-1:0] x,
                                             input logic [3:0] sh);
    logic signed [ACC_W-1:0] s;
    s = x >>> sh;
    if (s > 20'sd127)       return 8'sd127;
    else if (s < -20'sd128) return 8'h80;
    else                    return s[DATA_W-1:0];
  endfunction

endpackage
