// tb_prog_pkg: microprograms and reference arithmetic shared by the chip-
// and system-level testbenches.
//
// The ring feed-forward routine computes S = W a for an N x N layer with
// one PE per neuron, then a_out = f(S) by table look-up:
//   init (2 words):  r1 = cache[A_ADDR]; r3 = 0 | out_buf = a_i; r2 = 0
//   step (1 word, run N+1 times with the repetition index k added to the
//        cache address): receive from the west and forward;
//        r2 = cache[k] * in_buf; r3 = r3 + r2
//   act (6 words):   r3 = r3 + r2; cache[TMP] = sat(r3 >>> SH);
//                    r4 = cache[TMP]; r5 = cache[LUT_BASE + r4] + r4;
//                    r5 = r5 - r4; cache[OUT] = r5
// (an indexed read takes its index from REG2, which is also the adder's B
// operand, hence the correcting subtraction).
// With in_buf holding a_((i-k) mod N) after k shifts, PE i must hold
// cache[k] = w(i, (i-k) mod N) for k = 1..N and cache[0] = 0.
package tb_prog_pkg;
  import mp_pkg::*;

  localparam int A_ADDR   = 200;
  localparam int TMP_ADDR = 201;
  localparam int OUT_ADDR = 202;
  localparam int LUT_BASE = 240;  // table entries for x = -16..15 at 240 + x (mod 256)
  localparam int SH       = 5;

  localparam int U_INIT = 0, U_STEP = 2, U_ACT = 3, U_ACT_LEN = 6, U_LEN = 9;

  function automatic mcode_t ucode(int n, int sh = SH);
    mcode_t m;
    m = MCODE_NOP;
    case (n)
      0: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd1; m.cache_addr = 8'(A_ADDR);
               m.mul_en = 1; m.mul_dst = 3'd3; end
      1: begin m.send_en = 1; m.ra = 3'd1; m.mul_en = 1; m.mul_dst = 3'd2; end
      2: begin m.recv_en = 1; m.recv_dir = DIR_W; m.send_en = 1; m.send_fwd = 1;
               m.mul_en = 1; m.mul_a_cpu = 1; m.mul_b_cpu = 1; m.mul_dst = 3'd2;
               m.add_en = 1; m.ra = 3'd3; m.rb = 3'd2; m.add_dst = 3'd3;
               m.cache_addr = 8'd0; m.idx_add = 1; end
      3: begin m.add_en = 1; m.ra = 3'd3; m.rb = 3'd2; m.add_dst = 3'd3; end
      4: begin m.cache_wr = 1; m.ra = 3'd3; m.shamt = 4'(sh); m.cache_addr = 8'(TMP_ADDR); end
      5: begin m.add_en = 1; m.add_a_cpu = 1; m.add_dst = 3'd4; m.cache_addr = 8'(TMP_ADDR); end
      6: begin m.add_en = 1; m.add_a_cpu = 1; m.cache_ind = 1; m.rb = 3'd4; m.add_dst = 3'd5;
               m.cache_addr = 8'(LUT_BASE); end
      7: begin m.add_en = 1; m.add_sub = 1; m.ra = 3'd5; m.rb = 3'd4; m.add_dst = 3'd5; end
      8: begin m.cache_wr = 1; m.ra = 3'd5; m.cache_addr = 8'(OUT_ADDR); end
      default: ;
    endcase
    return m;
  endfunction

  // The activation table: a hard-limited ramp, f(x) = clamp(64 + 6x, 0, 127).
  function automatic int act(int x);
    int y;
    y = 64 + 6 * x;
    return (y < 0) ? 0 : (y > 127) ? 127 : y;
  endfunction

  // Reference for the scaled table index: saturate (s >>> SH) to a byte.
  function automatic int idx(int s, int sh = SH);
    int v;
    v = s >>> sh;
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
endpackage
