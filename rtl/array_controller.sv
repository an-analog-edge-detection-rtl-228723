// array_controller: the multiprocessor's array controller.
//
// Two-level microprogramming: the host sends macroinstructions (mp_pkg::
// macro_t) into a FIFO; the controller expands each into a stream of
// microinstructions from a writable control store and broadcasts one per
// clock to all PEs over the 43 Mcode lines, so every PE executes the same
// command in the same cycle. It also loads and unloads the PE data caches.
//
//   M_EXEC    a[7:0] = ustart, b[8:0] = ulen, len = reps. Issues control store
//             words ustart .. ustart+ulen-1, the whole routine reps times.
//             For words with idx_add set, the repetition index (0, 1, ...)
//             is added to cache_addr, which lets one word step through the
//             cache, e.g. one weight per systolic step.
//   M_LOAD    copies len bytes from system memory address a onward to PE
//             address b onward; a PE address is {PE index, cache address},
//             so a copy runs through one PE's cache into the next one's.
//   M_LOADIMG the same, reading the edge-image buffer instead.
//   M_STORE   copies len bytes from PE address b onward to system memory a.
//
// Timing: an idle controller takes a macro from the FIFO on the clock edge
// after the host writes it, and an EXEC's first microword appears on mc (a
// register) one edge later, then one per clock. A LOAD moves one
// byte per clock plus one cycle of memory read latency; a STORE one byte per
// clock; the byte read from the PE (ext_rdata) goes straight out as
// sm_wdata in the same cycle. While loading or storing, mc carries no-ops. busy is high from a
// macro entering the FIFO until the last of its effects has been issued.
// The design names the macro/micro split and the broadcast; the opcode set,
// the FIFO (MACRO_DEPTH) and the control store size (UCODE_DEPTH) are this
// design's choices.
module array_controller
  import mp_pkg::*;
#(
  parameter int N_PE        = 20,
  parameter int UCODE_DEPTH = 256,
  parameter int MACRO_DEPTH = 8,
  localparam int PEW        = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int UAW        = $clog2(UCODE_DEPTH),
  localparam int QAW        = $clog2(MACRO_DEPTH)
) (
  input  logic                clk,
  input  logic                rst,
  // host side
  input  logic                ucode_we,
  input  logic [UAW-1:0]      ucode_addr,
  input  mcode_t              ucode_wdata,
  input  logic                macro_valid,
  input  macro_t              macro_in,
  output logic                macro_ready,
  output logic                busy,
  // broadcast microinstruction
  output mcode_t              mc,
  // peripheral bus to the PE caches
  output logic                ext_en,
  output logic [PEW-1:0]      ext_pe,
  output logic                ext_we,
  output logic [CACHE_AW-1:0] ext_addr,
  output logic [DATA_W-1:0]   ext_wdata,
  input  logic [DATA_W-1:0]   ext_rdata,
  // system memory port (synchronous read, one cycle latency)
  output logic [ADDR_W-1:0]   sm_addr,
  output logic                sm_we,
  output logic [DATA_W-1:0]   sm_wdata,
  input  logic [DATA_W-1:0]   sm_rdata,
  // image buffer read port (synchronous read, one cycle latency)
  output logic [ADDR_W-1:0]   fb_addr,
  input  logic [DATA_W-1:0]   fb_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_LOAD, S_STORE} state_e;

  mcode_t ustore [UCODE_DEPTH];
  macro_t fifo   [MACRO_DEPTH];
  logic [QAW:0]   q_count;
  logic [QAW-1:0] q_rd, q_wr;

  state_e          state;
  macro_t          cur;
  logic [8:0]      i_cnt;      // word within routine / byte count issued
  logic [8:0]      rep;        // EXEC repetition index
  logic            pend;       // LOAD: a read is in flight
  logic            from_img;
  logic [ADDR_W-1:0] pend_addr, st_addr;
  mcode_t          uword;
  logic            take;

  always_ff @(posedge clk)
    if (ucode_we) ustore[ucode_addr] <= ucode_wdata;

  // Macro FIFO
  assign macro_ready = (q_count != (QAW+1)'(MACRO_DEPTH));
  assign take        = (state == S_IDLE) && !pend && (q_count != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      q_count <= '0;
      q_rd    <= '0;
      q_wr    <= '0;
    end else begin
      if (macro_valid && macro_ready) begin
        fifo[q_wr] <= macro_in;
        q_wr       <= q_wr + 1'b1;
      end
      if (take) q_rd <= q_rd + 1'b1;
      q_count <= q_count + (QAW+1)'(macro_valid && macro_ready) - (QAW+1)'(take);
    end
  end

  // Current control store word with the repetition index applied
  always_comb begin
    uword = ustore[UAW'(cur.a[7:0] + i_cnt[7:0])];
    if (uword.idx_add) uword.cache_addr = uword.cache_addr + rep[CACHE_AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cur       <= '0;
      i_cnt     <= '0;
      rep       <= '0;
      pend      <= 1'b0;
      from_img  <= 1'b0;
      pend_addr <= '0;
      mc        <= MCODE_NOP;
    end else begin
      mc <= MCODE_NOP;
      unique case (state)
        S_IDLE: begin
          if (take) begin
            cur      <= fifo[q_rd];
            i_cnt    <= '0;
            rep      <= '0;
            from_img <= (fifo[q_rd].op == M_LOADIMG);
            unique case (fifo[q_rd].op)
              M_EXEC:  state <= (fifo[q_rd].b[8:0] != '0 && fifo[q_rd].len != '0) ? S_EXEC : S_IDLE;
              M_STORE: state <= (fifo[q_rd].len != '0) ? S_STORE : S_IDLE;
              default: state <= (fifo[q_rd].len != '0) ? S_LOAD : S_IDLE;
            endcase
          end
        end
        S_EXEC: begin
          mc <= uword;
          if (i_cnt + 9'd1 == cur.b[8:0]) begin
            i_cnt <= '0;
            rep   <= rep + 9'd1;
            if (rep + 9'd1 == cur.len) state <= S_IDLE;
          end else begin
            i_cnt <= i_cnt + 9'd1;
          end
        end
        S_LOAD: begin
          i_cnt <= i_cnt + 9'd1;
          if (i_cnt + 9'd1 == cur.len) state <= S_IDLE;
        end
        S_STORE: begin
          i_cnt <= i_cnt + 9'd1;
          if (i_cnt + 9'd1 == cur.len) state <= S_IDLE;
        end
      endcase
      // LOAD pipeline: the byte read in this cycle is written to the PE next cycle
      pend      <= (state == S_LOAD);
      pend_addr <= cur.b + ADDR_W'(i_cnt);
    end
  end

  // Memory ports
  always_comb begin
    sm_addr  = cur.a + ADDR_W'(i_cnt);
    fb_addr  = cur.a + ADDR_W'(i_cnt);
    sm_we    = (state == S_STORE);
    sm_wdata = ext_rdata;
  end

  assign st_addr = cur.b + ADDR_W'(i_cnt);

  // Peripheral bus: LOAD writes (one cycle behind the read), STORE reads
  always_comb begin
    ext_en    = 1'b0;
    ext_we    = 1'b0;
    ext_pe    = '0;
    ext_addr  = '0;
    ext_wdata = from_img ? fb_rdata : sm_rdata;
    if (pend) begin
      ext_en   = 1'b1;
      ext_we   = 1'b1;
      ext_pe   = PEW'(pend_addr[ADDR_W-1:CACHE_AW]);
      ext_addr = pend_addr[CACHE_AW-1:0];
    end else if (state == S_STORE) begin
      ext_en   = 1'b1;
      ext_pe   = PEW'(st_addr[ADDR_W-1:CACHE_AW]);
      ext_addr = st_addr[CACHE_AW-1:0];
    end
  end

  assign busy = (state != S_IDLE) || pend || (q_count != '0);

  // The control store must not be rewritten while a routine runs from it.
  always_ff @(posedge clk)
    if (!rst) assert (!(ucode_we && state == S_EXEC))
      else $error("control store written during EXEC");
endmodule
