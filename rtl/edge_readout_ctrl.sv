// edge_readout_ctrl: sequences the readout of one frame from the edge chip.
//
// On start it selects effective row 0 and waits SETTLE clocks for the column
// lines and sense amplifiers to settle, then captures the row into buffer
// stage 1 (load1). In the next cycle, if the output side is idle, the row
// moves to stage 2 (load2) and the output side sends its GROUPS bytes on
// GROUPS consecutive clocks (grp_sel, out_load, out_addr = row * GROUPS +
// group) while the sense side selects the next row and settles again. If the
// output side is still busy, the sense side waits (stall = 1 for that
// cycle). frame_done pulses when the last byte of row ROWS_EFF-1 has been
// loaded into the output register.
//
// Timing with SETTLE >= GROUPS: each row takes SETTLE + 1 clocks, and the
// edge that raises frame_done comes ROWS_EFF * (SETTLE + 1) + GROUPS clocks
// after the edge that takes start. SETTLE = 10 clocks stands for the
// about 1 us column time constant at an assumed 10 MHz clock; the design
// gives no clock rate. The row-by-row order and the double-buffered
// overlap are this design's reading of the two-stage buffer.
module edge_readout_ctrl #(
  parameter int ROWS_EFF = 64,
  parameter int GROUPS   = 6,
  parameter int SETTLE   = 10,
  localparam int RAW     = $clog2(ROWS_EFF),
  localparam int GSW     = $clog2(GROUPS),
  localparam int OAW     = $clog2(ROWS_EFF * GROUPS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           row_en,
  output logic [RAW-1:0] row_addr,
  output logic           load1,
  output logic           load2,
  output logic [GSW-1:0] grp_sel,
  output logic           out_load,
  output logic [OAW-1:0] out_addr,
  output logic           stall,
  output logic           busy,
  output logic           frame_done
);
  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_HAND, S_DRAIN} state_e;

  state_e         state;
  logic [15:0]    settle_cnt;
  logic           out_busy;
  logic [RAW-1:0] out_row;
  logic [GSW-1:0] g;
  logic           last_row;

  assign last_row = (row_addr == RAW'(ROWS_EFF - 1));
  assign row_en   = (state == S_SETTLE) || (state == S_HAND);
  assign load1    = (state == S_SETTLE) && (settle_cnt == 16'(SETTLE - 1));
  assign load2    = (state == S_HAND) && !out_busy;
  assign stall    = (state == S_HAND) && out_busy;
  assign grp_sel  = g;
  assign out_load = out_busy;
  assign out_addr = OAW'(out_row) * OAW'(GROUPS) + OAW'(g);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      settle_cnt <= '0;
      row_addr   <= '0;
      out_busy   <= 1'b0;
      out_row    <= '0;
      g          <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      // output side
      if (out_busy) begin
        if (g == GSW'(GROUPS - 1)) begin
          out_busy <= 1'b0;
          g        <= '0;
          if (state == S_DRAIN) begin
            frame_done <= 1'b1;
            state      <= S_IDLE;
          end
        end else begin
          g <= g + 1'b1;
        end
      end
      // sense side
      unique case (state)
        S_IDLE: if (start) begin
          row_addr   <= '0;
          settle_cnt <= '0;
          state      <= S_SETTLE;
        end
        S_SETTLE: begin
          settle_cnt <= settle_cnt + 16'd1;
          if (load1) state <= S_HAND;
        end
        S_HAND: if (load2) begin
          out_busy   <= 1'b1;
          out_row    <= row_addr;
          g          <= '0;
          settle_cnt <= '0;
          if (last_row) state <= S_DRAIN;
          else begin
            row_addr <= row_addr + 1'b1;
            state    <= S_SETTLE;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
