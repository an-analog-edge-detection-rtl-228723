// pe_io_unit: the four-direction I/O unit of a PE.
//
// Holds an 8-bit output buffer, whose value is offered on all four ports
// (N, E, S, W) at once, and an 8-bit input buffer. Because every PE executes
// the same broadcast microinstruction, all PEs send and receive in lockstep:
// recv_en loads the input buffer with the word its neighbour in direction
// recv_dir offers; send_en loads the output buffer with send_data, or with
// the word being received when send_fwd is set, so a ring or mesh shifts one
// hop per clock. Both buffers are registers and reset to zero. The buffer
// names follow the design's I/O unit; the lockstep protocol without
// handshake is this design's choice.
module pe_io_unit
  import mp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              send_en,
  input  logic              send_fwd,
  input  logic [DATA_W-1:0] send_data,
  input  logic              recv_en,
  input  dir_e              recv_dir,
  input  logic [DATA_W-1:0] in_n,
  input  logic [DATA_W-1:0] in_e,
  input  logic [DATA_W-1:0] in_s,
  input  logic [DATA_W-1:0] in_w,
  output logic [DATA_W-1:0] out_buf,
  output logic [DATA_W-1:0] in_buf
);
  logic [DATA_W-1:0] incoming;

  always_comb begin
    unique case (recv_dir)
      DIR_N:   incoming = in_n;
      DIR_E:   incoming = in_e;
      DIR_S:   incoming = in_s;
      default: incoming = in_w;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_buf <= '0;
      in_buf  <= '0;
    end else begin
      if (recv_en) in_buf <= incoming;
      if (send_en) out_buf <= send_fwd ? incoming : send_data;
    end
  end
endmodule
