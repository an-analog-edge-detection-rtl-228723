// edge_buffer_reg: two-stage buffer register for one row of edge bits.
//
// Stage 1 captures the sense amplifier outputs of the selected row
// (load1); stage 2 takes stage 1 (load2) and holds the row while it is sent
// out a byte at a time, so stage 1 is free for the next row in the
// meantime. Both stages are W = 48 bits, one per sense amplifier, and reset
// to zero. Loads take effect on the rising clock edge.
module edge_buffer_reg #(
  parameter int W = 48
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load1,
  input  logic [W-1:0] d,
  input  logic         load2,
  output logic [W-1:0] q1,
  output logic [W-1:0] q2
);
  always_ff @(posedge clk) begin
    if (rst) begin
      q1 <= '0;
      q2 <= '0;
    end else begin
      if (load1) q1 <= d;
      if (load2) q2 <= q1;
    end
  end
endmodule
