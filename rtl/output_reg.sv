// output_reg: the edge chip's 8-bit output register.
//
// On load it captures a byte of edge bits and the buffer address that byte
// belongs to, and raises valid for exactly one clock, the cycle in which the
// byte is on the output bus and is written to the image buffer. The address
// and the valid strobe are this design's choice of write interface.
module output_reg #(
  parameter int W  = 8,
  parameter int AW = 9
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [W-1:0]  d,
  input  logic [AW-1:0] d_addr,
  output logic [W-1:0]  q,
  output logic [AW-1:0] q_addr,
  output logic          valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      q      <= '0;
      q_addr <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= load;
      if (load) begin
        q      <= d;
        q_addr <= d_addr;
      end
    end
  end
endmodule
