// buffer_sram: two-port static RAM used twice in the system: as the
// edge-image buffer between the edge detection chip and the multiprocessor
// (one bit per pixel, eight pixels per byte) and as the multiprocessor's
// shared two-port system memory (SRAM #2), which the host fills and the
// array controller reads and writes.
//
// Two independent ports, A and B, each with a synchronous write and a
// registered read (data appears the cycle after the address). If both ports
// write the same word in one cycle, port B's value is kept. The default size
// spans the 16-bit address bus (64 K bytes); the sizes and the read latency
// are this design's choices, the design gives neither.
module buffer_sram #(
  parameter int DEPTH = 65536,
  parameter int W     = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
