// data_cache: the on-chip data memory of one PE, 256 words of 8 bits.
//
// One access per cycle: a synchronous write and an asynchronous read of the
// addressed word, so a microinstruction can read a word onto the CPU1 bus and
// use it in the same cycle. The size is the design's; the single port with
// combinational read is this implementation's choice (the PE's external
// loading path and its own microcode share the port, arbitrated by the PE).
module data_cache #(
  parameter int WORDS = 256,
  parameter int W     = 8,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
