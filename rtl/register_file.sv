// register_file: the PE register file.
//
// Two read ports drive the REG1 (address ra) and REG2 (address rb) buses.
// Two write ports: the multiplier result arrives over REG1 and the adder
// result over REG2, so both can be written in one cycle; if both name the
// same register the adder result wins. Register 0 always reads as zero, so
// "add r0" is a move. Eight 20-bit registers and the r0 convention are this
// design's choices; the document gives no register count. Reset clears all.
module register_file #(
  parameter int NREGS = 8,
  parameter int W     = 20,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we_m,
  input  logic [AW-1:0] wa_m,
  input  logic [W-1:0]  wd_m,
  input  logic          we_a,
  input  logic [AW-1:0] wa_a,
  input  logic [W-1:0]  wd_a
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (we_m && wa_m != '0) regs[wa_m] <= wd_m;
      if (we_a && wa_a != '0) regs[wa_a] <= wd_a;
    end
  end

  assign rd1 = (ra == '0) ? '0 : regs[ra];
  assign rd2 = (rb == '0) ? '0 : regs[rb];
endmodule
