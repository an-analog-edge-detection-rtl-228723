// edge_chip: the analog edge detection chip with its digital readout.
//
// A ROWS x COLS (66 x 50) mesh of photosensor cells computes, for every
// pixel at once, the Laplacian of the image as a current (behavioural model
// laplacian_cell_array). Readout works like a static RAM: the row decoder
// selects one effective row, the 48 column sense amplifiers (behavioural
// models) compare each cell's current with the externally set threshold and
// give one edge bit per column, and the bits go through the two-stage 48-bit
// buffer register and the 6:1 multiplexer to the 8-bit output register, one
// byte per clock, eight pixels per byte. The outermost ring of cells only
// feeds its neighbours, so the effective image is 64 rows x 48 columns,
// 384 bytes per frame.
//
// Interface: pulse start to read one frame; each out_valid cycle carries a
// byte (out_data, bit i = column 8*group + i) and its image-buffer address
// (out_addr = row * 6 + group). frame_done pulses after the last byte. Frame
// time: 64 * (SETTLE + 1) + 6 clocks with the default SETTLE = 10.
// Photocurrents iph are in pA, the threshold vth_pv in pV at S0's output.
module edge_chip #(
  parameter int ROWS   = 66,
  parameter int COLS   = 50,
  parameter int SETTLE = 10,
  parameter int R_OHM  = 5000,
  localparam int ROWS_EFF = ROWS - 2,
  localparam int COLS_EFF = COLS - 2,
  localparam int GROUPS   = COLS_EFF / 8,
  localparam int OAW      = $clog2(ROWS_EFF * GROUPS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [15:0]        iph [ROWS][COLS],
  input  logic signed [47:0] vth_pv,
  output logic [7:0]         out_data,
  output logic [OAW-1:0]     out_addr,
  output logic               out_valid,
  output logic               stall,
  output logic               busy,
  output logic               frame_done
);
  localparam int RAW = $clog2(ROWS_EFF);
  localparam int GSW = $clog2(GROUPS);

  logic [ROWS-1:0]          row_sel;
  logic signed [23:0]       col_i [COLS];
  logic [COLS_EFF-1:0]      sense_bits, q1, q2;
  logic                     row_en, load1, load2, out_load;
  logic [RAW-1:0]           row_addr;
  logic [GSW-1:0]           grp_sel;
  logic [OAW-1:0]           ld_addr;
  logic [7:0]               grp_byte;

  laplacian_cell_array #(.ROWS(ROWS), .COLS(COLS), .I_W(16), .O_W(24)) u_cells (
    .iph, .row_sel, .col_i
  );

  row_decoder #(.ROWS(ROWS), .AW(RAW), .FIRST(1)) u_rowdec (
    .en(row_en), .addr(row_addr), .row_sel
  );

  for (genvar k = 0; k < COLS_EFF; k++) begin : g_sa
    logic signed [47:0] v0;
    sense_amp #(.I_W(24), .R_OHM(R_OHM)) u_sa (
      .i_pa(col_i[k + 1]), .vth_pv, .v0_pv(v0), .edge_o(sense_bits[k])
    );
  end

  edge_buffer_reg #(.W(COLS_EFF)) u_buf (
    .clk, .rst, .load1, .d(sense_bits), .load2, .q1, .q2
  );

  group_mux #(.GROUPS(GROUPS), .GW(8)) u_mux (.d(q2), .sel(grp_sel), .y(grp_byte));

  output_reg #(.W(8), .AW(OAW)) u_out (
    .clk, .rst, .load(out_load), .d(grp_byte), .d_addr(ld_addr),
    .q(out_data), .q_addr(out_addr), .valid(out_valid)
  );

  edge_readout_ctrl #(.ROWS_EFF(ROWS_EFF), .GROUPS(GROUPS), .SETTLE(SETTLE)) u_ctrl (
    .clk, .rst, .start, .row_en, .row_addr, .load1, .load2, .grp_sel,
    .out_load, .out_addr(ld_addr), .stall, .busy, .frame_done
  );
endmodule
