// vision_system: the early-vision system of an analog edge detection chip
// and a digital neural multiprocessor chip.
//
// The edge chip senses the image and detects edges in place; its one-bit
// edge pixels, eight per byte, are written into the image buffer SRAM as they
// are read out (384 bytes per frame at the default 64 x 48 effective pixels).
// The multiprocessor chip's array controller copies image bytes from that
// buffer into the PE data caches (M_LOADIMG) and weights, targets and
// intermediate results between the caches and the system memory (SRAM #2,
// 64 K bytes) and runs the microprograms the host has loaded. The system
// controller / host is outside: it starts frames, sets the edge threshold,
// writes the control store, issues macroinstructions and reads and writes
// the system memory through that memory's second port (host_*).
module vision_system
  import mp_pkg::*;
#(
  parameter int ROWS      = 66,
  parameter int COLS      = 50,
  parameter int SETTLE    = 10,
  parameter int N_PE      = 20,
  parameter int MESH_COLS = 5,
  parameter int SM_DEPTH  = 65536,
  localparam int MROWS    = N_PE / MESH_COLS,
  localparam int FB_DEPTH = 2 ** $clog2((ROWS - 2) * ((COLS - 2) / 8)),
  localparam int FB_AW    = $clog2(FB_DEPTH),
  localparam int SM_AW    = $clog2(SM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // edge detection chip
  input  logic               frame_start,
  input  logic [15:0]        iph [ROWS][COLS],
  input  logic signed [47:0] vth_pv,
  output logic               edge_busy,
  output logic               edge_stall,
  output logic               frame_done,
  // multiprocessor chip, host side
  input  logic               mesh_mode,
  input  logic               ucode_we,
  input  logic [7:0]         ucode_addr,
  input  mcode_t             ucode_wdata,
  input  logic               macro_valid,
  input  macro_t             macro_in,
  output logic               macro_ready,
  output logic               mp_busy,
  input  logic [DATA_W-1:0]  west_in  [MROWS],
  input  logic [DATA_W-1:0]  east_in  [MROWS],
  output logic [DATA_W-1:0]  west_out [MROWS],
  output logic [DATA_W-1:0]  east_out [MROWS],
  output logic [N_PE-1:0]    flags,
  // host port of the system memory
  input  logic               host_we,
  input  logic [SM_AW-1:0]   host_addr,
  input  logic [DATA_W-1:0]  host_wdata,
  output logic [DATA_W-1:0]  host_rdata
);
  logic [7:0]          e_data;
  logic [FB_AW-1:0]    e_addr;
  logic                e_valid;
  logic [ADDR_W-1:0]   sm_addr, fb_addr;
  logic                sm_we;
  logic [DATA_W-1:0]   sm_wdata, sm_rdata, fb_rdata, fb_a_unused;

  edge_chip #(.ROWS(ROWS), .COLS(COLS), .SETTLE(SETTLE)) u_edge (
    .clk, .rst, .start(frame_start), .iph, .vth_pv,
    .out_data(e_data), .out_addr(e_addr), .out_valid(e_valid),
    .stall(edge_stall), .busy(edge_busy), .frame_done
  );

  // Image buffer: port A written by the edge chip, port B read by the controller
  buffer_sram #(.DEPTH(FB_DEPTH), .W(8)) u_img_buf (
    .clk,
    .a_we(e_valid), .a_addr(e_addr), .a_wdata(e_data), .a_rdata(fb_a_unused),
    .b_we(1'b0), .b_addr(fb_addr[FB_AW-1:0]), .b_wdata('0), .b_rdata(fb_rdata)
  );

  neural_mp_chip #(.N_PE(N_PE), .MESH_COLS(MESH_COLS)) u_mp (
    .clk, .rst, .mesh_mode,
    .ucode_we, .ucode_addr, .ucode_wdata,
    .macro_valid, .macro_in, .macro_ready, .busy(mp_busy),
    .sm_addr, .sm_we, .sm_wdata, .sm_rdata,
    .fb_addr, .fb_rdata,
    .west_in, .east_in, .west_out, .east_out, .flags
  );

  // System memory (SRAM #2): port A the array controller, port B the host
  buffer_sram #(.DEPTH(SM_DEPTH), .W(DATA_W)) u_sys_mem (
    .clk,
    .a_we(sm_we), .a_addr(sm_addr[SM_AW-1:0]), .a_wdata(sm_wdata), .a_rdata(sm_rdata),
    .b_we(host_we), .b_addr(host_addr), .b_wdata(host_wdata), .b_rdata(host_rdata)
  );
endmodule
