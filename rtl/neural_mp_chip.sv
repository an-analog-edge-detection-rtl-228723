// neural_mp_chip: the digital neural multiprocessor chip.
//
// The array controller expands host macroinstructions into microinstructions
// broadcast to all PEs, and moves data between the system memory / image
// buffer and the PE data caches over the peripheral bus. The PEs (N_PE = 20,
// as on the prototype chip) form a ring systolic array or, with mesh_mode
// set, a mesh whose row ends are brought out as west/east edge ports.
// A multiply-accumulate per PE per clock gives N_PE connections per clock.
// The memories themselves are outside the chip (ports sm_* and fb_*).
module neural_mp_chip
  import mp_pkg::*;
#(
  parameter int N_PE        = 20,
  parameter int MESH_COLS   = 5,
  parameter int UCODE_DEPTH = 256,
  localparam int ROWS       = N_PE / MESH_COLS,
  localparam int UAW        = $clog2(UCODE_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              mesh_mode,
  // host
  input  logic              ucode_we,
  input  logic [UAW-1:0]    ucode_addr,
  input  mcode_t            ucode_wdata,
  input  logic              macro_valid,
  input  macro_t            macro_in,
  output logic              macro_ready,
  output logic              busy,
  // system memory and image buffer ports
  output logic [ADDR_W-1:0] sm_addr,
  output logic              sm_we,
  output logic [DATA_W-1:0] sm_wdata,
  input  logic [DATA_W-1:0] sm_rdata,
  output logic [ADDR_W-1:0] fb_addr,
  input  logic [DATA_W-1:0] fb_rdata,
  // mesh edge I/O
  input  logic [DATA_W-1:0] west_in  [ROWS],
  input  logic [DATA_W-1:0] east_in  [ROWS],
  output logic [DATA_W-1:0] west_out [ROWS],
  output logic [DATA_W-1:0] east_out [ROWS],
  output logic [N_PE-1:0]   flags
);
  localparam int PEW = (N_PE > 1) ? $clog2(N_PE) : 1;

  mcode_t              mc;
  logic                ext_en, ext_we;
  logic [PEW-1:0]      ext_pe;
  logic [CACHE_AW-1:0] ext_addr;
  logic [DATA_W-1:0]   ext_wdata, ext_rdata;

  array_controller #(.N_PE(N_PE), .UCODE_DEPTH(UCODE_DEPTH)) u_ctrl (
    .clk, .rst,
    .ucode_we, .ucode_addr, .ucode_wdata,
    .macro_valid, .macro_in, .macro_ready, .busy,
    .mc,
    .ext_en, .ext_pe, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .sm_addr, .sm_we, .sm_wdata, .sm_rdata,
    .fb_addr, .fb_rdata
  );

  pe_array #(.N_PE(N_PE), .MESH_COLS(MESH_COLS)) u_array (
    .clk, .rst, .mesh_mode, .mc,
    .ext_en, .ext_pe, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .west_in, .east_in, .west_out, .east_out, .flags
  );
endmodule
