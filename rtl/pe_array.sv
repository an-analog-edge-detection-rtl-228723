// pe_array: the processing elements of the multiprocessor chip and their
// nearest-neighbour links, connectable as a 1-D ring or a 2-D mesh.
//
// PE k sits at row k / MESH_COLS, column k % MESH_COLS. Each PE's west
// input comes from PE k-1 and its east input from PE k+1 in both modes.
// In ring mode (mesh_mode = 0) the chain closes on itself: PE 0's west input
// is PE N-1 and PE N-1's east input is PE 0, forming the ring systolic
// array's data link. In mesh mode the row ends are broken: the west input of
// column 0 and the east input of the last column come from the array edge
// (west_in / east_in, one word per row), where the design places all of the
// mesh's input and output, and north/south links join vertical neighbours
// with the top and bottom rows wrapped around. In ring mode the north/south
// inputs read zero. The microinstruction and the peripheral load bus are
// broadcast to all PEs; ext_pe picks the PE that the bus addresses.
// N_PE = 20 is the prototype chip's PE count; the 4 x 5 mesh arrangement is
// this design's choice. Neighbour links have no delay beyond each PE's
// output buffer register.
module pe_array
  import mp_pkg::*;
#(
  parameter int N_PE      = 20,
  parameter int MESH_COLS = 5,
  localparam int ROWS     = N_PE / MESH_COLS,
  localparam int PEW      = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                mesh_mode,
  input  mcode_t              mc,
  input  logic                ext_en,
  input  logic [PEW-1:0]      ext_pe,
  input  logic                ext_we,
  input  logic [CACHE_AW-1:0] ext_addr,
  input  logic [DATA_W-1:0]   ext_wdata,
  output logic [DATA_W-1:0]   ext_rdata,
  input  logic [DATA_W-1:0]   west_in  [ROWS],
  input  logic [DATA_W-1:0]   east_in  [ROWS],
  output logic [DATA_W-1:0]   west_out [ROWS],
  output logic [DATA_W-1:0]   east_out [ROWS],
  output logic [N_PE-1:0]     flags
);
  logic [DATA_W-1:0] pe_out [N_PE];
  logic [DATA_W-1:0] pe_rd  [N_PE];

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    localparam int R = k / MESH_COLS;
    localparam int C = k % MESH_COLS;
    localparam int KW = (k + N_PE - 1) % N_PE;          // ring predecessor
    localparam int KE = (k + 1) % N_PE;                 // ring successor
    localparam int KN = ((R + ROWS - 1) % ROWS) * MESH_COLS + C;
    localparam int KS = ((R + 1) % ROWS) * MESH_COLS + C;
    logic [DATA_W-1:0] in_n, in_e, in_s, in_w;

    always_comb begin
      in_w = pe_out[KW];
      in_e = pe_out[KE];
      in_n = '0;
      in_s = '0;
      if (mesh_mode) begin
        in_n = pe_out[KN];
        in_s = pe_out[KS];
        if (C == 0)             in_w = west_in[R];
        if (C == MESH_COLS - 1) in_e = east_in[R];
      end
    end

    processing_element u_pe (
      .clk, .rst, .mc,
      .ext_sel(ext_en && ext_pe == PEW'(k)), .ext_we, .ext_addr, .ext_wdata,
      .ext_rdata(pe_rd[k]),
      .in_n, .in_e, .in_s, .in_w,
      .out_buf(pe_out[k]), .flag(flags[k])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_edge
    assign west_out[r] = pe_out[r * MESH_COLS];
    assign east_out[r] = pe_out[r * MESH_COLS + MESH_COLS - 1];
  end

  always_comb begin
    ext_rdata = '0;
    for (int k = 0; k < N_PE; k++)
      if (ext_pe == PEW'(k)) ext_rdata = pe_rd[k];
  end
endmodule
