// dsa_pkg: types and constants shared by the dense-sparse accelerator.
//
// Weights are 8-bit two's-complement quantized values. The bit scanner works on
// their magnitude (8 bits, so that -128 is representable), which gives at most
// 8 nonzero bits, each position 3 bits wide. Inputs are 8-bit signed values.
// Positions inside a layer, memory addresses and tile IDs are 16 bits.
// These widths are this design's choice; the accelerator's structure (metadata
// header, tile_info record, nine PE rows per column) follows the architecture.
package dsa_pkg;

  localparam int unsigned WGT_W   = 8;            // quantized weight width
  localparam int unsigned MAG_W   = WGT_W;        // magnitude width seen by the bit scanner
  localparam int unsigned BPOS_W  = $clog2(MAG_W); // width of one nonzero-bit position
  localparam int unsigned NNZB_W  = $clog2(MAG_W + 1); // width of the nonzero-bit count
  localparam int unsigned IN_W    = 8;            // input activation width
  localparam int unsigned ADDR_W  = 16;           // memory address / layer position width
  localparam int unsigned ID_W    = 16;           // tile ID width
  localparam int unsigned MEM_W   = 16;           // word width of the value/index memory region
  localparam int unsigned PE_ROWS = 9;            // PEs per column (PE_0,0 .. PE_0,8)
  localparam int unsigned ROW_W   = $clog2(PE_ROWS + 1); // width of a tile span (0..PE_ROWS)
  localparam int unsigned ACC_W   = 24;           // PE accumulator and column sum width

  // Per-layer metadata header (S_addr, Idx_addr, E_addr, delta_ds).
  // Value block: [s_addr, idx_addr). Index block: [idx_addr, e_addr).
  typedef struct packed {
    logic [ADDR_W-1:0] s_addr;
    logic [ADDR_W-1:0] idx_addr;
    logic [ADDR_W-1:0] e_addr;
    logic              ds;      // 1: sparse storage, 0: dense-mapping storage
  } layer_hdr_t;

  // Global configuration record tile_info: tile ID range and distribution tuple.
  typedef struct packed {
    logic [ID_W-1:0]  id_start;
    logic [ID_W-1:0]  id_end;
    logic [ROW_W-1:0] pe_size;  // valid PE rows of a full tile
    logic [ROW_W-1:0] ts_num;   // valid span of the first tile (Id_start)
    logic [ROW_W-1:0] te_num;   // valid span of the last tile (Id_end)
  } tile_info_t;

  // Bit metadata of one weight: sign plus (T_bitpos, N_nzb).
  // tbitpos[k] is the k-th nonzero bit, ascending; slots k >= nnzb are zero.
  typedef struct packed {
    logic                          sign;
    logic [MAG_W-1:0][BPOS_W-1:0]  tbitpos;
    logic [NNZB_W-1:0]             nnzb;
  } bitmeta_t;

  // One nonzero weight leaving the read stage, with its input operand.
  typedef struct packed {
    logic [ADDR_W-1:0]       pos;   // position of the weight inside the layer
    bitmeta_t                meta;
    logic signed [IN_W-1:0]  x;
  } elem_t;

  // Operand of one PE.
  typedef struct packed {
    bitmeta_t                meta;
    logic signed [IN_W-1:0]  x;
  } pe_op_t;

endpackage
