// dsa_top: sparsity-aware dense-sparse DNN accelerator.
//
// One layer is processed as a three-stage stream:
//   read stage        - walks the layer's value and index blocks under the
//                       metadata header, fetches the input of every nonzero
//                       weight and turns the weight into bit metadata
//                       (sign, T_bitpos, N_nzb) with LUT-based bit scanning;
//   arrangement stage - places each weight/input pair into its PE row and tile
//                       column according to tile_info and dispatches rounds of
//                       PE_COLS tiles;
//   multiplication    - PE_COLS x 9 weight-stationary shift-accumulate PEs,
//                       one global partial-sum adder per column;
// and an output buffer streams one (tile ID, dot product) result per tile.
// For tile t with weights w and inputs x at the tile's layer positions the
// result is sum_i w_i * x_i.
//
// Memories: the weight memory region (value and index blocks, MEM_W-bit words)
// is kept in two identical copies so that a value and an index can be read in
// the same cycle; the input array is a third RAM, addressed by layer position.
// The host fills them through the write ports while the accelerator is idle.
//
// Control: pulse start with hdr and tinfo valid; busy is high while the layer
// runs; done is high once every tile result has left the output buffer, until
// the next start. range_err flags weights positioned past tile Id_end.
// The stage structure follows the architecture; port list, memory sizes and
// handshakes are this design's choice.
module dsa_top
  import dsa_pkg::*;
#(
  parameter int unsigned PE_COLS    = 8,
  parameter int unsigned WMEM_DEPTH = 4096,
  parameter int unsigned IMEM_DEPTH = 4096,
  parameter int unsigned OBUF_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host load ports
  input  logic                      wmem_we,
  input  logic [ADDR_W-1:0]         wmem_waddr,
  input  logic [MEM_W-1:0]          wmem_wdata,
  input  logic                      imem_we,
  input  logic [ADDR_W-1:0]         imem_waddr,
  input  logic [IN_W-1:0]           imem_wdata,
  // layer control
  input  logic                      start,
  input  layer_hdr_t                hdr,
  input  tile_info_t                tinfo,
  output logic                      busy,
  output logic                      done,
  output logic                      range_err,
  // result stream to external memory
  output logic                      res_valid,
  input  logic                      res_ready,
  output logic [ID_W-1:0]           res_id,
  output logic signed [ACC_W-1:0]   res_sum
);

  localparam int unsigned WAW = $clog2(WMEM_DEPTH);
  localparam int unsigned IAW = $clog2(IMEM_DEPTH);

  // ---------------------------------------------------------------- memories
  logic              val_re, idx_re, in_re;
  logic [ADDR_W-1:0] val_addr, idx_addr, in_addr;
  logic [MEM_W-1:0]  val_rdata, idx_rdata;
  logic [IN_W-1:0]   in_rdata;

  sync_ram #(.WIDTH(MEM_W), .DEPTH(WMEM_DEPTH)) u_wmem_val (
    .clk(clk), .we(wmem_we), .waddr(wmem_waddr[WAW-1:0]), .wdata(wmem_wdata),
    .re(val_re), .raddr(val_addr[WAW-1:0]), .rdata(val_rdata));

  sync_ram #(.WIDTH(MEM_W), .DEPTH(WMEM_DEPTH)) u_wmem_idx (
    .clk(clk), .we(wmem_we), .waddr(wmem_waddr[WAW-1:0]), .wdata(wmem_wdata),
    .re(idx_re), .raddr(idx_addr[WAW-1:0]), .rdata(idx_rdata));

  sync_ram #(.WIDTH(IN_W), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr[IAW-1:0]), .wdata(imem_wdata),
    .re(in_re), .raddr(in_addr[IAW-1:0]), .rdata(in_rdata));

  // -------------------------------------------------------------- read stage
  logic  rd_busy, rd_done, el_valid, el_ready;
  elem_t el;

  read_stage u_read (
    .clk(clk), .rst_n(rst_n), .start(start), .hdr(hdr),
    .busy(rd_busy), .done(rd_done),
    .val_re(val_re), .val_addr(val_addr), .val_rdata(val_rdata),
    .idx_re(idx_re), .idx_addr(idx_addr), .idx_rdata(idx_rdata),
    .in_re(in_re), .in_addr(in_addr), .in_rdata(in_rdata),
    .out_valid(el_valid), .out_ready(el_ready), .out(el));

  // ------------------------------------------------------- arrangement stage
  logic                               ar_busy, ar_done, rnd_valid, rnd_ready;
  pe_op_t [PE_COLS-1:0][PE_ROWS-1:0]  rnd_ops;
  logic   [PE_COLS-1:0]               rnd_colvalid;
  logic   [ID_W-1:0]                  rnd_base_id;

  arrangement_stage #(.PE_COLS(PE_COLS)) u_arr (
    .clk(clk), .rst_n(rst_n), .start(start), .tinfo(tinfo),
    .busy(ar_busy), .done(ar_done), .range_err(range_err),
    .in_valid(el_valid), .in_ready(el_ready), .in(el), .rd_done(rd_done),
    .round_valid(rnd_valid), .round_ready(rnd_ready), .round_ops(rnd_ops),
    .round_colvalid(rnd_colvalid), .round_base_id(rnd_base_id));

  // ---------------------------------------------------- multiplication stage
  logic                                 mres_valid, mres_ready, mu_busy;
  logic signed [PE_COLS-1:0][ACC_W-1:0] mres_sum;
  logic        [PE_COLS-1:0]            mres_colvalid;
  logic        [ID_W-1:0]               mres_base_id;

  mult_stage #(.PE_COLS(PE_COLS)) u_mult (
    .clk(clk), .rst_n(rst_n),
    .round_valid(rnd_valid), .round_ready(rnd_ready), .round_ops(rnd_ops),
    .round_colvalid(rnd_colvalid), .round_base_id(rnd_base_id),
    .res_valid(mres_valid), .res_ready(mres_ready), .res_sum(mres_sum),
    .res_colvalid(mres_colvalid), .res_base_id(mres_base_id), .busy(mu_busy));

  // ----------------------------------------------------------- output buffer
  logic ob_empty;

  out_buffer #(.PE_COLS(PE_COLS), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mres_valid), .in_ready(mres_ready), .in_sum(mres_sum),
    .in_colvalid(mres_colvalid), .in_base_id(mres_base_id),
    .out_valid(res_valid), .out_ready(res_ready), .out_id(res_id),
    .out_sum(res_sum), .empty(ob_empty));

  assign busy = rd_busy || ar_busy || mu_busy || !ob_empty;
  assign done = ar_done && !mu_busy && ob_empty;

endmodule
