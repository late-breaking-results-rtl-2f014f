// read_stage: header-driven fetch of one layer's nonzero weights and inputs.
//
// Under the per-layer metadata header (S_addr, Idx_addr, E_addr, delta_ds) the
// stage walks the value block [S_addr, Idx_addr) and the index block
// [Idx_addr, E_addr) of the weight memory region:
//   * sparse mode (delta_ds = 1): the k-th index entry is the layer position of
//     the k-th stored value;
//   * dense-mapping mode (delta_ds = 0): the layer has (Idx-S)+(E-Idx)
//     positions; the index block lists the zero positions in ascending order,
//     and the stored values fill the remaining positions in order.
// For every nonzero weight it fetches the input at the same layer position,
// applies the dynamic bit-processing scheme (bit_scanner) and emits one elem_t
// (position, sign, T_bitpos, N_nzb, input) on a valid/ready stream, in
// ascending position order. Zero weights are never emitted or multiplied.
//
// Structure: a three-step pipeline feeding a 4-entry output FIFO.
//   issue  - sparse: read value k and index k. dense: compare the position
//            counter with the next zero position; skip it if equal, else read
//            the next value and the input at that position.
//   B      - sparse: read the input at the returned index.
//   C      - push (position, weight, input) into the output FIFO.
// Issue is credit limited: it stops while FIFO entries plus elements in
// flight reach the FIFO depth, so backpressure never loses data. In dense-
// mapping mode the zero positions are prefetched into a 4-entry queue through
// the index read port, starting in the start cycle.
//
// Memory ports: three synchronous read ports (value copy, index copy, input
// RAM) with one cycle of read latency. Value words carry the weight in their
// low WGT_W bits; index words carry a layer position.
// Timing, with the output always ready: one element per cycle. In sparse mode
// the first element is valid 4 cycles after the start cycle and elements
// follow back to back. In dense-mapping mode every position (zero or not)
// costs one cycle of issue, and the first element is valid
// 4 + first_position cycles after start, plus one cycle when the layer has
// any zero. done rises after the last element has been accepted and stays
// high until the next start.
// The pipeline and its FIFO are this design's choice; the storage format is
// the architecture's.
module read_stage
  import dsa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_hdr_t        hdr,
  output logic              busy,
  output logic              done,
  // value block read port
  output logic              val_re,
  output logic [ADDR_W-1:0] val_addr,
  input  logic [MEM_W-1:0]  val_rdata,
  // index block read port
  output logic              idx_re,
  output logic [ADDR_W-1:0] idx_addr,
  input  logic [MEM_W-1:0]  idx_rdata,
  // input array read port
  output logic              in_re,
  output logic [ADDR_W-1:0] in_addr,
  input  logic [IN_W-1:0]   in_rdata,
  // element stream to the arrangement stage
  output logic              out_valid,
  input  logic              out_ready,
  output elem_t             out
);

  localparam int unsigned QD = 4;   // depth of the output FIFO and zero queue

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  typedef struct packed {
    logic [ADDR_W-1:0] pos;
    logic [WGT_W-1:0]  w;
    logic [IN_W-1:0]   x;
  } raw_t;

  state_t            state;
  layer_hdr_t        h;
  logic [ADDR_W-1:0] nvals, nidx, total;
  logic [ADDR_W-1:0] v;      // values issued
  logic [ADDR_W-1:0] p;      // position counter (dense-mapping mode)

  assign nvals = h.idx_addr - h.s_addr;
  assign nidx  = h.e_addr - h.idx_addr;
  assign total = nvals + nidx;

  // ------------------------------------------------------------ zero queue
  logic [ADDR_W-1:0] zq [QD];
  logic [1:0]        zq_wp, zq_rp;
  logic [2:0]        zq_cnt;
  logic [ADDR_W-1:0] zreq;        // zero-index entries requested
  logic              zinflight;   // a zero-index read returns this cycle
  logic              zissue, zpop;
  logic [ADDR_W-1:0] zpopped;     // zero-index entries consumed
  logic              start_zissue;

  // ---------------------------------------------------- pipeline and FIFO
  logic              b_valid, c_valid;
  logic [ADDR_W-1:0] b_pos, c_pos;
  logic [WGT_W-1:0]  c_w;
  logic [IN_W-1:0]   b_x, c_x;   // c_x: input of the element in step C
  raw_t              of [QD];
  logic [1:0]        of_wp, of_rp;
  logic [2:0]        of_cnt;
  logic              of_push, of_pop;
  raw_t              of_head;

  logic issued_all, credit, issue, skip, zero_known;

  assign issued_all = h.ds ? (v == nvals) : (p == total);
  assign credit     = (32'(of_cnt) + 32'(b_valid) + 32'(c_valid)) < QD;
  // dense: the next zero position is known, or no zero is left
  assign zero_known = (zq_cnt != '0) || (zpopped == nidx);
  assign skip       = (state == S_RUN) && !h.ds && !issued_all && (zq_cnt != '0) && (zq[zq_rp] == p);
  assign issue      = (state == S_RUN) && !issued_all && credit && (h.ds || (zero_known && !skip));
  assign zpop       = skip;

  // zero-index prefetch: starts in the start cycle, then keeps the queue full
  assign start_zissue = (state != S_RUN) && start && !hdr.ds && (hdr.e_addr != hdr.idx_addr);
  assign zissue       = start_zissue ||
                        ((state == S_RUN) && !h.ds && (zreq != nidx) &&
                         (32'(zq_cnt) + 32'(zinflight)) < QD);

  // read ports
  always_comb begin
    val_re = 1'b0; val_addr = '0;
    idx_re = 1'b0; idx_addr = '0;
    in_re  = 1'b0; in_addr  = '0;
    if (issue) begin
      val_re = 1'b1; val_addr = h.s_addr + v;
      if (h.ds) begin
        idx_re = 1'b1; idx_addr = h.idx_addr + v;
      end else begin
        in_re = 1'b1; in_addr = p;
      end
    end
    if (zissue) begin
      idx_re   = 1'b1;
      idx_addr = start_zissue ? hdr.idx_addr : h.idx_addr + zreq;
    end
    if (b_valid && h.ds) begin
      in_re = 1'b1; in_addr = idx_rdata[ADDR_W-1:0];
    end
  end

  // output FIFO
  assign of_head   = of[of_rp];
  assign out_valid = (of_cnt != '0);
  assign of_pop    = out_valid && out_ready;
  assign of_push   = c_valid;
  // sparse: the input read issued in step B returns now; dense: it was
  // captured in step B together with the value
  assign c_x       = h.ds ? in_rdata : b_x;
  assign out.pos   = of_head.pos;
  assign out.x     = of_head.x;
  bit_scanner u_scan (.w(of_head.w), .meta(out.meta));

  assign busy = (state == S_RUN);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (of_push) of[of_wp] <= '{pos: c_pos, w: c_w, x: c_x};
    if (zinflight) zq[zq_wp] <= idx_rdata[ADDR_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      h         <= '0;
      v         <= '0;
      p         <= '0;
      zreq      <= '0;
      zpopped   <= '0;
      zinflight <= 1'b0;
      zq_wp     <= '0;
      zq_rp     <= '0;
      zq_cnt    <= '0;
      b_valid   <= 1'b0;
      b_pos     <= '0;
      b_x       <= '0;
      c_valid   <= 1'b0;
      c_pos     <= '0;
      c_w       <= '0;
      of_wp     <= '0;
      of_rp     <= '0;
      of_cnt    <= '0;
    end else begin
      // zero queue
      zinflight <= zissue;
      if (zinflight) zq_wp <= zq_wp + 1'b1;
      if (zpop)      zq_rp <= zq_rp + 1'b1;
      zq_cnt <= zq_cnt + 3'(zinflight) - 3'(zpop);

      // pipeline
      b_valid <= issue;
      b_pos   <= p;
      c_valid <= b_valid;
      if (b_valid) begin
        c_w   <= val_rdata[WGT_W-1:0];
        c_pos <= h.ds ? idx_rdata[ADDR_W-1:0] : b_pos;
        b_x   <= in_rdata;             // dense: input returned with the value
      end

      // output FIFO
      if (of_push) of_wp <= of_wp + 1'b1;
      if (of_pop)  of_rp <= of_rp + 1'b1;
      of_cnt <= of_cnt + 3'(of_push) - 3'(of_pop);

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            h       <= hdr;
            v       <= '0;
            p       <= '0;
            zreq    <= start_zissue ? ADDR_W'(1) : '0;
            zpopped <= '0;
            state   <= S_RUN;
          end
        end
        S_RUN: begin
          if (zissue) zreq <= zreq + 1'b1;
          if (zpop) begin
            zpopped <= zpopped + 1'b1;
            p       <= p + 1'b1;
          end
          if (issue) begin
            v <= v + 1'b1;
            if (!h.ds) p <= p + 1'b1;
          end
          if (issued_all && !b_valid && !c_valid && (of_cnt == '0 || (of_cnt == 3'd1 && of_pop)))
            state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A presented element stays stable until it is accepted.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out));
  // The output FIFO never overflows.
  a_fifo_bound: assert property (@(posedge clk) disable iff (!rst_n)
    of_cnt <= 3'(QD));

endmodule
