// out_buffer: output buffer between the multiplication stage and external
// memory.
//
// Stores whole round results (one column sum per tile, the column-valid mask
// and the first tile ID) in a DEPTH-entry FIFO, and streams them out one tile
// at a time as (tile ID, result) on a valid/ready port. The columns of a round
// are valid from column 0 upward, so the entry is released after its last
// valid column has been accepted.
// Timing: a round is written in the cycle in_valid and in_ready are high; the
// first of its results can leave in the next cycle; one result per cycle after
// that. The FIFO depth and the serialising order are this design's choice.
module out_buffer
  import dsa_pkg::*;
#(
  parameter int unsigned PE_COLS = 8,
  parameter int unsigned DEPTH   = 4
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  output logic                                 in_ready,
  input  logic signed [PE_COLS-1:0][ACC_W-1:0] in_sum,
  input  logic        [PE_COLS-1:0]            in_colvalid,
  input  logic        [ID_W-1:0]               in_base_id,
  output logic                                 out_valid,
  input  logic                                 out_ready,
  output logic        [ID_W-1:0]               out_id,
  output logic signed [ACC_W-1:0]              out_sum,
  output logic                                 empty
);

  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned COL_W = (PE_COLS > 1) ? $clog2(PE_COLS) : 1;

  typedef struct packed {
    logic signed [PE_COLS-1:0][ACC_W-1:0] sum;
    logic        [PE_COLS-1:0]            colvalid;
    logic        [ID_W-1:0]               base_id;
  } entry_t;

  entry_t            fifo [DEPTH];
  logic [PW-1:0]     wp, rp;
  logic [PW:0]       count;
  logic [COL_W-1:0]  sc;      // column being streamed out of the head entry
  entry_t            head;
  logic              push, pop, col_last;

  assign head      = fifo[rp];
  assign in_ready  = (count != (PW+1)'(DEPTH));
  assign empty     = (count == '0);
  assign out_valid = !empty;
  assign out_id    = head.base_id + ID_W'(sc);
  assign out_sum   = head.sum[sc];
  assign push      = in_valid && in_ready;
  assign col_last  = (sc == COL_W'(PE_COLS - 1)) || !head.colvalid[sc + 1'b1];
  assign pop       = out_valid && out_ready && col_last;

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= '{sum: in_sum, colvalid: in_colvalid, base_id: in_base_id};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      sc    <= '0;
    end else begin
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
      if (out_valid && out_ready) sc <= pop ? '0 : sc + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (PW+1)'(DEPTH));

endmodule
