// arrangement_stage: packs a layer's nonzero weights into PE-aligned rounds.
//
// The global configuration record tile_info gives the tile ID range
// [Id_start, Id_end] and the distribution tuple (PE_size, tS_num, tE_num).
// Layer positions are laid out tile after tile: tile Id_start holds tS_num
// positions, tile Id_end holds tE_num, every tile in between PE_size, each at
// most PE_ROWS. One tile occupies one PE column; a round fills PE_COLS
// columns with consecutive tile IDs and is dispatched to the multiplication
// stage as a whole.
//
// Elements arrive from the read stage in ascending position order. An element
// inside the current tile is written to row (pos - tile base) of the current
// column: this is the local re-ordering that aligns each weight, and its input,
// with its PE. An element past the current tile, or the end of the stream
// (rd_done with nothing pending), closes the tile; a full round, or the tile
// Id_end, dispatches the round. Rows left empty hold zero weights (N_nzb = 0),
// so value-level sparsity costs no PE cycles. Tiles that receive no element
// are still dispatched, so every tile ID yields exactly one result.
//
// Timing: one element accepted per cycle; closing a tile takes one cycle;
// dispatch waits for round_ready. An element past Id_end is dropped and sets
// range_err. The counters and the round structure are this design's choice.
module arrangement_stage
  import dsa_pkg::*;
#(
  parameter int unsigned PE_COLS = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  tile_info_t                            tinfo,
  output logic                                  busy,
  output logic                                  done,
  output logic                                  range_err,
  // element stream from the read stage
  input  logic                                  in_valid,
  output logic                                  in_ready,
  input  elem_t                                 in,
  input  logic                                  rd_done,
  // round to the multiplication stage
  output logic                                  round_valid,
  input  logic                                  round_ready,
  output pe_op_t [PE_COLS-1:0][PE_ROWS-1:0]     round_ops,
  output logic   [PE_COLS-1:0]                  round_colvalid,
  output logic   [ID_W-1:0]                     round_base_id
);

  localparam int unsigned COL_W = (PE_COLS > 1) ? $clog2(PE_COLS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_DISPATCH, S_DONE} state_t;

  state_t             state;
  tile_info_t         ti;
  logic [ID_W-1:0]    cur_id;
  logic [COL_W-1:0]   col;
  logic [ADDR_W-1:0]  tbase;
  logic [ROW_W-1:0]   tlen;

  function automatic logic [ROW_W-1:0] tile_len(tile_info_t t, logic [ID_W-1:0] id);
    if (id == t.id_start)    return t.ts_num;
    else if (id == t.id_end) return t.te_num;
    else                     return t.pe_size;
  endfunction

  logic [ADDR_W-1:0] tend;
  logic              beyond, close_tile, last_tile, last_col;
  assign tend       = tbase + ADDR_W'(tlen);
  assign beyond     = in.pos >= tend;
  assign last_tile  = (cur_id == ti.id_end);
  assign last_col   = (col == COL_W'(PE_COLS - 1));
  assign close_tile = (in_valid && beyond) || (!in_valid && rd_done);

  assign busy        = (state == S_FILL) || (state == S_DISPATCH);
  assign done        = (state == S_DONE);
  assign round_valid = (state == S_DISPATCH);
  // accept in-range elements, and drop elements past the last tile
  assign in_ready    = (state == S_FILL) && (!beyond || last_tile);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      ti             <= '0;
      cur_id         <= '0;
      col            <= '0;
      tbase          <= '0;
      tlen           <= '0;
      round_ops      <= '0;
      round_colvalid <= '0;
      round_base_id  <= '0;
      range_err      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            ti             <= tinfo;
            cur_id         <= tinfo.id_start;
            round_base_id  <= tinfo.id_start;
            col            <= '0;
            tbase          <= '0;
            tlen           <= tinfo.ts_num;
            round_ops      <= '0;
            round_colvalid <= PE_COLS'(1);
            range_err      <= 1'b0;
            state          <= S_FILL;
          end
        end
        S_FILL: begin
          if (in_valid && !beyond) begin
            round_ops[col][in.pos - tbase] <= '{meta: in.meta, x: in.x};
          end else if (in_valid && last_tile) begin
            range_err <= 1'b1;
          end else if (close_tile) begin
            if (last_tile || last_col) begin
              state <= S_DISPATCH;
            end else begin
              col                      <= col + 1'b1;
              cur_id                   <= cur_id + 1'b1;
              tbase                    <= tend;
              tlen                     <= tile_len(ti, cur_id + 1'b1);
              round_colvalid[col + 1'b1] <= 1'b1;
            end
          end
        end
        S_DISPATCH: begin
          if (round_ready) begin
            if (last_tile) begin
              state <= S_DONE;
            end else begin
              round_ops      <= '0;
              round_colvalid <= PE_COLS'(1);
              round_base_id  <= cur_id + 1'b1;
              col            <= '0;
              cur_id         <= cur_id + 1'b1;
              tbase          <= tend;
              tlen           <= tile_len(ti, cur_id + 1'b1);
              state          <= S_FILL;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_round_stable: assert property (@(posedge clk) disable iff (!rst_n)
    round_valid && !round_ready |=> round_valid && $stable(round_ops) && $stable(round_colvalid));

endmodule
