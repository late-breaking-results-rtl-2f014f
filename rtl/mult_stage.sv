// mult_stage: multiplication stage, a weight-stationary array of
// shift-accumulate PEs with one global partial-sum adder per column.
//
// The array has PE_COLS columns of PE_ROWS PEs (PE_c,0 .. PE_c,8). A round from
// the arrangement stage loads every PE at once with its weight's bit metadata
// and its input; each PE then runs for its own N_nzb cycles. The round ends
// when every PE has consumed its last nonzero bit, so the slowest weight of the
// round sets its length. The column adders then sum the R_i of each column
// and the stage presents one result per column (with the round's column-valid
// mask and first tile ID) on a valid/ready port.
//
// Timing: the round is accepted in the cycle round_valid and round_ready are
// both high (round_ready is high when idle, and in the cycle the previous
// result is taken, so rounds can follow each other without a gap); results are valid
// max(N_nzb) + 2 cycles later and stay until res_ready. An 8-bit weight has at
// most 7 nonzero magnitude bits (127), so a round takes at most 9 cycles. Array shape and handshakes are this design's choice;
// the PE operation and the column adder follow the architecture.
module mult_stage
  import dsa_pkg::*;
#(
  parameter int unsigned PE_COLS = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // round from the arrangement stage
  input  logic                                  round_valid,
  output logic                                  round_ready,
  input  pe_op_t [PE_COLS-1:0][PE_ROWS-1:0]     round_ops,
  input  logic   [PE_COLS-1:0]                  round_colvalid,
  input  logic   [ID_W-1:0]                     round_base_id,
  // results to the output buffer
  output logic                                  res_valid,
  input  logic                                  res_ready,
  output logic signed [PE_COLS-1:0][ACC_W-1:0]  res_sum,
  output logic   [PE_COLS-1:0]                  res_colvalid,
  output logic   [ID_W-1:0]                     res_base_id,
  output logic                                  busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SUM, S_OUT} state_t;
  state_t state;

  logic load;
  // a new round may load in the cycle the previous result is taken
  assign round_ready = (state == S_IDLE) || ((state == S_OUT) && res_ready);
  assign load        = round_valid && round_ready;
  assign res_valid   = (state == S_OUT);
  assign busy        = (state != S_IDLE);

  logic        [PE_COLS-1:0][PE_ROWS-1:0]            pe_last, pe_busy;
  logic signed [PE_COLS-1:0][PE_ROWS-1:0][ACC_W-1:0] pe_acc;
  logic signed [PE_COLS-1:0][ACC_W-1:0]              col_sum;
  logic                                              any_bits;

  for (genvar c = 0; c < PE_COLS; c++) begin : g_col
    for (genvar r = 0; r < PE_ROWS; r++) begin : g_row
      shift_acc_pe u_pe (
        .clk  (clk),
        .rst_n(rst_n),
        .load (load),
        .op   (round_ops[c][r]),
        .busy (pe_busy[c][r]),
        .last (pe_last[c][r]),
        .acc  (pe_acc[c][r])
      );
    end
    psum_adder #(.N(PE_ROWS)) u_gsum (.r(pe_acc[c]), .sum(col_sum[c]));
  end

  always_comb begin
    any_bits = 1'b0;
    for (int c = 0; c < PE_COLS; c++)
      for (int r = 0; r < PE_ROWS; r++)
        if (round_ops[c][r].meta.nnzb != '0) any_bits = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      res_sum      <= '0;
      res_colvalid <= '0;
      res_base_id  <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_OUT: begin
          if (load) begin
            res_colvalid <= round_colvalid;
            res_base_id  <= round_base_id;
            state        <= any_bits ? S_RUN : S_SUM;
          end else if (state == S_OUT && res_ready) begin
            state        <= S_IDLE;
          end
        end
        S_RUN:  if (&pe_last) state <= S_SUM;  // every PE is in its final step
        S_SUM: begin
          res_sum <= col_sum;
          state   <= S_OUT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Every PE has finished by the time the column sums are captured.
  a_pes_done: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SUM |-> pe_busy == '0);

  a_res_stable: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res_sum));

endmodule
