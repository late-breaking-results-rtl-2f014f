// shift_acc_pe: weight-stationary shift-accumulate processing element.
//
// A PE multiplies its input x by its weight without a multiplier. The weight
// arrives as bit metadata: the nonzero-bit positions T_bitpos of its magnitude,
// their count N_nzb and its sign. On load the PE captures the operand and
// clears its local register R_i. Then, once per cycle while N_nzb is nonzero,
// it forms the partial sum Psum = +/-(x << T_bitpos[0]), adds it into R_i
// (Psum + R_i -> R_i), drops the consumed position from the head of its
// T_bitpos list and decrements N_nzb, so N_nzb is the offset count that ends
// the operation. After N_nzb cycles R_i = x * w. A zero weight costs no cycle.
//
// Interface: load/op in; busy (N_nzb left), last (at most one step left) and
// acc = R_i out. load has priority over a running operation.
// Timing: N_nzb cycles after the load cycle. The structure follows the
// architecture's multiplication stage; the widths are this design's choice.
module shift_acc_pe
  import dsa_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  pe_op_t                  op,
  output logic                    busy,
  output logic                    last,
  output logic signed [ACC_W-1:0] acc
);

  logic [MAG_W-1:0][BPOS_W-1:0] tbitpos;
  logic [NNZB_W-1:0]            nnzb;
  logic                         sign;
  logic signed [IN_W-1:0]       x;

  logic signed [ACC_W-1:0] psum;
  always_comb begin
    psum = ACC_W'(x) <<< tbitpos[0];
    if (sign) psum = -psum;
  end

  assign busy = (nnzb != '0);
  assign last = (nnzb <= NNZB_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbitpos <= '0;
      nnzb    <= '0;
      sign    <= 1'b0;
      x       <= '0;
      acc     <= '0;
    end else if (load) begin
      tbitpos <= op.meta.tbitpos;
      nnzb    <= op.meta.nnzb;
      sign    <= op.meta.sign;
      x       <= op.x;
      acc     <= '0;
    end else if (busy) begin
      acc     <= acc + psum;
      tbitpos <= {BPOS_W'(0), tbitpos[MAG_W-1:1]};
      nnzb    <= nnzb - 1'b1;
    end
  end

endmodule
