// psum_adder: global partial-sum adder of one PE column.
//
// Adds the local registers R_i of the N PEs of a column into the column's
// output. The inputs are padded with zeros to the next power of two and
// reduced by a balanced tree of two-input adders, one level per generate
// stage (4 levels for the nine PEs of a column).
// Interface: the R_i vector in, the sum out. Timing: combinational;
// mult_stage registers the result. The tree shape is this design's choice.
module psum_adder
  import dsa_pkg::*;
#(
  parameter int unsigned N = PE_ROWS
) (
  input  logic signed [N-1:0][ACC_W-1:0] r,
  output logic signed [ACC_W-1:0]        sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned P      = 1 << LEVELS;

  // node[l][i]: i-th partial sum after l levels of addition
  logic signed [LEVELS:0][P-1:0][ACC_W-1:0] node;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[0][i] = r[i];
    end else begin : g_pad
      assign node[0][i] = '0;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < P; i++) begin : g_node
      if (i < (P >> (l + 1))) begin : g_add
        assign node[l+1][i] = node[l][2*i] + node[l][2*i+1];
      end else begin : g_unused
        assign node[l+1][i] = '0;
      end
    end
  end

  assign sum = node[LEVELS][0];

endmodule
