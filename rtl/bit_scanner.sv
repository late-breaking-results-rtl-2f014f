// bit_scanner: dynamic bit processing of one quantized weight.
//
// Produces the nonzero-bit positions T_bitpos of the weight's magnitude and
// their count N_nzb, which later drive the shift-accumulate PEs. Scanning is
// LUT based, as the architecture specifies: the magnitude is cut into 4-bit
// nibbles, a 16-entry table gives each nibble's bit count and the positions of
// its set bits, and the per-nibble lists are concatenated with running offsets.
// The nibble split and the sign-magnitude output are this design's choice.
//
// Interface: w (two's complement, WGT_W bits) in, bitmeta_t out.
// tbitpos lists positions in ascending order; unused slots read zero.
// Timing: purely combinational.
module bit_scanner
  import dsa_pkg::*;
(
  input  logic [WGT_W-1:0] w,
  output bitmeta_t         meta
);

  localparam int unsigned NNIB = MAG_W / 4;

  // 16-entry nibble LUT: {count[2:0], pos3[1:0], pos2[1:0], pos1[1:0], pos0[1:0]}
  function automatic logic [10:0] nib_lut(input logic [3:0] n);
    unique case (n)
      4'h0: nib_lut = {3'd0, 2'd0, 2'd0, 2'd0, 2'd0};
      4'h1: nib_lut = {3'd1, 2'd0, 2'd0, 2'd0, 2'd0};
      4'h2: nib_lut = {3'd1, 2'd0, 2'd0, 2'd0, 2'd1};
      4'h3: nib_lut = {3'd2, 2'd0, 2'd0, 2'd1, 2'd0};
      4'h4: nib_lut = {3'd1, 2'd0, 2'd0, 2'd0, 2'd2};
      4'h5: nib_lut = {3'd2, 2'd0, 2'd0, 2'd2, 2'd0};
      4'h6: nib_lut = {3'd2, 2'd0, 2'd0, 2'd2, 2'd1};
      4'h7: nib_lut = {3'd3, 2'd0, 2'd2, 2'd1, 2'd0};
      4'h8: nib_lut = {3'd1, 2'd0, 2'd0, 2'd0, 2'd3};
      4'h9: nib_lut = {3'd2, 2'd0, 2'd0, 2'd3, 2'd0};
      4'hA: nib_lut = {3'd2, 2'd0, 2'd0, 2'd3, 2'd1};
      4'hB: nib_lut = {3'd3, 2'd0, 2'd3, 2'd1, 2'd0};
      4'hC: nib_lut = {3'd2, 2'd0, 2'd0, 2'd3, 2'd2};
      4'hD: nib_lut = {3'd3, 2'd0, 2'd3, 2'd2, 2'd0};
      4'hE: nib_lut = {3'd3, 2'd0, 2'd3, 2'd2, 2'd1};
      4'hF: nib_lut = {3'd4, 2'd3, 2'd2, 2'd1, 2'd0};
      default: nib_lut = '0;
    endcase
  endfunction

  logic [MAG_W-1:0] mag;

  always_comb begin
    logic [10:0]       e;
    logic [NNZB_W-1:0] off;
    logic [2:0]        cnt;
    mag  = w[WGT_W-1] ? MAG_W'(-w) : MAG_W'(w);
    meta = '0;
    meta.sign = w[WGT_W-1];
    off = '0;
    for (int n = 0; n < NNIB; n++) begin
      e   = nib_lut(mag[4*n +: 4]);
      cnt = e[10:8];
      for (int j = 0; j < 4; j++) begin
        if (j < int'(cnt))
          meta.tbitpos[int'(off) + j] = BPOS_W'(4*n) + BPOS_W'(e[2*j +: 2]);
      end
      off = off + NNZB_W'(cnt);
    end
    meta.nnzb = off;
  end

endmodule
