// tb_dsa_top: end-to-end test of the accelerator at its default parameters.
//
// Each layer: random weights with a chosen zero fraction are encoded in the
// dense-sparse storage format (mode picked by a 50 % sparsity threshold, or
// forced), written into the weight memory region, inputs are written at their
// layer positions, and the layer is started with a tile_info record. Every
// streamed (tile ID, result) must equal the dot product of that tile's weights
// and inputs, every tile must be reported exactly once, and done must follow.
// The test counts the mechanisms of the design and fails if one never occurs:
// sparse and dense-mapping storage, a switch between them, skipped zero
// indices, incomplete edge tiles, full and partial rounds, empty tiles, a
// worst-case (7 nonzero bits) multiplication, read-stage stalls behind the
// arrangement stage, and result-stream backpressure.
module tb_dsa_top;
  import dsa_pkg::*;
  import dsa_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wmem_we = 0, imem_we = 0;
  logic [ADDR_W-1:0] wmem_waddr = '0, imem_waddr = '0;
  logic [MEM_W-1:0] wmem_wdata = '0;
  logic [IN_W-1:0] imem_wdata = '0;
  logic start = 0;
  layer_hdr_t hdr;
  tile_info_t tinfo;
  logic busy, done, range_err;
  logic res_valid, res_ready;
  logic [ID_W-1:0] res_id;
  logic signed [ACC_W-1:0] res_sum;
  int checks = 0, failures = 0;

  dsa_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_sparse = 0, n_dense = 0, n_switch = 0, n_zero_skip = 0, n_edge = 0;
  int n_full_round = 0, n_part_round = 0, n_empty_tile = 0, n_worst = 0;
  int n_read_stall = 0, n_res_stall = 0;
  longint bitops_full = 0, bitops_exec = 0;

  bit stall_results;
  always @(negedge clk) res_ready = stall_results ? ($urandom % 4 == 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (res_valid && !res_ready) n_res_stall++;
    if (dut.el_valid && !dut.el_ready) n_read_stall++;
    if (dut.rnd_valid && dut.rnd_ready) begin
      if (dut.rnd_colvalid == '1) n_full_round++; else n_part_round++;
    end
  end

  // expected results of the running layer, by tile ID offset
  longint exp_sum[];
  int     seen[];
  int     cur_start;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    automatic int k = int'(res_id) - cur_start;
    check(k >= 0 && k < exp_sum.size(), $sformatf("tile id %0d out of range", res_id));
    if (k >= 0 && k < exp_sum.size()) begin
      check(longint'(res_sum) == exp_sum[k], $sformatf("tile %0d result %0d exp %0d", res_id, res_sum, exp_sum[k]));
      seen[k]++;
    end
  end

  task automatic run_layer(input int ntiles, input int ps, input int ts, input int te,
                           input int zero_pct, input int force_mode, input int id0,
                           input int s_addr, input bit stall);
    int L, base, len, prev_ds, cyc;
    int w[], x[];
    word_q_t img;
    layer_hdr_t h;
    tile_info_t ti;
    ti.pe_size = ROW_W'(ps); ti.ts_num = ROW_W'(ts); ti.te_num = ROW_W'(te);
    ti.id_start = ID_W'(id0); ti.id_end = ID_W'(id0 + ntiles - 1);
    L = 0;
    for (int id = id0; id < id0 + ntiles; id++) L += tile_len(ti, id);
    w = new[L]; x = new[L];
    foreach (w[i]) begin
      w[i] = rand_weight(zero_pct);
      if (i % 97 == 13) w[i] = 127;
      x[i] = int'($urandom % 256) - 128;
      bitops_full += MAG_W;
      bitops_exec += popcount_mag(w[i]);
      if (popcount_mag(w[i]) == 7) n_worst++;
    end
    encode_layer(w, s_addr, 50, force_mode, img, h);
    // expected tile results
    exp_sum = new[ntiles]; seen = new[ntiles];
    base = 0;
    for (int k = 0; k < ntiles; k++) begin
      bit empty_tile;
      len = tile_len(ti, id0 + k);
      exp_sum[k] = 0; seen[k] = 0; empty_tile = 1;
      for (int r = 0; r < len; r++) begin
        exp_sum[k] += w[base + r] * x[base + r];
        if (w[base + r] != 0) empty_tile = 0;
      end
      if (empty_tile) n_empty_tile++;
      base += len;
    end
    if (ts != ps || (ntiles > 1 && te != ps)) n_edge++;
    // load memories
    foreach (img[i]) begin
      @(negedge clk); wmem_we = 1; wmem_waddr = ADDR_W'(s_addr + i); wmem_wdata = img[i];
    end
    @(negedge clk); wmem_we = 0;
    foreach (x[i]) begin
      @(negedge clk); imem_we = 1; imem_waddr = ADDR_W'(i); imem_wdata = IN_W'(x[i]);
    end
    @(negedge clk); imem_we = 0;
    prev_ds = (n_sparse + n_dense == 0) ? -1 : int'(hdr.ds);
    if (h.ds) n_sparse++; else begin n_dense++; n_zero_skip += int'(h.e_addr - h.idx_addr); end
    if (prev_ds >= 0 && prev_ds != int'(h.ds)) n_switch++;
    cur_start = id0;
    stall_results = stall;
    hdr = h; tinfo = ti; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 200000) begin @(negedge clk); cyc++; end
    check(done, "layer finished");
    check(!range_err, "no range error");
    for (int k = 0; k < ntiles; k++) check(seen[k] == 1, $sformatf("tile %0d reported %0d times", id0 + k, seen[k]));
    $display("layer: %0d tiles of %0d (first %0d, last %0d), %0d weights, %0s mode, %0d cycles",
             ntiles, ps, ts, te, L, h.ds ? "sparse" : "dense-mapping", cyc);
  endtask

  initial begin
    hdr = '0; tinfo = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    //         tiles ps ts te zero% mode  id0   s_addr stall
    run_layer(   20, 9, 9, 9,  80,  -1,    0,     0,  0);  // sparse, 3x3 tiles
    run_layer(   20, 9, 9, 9,  20,  -1,  100,   200,  1);  // dense-mapping, backpressure
    run_layer(   17, 9, 4, 6,  50,   1,  500,    10,  0);  // incomplete edge tiles
    run_layer(   33, 1, 1, 1,  30,   0, 1000,    50,  1);  // 1x1 tiles, many rounds
    run_layer(    1, 9, 7, 7,  40,  -1, 2000,     0,  0);  // single tile
    run_layer(   12, 5, 2, 3, 100,  -1,   40,   700,  0);  // all-zero layer
    run_layer(   24, 9, 9, 9,  90,  -1, 4000,   100,  1);  // very sparse, empty tiles
    run_layer(  200, 9, 9, 9,  60,  -1,    7,  1000,  0);  // large layer, 1800 weights
    check(n_sparse > 0,     "sparse storage used");
    check(n_dense > 0,      "dense-mapping storage used");
    check(n_switch > 0,     "storage mode switched between layers");
    check(n_zero_skip > 0,  "zero indices skipped");
    check(n_edge > 0,       "incomplete edge tiles");
    check(n_full_round > 0, "full rounds");
    check(n_part_round > 0, "partial rounds");
    check(n_empty_tile > 0, "empty tiles");
    check(n_worst > 0,      "worst-case weights");
    check(n_read_stall > 0, "read stage stalled");
    check(n_res_stall > 0,  "result stream backpressured");
    $display("sparse %0d dense %0d switches %0d zero-skips %0d edge-layers %0d full-rounds %0d partial-rounds %0d",
             n_sparse, n_dense, n_switch, n_zero_skip, n_edge, n_full_round, n_part_round);
    $display("empty-tiles %0d worst-weights %0d read-stalls %0d result-stalls %0d",
             n_empty_tile, n_worst, n_read_stall, n_res_stall);
    $display("effective bit sparsity BitOps_full/BitOps_exec = %0d/%0d", bitops_full, bitops_exec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
