// tb_arrangement_stage: round packing against a reference layout.
// Random tile_info records (tile sizes 1..9, incomplete first and last tiles,
// single-tile layers) and random layers are streamed in with random gaps; every
// dispatched round must carry the right first tile ID, column mask and, for each
// PE, the weight and input of its layer position (zero where the weight is
// zero or the row is past the tile). An element past Id_end must set range_err.
module tb_arrangement_stage;
  import dsa_pkg::*;
  import dsa_tb_pkg::*;

  localparam int unsigned PE_COLS = 4;

  logic clk = 0, rst_n = 0, start = 0;
  tile_info_t tinfo;
  logic busy, done, range_err;
  logic in_valid = 0, in_ready, rd_done = 0;
  elem_t in;
  logic round_valid, round_ready;
  pe_op_t [PE_COLS-1:0][PE_ROWS-1:0] round_ops;
  logic [PE_COLS-1:0] round_colvalid;
  logic [ID_W-1:0] round_base_id;
  int checks = 0, failures = 0;
  int n_full_rounds = 0, n_partial_rounds = 0, n_edge_tiles = 0, n_range = 0;

  always #5 clk = ~clk;

  arrangement_stage #(.PE_COLS(PE_COLS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) round_ready = ($urandom % 4 != 0);

  int w[], x[];
  tile_info_t ti;
  int L, ntiles, next_round_id;
  bit layer_active;

  // round checker
  always @(posedge clk) if (layer_active && round_valid && round_ready) begin
    automatic int base = 0;
    for (int id = int'(ti.id_start); id < next_round_id; id++) base += tile_len(ti, id);
    check(int'(round_base_id) == next_round_id, $sformatf("round base id %0d exp %0d", round_base_id, next_round_id));
    if (int'(ti.id_end) - next_round_id + 1 >= int'(PE_COLS)) n_full_rounds++; else n_partial_rounds++;
    for (int c = 0; c < int'(PE_COLS); c++) begin
      automatic int id = next_round_id + c;
      automatic bit valid = id <= int'(ti.id_end);
      check(round_colvalid[c] == valid, $sformatf("colvalid[%0d] id %0d", c, id));
      if (valid) begin
        automatic int len = tile_len(ti, id);
        for (int r = 0; r < int'(PE_ROWS); r++) begin
          pe_op_t exp;
          exp = '0;
          if (r < len && w[base + r] != 0) begin
            exp.meta = make_meta(w[base + r]);
            exp.x    = IN_W'(x[base + r]);
          end
          check(round_ops[c][r] == exp, $sformatf("op tile %0d row %0d", id, r));
        end
        base += len;
      end
    end
    next_round_id += PE_COLS;
  end

  initial begin
    tinfo = '0; in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int ps, cyc;
      ps = 1 + $urandom % PE_ROWS;
      ntiles = (t % 7 == 0) ? 1 : 1 + $urandom % 20;
      ti.pe_size  = ROW_W'(ps);
      ti.ts_num   = ROW_W'((t % 3 == 0) ? ps : 1 + $urandom % ps);
      ti.te_num   = ROW_W'((t % 4 == 0) ? ps : 1 + $urandom % ps);
      ti.id_start = ID_W'($urandom % 1000);
      ti.id_end   = ti.id_start + ID_W'(ntiles - 1);
      if (ti.ts_num != ti.pe_size || (ntiles > 1 && ti.te_num != ti.pe_size)) n_edge_tiles++;
      L = 0;
      for (int id = int'(ti.id_start); id <= int'(ti.id_end); id++) L += tile_len(ti, id);
      w = new[L]; x = new[L];
      foreach (w[i]) begin w[i] = rand_weight((t % 4) * 30); x[i] = int'($urandom % 256) - 128; end
      next_round_id = int'(ti.id_start);
      layer_active = 1;
      @(negedge clk); tinfo = ti; start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i <= L; i++) begin
        automatic bit extra = (i == L) && (t % 5 == 1);
        if (i < L && w[i] == 0) continue;
        if (i == L && !extra) break;
        while ($urandom % 3 == 0) @(negedge clk);
        in_valid = 1;
        in.pos   = ADDR_W'(i + (extra ? 3 : 0));
        in.meta  = extra ? make_meta(5) : make_meta(w[i]);
        in.x     = IN_W'(extra ? 1 : x[i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk); in_valid = 0;
        if (extra) n_range++;
      end
      rd_done = 1;
      cyc = 0;
      while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
      check(done, "layer done");
      check(next_round_id > int'(ti.id_end), "all tiles dispatched");
      check(range_err == (t % 5 == 1), "range_err flag");
      layer_active = 0;
      rd_done = 0;
    end
    check(n_full_rounds > 0 && n_partial_rounds > 0 && n_edge_tiles > 0 && n_range > 0, "all cases hit");
    $display("full rounds %0d partial rounds %0d edge-tile layers %0d range errors %0d",
             n_full_rounds, n_partial_rounds, n_edge_tiles, n_range);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
