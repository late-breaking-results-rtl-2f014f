// tb_workload_slices: runs whole output neurons/channels of layer shapes
// taken from common networks, at the accelerator's default sizes.
//
// One output of a layer is a dot product of K weights with K inputs. It is cut
// into tiles of nine weights (tile ID = weight index / 9) and, because the
// on-chip memories hold at most 4096 positions, into chunks of CHUNK
// positions. Chunk boundaries are deliberately not tile aligned, so a tile may
// start in one chunk and end in the next: tile_info's first- and last-tile
// spans (ts_num, te_num) describe the split, and the host adds the two partial
// results of that tile ID. Each chunk is encoded in the dense-sparse format
// (50 % threshold), loaded, run, and its results collected.
// Checks: every tile result (summed over chunks) and the full output against a
// software dot product. Weights are synthetic: zero with the given
// probability, otherwise of log-uniform magnitude, as small values dominate in
// quantized networks; inputs are uniform 8-bit values.
// Layer shapes (weights per output):
//   ResNet50 conv5 3x3, 512 input channels      4608
//   VGG19 conv5 3x3, 512 input channels         4608
//   MobileNetV2 depthwise 3x3                   9
//   AlexNet fc6, 9216 inputs                    9216
//   ViT-B / OPT-125M linear, 768 inputs         768 (85 full tiles + 3)
module tb_workload_slices;
  import dsa_pkg::*;
  import dsa_tb_pkg::*;

  localparam int CHUNK = 4000;

  logic clk = 0, rst_n = 0;
  logic wmem_we = 0, imem_we = 0;
  logic [ADDR_W-1:0] wmem_waddr = '0, imem_waddr = '0;
  logic [MEM_W-1:0] wmem_wdata = '0;
  logic [IN_W-1:0] imem_wdata = '0;
  logic start = 0;
  layer_hdr_t hdr;
  tile_info_t tinfo;
  logic busy, done, range_err;
  logic res_valid, res_ready = 1;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint tile_acc[];
  int     tile_hits[];
  int     n_split_tiles = 0;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    automatic int k = int'(res_id);
    check(k < tile_acc.size(), "tile id in range");
    if (k < tile_acc.size()) begin
      tile_acc[k] += longint'(res_sum);
      tile_hits[k]++;
    end
  end

  function automatic int synth_weight(input int zero_pct);
    int mag;
    if (($urandom % 100) < zero_pct) return 0;
    mag = 1 + int'($urandom % (1 << ($urandom % 7)));
    return ($urandom % 2) ? -mag : mag;
  endfunction

  task automatic run_output(input string name, input int K, input int zero_pct);
    int w[], x[];
    int ntiles, a, b, cyc_total;
    longint exp_out, got_out, bit_full, bit_exec;
    w = new[K]; x = new[K];
    exp_out = 0; bit_full = 0; bit_exec = 0;
    foreach (w[i]) begin
      w[i] = synth_weight(zero_pct);
      x[i] = int'($urandom % 256) - 128;
      exp_out += w[i] * x[i];
      bit_full += MAG_W;
      bit_exec += popcount_mag(w[i]);
    end
    ntiles = (K + 8) / 9;
    tile_acc = new[ntiles]; tile_hits = new[ntiles];
    foreach (tile_acc[t]) begin tile_acc[t] = 0; tile_hits[t] = 0; end
    cyc_total = 0;
    for (a = 0; a < K; a = b) begin
      int cw[];
      int t0, t1, cyc;
      word_q_t img;
      layer_hdr_t h;
      tile_info_t ti;
      b = (a + CHUNK < K) ? a + CHUNK : K;
      cw = new[b - a];
      foreach (cw[i]) cw[i] = w[a + i];
      t0 = a / 9; t1 = (b - 1) / 9;
      ti.id_start = ID_W'(t0);
      ti.id_end   = ID_W'(t1);
      ti.pe_size  = ROW_W'(9);
      ti.ts_num   = ROW_W'(((t0 + 1) * 9 < b ? (t0 + 1) * 9 : b) - a);
      ti.te_num   = ROW_W'(b - t1 * 9);
      if (a % 9 != 0) n_split_tiles++;
      encode_layer(cw, 0, 50, -1, img, h);
      foreach (img[i]) begin
        @(negedge clk); wmem_we = 1; wmem_waddr = ADDR_W'(i); wmem_wdata = img[i];
      end
      @(negedge clk); wmem_we = 0;
      foreach (cw[i]) begin
        @(negedge clk); imem_we = 1; imem_waddr = ADDR_W'(i); imem_wdata = IN_W'(x[a + i]);
      end
      @(negedge clk); imem_we = 0;
      hdr = h; tinfo = ti; start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 500000) begin @(negedge clk); cyc++; end
      check(done && !range_err, $sformatf("%s chunk [%0d,%0d) finished", name, a, b));
      cyc_total += cyc;
    end
    got_out = 0;
    for (int t = 0; t < ntiles; t++) begin
      longint e = 0;
      for (int i = t * 9; i < t * 9 + 9 && i < K; i++) e += w[i] * x[i];
      check(tile_acc[t] == e, $sformatf("%s tile %0d: %0d exp %0d", name, t, tile_acc[t], e));
      check(tile_hits[t] >= 1, $sformatf("%s tile %0d reported", name, t));
      got_out += tile_acc[t];
    end
    check(got_out == exp_out, $sformatf("%s output %0d exp %0d", name, got_out, exp_out));
    $display("%-34s K=%5d tiles=%4d chunks=%0d cycles=%6d bit-sparsity=%0.2fx",
             name, K, ntiles, (K + CHUNK - 1) / CHUNK, cyc_total, real'(bit_full) / real'(bit_exec));
  endtask

  initial begin
    hdr = '0; tinfo = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_output("ResNet50 conv5 3x3 (one channel)", 4608, 30);
    run_output("VGG19 conv5 3x3 (one channel)",    4608, 60);
    run_output("MobileNetV2 depthwise 3x3",           9, 10);
    run_output("AlexNet fc6 (one neuron)",         9216, 40);
    run_output("ViT-B/OPT linear 768 (one neuron)", 768, 20);
    check(n_split_tiles > 0, "a tile was split across chunks");
    $display("tiles split across chunks: %0d", n_split_tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
