// tb_read_stage: read stage against the storage-format model.
// Random layers (sizes, zero fractions, start addresses, forced or
// threshold-chosen modes) are encoded into the weight RAM copies, random
// inputs fill the input RAM, and the emitted element stream must equal the
// nonzero weights in position order with their inputs. With the output always
// ready the timing is checked exactly: the first element 4 cycles after start
// (dense-mapping: plus its position, plus one when the layer has zeros), one
// cycle per element (dense-mapping: per position) after that, and done one
// cycle after the last element.
module tb_read_stage;
  import dsa_pkg::*;
  import dsa_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  layer_hdr_t hdr;
  logic busy, done;
  logic val_re, idx_re, in_re;
  logic [ADDR_W-1:0] val_addr, idx_addr, in_addr;
  logic [MEM_W-1:0] val_rdata, idx_rdata;
  logic [IN_W-1:0] in_rdata;
  logic out_valid, out_ready;
  elem_t out;
  logic wwe = 0, iwe = 0;
  logic [11:0] wwaddr = '0, iwaddr = '0;
  logic [MEM_W-1:0] wwdata = '0;
  logic [IN_W-1:0] iwdata = '0;
  int checks = 0, failures = 0;
  int n_sparse = 0, n_dense = 0;

  always #5 clk = ~clk;

  sync_ram #(.WIDTH(MEM_W), .DEPTH(4096)) u_v (.clk, .we(wwe), .waddr(wwaddr), .wdata(wwdata),
    .re(val_re), .raddr(val_addr[11:0]), .rdata(val_rdata));
  sync_ram #(.WIDTH(MEM_W), .DEPTH(4096)) u_i (.clk, .we(wwe), .waddr(wwaddr), .wdata(wwdata),
    .re(idx_re), .raddr(idx_addr[11:0]), .rdata(idx_rdata));
  sync_ram #(.WIDTH(IN_W), .DEPTH(4096)) u_x (.clk, .we(iwe), .waddr(iwaddr), .wdata(iwdata),
    .re(in_re), .raddr(in_addr[11:0]), .rdata(in_rdata));

  read_stage dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x[4096];
  bit ready_always;
  always @(posedge clk) #1 out_ready = ready_always ? 1'b1 : ($urandom % 3 != 0);

  initial begin
    hdr = '0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); iwe = 1; iwaddr = 12'(i); x[i] = int'($urandom % 256); iwdata = IN_W'(x[i]);
    end
    @(negedge clk); iwe = 0; rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int L, zp, sa, mode, nnz, nzero, k, cyc, first_cyc, last_cyc, first_pos, last_pos;
      int w[];
      word_q_t img;
      layer_hdr_t h;
      L    = (t < 2) ? t * 5 : 1 + $urandom % 400;
      zp   = (t % 5) * 25;
      sa   = $urandom % 1000;
      mode = (t % 3 == 0) ? -1 : (t % 3 == 1 ? 0 : 1);
      ready_always = (t % 2 == 0);
      w = new[L];
      nnz = 0; first_pos = -1; last_pos = -1;
      foreach (w[i]) begin
        w[i] = rand_weight(zp);
        if (w[i] != 0) begin
          nnz++; last_pos = i;
          if (first_pos < 0) first_pos = i;
        end
      end
      nzero = L - nnz;
      encode_layer(w, sa, 50, mode, img, h);
      foreach (img[i]) begin
        @(negedge clk); wwe = 1; wwaddr = 12'(sa + i); wwdata = img[i];
      end
      @(negedge clk); wwe = 0; hdr = h; start = 1;
      @(negedge clk); start = 0;
      if (h.ds) n_sparse++; else n_dense++;
      // sampled at the falling edge: cyc = clock edges since start was taken
      cyc = 1; k = 0; first_cyc = -1; last_cyc = -1;
      while (!done && cyc < 5000) begin
        if (out_valid && out_ready) begin
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
          // advance k to the next nonzero position
          while (k < L && w[k] == 0) k++;
          check(k < L, "element beyond layer");
          if (k < L) begin
            check(int'(out.pos) == k, $sformatf("pos %0d exp %0d", out.pos, k));
            check(meta_value(out.meta) == w[k], $sformatf("weight at %0d", k));
            check(out.x == IN_W'(x[k]), $sformatf("input at %0d", k));
          end
          k++;
        end
        @(negedge clk);
        cyc++;
      end
      while (k < L && w[k] == 0) k++;
      check(k == L, "all nonzero weights emitted");
      if (ready_always) begin
        int exp_first, exp_span, exp_done;
        if (nnz > 0) begin
          exp_first = h.ds ? 4 : 4 + first_pos + (nzero > 0 ? 1 : 0);
          exp_span  = h.ds ? nnz - 1 : last_pos - first_pos;
          exp_done  = exp_first + exp_span + 1;
          check(first_cyc == exp_first, $sformatf("first element at %0d exp %0d (ds=%0d)", first_cyc, exp_first, h.ds));
          check(last_cyc - first_cyc == exp_span, $sformatf("span %0d exp %0d (ds=%0d)", last_cyc - first_cyc, exp_span, h.ds));
        end else begin
          exp_done = h.ds ? 2 : 2 + (nzero > 0 ? 1 : 0) + nzero;
        end
        check(cyc == exp_done, $sformatf("done at %0d exp %0d (ds=%0d nnz=%0d)", cyc, exp_done, h.ds, nnz));
      end
    end
    check(n_sparse > 0 && n_dense > 0, "both storage modes exercised");
    $display("sparse layers %0d dense-mapping layers %0d", n_sparse, n_dense);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
