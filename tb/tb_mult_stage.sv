// tb_mult_stage: multiplication stage against a software dot product.
// A producer offers random rounds (value- and bit-sparse weights, partial
// column masks, the worst-case weight 127) with random gaps, and a consumer
// takes results with random backpressure, so rounds also load in the cycle
// the previous result leaves. Each column result must equal sum(w*x) of its
// column, and every result must become valid exactly max(N_nzb) + 2 cycles
// after its round was accepted.
module tb_mult_stage;
  import dsa_pkg::*;
  import dsa_tb_pkg::*;

  localparam int unsigned PE_COLS = 4;
  localparam int unsigned NROUNDS = 1500;

  logic clk = 0, rst_n = 0;
  logic round_valid = 0, round_ready;
  pe_op_t [PE_COLS-1:0][PE_ROWS-1:0] round_ops;
  logic [PE_COLS-1:0] round_colvalid;
  logic [ID_W-1:0] round_base_id;
  logic res_valid, res_ready = 0;
  logic signed [PE_COLS-1:0][ACC_W-1:0] res_sum;
  logic [PE_COLS-1:0] res_colvalid;
  logic [ID_W-1:0] res_base_id;
  logic busy;
  int checks = 0, failures = 0;
  int n_worst = 0, n_empty = 0, n_stall = 0, n_back_to_back = 0, n_done = 0;
  int cyc = 0;

  typedef struct {
    longint              sum [PE_COLS];
    logic [PE_COLS-1:0]  colvalid;
    logic [ID_W-1:0]     base_id;
    int                  maxn;
    int                  accept_cyc;
  } exp_t;
  exp_t q[$];

  always #5 clk = ~clk;
  mult_stage #(.PE_COLS(PE_COLS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Everything is sampled at the falling edge; inputs change 1 ns after the
  // rising edge.
  exp_t pending;
  bit   have_pending = 0;
  bit   res_new = 1;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (round_valid && round_ready) begin
      pending.accept_cyc = cyc;
      q.push_back(pending);
      have_pending = 0;
      if (res_valid && res_ready) n_back_to_back++;
    end
    if (res_valid && res_new) begin
      check(q.size() > 0, "result without a round");
      if (q.size() > 0)
        check(cyc - q[0].accept_cyc == q[0].maxn + 2,
              $sformatf("latency %0d exp %0d", cyc - q[0].accept_cyc, q[0].maxn + 2));
    end
    if (res_valid && !res_ready) n_stall++;
    res_new = 0;
    if (res_valid && res_ready && q.size() > 0) begin
      exp_t e;
      e = q.pop_front();
      for (int c = 0; c < int'(PE_COLS); c++)
        check(longint'($signed(res_sum[c])) == e.sum[c],
              $sformatf("col %0d sum %0d exp %0d", c, $signed(res_sum[c]), e.sum[c]));
      check(res_colvalid == e.colvalid, "column mask");
      check(res_base_id == e.base_id, "base id");
      res_new = 1;
      n_done++;
    end
    if (!res_valid) res_new = 1;
  end

  always @(posedge clk) #1 res_ready = ($urandom % 3 != 0);

  initial begin
    round_ops = '0; round_colvalid = '0; round_base_id = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < int'(NROUNDS); n++) begin
      int zp;
      pending.maxn = 0;
      zp = (n % 10 == 0) ? 100 : (n % 4) * 30;
      for (int c = 0; c < int'(PE_COLS); c++) begin
        pending.sum[c] = 0;
        for (int r = 0; r < int'(PE_ROWS); r++) begin
          int w, x;
          w = (n % 13 == 5 && r == 4) ? 127 : rand_weight(zp);
          x = int'($urandom % 256) - 128;
          round_ops[c][r].meta = make_meta(w);
          round_ops[c][r].x    = IN_W'(x);
          pending.sum[c] += w * x;
          if (popcount_mag(w) > pending.maxn) pending.maxn = popcount_mag(w);
        end
      end
      if (pending.maxn == 7) n_worst++;
      if (pending.maxn == 0) n_empty++;
      round_colvalid   = PE_COLS'((1 << (1 + $urandom % PE_COLS)) - 1);
      round_base_id    = ID_W'($urandom);
      pending.colvalid = round_colvalid;
      pending.base_id  = round_base_id;
      have_pending = 1;
      @(posedge clk); #1;
      while ($urandom % 4 == 0) begin @(posedge clk); #1; end
      round_valid = 1;
      while (have_pending) begin @(posedge clk); #1; end
      round_valid = 0;
    end
    while (n_done < int'(NROUNDS)) @(negedge clk);
    check(n_worst > 0 && n_empty > 0 && n_stall > 0 && n_back_to_back > 0,
          "worst-case, empty, stalled and back-to-back rounds seen");
    $display("worst-case rounds %0d empty rounds %0d stall cycles %0d back-to-back loads %0d",
             n_worst, n_empty, n_stall, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
