// tb_out_buffer: output buffer against a queue model.
// Rounds with random column masks are pushed while the consumer applies random
// backpressure; the stream must deliver every valid column as (tile ID, sum)
// in order, one per cycle at most, and refuse writes while the FIFO is full.
module tb_out_buffer;
  import dsa_pkg::*;

  localparam int unsigned PE_COLS = 4, DEPTH = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [PE_COLS-1:0][ACC_W-1:0] in_sum;
  logic [PE_COLS-1:0] in_colvalid;
  logic [ID_W-1:0] in_base_id;
  logic out_valid, out_ready = 0, empty;
  logic [ID_W-1:0] out_id;
  logic signed [ACC_W-1:0] out_sum;
  int checks = 0, failures = 0, n_full = 0, received = 0, expected_total = 0;

  typedef struct { int id; int sum; } res_t;
  res_t q[$];

  always #5 clk = ~clk;
  out_buffer #(.PE_COLS(PE_COLS), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  always @(negedge clk) out_ready = ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    res_t e;
    check(q.size() > 0, "result without a pushed round");
    if (q.size() > 0) begin
      e = q.pop_front();
      check(int'(out_id) == e.id, $sformatf("id %0d exp %0d", out_id, e.id));
      check(int'(out_sum) == e.sum, $sformatf("sum %0d exp %0d", out_sum, e.sum));
    end
    received++;
  end
  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_full++;

  initial begin
    in_sum = '0; in_colvalid = '0; in_base_id = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int ncol;
      ncol = 1 + $urandom % PE_COLS;
      in_colvalid = PE_COLS'((1 << ncol) - 1);
      in_base_id  = ID_W'($urandom % 60000);
      for (int c = 0; c < int'(PE_COLS); c++) in_sum[c] = ACC_W'(int'($urandom % 200000) - 100000);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      for (int c = 0; c < ncol; c++) q.push_back('{int'(in_base_id) + c, int'($signed(in_sum[c]))});
      expected_total += ncol;
      @(negedge clk); in_valid = 0;
      if (n % 50 == 0) repeat (20) @(negedge clk);
    end
    while (!empty) @(negedge clk);
    check(received == expected_total, "all results delivered");
    check(q.size() == 0, "queue drained");
    check(n_full > 0, "full FIFO back-pressured its input");
    $display("full-FIFO cycles %0d results %0d", n_full, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
