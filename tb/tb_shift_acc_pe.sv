// tb_shift_acc_pe: shift-accumulate PE against integer multiplication.
// Random and corner weights (0, +/-1, +/-127, -128, 0x55 patterns) and inputs
// are loaded as bit metadata; R_i must equal w*x after exactly N_nzb steps,
// busy must be high for exactly N_nzb cycles and last in the final one.
module tb_shift_acc_pe;
  import dsa_pkg::*;
  import dsa_tb_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  pe_op_t op;
  logic busy, last;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  shift_acc_pe dut (.*);

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

  int corner[10] = '{0, 1, -1, 127, -127, -128, 85, -86, 64, 3};

  initial begin
    op = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int w, x, steps;
      w = (n < 10) ? corner[n] : int'($urandom % 256) - 128;
      x = (n % 7 == 0) ? -128 : int'($urandom % 256) - 128;
      op.meta = make_meta(w);
      op.x    = IN_W'(x);
      load = 1;
      @(negedge clk); load = 0;
      steps = 0;
      while (busy && steps < 20) begin
        check(last == (steps == popcount_mag(w) - 1), "last flag");
        @(negedge clk); steps++;
      end
      check(steps == popcount_mag(w), $sformatf("steps %0d for w=%0d", steps, w));
      check(acc == ACC_W'(w * x), $sformatf("acc %0d exp %0d (w=%0d x=%0d)", acc, w * x, w, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
