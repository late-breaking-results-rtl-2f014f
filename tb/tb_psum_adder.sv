// tb_psum_adder: global partial-sum adder of a nine-PE column against a
// software sum, over random and extreme accumulator values.
module tb_psum_adder;
  import dsa_pkg::*;

  logic signed [PE_ROWS-1:0][ACC_W-1:0] r;
  logic signed [ACC_W-1:0] sum;
  int checks = 0, failures = 0;

  psum_adder #(.N(PE_ROWS)) dut (.r(r), .sum(sum));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint exp;
      exp = 0;
      for (int i = 0; i < int'(PE_ROWS); i++) begin
        int v;
        v = (n % 3 == 0) ? ((n % 2) ? 16384 : -16384) : int'($urandom % 65536) - 32768;
        if (n % 5 == 0 && i == n % 9) v = 0;
        r[i] = ACC_W'(v);
        exp += v;
      end
      #1;
      checks++;
      if (longint'(sum) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL sum %0d exp %0d", sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
