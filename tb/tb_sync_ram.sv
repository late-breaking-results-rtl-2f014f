// tb_sync_ram: block RAM check. Random writes against a shadow array, then
// reads that must return the word one cycle after the request and hold it
// while no read is issued; read-during-write returns the old word.
module tb_sync_ram;
  localparam int unsigned W = 16, D = 64;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  sync_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      int a = $urandom % D;
      @(negedge clk); re = 1; raddr = 6'(a);
      @(negedge clk); re = 0; raddr = 6'($urandom % D);
      check(rdata == shadow[a], "read data after one cycle");
      @(negedge clk);
      check(rdata == shadow[a], "read data held without re");
    end
    // read during write returns the old word
    @(negedge clk); re = 1; we = 1; raddr = 6'd7; waddr = 6'd7; wdata = ~shadow[7];
    @(negedge clk); re = 0; we = 0;
    check(rdata == shadow[7], "read-during-write old data");
    shadow[7] = ~shadow[7];
    @(negedge clk); re = 1; raddr = 6'd7;
    @(negedge clk); re = 0;
    check(rdata == shadow[7], "new data after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
