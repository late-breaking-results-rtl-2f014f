// tb_bit_scanner: exhaustive check of the LUT-based bit scanner.
// Every 8-bit weight is applied; the expected sign, nonzero-bit count and
// ascending position list are computed bit by bit from the magnitude.
module tb_bit_scanner;
  import dsa_pkg::*;

  logic [WGT_W-1:0] w;
  bitmeta_t         meta;
  int checks = 0, failures = 0;

  bit_scanner dut (.w(w), .meta(meta));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL w=%0d: %s", $signed(w), what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int mag, k, recon;
      logic [MAG_W-1:0][BPOS_W-1:0] exp_pos;
      w = WGT_W'(i);
      #1;
      mag = (i >= 128) ? 256 - i : i;
      exp_pos = '0;
      k = 0;
      for (int b = 0; b < MAG_W; b++)
        if (mag[b]) begin exp_pos[k] = BPOS_W'(b); k++; end
      check(meta.sign == (i >= 128), "sign");
      check(int'(meta.nnzb) == k, "N_nzb");
      check(meta.tbitpos == exp_pos, "T_bitpos");
      recon = 0;
      for (int j = 0; j < int'(meta.nnzb); j++) recon += 1 << meta.tbitpos[j];
      check(recon == mag, "reconstructed magnitude");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
