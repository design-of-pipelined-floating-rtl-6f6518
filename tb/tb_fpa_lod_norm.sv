// tb_fpa_lod_norm: self-checking test of the MSB-first LOD normalizer.
// Inputs with every possible count of leading zeros (0..24) and random
// bits below the leading one; the expected shift is the leading-zero count
// found by a simple scan and the expected output the top 24 bits of the
// input shifted by it.
module tb_fpa_lod_norm;
  logic [24:0] f_sum;
  logic [4:0]  shf_len;
  logic [23:0] norm_out;
  logic        zero;
  int checks = 0, failures = 0;

  fpa_lod_norm dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [24:0] f);
    int lz;
    logic [24:0] sh;
    f_sum = f;
    #1;
    lz = 25;
    for (int i = 0; i < 25; i++) if (f[i]) lz = 24 - i;
    sh = (lz == 25) ? 25'd0 : f << lz;
    checks++;
    if (zero !== (f == 0) || norm_out !== sh[24:1] || (f != 0 && shf_len !== 5'(lz))) begin
      failures++;
      if (failures < 10) $display("FAIL f=%h len=%0d exp %0d out=%h exp %h", f, shf_len, lz,
                                  norm_out, sh[24:1]);
    end
  endtask

  initial begin
    check(25'd0);
    for (int k = 0; k < 25; k++) begin
      check(25'd1 << k);
      for (int i = 0; i < 400; i++) check((25'd1 << k) | (25'($urandom) & ((25'd1 << k) - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
