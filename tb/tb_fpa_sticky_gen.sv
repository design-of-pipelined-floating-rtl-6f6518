// tb_fpa_sticky_gen: self-checking test of the sticky-bit generator.
// The expected sticky bit is the OR of the bits that a right shift by d
// pushes below the guard and round positions, computed directly by
// shifting; the trailing-zero count is checked as well.
module tb_fpa_sticky_gen;
  logic [23:0] opr;
  logic [7:0]  d;
  logic [4:0]  len;
  logic        sticky;
  int checks = 0, failures = 0;

  fpa_sticky_gen dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [23:0] o, input logic [7:0] dd);
    logic [281:0] full, lost;
    logic exp_s;
    int exp_len;
    opr = o; d = dd;
    #1;
    full = {o, 2'b00, 256'd0} >> dd;     // 256 fraction bits below the frame
    lost = full & {26'd0, {256{1'b1}}};
    exp_s = |lost || (dd >= 8'd32);      // shifts of 32 and more always set it
    exp_len = 31;
    for (int i = 23; i >= 0; i--) if (o[i]) exp_len = i;
    checks++;
    if (sticky !== exp_s || len !== 5'(exp_len)) begin
      failures++;
      if (failures < 10) $display("FAIL opr=%h d=%0d sticky=%0b exp %0b len=%0d exp %0d",
                                  o, dd, sticky, exp_s, len, exp_len);
    end
  endtask

  initial begin
    for (int dd = 0; dd < 256; dd++) begin
      check(24'h800000, 8'(dd));
      check(24'hFFFFFF, 8'(dd));
      for (int k = 0; k < 24; k++) check(24'h800000 | (24'd1 << k), 8'(dd));
    end
    for (int i = 0; i < 20000; i++) begin
      logic [23:0] o;
      o = {1'b1, 23'($urandom)} & ~((24'd1 << $urandom_range(23, 0)) - 1);
      check(o | 24'h800000, 8'($urandom_range(40, 0)));
    end
    for (int dd = 2; dd < 256; dd++) check(24'd0, 8'(dd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
