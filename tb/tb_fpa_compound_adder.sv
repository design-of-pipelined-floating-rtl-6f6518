// tb_fpa_compound_adder: self-checking test of the 24-bit compound adder.
// Random and corner operands; every output (both sums, the inc-selected sum
// and all six flags) is compared with plain integer arithmetic.
module tb_fpa_compound_adder;
  localparam int N = 24;
  logic [N-1:0] x, y, s0, s1, s;
  logic inc, cout0, cout1, s0_msb, s1_msb, bit_lsb, bit_lsb1;
  int checks = 0, failures = 0;

  fpa_compound_adder #(.N(N)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] xi, input logic [N-1:0] yi, input logic inci);
    logic [N:0] e0, e1;
    x = xi; y = yi; inc = inci;
    #1;
    e0 = {1'b0, xi} + {1'b0, yi};
    e1 = e0 + 1'b1;
    checks++;
    if ({cout0, s0} !== e0 || {cout1, s1} !== e1 || s !== (inci ? e1[N-1:0] : e0[N-1:0]) ||
        s0_msb !== e0[N-1] || s1_msb !== e1[N-1] || bit_lsb !== e0[0] || bit_lsb1 !== e0[1]) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%h y=%h inc=%0b: s0=%h/%0b s1=%h/%0b exp %h %h", xi, yi, inci,
                 s0, cout0, s1, cout1, e0, e1);
    end
  endtask

  initial begin
    check('0, '0, 0);
    check('1, '0, 1);
    check('1, '1, 0);
    check(24'h800000, 24'h7FFFFF, 1);
    check(24'h123456, ~24'h123456, 1);
    for (int i = 0; i < 20000; i++) check(N'($urandom), N'($urandom), 1'($urandom));
    for (int i = 0; i < 2000; i++) begin
      logic [N-1:0] r;
      r = N'($urandom);
      check(r, ~r ^ N'(1 << $urandom_range(N-1, 0)), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
