// tb_fpa_cmp_clamp: self-checking test of the comparator and CLAMP unit.
// Each clock a new pair enters; one clock later the EQ/GT/LT flags are
// compared with a signed-integer ordering of the two values (+0 == -0), and
// for CLAMP operations the clamped result with +/-MAXPOWER (128.0).
// lt_s1 is checked in the cycle the pair is applied.
module tb_fpa_cmp_clamp;
  import fpau_ref_pkg::*;

  localparam logic [31:0] MAXP = 32'h4300_0000;
  logic clk = 0, rst_n = 0;
  logic clamp;
  logic [31:0] a, b, clamp_res;
  logic lt_s1, eq, gt, lt, clamp_true;
  int checks = 0, failures = 0;
  int n_clamped = 0, n_passed = 0, n_eq = 0;

  fpa_cmp_clamp #(.MAXPOWER(MAXP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic pend = 0;
  int   c_q;
  logic clamp_q;
  logic [31:0] a_q, b_q, res_q;

  task automatic drive(input logic cl, input logic [31:0] ai, input logic [31:0] bi);
    int c;
    logic [31:0] lim;
    @(negedge clk);
    if (pend) begin
      checks++;
      if (eq !== (c_q == 0) || gt !== (c_q > 0) || lt !== (c_q < 0) ||
          (clamp_q && clamp_res !== res_q)) begin
        failures++;
        if (failures < 10) $display("FAIL clamp=%0b a=%h b=%h eq/gt/lt=%0b%0b%0b cmp=%0d res=%h exp %h",
                                    clamp_q, a_q, b_q, eq, gt, lt, c_q, clamp_res, res_q);
      end
    end
    clamp = cl; a = ai; b = bi;
    lim = {ai[31], MAXP[30:0]};
    c = ref_cmp(ai, cl ? lim : bi);
    #1;
    checks++;
    if (lt_s1 !== (c < 0)) begin
      failures++;
      if (failures < 10) $display("FAIL lt_s1 a=%h b=%h", ai, bi);
    end
    c_q = c; clamp_q = cl; a_q = ai; b_q = bi;
    if (cl) begin
      if ((!ai[31] && c > 0) || (ai[31] && c < 0)) begin res_q = lim; n_clamped++; end
      else begin res_q = ai; n_passed++; end
    end
    if (c == 0) n_eq++;
    pend = 1;
  endtask

  initial begin
    clamp = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    drive(0, 32'h0000_0000, 32'h8000_0000);   // +0 == -0
    drive(0, 32'h3F80_0000, 32'hBF80_0000);
    drive(0, 32'hBF80_0000, 32'hBF80_0001);
    drive(1, 32'h4300_0000, 32'h0);           // exactly MAXPOWER
    drive(1, 32'h4300_0001, 32'h0);
    drive(1, 32'hC300_0001, 32'h0);
    drive(1, 32'hC2FF_FFFF, 32'h0);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      x = rand_fp_near(134, (i % 2) ? 3 : 100);
      case (i % 4)
        0: y = x;
        1: y = {~x[31], x[30:0]};
        2: y = {x[31], x[30:0] + 31'($urandom_range(3, 0)) - 31'd1};
        default: y = rand_fp_near(134, 100);
      endcase
      if (i % 10 == 0) x[30:23] = 8'd0;
      drive(1'($urandom), x, y);
    end
    drive(0, 32'h0, 32'h0);
    if (n_clamped == 0 || n_passed == 0 || n_eq == 0) begin
      failures++;
      $display("FAIL coverage clamped=%0d passed=%0d eq=%0d", n_clamped, n_passed, n_eq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
