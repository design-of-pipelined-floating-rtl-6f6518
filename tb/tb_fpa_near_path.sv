// tb_fpa_near_path: self-checking test of the near path.
// A new operation enters every clock and is checked one clock later:
// subtractions that the dual-path rule sends to the near path (exponent
// difference 0 or 1, both orders, including exact cancellation, negative
// differences and results that flush below the smallest normal) against the
// wide-integer reference, and ITOF against a direct integer conversion.
module tb_fpa_near_path;
  import fpau_pkg::*;
  import fpau_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic itof;
  logic [31:0] a, b, res;
  logic zero_r;
  int checks = 0, failures = 0;
  int n_zero = 0, n_flush = 0, n_neg = 0;

  fpa_near_path dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        pend = 0;
  logic [31:0] exp_q, a_q, b_q;
  logic        itof_q;

  task automatic drive(input logic it, input logic [31:0] ai, input logic [31:0] bi);
    @(negedge clk);
    if (pend) begin
      checks++;
      // zero_r may only be set when the result is zero
      if (res !== exp_q || (zero_r && exp_q != 32'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL itof=%0b a=%h b=%h res=%h exp %h z=%0b", itof_q, a_q, b_q, res, exp_q, zero_r);
      end
    end
    itof = it; a = ai; b = bi;
    itof_q = it; a_q = ai; b_q = bi;
    exp_q = it ? ref_itof(ai) : ref_add(ai, bi);
    if (!it && exp_q == 32'd0) n_zero++;
    if (!it && exp_q == 32'h8000_0000) n_flush++;
    if (!it && exp_q[31] != ai[31]) n_neg++;
    pend = 1;
  endtask

  initial begin
    itof = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    drive(0, 32'h3F80_0000, 32'hBF80_0000);   // 1 - 1 = +0
    drive(0, 32'h3F80_0000, 32'hBF80_0001);   // negative result
    drive(0, 32'h0080_0001, 32'h8080_0000);   // small difference
    drive(0, 32'h8100_0001, 32'h0180_0000);   // tiny difference
    drive(1, 32'h0000_0000, 32'h0);           // ITOF 0
    drive(1, 32'hFF80_0000, 32'h0);           // ITOF -2^23
    drive(1, 32'h007F_FFFF, 32'h0);           // ITOF 2^23-1
    drive(1, 32'hFFFF_FFFF, 32'h0);           // ITOF -1
    for (int i = 0; i < 30000; i++) begin
      logic [31:0] x, y;
      int eb;
      eb = (i % 5 == 0) ? int'($urandom_range(4, 1)) : int'($urandom_range(254, 1));
      do begin
        x = rand_fp_near(eb, 1);
        y = rand_fp_near(eb, 1);
        if (i % 4 == 0) y = {~x[31], x[30:23], x[22:0] ^ 23'($urandom_range(255, 0))};
      end while (!is_near(x, y));
      drive(0, x, y);
      drive(1, {{8{1'($urandom)}}, 24'($urandom) >> $urandom_range(23, 0)}, 32'($urandom));
    end
    drive(0, 32'h0, 32'h0);
    if (n_zero == 0 || n_flush == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage zero=%0d flush=%0d neg=%0d", n_zero, n_flush, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
