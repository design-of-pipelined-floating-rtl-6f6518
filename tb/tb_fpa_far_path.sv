// tb_fpa_far_path: self-checking test of the far path.
// A new operation enters every clock and its result is checked exactly one
// clock later against the wide-integer reference model: far-path additions
// and subtractions (pairs that the dual-path rule sends to the far path,
// including exponent ranges that overflow and underflow), FTOI and FLOOR.
module tb_fpa_far_path;
  import fpau_pkg::*;
  import fpau_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  far_mode_e mode;
  logic [31:0] a, b, res;
  int checks = 0, failures = 0;
  int n_sat = 0, n_isat = 0;

  fpa_far_path dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        pend = 0;
  logic [31:0] exp_q;
  far_mode_e   mode_q;
  logic [31:0] a_q, b_q;

  task automatic drive(input far_mode_e m, input logic [31:0] ai, input logic [31:0] bi);
    @(negedge clk);
    if (pend) begin
      checks++;
      if (res !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d a=%h b=%h res=%h exp %h", mode_q, a_q, b_q, res, exp_q);
      end
    end
    mode = m; a = ai; b = bi;
    mode_q = m; a_q = ai; b_q = bi;
    unique case (m)
      FAR_ADD:   exp_q = ref_add(ai, bi);
      FAR_FTOI:  exp_q = ref_ftoi(ai, 0);
      default:   exp_q = ref_ftoi(ai, 1);
    endcase
    if (m == FAR_ADD && exp_q[30:0] == 31'h7F7F_FFFF) n_sat++;
    if (m != FAR_ADD && (exp_q == INT_MAX || exp_q == INT_MIN)) n_isat++;
    pend = 1;
  endtask

  initial begin
    mode = FAR_ADD; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed cases
    drive(FAR_ADD, 32'h3F80_0000, 32'h3F80_0000);   // 1 + 1
    drive(FAR_ADD, 32'h3FFF_FFFF, 32'h3400_0000);   // rounding carries out
    drive(FAR_ADD, 32'h4000_0000, 32'hBF00_0001);   // 2 - 0.5.. (underflow)
    drive(FAR_ADD, 32'h7F7F_FFFF, 32'h7F7F_FFFF);   // saturates
    drive(FAR_ADD, 32'h0140_0000, 32'h80FF_FFFF);   // lowest exponent, no flush
    drive(FAR_FTOI,  32'h4020_0000, 32'h0);          // 2.5 -> 2
    drive(FAR_FTOI,  32'hC020_0000, 32'h0);          // -2.5 -> -2
    drive(FAR_FLOOR, 32'hC020_0000, 32'h0);          // floor(-2.5) = -3
    drive(FAR_FLOOR, 32'h8000_0000, 32'h0);          // -0
    drive(FAR_FTOI,  32'h4B00_0000, 32'h0);          // 2^23 saturates
    drive(FAR_FTOI,  32'hCB00_0000, 32'h0);          // -2^23 fits
    drive(FAR_FLOOR, 32'hBE99_999A, 32'h0);          // floor(-0.3) = -1
    for (int i = 0; i < 30000; i++) begin
      logic [31:0] x, y;
      int eb, sp;
      sp = (i % 3 == 0) ? 2 : 30;
      eb = (i % 7 == 0) ? 250 : (i % 7 == 1) ? 4 : int'($urandom_range(250, 5));
      do begin
        x = rand_fp_near(eb, sp);
        y = rand_fp_near(eb, sp);
      end while (is_near(x, y));
      drive(FAR_ADD, x, y);
      drive(far_mode_e'(($urandom & 1) + 1), rand_fp_near(140, 20), 32'h0);
      if (i % 5 == 0) drive(far_mode_e'(($urandom & 1) + 1), {1'($urandom), 8'd150, 23'($urandom)}, 32'h0);
    end
    drive(FAR_ADD, 32'h0, 32'h0);   // flushes the last check
    if (n_sat == 0 || n_isat == 0) begin
      failures++;
      $display("FAIL coverage sat=%0d isat=%0d", n_sat, n_isat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
