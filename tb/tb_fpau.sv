// tb_fpau: end-to-end self-checking test of the arithmetic unit.
// Runs the unit at its default parameters with one operation issued per
// clock (random valid gaps, NOPs included) over all seventeen operations.
// Each result must appear exactly two clocks after issue and equal the
// reference model's value. The test also counts how often each mechanism of
// the design is exercised -- near path, far path, zero bypass, fraction
// overflow and underflow in the far path, float saturation, flush to zero,
// integer saturation, CLAMP hitting both limits, CMP with the LT flag set
// and clear, CMP directly behind its SLT -- and fails if any never occurs.
module tb_fpau;
  import fpau_pkg::*;
  import fpau_ref_pkg::*;

  localparam logic [31:0] MAXP = 32'h4300_0000;   // default CLAMP limit

  logic clk = 0, rst_n = 0;
  logic in_valid;
  op_e  op;
  logic [31:0] rs, rt, result;
  logic out_valid, lt_flag, near_taken;
  int checks = 0, failures = 0;

  fpau dut (.*);

  always #5 clk = ~clk;

  localparam int NCOV = 14;
  int cov [NCOV];
  string cov_name [NCOV] = '{"near", "far", "zero_bypass", "frac_overflow", "frac_underflow",
                             "saturate", "flush", "int_saturate", "clamp_pos", "clamp_neg",
                             "cmp_lt1", "cmp_lt0", "slt_then_cmp", "near_negative"};
  int op_count [17];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected-result pipeline: index 0 = issued at this falling edge, index 1
  // = issued one clock earlier, due at the output now (two rising edges).
  logic        ev [2];
  logic [31:0] er [2];
  op_e         eo [2];
  logic        en [2];     // ADD/SUB expected on the near path
  logic        ea [2];     // ADD/SUB on a path (no zero bypass)
  logic        lt_model = 0;
  op_e         last_op = OP_NOP;

  function automatic logic [31:0] model(input op_e o, input logic [31:0] x, input logic [31:0] y);
    int c;
    logic [31:0] lim;
    case (o)
      OP_ABS:   return {1'b0, x[30:0]};
      OP_NEG:   return {~x[31], x[30:0]};
      OP_MOV:   return x;
      OP_ADD:   return ref_add(x, y);
      OP_SUB:   return ref_add(x, {~y[31], y[30:0]});
      OP_MAX:   return (ref_cmp(x, y) < 0) ? y : x;
      OP_MIN:   return (ref_cmp(x, y) > 0) ? y : x;
      OP_ITOF:  return ref_itof(x);
      OP_FLOOR: return ref_ftoi(x, 1);
      OP_FTOI:  return ref_ftoi(x, 0);
      OP_SEQ:   return (ref_cmp(x, y) == 0) ? FP_ONE : 32'd0;
      OP_SGE:   return (ref_cmp(x, y) >= 0) ? FP_ONE : 32'd0;
      OP_SLT:   return (ref_cmp(x, y) < 0) ? FP_ONE : 32'd0;
      OP_SGN: begin
        c = ref_cmp(x, 32'd0);
        return (c == 0) ? 32'd0 : (c < 0) ? FP_MONE : FP_ONE;
      end
      OP_CLAMP: begin
        lim = {x[31], MAXP[30:0]};
        c = ref_cmp(x, lim);
        return ((!x[31] && c > 0) || (x[31] && c < 0)) ? lim : x;
      end
      OP_CMP:   return lt_model ? y : x;
      default:  return 32'd0;
    endcase
  endfunction

  task automatic cover_issue(input op_e o, input logic [31:0] x, input logic [31:0] y,
                             input logic [31:0] r);
    logic [31:0] yy;
    int el;
    yy = (o == OP_SUB) ? {~y[31], y[30:0]} : y;
    if (o == OP_ADD || o == OP_SUB) begin
      if (x[30:23] == 0 || y[30:23] == 0) cov[2]++;
      else begin
        el = (x[30:23] > y[30:23]) ? int'(x[30:23]) : int'(y[30:23]);
        if (is_near(x, yy)) begin
          cov[0]++;
          if (r[31] != x[31] && r[30:0] != 0 && x[30:23] == y[30:23]) cov[13]++;
          if (r[30:23] == 0 && !(r == 0)) cov[6]++;
          if (r == 32'h8000_0000) cov[6]++;
        end else begin
          cov[1]++;
          if (r[30:0] != 31'h7F7F_FFFF && int'(r[30:23]) > el) cov[3]++;
          if (int'(r[30:23]) < el && r[30:0] != 0) cov[4]++;
        end
        if (r[30:0] == 31'h7F7F_FFFF) cov[5]++;
      end
    end
    if ((o == OP_FTOI || o == OP_FLOOR) && (r == INT_MAX || r == INT_MIN)) cov[7]++;
    if (o == OP_CLAMP && r == MAXP) cov[8]++;
    if (o == OP_CLAMP && r == {1'b1, MAXP[30:0]}) cov[9]++;
    if (o == OP_CMP && lt_model) cov[10]++;
    if (o == OP_CMP && !lt_model) cov[11]++;
    if (o == OP_CMP && last_op == OP_SLT) cov[12]++;
  endtask

  task automatic issue(input logic v, input op_e o, input logic [31:0] x, input logic [31:0] y);
    @(negedge clk);
    // check the operation issued two clocks ago
    checks++;
    if (out_valid !== ev[1] || (ev[1] && result !== er[1])) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d valid=%0b/%0b result=%h exp %h", eo[1], out_valid, ev[1], result, er[1]);
    end
    if (ev[1] && ea[1]) begin
      checks++;
      if (near_taken !== en[1]) begin
        failures++;
        if (failures < 10) $display("FAIL path select op=%0d", eo[1]);
      end
    end
    ev[1] = ev[0]; er[1] = er[0]; eo[1] = eo[0]; en[1] = en[0]; ea[1] = ea[0];
    in_valid = v; op = o; rs = x; rt = y;
    ev[0] = v && (o != OP_NOP);
    er[0] = model(o, x, y);
    eo[0] = o;
    ea[0] = (o == OP_ADD || o == OP_SUB) && x[30:23] != 0 && y[30:23] != 0;
    en[0] = is_near(x, (o == OP_SUB) ? {~y[31], y[30:0]} : y);
    if (v) begin
      op_count[o]++;
      cover_issue(o, x, y, er[0]);
      if (o == OP_SLT) lt_model = (ref_cmp(x, y) < 0);
      last_op = o;
    end
  endtask

  function automatic logic [31:0] rand_operand(input op_e o);
    case (o)
      OP_ITOF:            return {{8{1'($urandom)}}, 24'($urandom) >> $urandom_range(23, 0)};
      OP_FTOI, OP_FLOOR:  return rand_fp_near(140, 16);
      OP_CLAMP:           return rand_fp_near(134, 3);
      default:            return ($urandom_range(20, 0) == 0) ? {1'($urandom), 31'd0} :
                                 ($urandom_range(10, 0) == 0) ? rand_fp_near(252, 3) :
                                 ($urandom_range(10, 0) == 0) ? rand_fp_near(2, 2) :
                                 rand_fp_near(127, 40);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < NCOV; i++) cov[i] = 0;
    for (int i = 0; i < 17; i++) op_count[i] = 0;
    for (int i = 0; i < 2; i++) begin ev[i] = 0; er[i] = 0; eo[i] = OP_NOP; en[i] = 0; ea[i] = 0; end
    in_valid = 0; op = OP_NOP; rs = 0; rt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Directed: SLT immediately followed by CMP, both flag values.
    issue(1, OP_SLT, 32'h3F80_0000, 32'h4000_0000);
    issue(1, OP_CMP, 32'h1111_1111, 32'h2222_2222);
    issue(1, OP_SLT, 32'h4000_0000, 32'h3F80_0000);
    issue(1, OP_CMP, 32'h1111_1111, 32'h2222_2222);
    issue(1, OP_ADD, 32'h7F7F_FFFF, 32'h7F7F_FFFF);     // saturates
    issue(1, OP_SUB, 32'h0080_0001, 32'h0080_0000);     // flushes
    issue(1, OP_ADD, 32'h3F80_0000, 32'h3F80_0000);     // fraction overflow
    issue(1, OP_SUB, 32'h4000_0000, 32'h3E80_0000);     // fraction underflow
    issue(1, OP_SUB, 32'h3F80_0000, 32'h3F80_0001);     // negative near result
    issue(1, OP_CLAMP, 32'h4400_0000, 32'h0);
    issue(1, OP_CLAMP, 32'hC400_0000, 32'h0);
    issue(1, OP_FTOI, 32'h4C00_0000, 32'h0);
    issue(0, OP_ADD, 32'h3F80_0000, 32'h3F80_0000);     // bubble
    for (int i = 0; i < 60000; i++) begin
      op_e o;
      logic [31:0] x, y;
      o = op_e'($urandom_range(16, 0));
      x = rand_operand(o);
      case ($urandom_range(3, 0))
        0: y = {~x[31], x[30:23], 23'($urandom)};
        1: y = {1'($urandom), x[30:23] + 8'($urandom_range(2, 0)) - 8'd1, 23'($urandom)};
        default: y = rand_operand(o);
      endcase
      if (y[30:23] == 8'hFF) y[30:23] = 8'hFE;
      issue($urandom_range(9, 0) != 0, o, x, y);
    end
    repeat (3) issue(0, OP_NOP, 0, 0);
    for (int i = 0; i < NCOV; i++) begin
      $display("mechanism %-15s : %0d", cov_name[i], cov[i]);
      if (cov[i] == 0) failures++;
    end
    for (int i = 0; i < 17; i++) if (op_count[i] == 0) begin
      $display("FAIL operation %0d never issued", i);
      failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
