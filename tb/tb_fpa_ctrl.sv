// tb_fpa_ctrl: self-checking test of the data-stationary controller.
// Streams random opcodes with random valid bits, one per clock, and checks
// the EX1 decode in the same cycle and the EX2 decode (opcode, valid and
// result source) exactly one clock later against a table written out here.
module tb_fpa_ctrl;
  import fpau_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  op_e op;
  ctl1_t ctl1;
  ctl2_t ctl2;
  int checks = 0, failures = 0;

  fpa_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rsel_e exp_rsel(input op_e o);
    case (o)
      OP_NOP:                  return RS_ZERO;
      OP_ADD, OP_SUB:          return RS_ADD;
      OP_ITOF:                 return RS_NEAR;
      OP_FTOI, OP_FLOOR:       return RS_FAR;
      OP_SEQ, OP_SGE, OP_SLT:  return RS_SET;
      OP_CLAMP:                return RS_CLAMP;
      default:                 return RS_SIGN;
    endcase
  endfunction

  logic pend = 0;
  op_e  op_q;
  logic v_q;

  initial begin
    in_valid = 0; op = OP_NOP;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (ctl2.op !== op_q || ctl2.valid !== (v_q && op_q != OP_NOP) || ctl2.rsel !== exp_rsel(op_q)) begin
          failures++;
          if (failures < 10) $display("FAIL ex2 op=%0d", op_q);
        end
      end
      in_valid = 1'($urandom);
      op = op_e'($urandom_range(16, 0));
      #1;
      checks++;
      if (ctl1.valid !== (in_valid && op != OP_NOP) || ctl1.negate_b !== (op == OP_SUB) ||
          ctl1.near_itof !== (op == OP_ITOF) || ctl1.clamp !== (op == OP_CLAMP) ||
          ctl1.set_lt !== (in_valid && op == OP_SLT) ||
          ctl1.far_mode !== ((op == OP_FTOI) ? FAR_FTOI : (op == OP_FLOOR) ? FAR_FLOOR : FAR_ADD)) begin
        failures++;
        if (failures < 10) $display("FAIL ex1 op=%0d", op);
      end
      op_q = op; v_q = in_valid; pend = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
