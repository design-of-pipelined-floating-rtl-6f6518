// fpa_ctrl: data-stationary pipelined controller of the arithmetic unit.
//
// The opcode travels down the pipeline next to the data it belongs to, and
// each stage decodes its own control signals from the opcode it holds. This
// block decodes the EX1 controls straight from the incoming opcode, keeps
// the (valid, opcode) pair in the EX1/EX2 pipeline register and decodes the
// EX2 result-source select from that copy. EX1 controls are combinational
// from the inputs; EX2 controls appear one clock after an operation was
// accepted. A NOP occupies a slot but is never reported as a valid result.
// The split of the decode between stages is this design's own.
module fpa_ctrl
  import fpau_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  op_e   op,
  output ctl1_t ctl1,
  output ctl2_t ctl2
);
  // EX1 decode.
  always_comb begin
    ctl1           = '0;
    ctl1.valid     = in_valid && (op != OP_NOP);
    ctl1.op        = op;
    ctl1.negate_b  = (op == OP_SUB);
    ctl1.far_mode  = (op == OP_FTOI)  ? FAR_FTOI :
                     (op == OP_FLOOR) ? FAR_FLOOR : FAR_ADD;
    ctl1.near_itof = (op == OP_ITOF);
    ctl1.clamp     = (op == OP_CLAMP);
    ctl1.set_lt    = in_valid && (op == OP_SLT);
  end

  // Pipeline register: the opcode moves with its data.
  logic valid_q;
  op_e  op_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      op_q    <= OP_NOP;
    end else begin
      valid_q <= ctl1.valid;
      op_q    <= op;
    end
  end

  // EX2 decode.
  always_comb begin
    ctl2.valid = valid_q;
    ctl2.op    = op_q;
    unique case (op_q)
      OP_ADD, OP_SUB:                     ctl2.rsel = RS_ADD;
      OP_ITOF:                            ctl2.rsel = RS_NEAR;
      OP_FTOI, OP_FLOOR:                  ctl2.rsel = RS_FAR;
      OP_SEQ, OP_SGE, OP_SLT:             ctl2.rsel = RS_SET;
      OP_CLAMP:                           ctl2.rsel = RS_CLAMP;
      OP_ABS, OP_NEG, OP_MOV, OP_SGN,
      OP_CMP, OP_MAX, OP_MIN:             ctl2.rsel = RS_SIGN;
      default:                            ctl2.rsel = RS_ZERO;
    endcase
  end

endmodule
