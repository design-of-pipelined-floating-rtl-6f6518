// fpau: two-stage pipelined floating-point arithmetic unit (FP-AU).
//
// One operation per clock of seventeen: NOP, ABS, NEG, MOV, ADD, SUB, MAX,
// MIN, ITOF, FLOOR, FTOI, SEQ, SGE, SLT, SGN, CLAMP and CMP, on IEEE single
// precision values and 24-bit integers (held sign-extended in 32 bits).
// Floating-point results saturate instead of overflowing to infinity, and
// flush to zero instead of becoming denormal. ADD/SUB round to nearest even.
//
// Datapath: the dual-path adder. Stage 1 (EX1) classifies an add/subtract:
// an effective subtraction with exponent difference 0, or 1 when the larger
// operand's significand is below 1.5, takes the near path (no rounding,
// full normalization); everything else takes the far path (1-bit
// normalization merged with rounding). Both paths run every cycle and the
// classification picks one in stage 2. ITOF runs on the near path, FTOI and
// FLOOR on the far path, the compare-type operations on the comparator and
// the CLAMP constant selector; ABS, NEG, MOV, SGN and CMP are computed in the
// sign unit during EX1. An add/subtract with a zero operand bypasses the
// paths. CMP picks Rt when the LT flag set by the most recent SLT is 1,
// otherwise Rs; the flag is written at the end of SLT's EX1, so a CMP right
// behind its SLT already sees it.
//
// Interface: present in_valid/op/rs/rt for one clock; out_valid/result
// follow exactly two clocks later (EX1 register, EX2 output register), and
// a new operation may enter every clock. Operation encoding, sign of zero
// results, the 1.0/0.0 values of the set-on-compare operations and the
// zero bypass are this design's choices.
module fpau
  import fpau_pkg::*;
#(
  parameter logic [31:0] MAXPOWER = 32'h4300_0000   // CLAMP limit, 128.0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  op_e         op,
  input  logic [31:0] rs,
  input  logic [31:0] rt,
  output logic        out_valid,
  output logic [31:0] result,
  output logic        lt_flag,
  output logic        near_taken   // last ADD/SUB result came from the near path
);
  ctl1_t ctl1;
  ctl2_t ctl2;
  fpa_ctrl u_ctrl (.clk, .rst_n, .in_valid, .op, .ctl1, .ctl2);

  // ------------------------------------------------------------------ stage 1
  logic [31:0] rt_eff;
  assign rt_eff = {rt[31] ^ ctl1.negate_b, rt[30:0]};

  // Near/far classification.
  logic [7:0] d;
  logic       swap, e_sub, msb_lg, near_sel, za, zb;
  fpa_exp_diff u_ediff (.ea(rs[30:23]), .eb(rt[30:23]), .d(d), .swap(swap));
  assign e_sub    = rs[31] ^ rt_eff[31];
  assign msb_lg   = swap ? rt[22] : rs[22];
  assign near_sel = e_sub && ((d == 8'd0) || ((d == 8'd1) && !msb_lg));
  assign za       = ~|rs[30:23];
  assign zb       = ~|rt[30:23];

  // Sign unit and zero bypass.
  logic [31:0] unit_d;
  logic        zbyp_d;
  always_comb begin
    unit_d = '0;
    zbyp_d = 1'b0;
    unique case (ctl1.op)
      OP_ABS: unit_d = {1'b0, rs[30:0]};
      OP_NEG: unit_d = {~rs[31], rs[30:0]};
      OP_MOV: unit_d = rs;
      OP_SGN: unit_d = za ? 32'd0 : (rs[31] ? FP_MONE : FP_ONE);
      OP_CMP: unit_d = lt_flag ? rt : rs;
      OP_ADD, OP_SUB: begin
        zbyp_d = za | zb;
        if (za && zb)  unit_d = {rs[31] & rt_eff[31], 31'd0};
        else if (za)   unit_d = rt_eff;
        else           unit_d = rs;
      end
      default: unit_d = '0;
    endcase
  end

  // Paths and comparator.
  logic [31:0] far_res, near_res, clamp_res;
  logic        near_zero, lt_s1, eq, gt, lt, clamp_true;

  fpa_far_path u_far (
    .clk, .rst_n, .mode(ctl1.far_mode), .a(rs), .b(rt_eff), .res(far_res)
  );
  fpa_near_path u_near (
    .clk, .rst_n, .itof(ctl1.near_itof), .a(rs), .b(rt_eff),
    .res(near_res), .zero_r(near_zero)
  );
  fpa_cmp_clamp #(.MAXPOWER(MAXPOWER)) u_cmp (
    .clk, .rst_n, .clamp(ctl1.clamp), .a(rs), .b(rt),
    .lt_s1, .eq, .gt, .lt, .clamp_true, .clamp_res
  );

  // LT flag register, written by SLT.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           lt_flag <= 1'b0;
    else if (ctl1.set_lt) lt_flag <= lt_s1;
  end

  // EX1/EX2 register of the top-level datapath.
  logic [31:0] unit_q, rs_q, rt_q;
  logic        zbyp_q, near_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unit_q <= '0;
      rs_q   <= '0;
      rt_q   <= '0;
      zbyp_q <= 1'b0;
      near_q <= 1'b0;
    end else begin
      unit_q <= unit_d;
      rs_q   <= rs;
      rt_q   <= rt;
      zbyp_q <= zbyp_d;
      near_q <= near_sel;
    end
  end

  // ------------------------------------------------------------------ stage 2
  logic [31:0] res_d;
  always_comb begin
    unique case (ctl2.rsel)
      RS_ADD:   res_d = zbyp_q ? unit_q : (near_q ? near_res : far_res);
      RS_NEAR:  res_d = near_res;
      RS_FAR:   res_d = far_res;
      RS_SET: begin
        unique case (ctl2.op)
          OP_SEQ:  res_d = eq ? FP_ONE : 32'd0;
          OP_SGE:  res_d = (gt | eq) ? FP_ONE : 32'd0;
          default: res_d = lt ? FP_ONE : 32'd0;
        endcase
      end
      RS_CLAMP: res_d = clamp_res;
      RS_SIGN: begin
        unique case (ctl2.op)
          OP_MAX:  res_d = lt ? rt_q : rs_q;
          OP_MIN:  res_d = gt ? rt_q : rs_q;
          default: res_d = unit_q;
        endcase
      end
      default:  res_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      result     <= '0;
      near_taken <= 1'b0;
    end else begin
      out_valid <= ctl2.valid;
      result    <= res_d;
      if (ctl2.valid && ctl2.rsel == RS_ADD && !zbyp_q) near_taken <= near_q;
    end
  end

  // A NOP never produces a result, and every valid operation has a source.
  a_no_nop_result: assert property (@(posedge clk) disable iff (!rst_n)
                                    ctl2.valid |-> (ctl2.op != OP_NOP && ctl2.rsel != RS_ZERO));

endmodule
