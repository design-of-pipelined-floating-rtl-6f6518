// fpa_near_path: near path of the dual-path adder, also used for ITOF.
//
// Handles effective subtractions with exponent difference 0, or 1 when the
// larger operand's significand is below 1.5. Then the difference is either
// exact (d = 0) or below 1.0 (d = 1) so it never needs rounding, only a
// left normalization of up to 24 places.
//
// Stage 1 (EX1): the exponent estimator looks only at the two low exponent
//   bits (enough when |d| <= 1) to find d and the swap. The smaller
//   significand is shifted right by d into B with guard bit g_b. A compound
//   adder forms X+Y and X+Y+1 with X = A, Y = ~B. With carry-in C_I = ~g_b:
//     g_b = 1            -> result is X+Y with fraction bit 1 (always >= 0);
//     g_b = 0, A >= B    -> result is X+Y+1 = A-B (carry out of X+Y+1 set);
//     g_b = 0, A <  B    -> result is B-A = ~(X+Y), one's complement of the
//                           same adder output, and the sign is flipped.
//   The 25-bit value {result, g_b} is registered.
// Stage 2 (EX2): MSB-first leading-one detector and normalization shifter,
//   zero detector. Exponent = larger exponent - shift length; an exact zero
//   gives +0 and a result below the smallest normal flushes to +/-0.
//
// ITOF mode (`itof`, operand on `a`): the 24-bit integer in a[23:0] enters
//   as B with X = 0; a negative integer takes 0-B (X+Y+1 with Y = ~B), a
//   positive one 0+B (X+Y with Y = B). The magnitude is normalized by the
//   same shifter with exponent base bias+23. A 24-bit magnitude fits the
//   significand, so no rounding is ever needed.
//
// The two-stage split and the result-selection scheme follow the unit's
// near-path diagram; zero and flush-to-zero handling are this design's own.
module fpa_near_path
  import fpau_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        itof,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] res,
  output logic        zero_r   // Zero_R_flag: the result is exactly zero
);
  // ------------------------------------------------------------------ stage 1
  // Exponent estimator: 2-bit difference of the low exponent bits.
  logic [1:0] ediff2;
  logic       est_len0, swap;
  assign ediff2   = a[24:23] - b[24:23];
  assign est_len0 = ediff2[0];
  assign swap     = (ediff2 == 2'd3);

  logic [31:0] lg, sm;
  assign lg = swap ? b : a;
  assign sm = swap ? a : b;

  logic [23:0] m_lg, m_sm;
  assign m_lg = {|lg[30:23], lg[22:0]};
  assign m_sm = {|sm[30:23], sm[22:0]};

  // 1-bit right shifter.
  logic [23:0] b_sh;
  logic        g_b;
  assign {b_sh, g_b} = est_len0 ? {1'b0, m_sm} : {m_sm, 1'b0};

  logic        isign;
  logic [23:0] x_in, y_in;
  assign isign = a[23];
  assign x_in  = itof ? 24'd0 : m_lg;
  assign y_in  = itof ? (isign ? ~a[23:0] : a[23:0]) : ~b_sh;

  logic [23:0] s0, s1, s_unused;
  logic cout0, cout1, s0m, s1m, bl, bl1;
  fpa_compound_adder #(.N(24)) u_cadd (
    .x(x_in), .y(y_in), .inc(1'b0),
    .s0(s0), .s1(s1), .s(s_unused),
    .cout0(cout0), .cout1(cout1),
    .s0_msb(s0m), .s1_msb(s1m), .bit_lsb(bl), .bit_lsb1(bl1)
  );

  // C_out^f: carry of the true difference, chosen by C_I = ~g_b.
  logic c_i, cf_out, neg;
  assign c_i    = ~g_b;
  assign cf_out = c_i ? cout1 : cout0;
  assign neg    = ~itof & ~cf_out;

  // Result selector.
  logic [23:0] inv_s0, r_int;
  assign inv_s0 = neg ? ~s0 : s0;
  always_comb begin
    if (itof)                r_int = isign ? s1 : s0;
    else if (!g_b && cout1)  r_int = s1;
    else                     r_int = inv_s0;
  end

  logic [24:0] f_sum_d;
  logic [7:0]  e_lg_d;
  logic        sign_d;
  assign f_sum_d = {r_int, itof ? 1'b0 : g_b};
  assign e_lg_d  = itof ? INT_EXP : lg[30:23];
  assign sign_d  = itof ? isign : (lg[31] ^ neg);

  // ------------------------------------------------------- pipeline register
  logic [24:0] f_sum;
  logic [7:0]  e_lg;
  logic        sign;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_sum <= '0;
      e_lg  <= '0;
      sign  <= 1'b0;
    end else begin
      f_sum <= f_sum_d;
      e_lg  <= e_lg_d;
      sign  <= sign_d;
    end
  end

  // ------------------------------------------------------------------ stage 2
  logic [4:0]  shf_len;
  logic [23:0] norm_out;
  fpa_lod_norm u_norm (.f_sum(f_sum), .shf_len(shf_len), .norm_out(norm_out), .zero(zero_r));

  logic signed [9:0] e_res;
  assign e_res = 10'(e_lg) - 10'(shf_len);

  always_comb begin
    if (zero_r)               res = 32'd0;
    else if (e_res <= 10'sd0) res = {sign, 31'd0};
    else                      res = {sign, e_res[7:0], norm_out[22:0]};
  end

  // A non-zero value always leaves the normalizer with its leading one on top.
  a_normalized: assert property (@(posedge clk) disable iff (!rst_n) !zero_r |-> norm_out[23]);

endmodule
