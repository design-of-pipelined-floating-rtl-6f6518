// fpa_sticky_gen: sticky-bit generator of the far path.
//
// When the smaller significand `opr` is shifted right by the exponent
// difference d to align it, everything below the guard and round positions
// is ORed into the sticky bit. Instead of ORing the shifted-out bits, this
// block counts the trailing zeros LEN of `opr` (trailing-one detector, TOD)
// and evaluates  sticky = (d >= LEN + 3)  as the sign of d - LEN - 3,
// computed by a 6-bit three-operand adder made of a carry-save stage and a
// carry-propagate stage: d + ~LEN + (~3 + 1 + 1), i.e. d - LEN - 3 in two's
// complement (the 5-bit LEN is zero-extended before the inversion). A
// sign of 0 means sticky = 1. If any of d[7:5] is set the shift
// exceeds the 24-bit operand and sticky is forced to 1 (`clear_R` path).
// Widths (24-bit operand, 5-bit LEN, 8-bit d, 6-bit adder) follow the
// unit's sticky generator. A zero operand gives LEN = 31 and a meaningless
// sticky for d < 2; the far path masks sticky for a zero operand itself. Purely combinational.
module fpa_sticky_gen (
  input  logic [23:0] opr,     // significand of the smaller operand (before shift)
  input  logic [7:0]  d,       // alignment shift (exponent difference)
  output logic [4:0]  len,     // trailing zeros of opr (31 if opr == 0)
  output logic        sticky
);
  // Trailing-one detector.
  always_comb begin
    len = 5'd31;
    for (int i = 23; i >= 0; i--) begin
      if (opr[i]) len = 5'(i);
    end
  end

  // 3-operand adder: d[4:0] - LEN - 3 as d + ~LEN + (~3 + 1 + 1).
  logic [5:0] a_op, b_op, c_op, sum_vec, carry_vec, sum;
  assign a_op = {1'b0, d[4:0]};
  assign b_op = ~{1'b0, len};        // -LEN-1 in 6 bits
  assign c_op = ~6'd3 + 6'd2;          // two's-complement -3 plus the +1 for ~LEN
  assign sum_vec   = a_op ^ b_op ^ c_op;
  assign carry_vec = {(a_op[4:0] & b_op[4:0]) | (a_op[4:0] & c_op[4:0]) | (b_op[4:0] & c_op[4:0]), 1'b0};
  assign sum = sum_vec + carry_vec;     // 6-bit CPA

  logic clear_r;
  assign clear_r = |d[7:5];
  assign sticky  = clear_r ? 1'b1 : ~sum[5];

endmodule
