// fpa_exp_diff: exponent difference unit.
//
// Returns d = |ea - eb| and swap = (eb > ea) using one flagged prefix
// compound adder on X = ea, Y = ~eb: X+Y+1 is ea - eb, and when that is
// negative (no carry out of X+Y+1) the one's complement of X+Y is eb - ea,
// so no second subtractor is needed. Purely combinational.
module fpa_exp_diff (
  input  logic [7:0] ea,
  input  logic [7:0] eb,
  output logic [7:0] d,
  output logic       swap
);
  logic [7:0] s0, s1, s_unused;
  logic cout0, cout1, s0m, s1m, bl, bl1;

  fpa_compound_adder #(.N(8)) u_add (
    .x(ea), .y(~eb), .inc(1'b1),
    .s0(s0), .s1(s1), .s(s_unused),
    .cout0(cout0), .cout1(cout1),
    .s0_msb(s0m), .s1_msb(s1m), .bit_lsb(bl), .bit_lsb1(bl1)
  );

  assign swap = ~cout1;
  assign d    = cout1 ? s1 : ~s0;

endmodule
