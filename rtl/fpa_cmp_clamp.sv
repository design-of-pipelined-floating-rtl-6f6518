// fpa_cmp_clamp: floating-point comparator and CLAMP hardware.
//
// Stage 1 (EX1) compares Rs (`a`) with a second operand that is Rt (`b`)
// or, for CLAMP, the constant +MAXPOWER or -MAXPOWER chosen by the sign of
// Rs. The magnitudes are compared with a flagged prefix compound adder
// (X = |Rs|, Y = ~|second|: the carry out of X+Y+1 means |Rs| >= |second|,
// an all-ones X+Y means equal); the signs then give the EQ, GT and LT flags
// of a signed comparison in which +0 and -0 are equal and a zero exponent
// reads as zero. The flags, the sign of Rs and Rs itself are registered.
// Stage 2 (EX2): CLAMP_True is set when a positive Rs is greater than
// +MAXPOWER or a negative Rs is less than -MAXPOWER; the CLAMP result is then
// the constant of Rs's sign, otherwise Rs.
// The structure (operand mux in front of the comparator, flags through the
// pipeline register, constant select after it) follows the unit's CLAMP
// diagram. MAXPOWER's value is not given there; 128.0, the specular power
// limit of the shader LIT operation, is this design's default.
module fpa_cmp_clamp #(
  parameter logic [31:0] MAXPOWER = 32'h4300_0000   // 128.0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clamp,     // CLAMP_L1
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        lt_s1,     // LT flag of the comparison in stage 1
  output logic        eq,        // stage-2 flags
  output logic        gt,
  output logic        lt,
  output logic        clamp_true,
  output logic [31:0] clamp_res
);
  // ------------------------------------------------------------------ stage 1
  logic [31:0] maxp_sel, cb;
  assign maxp_sel = a[31] ? {1'b1, MAXPOWER[30:0]} : {1'b0, MAXPOWER[30:0]};
  assign cb       = clamp ? maxp_sel : b;

  logic        za, zb;
  logic [30:0] mag_a, mag_b;
  assign za    = ~|a[30:23];
  assign zb    = ~|cb[30:23];
  assign mag_a = za ? 31'd0 : a[30:0];
  assign mag_b = zb ? 31'd0 : cb[30:0];

  logic [30:0] s0, s1, s_unused;
  logic cout0, cout1, s0m, s1m, bl, bl1;
  fpa_compound_adder #(.N(31)) u_cmp (
    .x(mag_a), .y(~mag_b), .inc(1'b0),
    .s0(s0), .s1(s1), .s(s_unused),
    .cout0(cout0), .cout1(cout1),
    .s0_msb(s0m), .s1_msb(s1m), .bit_lsb(bl), .bit_lsb1(bl1)
  );

  logic mag_eq, mag_ge, sa, sb, eq_d, gt_d;
  assign mag_eq = &s0;
  assign mag_ge = cout1;
  assign sa     = a[31] & ~za;
  assign sb     = cb[31] & ~zb;
  assign eq_d   = mag_eq & (sa == sb);
  always_comb begin
    if (sa != sb) gt_d = ~sa;
    else if (!sa) gt_d = mag_ge & ~mag_eq;
    else          gt_d = ~mag_ge;
  end
  assign lt_s1 = ~eq_d & ~gt_d;

  // ------------------------------------------------------- pipeline register
  logic [31:0] a_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eq  <= 1'b0;
      gt  <= 1'b0;
      lt  <= 1'b0;
      a_d <= '0;
    end else begin
      eq  <= eq_d;
      gt  <= gt_d;
      lt  <= lt_s1;
      a_d <= a;
    end
  end

  // ------------------------------------------------------------------ stage 2
  assign clamp_true = a_d[31] ? lt : gt;
  assign clamp_res  = clamp_true ? {a_d[31], MAXPOWER[30:0]} : a_d;

endmodule
