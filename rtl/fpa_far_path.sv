// fpa_far_path: far path of the dual-path adder, also used for FTOI and FLOOR.
//
// Handles every effective addition, and effective subtractions whose exponent
// difference d is above 1, or exactly 1 when the larger operand's significand
// is 1.5 or more. In those cases the result needs at most a 1-bit
// normalization, so addition, rounding and normalization collapse into one
// step: a compound adder yields X+Y and X+Y+1 and a small selector picks the
// correctly rounded, normalized significand from them.
//
// Stage 1 (EX1): exponent difference and swap, right-shift alignment of the
//   smaller significand to 24 bits plus guard g and round r, sticky bit from
//   the trailing-zero sticky generator, and for a subtraction the bit
//   inversion Y = ~B together with the two's complement of (g,r,s); the
//   carry C_I = (g,r,s)==0 then marks that the true difference is X+Y+1.
// Stage 2 (EX2): compound adder, round logic (round to nearest even) driven
//   by the adder flags cout0/cout1, s0_msb/s1_msb, bit[0], bit[1] and
//   g,r,s, the g_in bit (result LSB after a 1-bit left shift), and the
//   result selector/formatter. Results above the largest finite number
//   saturate to +/-max; results below the smallest normal flush to +/-0.
//
// Conversion modes (operand on `a`): the larger operand is the constant
//   exponent bias+23 with X = 0, so d = (bias+23) - exp(a) is the right shift
//   that leaves the integer part in the 24-bit window. A positive input gives
//   0 + B, a negative one 0 - B, in two's complement. FTOI rounds to nearest
//   even; FLOOR takes the truncated two's-complement sum, which is the floor
//   of the value. Results outside the 24-bit integer range saturate to
//   +2^23-1 / -2^23; the 24-bit result is sign-extended to 32 bits.
//
// Operands are IEEE single precision with the sign of Rt already flipped for
// SUB. A zero exponent is read as zero (no denormals); an exponent of 255 is
// read as an ordinary (very large) number. The output `res` is valid in the
// cycle after the inputs were sampled. The split of the work over the two
// stages follows the unit's far-path diagram; the saturation and
// special-value rules are this design's reading of "saturated arithmetic".
module fpa_far_path
  import fpau_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  far_mode_e   mode,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] res
);
  // ------------------------------------------------------------------ stage 1
  logic       conv;
  logic [7:0] ea_x, eb_x, d;
  logic       swap, dswap;
  assign conv = (mode != FAR_ADD);
  assign ea_x = conv ? INT_EXP : a[30:23];
  assign eb_x = conv ? a[30:23] : b[30:23];

  fpa_exp_diff u_ediff (.ea(ea_x), .eb(eb_x), .d(d), .swap(dswap));
  assign swap = conv ? 1'b0 : dswap;

  logic [31:0] lg, sm;
  assign lg = swap ? b : a;
  assign sm = conv ? a : (swap ? a : b);

  logic [23:0] m_lg, m_sm;
  assign m_lg = conv ? 24'd0 : {|lg[30:23], lg[22:0]};
  assign m_sm = {|sm[30:23], sm[22:0]};

  // Right shifter: 24-bit significand plus guard and round.
  logic [25:0] aligned;
  assign aligned = {m_sm, 2'b00} >> d;

  logic sticky_raw, sticky;
  logic [4:0] tz_len;
  fpa_sticky_gen u_sticky (.opr(m_sm), .d(d), .len(tz_len), .sticky(sticky_raw));
  assign sticky = sticky_raw & m_sm[23];

  logic       e_sub;
  logic [2:0] grs, grs_x;
  logic       c_i;
  logic [23:0] y_x;
  assign e_sub = conv ? a[31] : (a[31] ^ b[31]);
  assign grs   = {aligned[1:0], sticky};
  assign grs_x = e_sub ? (~grs + 3'd1) : grs;
  assign c_i   = e_sub & (grs == 3'b000);
  assign y_x   = e_sub ? ~aligned[25:2] : aligned[25:2];

  // Saturation conditions of the conversions, known after stage 1.
  logic ovf_shift, shift0_frac;
  assign ovf_shift   = conv & dswap;                         // exp(a) > bias+23
  assign shift0_frac = conv & (d == 8'd0) & (|a[22:0]);      // |a| in (2^23, 2^24)

  // ------------------------------------------------------- pipeline register
  typedef struct packed {
    far_mode_e   mode;
    logic [23:0] x;
    logic [23:0] y;
    logic [2:0]  grs;
    logic        c_i;
    logic        e_sub;
    logic        sign;
    logic [7:0]  e_lg;
    logic        ovf_shift;
    logic        shift0_frac;
  } far_s1_t;

  far_s1_t r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else begin
      r.mode        <= mode;
      r.x           <= m_lg;
      r.y           <= y_x;
      r.grs         <= grs_x;
      r.c_i         <= c_i;
      r.e_sub       <= e_sub;
      r.sign        <= conv ? a[31] : lg[31];
      r.e_lg        <= lg[30:23];
      r.ovf_shift   <= ovf_shift;
      r.shift0_frac <= shift0_frac;
    end
  end

  // ------------------------------------------------------------------ stage 2
  logic [23:0] s0, s1, s_unused;
  logic cout0, cout1, s0_msb, s1_msb, bit_lsb, bit_lsb1;

  fpa_compound_adder #(.N(24)) u_cadd (
    .x(r.x), .y(r.y), .inc(1'b0),
    .s0(s0), .s1(s1), .s(s_unused),
    .cout0(cout0), .cout1(cout1),
    .s0_msb(s0_msb), .s1_msb(s1_msb), .bit_lsb(bit_lsb), .bit_lsb1(bit_lsb1)
  );

  logic g, rr, st;
  assign {g, rr, st} = r.grs;

  // Round logic, result selector and g_in generator.
  logic [23:0] mant;       // significand with hidden bit at [23]
  logic signed [9:0] e_res;
  logic [23:0] t_int;
  logic        t_msb, rnd, g_in;
  always_comb begin
    t_int = r.c_i ? s1 : s0;
    t_msb = r.c_i ? s1_msb : s0_msb;
    rnd   = 1'b0;
    g_in  = 1'b0;
    mant  = s0;
    e_res = 10'(r.e_lg);
    if (!r.e_sub) begin
      if (cout0) begin
        // fraction overflow: 1-bit right normalization, round bit is bit[0]
        rnd = bit_lsb & (bit_lsb1 | g | rr | st);
        mant  = rnd ? {cout1, s1[23:1]} : {1'b1, s0[23:1]};
        e_res = 10'(r.e_lg) + 10'sd1;
      end else begin
        rnd = g & (rr | st | bit_lsb);
        if (rnd && cout1) begin
          // rounding carried out of the significand: 1.0 x 2^(e+1)
          mant  = 24'h80_0000;
          e_res = 10'(r.e_lg) + 10'sd1;
        end else begin
          mant = rnd ? s1 : s0;
        end
      end
    end else if (t_msb) begin
      // subtraction, no fraction underflow
      rnd  = ~r.c_i & g & (rr | st | bit_lsb);
      mant = (r.c_i | rnd) ? s1 : s0;
    end else begin
      // fraction underflow: 1-bit left normalization, g enters as new LSB
      rnd   = rr & (st | g);
      e_res = 10'(r.e_lg) - 10'sd1;
      if (g && rnd) begin
        g_in = 1'b0;
        if (s1_msb) begin
          mant  = 24'h80_0000;
          e_res = 10'(r.e_lg);
        end else begin
          mant = {s1[22:0], g_in};
        end
      end else begin
        g_in = g | rnd;
        mant = {t_int[22:0], g_in};
      end
    end
  end

  // Conversion result (24-bit two's complement).
  logic [23:0] ires;
  logic        irnd;
  assign irnd = ~r.c_i & g & (rr | st | t_int[0]);
  assign ires = (r.mode == FAR_FLOOR) ? t_int : ((r.c_i | irnd) ? s1 : s0);

  logic [31:0] int_out;
  always_comb begin
    if (!r.sign) begin
      int_out = (r.ovf_shift || ires[23]) ? INT_MAX : {8'd0, ires};
    end else begin
      int_out = (r.ovf_shift || r.shift0_frac) ? INT_MIN : {{8{ires[23]}}, ires};
    end
  end

  logic [31:0] flt_out;
  always_comb begin
    if (e_res >= 10'sd255)     flt_out = {r.sign, FP_MAXMAG};
    else if (e_res <= 10'sd0)  flt_out = {r.sign, 31'd0};
    else                       flt_out = {r.sign, e_res[7:0], mant[22:0]};
  end

  assign res = (r.mode == FAR_ADD) ? flt_out : int_out;

endmodule
