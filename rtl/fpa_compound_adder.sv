// fpa_compound_adder: N-bit compound adder built as a flagged prefix adder.
//
// Computes both S0 = X+Y and S1 = X+Y+1 from one parallel-prefix carry tree.
// Each bit produces generate G_i = x_i & y_i and propagate P_i = x_i ^ y_i; a
// Sklansky prefix tree forms for every bit position i the group generate
// GG_i (carry out of bits i..0 with carry-in 0) and the group propagate GP_i
// (all bits i..0 propagate). The output cell of bit i then gives
//   S0_i = P_i ^ GG_{i-1}        S1_i = P_i ^ (GG_{i-1} | GP_{i-1})
// so "+1" costs only an OR per bit ("flagged" increment). The `inc` input
// picks one of the two sums onto `s`, as a plain flagged prefix adder does.
// The floating-point datapath also needs status flags, which come straight
// from the tree signals:
//   cout0 = GG_{N-1}               carry out of X+Y
//   cout1 = GG_{N-1} | GP_{N-1}    carry out of X+Y+1
//   s0_msb, s1_msb                 top sum bits (fraction underflow test)
//   bit_lsb = P_0, bit_lsb1 = P_1 ^ G_0   bits 0 and 1 of X+Y (RNE control)
// The tree topology (Sklansky) is this design's choice; the flag equations
// follow the flagged-prefix structure of the unit. Purely combinational.
module fpa_compound_adder #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         inc,
  output logic [N-1:0] s0,       // X + Y
  output logic [N-1:0] s1,       // X + Y + 1
  output logic [N-1:0] s,        // inc ? S1 : S0
  output logic         cout0,
  output logic         cout1,
  output logic         s0_msb,
  output logic         s1_msb,
  output logic         bit_lsb,
  output logic         bit_lsb1
);
  localparam int unsigned LEVELS = (N <= 1) ? 1 : $clog2(N);

  logic [N-1:0] g, p;
  logic [N-1:0] gg [LEVELS+1];
  logic [N-1:0] gp [LEVELS+1];

  assign g = x & y;
  assign p = x ^ y;

  // Sklansky prefix tree: at level l, every bit whose index has bit l set
  // combines with the last bit of the preceding 2^l block.
  always_comb begin
    gg[0] = g;
    gp[0] = p;
    for (int l = 0; l < int'(LEVELS); l++) begin
      for (int i = 0; i < int'(N); i++) begin
        if (((i >> l) & 1) == 1) begin
          gg[l+1][i] = gg[l][i] | (gp[l][i] & gg[l][((i >> l) << l) - 1]);
          gp[l+1][i] = gp[l][i] & gp[l][((i >> l) << l) - 1];
        end else begin
          gg[l+1][i] = gg[l][i];
          gp[l+1][i] = gp[l][i];
        end
      end
    end
  end

  logic [N-1:0] ggf, gpf;
  assign ggf = gg[LEVELS];
  assign gpf = gp[LEVELS];

  // Output cells.
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      if (i == 0) begin
        s0[i] = p[i];
        s1[i] = ~p[i];
      end else begin
        s0[i] = p[i] ^ ggf[i-1];
        s1[i] = p[i] ^ (ggf[i-1] | gpf[i-1]);
      end
    end
  end

  assign s        = inc ? s1 : s0;
  assign cout0    = ggf[N-1];
  assign cout1    = ggf[N-1] | gpf[N-1];
  assign s0_msb   = s0[N-1];
  assign s1_msb   = s1[N-1];
  assign bit_lsb  = p[0];
  assign bit_lsb1 = p[1] ^ g[0];

endmodule
