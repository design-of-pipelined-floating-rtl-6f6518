// fpau_ref_pkg: reference models used by the arithmetic-unit testbenches.
//
// Straightforward wide-integer models of the unit's arithmetic, written
// without any of the hardware's tricks (no dual path, no compound adder):
// an add aligns both significands in a 128-bit frame, adds or subtracts
// exactly, then rounds to nearest even once. The number conventions match
// the unit: a zero exponent reads as zero, an exponent of 255 as an ordinary
// number, results beyond the largest finite value saturate to +/-max,
// results below the smallest normal flush to a signed zero, an exact zero
// difference is +0, integers are 24-bit two's complement sign-extended to
// 32 bits, and conversions saturate to +2^23-1 / -2^23.
package fpau_ref_pkg;

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] lg, sm;
    logic [127:0] L, S, R;
    int d, p, sh, e;
    logic [127:0] mant, rem, half;
    if (a[30:23] == 0 && b[30:23] == 0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 0) return b;
    if (b[30:23] == 0) return a;
    if (a[30:0] >= b[30:0]) begin lg = a; sm = b; end
    else begin lg = b; sm = a; end
    d = int'(lg[30:23]) - int'(sm[30:23]);
    L = {104'd1, lg[22:0]} << 64;
    if (d > 64) S = 128'd1;                       // lost entirely: sticky only
    else        S = ({104'd1, sm[22:0]} << 64) >> d;
    R = (a[31] ^ b[31]) ? L - S : L + S;
    if (R == 0) return 32'd0;
    p = 0;
    for (int i = 0; i < 128; i++) if (R[i]) p = i;
    e  = int'(lg[30:23]) + (p - 87);
    sh = p - 23;
    mant = R >> sh;
    rem  = R & ((128'd1 << sh) - 1);
    half = 128'd1 << (sh - 1);
    if (rem > half || (rem == half && mant[0])) mant = mant + 1;
    if (mant[24]) begin mant = mant >> 1; e = e + 1; end
    if (e >= 255) return {lg[31], 31'h7F7F_FFFF};
    if (e <= 0)   return {lg[31], 31'd0};
    return {lg[31], 8'(e), mant[22:0]};
  endfunction

  // Float to 24-bit integer. floor_mode: round toward minus infinity,
  // otherwise round to nearest even.
  function automatic logic [31:0] ref_ftoi(input logic [31:0] a, input bit floor_mode);
    longint m, q, rem, half, v;
    int s;
    if (a[30:23] == 0) return 32'd0;
    m = longint'({1'b1, a[22:0]});
    s = 150 - int'(a[30:23]);
    if (s < 0) begin
      v = a[31] ? -(longint'(1) << 40) : (longint'(1) << 40);
    end else begin
      if (s >= 40) begin q = 0; rem = m; half = longint'(1) << 39; end
      else begin
        q = m >> s;
        rem = m & ((longint'(1) << s) - 1);
        half = (s == 0) ? 0 : (longint'(1) << (s - 1));
      end
      if (floor_mode) begin
        v = a[31] ? -(q + ((rem != 0) ? 1 : 0)) : q;
      end else begin
        if (s > 0 && (rem > half || (rem == half && q[0]))) q = q + 1;
        v = a[31] ? -q : q;
      end
    end
    if (v > 8388607)  return 32'h007F_FFFF;
    if (v < -8388608) return 32'hFF80_0000;
    return 32'(v);
  endfunction

  function automatic logic [31:0] ref_itof(input logic [31:0] x);
    int v, mag, p;
    v = int'({{8{x[23]}}, x[23:0]});
    if (v == 0) return 32'd0;
    mag = (v < 0) ? -v : v;
    p = 0;
    for (int i = 0; i < 25; i++) if (mag[i]) p = i;
    return {x[23], 8'(127 + p), 23'((mag << (23 - p)) & 32'h7F_FFFF)};
  endfunction

  // Signed comparison: -1, 0, +1. +0 and -0 are equal.
  function automatic int ref_cmp(input logic [31:0] a, input logic [31:0] b);
    longint ka, kb;
    ka = (a[30:23] == 0) ? 0 : (a[31] ? -longint'(a[30:0]) : longint'(a[30:0]));
    kb = (b[30:23] == 0) ? 0 : (b[31] ? -longint'(b[30:0]) : longint'(b[30:0]));
    if (ka < kb) return -1;
    if (ka > kb) return 1;
    return 0;
  endfunction

  // Random float with exponent chosen around `ebase` (+/- spread), clipped.
  function automatic logic [31:0] rand_fp_near(input int ebase, input int spread);
    int e;
    e = ebase + int'($urandom_range(2 * spread, 0)) - spread;
    if (e < 1) e = 1;
    if (e > 254) e = 254;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // True when the dual-path classification sends a +/- b to the near path.
  function automatic bit is_near(input logic [31:0] a, input logic [31:0] b);
    int d;
    logic msb;
    if ((a[31] ^ b[31]) == 1'b0) return 0;
    d = int'(a[30:23]) - int'(b[30:23]);
    msb = (d >= 0) ? a[22] : b[22];
    if (d < 0) d = -d;
    return (d == 0) || (d == 1 && !msb);
  endfunction

endpackage
