// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Works on exact integers: an operand is (-1)^s * m * 2^e with a wide
// integer m, sums and products are formed exactly and then rounded once to
// 24 or 53 significant bits with the requested mode. The result rules are
// those of the design: no subnormal results (a nonzero value below the
// smallest normal becomes the smallest normal when rounding away from zero,
// else zero; subnormal inputs read as zero), overflow to infinity for
// round-to-nearest and rounding away from zero, else to the largest finite
// number. ref_add takes finite operands only; ref_mul also handles
// infinities and NaN.
package fp_ref_pkg;

  typedef logic [511:0] big_t;

  // rm encoding as in the design: 0 nearest-even, 1 toward zero, 2 up, 3 down.
  function automatic logic [63:0] ref_round(input logic sign, input big_t mag,
                                            input int e0, input int rm, input bit dbl);
    int   p, P, sh, E, bias, emax, biased;
    big_t kept, rem, half;
    logic inc;
    logic [63:0] r;
    P    = dbl ? 53 : 24;
    bias = dbl ? 1023 : 127;
    emax = dbl ? 2047 : 255;
    p = -1;
    for (int i = 0; i < 512; i++) if (mag[i]) p = i;
    E = p + e0;
    if (p >= P) begin
      sh   = p - (P - 1);
      kept = mag >> sh;
      rem  = mag - (kept << sh);
      half = big_t'(1) << (sh - 1);
      case (rm)
        0: inc = (rem > half) || (rem == half && kept[0]);
        1: inc = 0;
        2: inc = !sign && rem != 0;
        default: inc = sign && rem != 0;
      endcase
      kept = kept + big_t'(inc);
      if (kept[P]) begin kept = kept >> 1; E = E + 1; end
    end else begin
      kept = mag << (P - 1 - p);
    end
    biased = E + bias;
    if (biased >= emax) begin
      if (rm == 0 || (rm == 2 && !sign) || (rm == 3 && sign))
        r = dbl ? {sign, 11'h7FF, 52'd0} : {32'd0, sign, 8'hFF, 23'd0};
      else
        r = dbl ? {sign, 11'h7FE, {52{1'b1}}} : {32'd0, sign, 8'hFE, {23{1'b1}}};
    end else if (biased < 1) begin
      if ((rm == 2 && !sign) || (rm == 3 && sign))
        r = dbl ? {sign, 11'd1, 52'd0} : {32'd0, sign, 8'd1, 23'd0};
      else
        r = dbl ? {sign, 63'd0} : {32'd0, sign, 31'd0};
    end else begin
      r = dbl ? {sign, biased[10:0], kept[51:0]} : {32'd0, sign, biased[7:0], kept[22:0]};
    end
    return r;
  endfunction

  // Split a finite word into sign, integer significand and exponent.
  function automatic void unpack(input logic [63:0] x, input bit dbl,
                                 output logic s, output big_t m, output int e);
    int ex;
    if (dbl) begin
      s = x[63]; ex = int'(x[62:52]);
      m = (ex == 0) ? '0 : big_t'({1'b1, x[51:0]});
      e = ex - 1023 - 52;
    end else begin
      s = x[31]; ex = int'(x[30:23]);
      m = (ex == 0) ? '0 : big_t'({1'b1, x[22:0]});
      e = ex - 127 - 23;
    end
  endfunction

  function automatic logic [63:0] ref_add(input logic [63:0] x, input logic [63:0] y,
                                          input bit sub, input int rm, input bit dbl);
    logic sx, sy, sr;
    big_t mx, my, ms, ml, r;
    int   ex, ey, el, es, lim;
    logic ssm, slg;
    unpack(x, dbl, sx, mx, ex);
    unpack(y, dbl, sy, my, ey);
    sy = sy ^ sub;
    if (mx == 0 && my == 0) begin
      sr = (sx == sy) ? sx : (rm == 3);
      return dbl ? {sr, 63'd0} : {32'd0, sr, 31'd0};
    end
    if (mx == 0) return ref_round(sy, my, ey, rm, dbl);
    if (my == 0) return ref_round(sx, mx, ex, rm, dbl);
    // Order by exponent; a far smaller operand is replaced by a tiny value of
    // the same sign, which rounds identically.
    if (ex >= ey) begin ml = mx; el = ex; slg = sx; ms = my; es = ey; ssm = sy; end
    else          begin ml = my; el = ey; slg = sy; ms = mx; es = ex; ssm = sx; end
    lim = dbl ? 130 : 70;
    if (el - es > lim) begin
      ms = 1;
      es = el - lim;
    end
    ml = ml << (el - es);
    if (slg == ssm) begin
      r = ml + ms; sr = slg;
    end else if (ml >= ms) begin
      r = ml - ms; sr = slg;
    end else begin
      r = ms - ml; sr = ssm;
    end
    if (r == 0) begin
      sr = (rm == 3);
      return dbl ? {sr, 63'd0} : {32'd0, sr, 31'd0};
    end
    return ref_round(sr, r, es, rm, dbl);
  endfunction

  function automatic logic [63:0] ref_mul(input logic [63:0] x, input logic [63:0] y,
                                          input int rm, input bit dbl);
    logic sx, sy;
    big_t mx, my;
    int   ex, ey;
    logic xi, yi, xn, yn;
    unpack(x, dbl, sx, mx, ex);
    unpack(y, dbl, sy, my, ey);
    // Special values (IEEE-754): NaN in or 0 * inf gives NaN, else inf.
    xi = dbl ? (&x[62:52]) : (&x[30:23]);
    yi = dbl ? (&y[62:52]) : (&y[30:23]);
    xn = xi && (dbl ? (|x[51:0]) : (|x[22:0]));
    yn = yi && (dbl ? (|y[51:0]) : (|y[22:0]));
    if (xn || yn || (xi && my == 0) || (yi && mx == 0))
      return dbl ? 64'h7FF8_0000_0000_0000 : 64'h7FC0_0000;
    if (xi || yi)
      return dbl ? {sx ^ sy, 11'h7FF, 52'd0} : {32'd0, sx ^ sy, 8'hFF, 23'd0};
    if (mx == 0 || my == 0) return dbl ? {sx ^ sy, 63'd0} : {32'd0, sx ^ sy, 31'd0};
    return ref_round(sx ^ sy, mx * my, ex + ey, rm, dbl);
  endfunction

  // Total order key of a finite or infinite single (both zeros map to 0).
  function automatic longint sp_key(input logic [31:0] x);
    longint m;
    m = longint'(x[30:0]);
    return x[31] ? -m : m;
  endfunction

  // Random finite operands. Exponents are drawn around a centre so that
  // additions see every alignment, with some full-range and zero operands.
  function automatic logic [31:0] rand_sp(input int centre);
    int e, k;
    logic [22:0] f;
    k = int'($urandom_range(0, 99));
    if (k < 4) return {$urandom_range(0, 1) == 1, 31'd0};
    if (k < 14)      e = int'($urandom_range(1, 254));
    else if (k < 30) e = centre;
    else             e = centre + int'($urandom_range(0, 60)) - 30;
    if (e < 1) e = 1;
    if (e > 254) e = 254;
    f = 23'($urandom);
    k = int'($urandom_range(0, 9));
    if (k == 0) f = '1;
    if (k == 1) f = '0;
    return {$urandom_range(0, 1) == 1, 8'(e), f};
  endfunction

  function automatic logic [63:0] rand_dp(input int centre);
    int e, k;
    logic [51:0] f;
    k = int'($urandom_range(0, 99));
    if (k < 4) return {$urandom_range(0, 1) == 1, 63'd0};
    if (k < 14)      e = int'($urandom_range(1, 2046));
    else if (k < 30) e = centre;
    else             e = centre + int'($urandom_range(0, 140)) - 70;
    if (e < 1) e = 1;
    if (e > 2046) e = 2046;
    f = {20'($urandom), 32'($urandom)};
    k = int'($urandom_range(0, 9));
    if (k == 0) f = '1;
    if (k == 1) f = '0;
    return {$urandom_range(0, 1) == 1, 11'(e), f};
  endfunction

endpackage
