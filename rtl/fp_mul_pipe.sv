// fp_mul_pipe: double-precision multiplier pipeline extended for
// single-precision interval multiplication by the four-product method.
//
// A 64-bit operand word is one double or two singles (upper lane 63:32,
// lower lane 31:0). Modes:
//   MODE_DOUBLE    a * b, rounding mode rm, latency 6;
//   MODE_PAIR      two independent single products (upper*upper and
//                  lower*lower), both with rm, latency 6;
//   MODE_INTERVAL  [a,b] * [c,d] = [min(ac,ad,bc,bd) rounded down,
//                  max(ac,ad,bc,bd) rounded up], latency 7.
// Double-precision stages, as in the document:
//   1 split the significands (27 + 26 bits) and form four partial products
//     in carry-save form (four csa_mul units);
//   2 add the partial products in a carry-save tree;
//   3 final carry-lookahead addition (a 128-bit split_cla);
//   4 normalize and add exponents;   5 round and adjust exponent;
//   6 normalize again and pack.
// Interval stages, as in the document: 1 the four products of the bounds on
// the same four units; 2 the carry-save tree is bypassed; 3 the final adder
// is split into two halves and two more adders resolve the other two
// products; 4 normalize the four exact products and add exponents;
// 5 minimum and maximum (minmax4); 6 round the two bounds; 7 normalize again.
// Issue rule (this design's choice): because interval operations take one
// stage more, a double or pair operation is refused (in_ready low) in the
// cycle right after an interval operation was accepted; otherwise both would
// reach the rounding stage together. Other choices of this design: zero and
// subnormal inputs read as zero, no subnormal results (fpu_pkg::pack_fp),
// IEEE special values (0*inf = NaN), no exception flags.
//
// Timing: an operation accepted (in_valid & in_ready) in cycle t appears with
// out_valid in cycle t+6, or t+7 in interval mode. Synchronous active-low
// reset clears the valid bits.
module fp_mul_pipe
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  fpu_mode_e   mode,
  input  rnd_mode_e   rm,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        out_valid,
  output logic [63:0] res
);
  typedef struct packed {
    logic      v;
    fpu_mode_e mode;
    rnd_mode_e rm;
  } ctl_t;

  // Per-product side information, formed in stage 1.
  typedef struct packed {
    logic               nan;
    logic               inf;
    logic               zero;
    logic               sign;
    logic signed [13:0] esum;   // ea + eb - bias
  } meta_t;

  // A rounded result between stages 6 and 7.
  typedef struct packed {
    logic               nan;
    logic               inf;
    logic               zero;
    logic               sign;
    logic signed [13:0] exp;
    logic [53:0]        sig;    // 53 (double) or 24 (single) bits, plus carry
    rnd_mode_e          rm;
  } rres_t;

  ctl_t c1, c2, c3, c4, c5, c6;
  logic iv_last;

  assign in_ready = !(iv_last && mode != MODE_INTERVAL);

  // ---------------------------------------------------------------- stage 1
  logic        acc;
  logic        dbl0;
  logic [1:0]  sa, sb, za, zb, ia, ib, na, nb;
  logic [9:0]  eah, eal, ebh, ebl;   // lane exponents (hi also holds the double's)
  logic [10:0] ead, ebd;
  logic [52:0] mad, mbd;
  logic [26:0] xa [4], xb [4];
  logic [53:0] ps [4], pc [4];
  meta_t       mt0 [4];

  assign acc  = in_valid & in_ready;
  assign dbl0 = (mode == MODE_DOUBLE);

  always_comb begin
    // Unpack both formats; subnormals read as zero.
    ead = a[62:52];
    ebd = b[62:52];
    mad = {|ead, a[51:0] & {52{|ead}}};
    mbd = {|ebd, b[51:0] & {52{|ebd}}};
    eah = {2'b00, a[62:55]};
    eal = {2'b00, a[30:23]};
    ebh = {2'b00, b[62:55]};
    ebl = {2'b00, b[30:23]};
    if (dbl0) begin
      sa = {a[63], 1'b0};             sb = {b[63], 1'b0};
      za = {~|ead, 1'b0};             zb = {~|ebd, 1'b0};
      ia = {(&ead) & ~|a[51:0], 1'b0};  ib = {(&ebd) & ~|b[51:0], 1'b0};
      na = {(&ead) &  |a[51:0], 1'b0};  nb = {(&ebd) &  |b[51:0], 1'b0};
      // Partial products: Al*Bl, Al*Bh, Ah*Bl, Ah*Bh.
      xa[0] = mad[26:0];         xb[0] = mbd[26:0];
      xa[1] = mad[26:0];         xb[1] = {1'b0, mbd[52:27]};
      xa[2] = {1'b0, mad[52:27]}; xb[2] = mbd[26:0];
      xa[3] = {1'b0, mad[52:27]}; xb[3] = {1'b0, mbd[52:27]};
    end else begin
      sa = {a[63], a[31]};            sb = {b[63], b[31]};
      za = {~|a[62:55], ~|a[30:23]};  zb = {~|b[62:55], ~|b[30:23]};
      ia = {(&a[62:55]) & ~|a[54:32], (&a[30:23]) & ~|a[22:0]};
      ib = {(&b[62:55]) & ~|b[54:32], (&b[30:23]) & ~|b[22:0]};
      na = {(&a[62:55]) &  |a[54:32], (&a[30:23]) &  |a[22:0]};
      nb = {(&b[62:55]) &  |b[54:32], (&b[30:23]) &  |b[22:0]};
      // Products of the bounds: a*c, a*d, b*c, b*d with A = [a,b], B = [c,d].
      xa[0] = {3'b000, ~za[1], a[54:32] & {23{~za[1]}}};
      xa[1] = xa[0];
      xa[2] = {3'b000, ~za[0], a[22:0]  & {23{~za[0]}}};
      xa[3] = xa[2];
      xb[0] = {3'b000, ~zb[1], b[54:32] & {23{~zb[1]}}};
      xb[2] = xb[0];
      xb[1] = {3'b000, ~zb[0], b[22:0]  & {23{~zb[0]}}};
      xb[3] = xb[1];
    end
    // Side information of the four products (only product 0 in double mode).
    for (int k = 0; k < 4; k++) begin
      int ka, kb;
      ka = (k < 2) ? 1 : 0;
      kb = (k == 0 || k == 2) ? 1 : 0;
      mt0[k].sign = sa[ka] ^ sb[kb];
      mt0[k].nan  = na[ka] | nb[kb] | (ia[ka] & zb[kb]) | (za[ka] & ib[kb]);
      mt0[k].inf  = ia[ka] | ib[kb];
      mt0[k].zero = za[ka] | zb[kb];
      if (dbl0) mt0[k].esum = 14'($signed({3'b000, ead})) + 14'($signed({3'b000, ebd})) - 14'sd1023;
      else      mt0[k].esum = 14'($signed({4'b0000, (ka != 0) ? eah : eal})) +
                              14'($signed({4'b0000, (kb != 0) ? ebh : ebl})) - 14'sd127;
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_mul
    csa_mul #(.W(27)) u_mul (.a(xa[k]), .b(xb[k]), .sum(ps[k]), .carry(pc[k]));
  end

  logic [53:0] ps1 [4], pc1 [4];
  meta_t       mt1 [4], mt2 [4], mt3 [4];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c1.v    <= 1'b0;
      iv_last <= 1'b0;
    end else begin
      c1      <= '{v: acc, mode: mode, rm: rm};
      iv_last <= acc && mode == MODE_INTERVAL;
    end
    ps1 <= ps;
    pc1 <= pc;
    mt1 <= mt0;
  end

  // ---------------------------------------------------------------- stage 2
  // Carry-save tree over the eight vectors of the double product; bypassed
  // (the four carry-save pairs are kept apart) for single products.
  function automatic logic [255:0] csa3(input logic [127:0] x, input logic [127:0] y,
                                        input logic [127:0] z);
    return {((x & y) | (x & z) | (y & z)) << 1, x ^ y ^ z};
  endfunction

  logic [127:0] v [8];
  logic [127:0] t_s, t_c;

  always_comb begin
    logic [255:0] r1, r2, r3, r4, r5, r6;
    v[0] = 128'(ps1[0]);        v[1] = 128'(pc1[0]);
    v[2] = 128'(ps1[1]) << 27;  v[3] = 128'(pc1[1]) << 27;
    v[4] = 128'(ps1[2]) << 27;  v[5] = 128'(pc1[2]) << 27;
    v[6] = 128'(ps1[3]) << 54;  v[7] = 128'(pc1[3]) << 54;
    r1 = csa3(v[0], v[1], v[2]);
    r2 = csa3(v[3], v[4], v[5]);
    r3 = csa3(r1[127:0], r1[255:128], r2[127:0]);
    r4 = csa3(r2[255:128], v[6], v[7]);
    r5 = csa3(r3[127:0], r3[255:128], r4[127:0]);
    r6 = csa3(r5[127:0], r5[255:128], r4[255:128]);   // last stage
    t_s = r6[127:0];
    t_c = r6[255:128];
  end

  logic [127:0] fx2, fy2;
  logic [63:0]  ex2 [2], ey2 [2];

  always_ff @(posedge clk) begin
    if (!rst_n) c2.v <= 1'b0;
    else        c2 <= c1;
    if (c1.mode == MODE_DOUBLE) begin
      fx2 <= t_s;
      fy2 <= t_c;
    end else begin
      fx2 <= {64'(ps1[1]), 64'(ps1[0])};
      fy2 <= {64'(pc1[1]), 64'(pc1[0])};
    end
    ex2[0] <= 64'(ps1[2]);  ey2[0] <= 64'(pc1[2]);
    ex2[1] <= 64'(ps1[3]);  ey2[1] <= 64'(pc1[3]);
    mt2 <= mt1;
  end

  // ---------------------------------------------------------------- stage 3
  logic [127:0] fsum;
  logic [63:0]  esum3 [2];
  logic         fco_lo, fco_hi;
  logic [1:0]   eco_lo, eco_hi;

  split_cla #(.H(64)) u_fadd (.split(c2.mode != MODE_DOUBLE), .x(fx2), .y(fy2),
                              .cin_lo(1'b0), .cin_hi(1'b0), .sum(fsum),
                              .cout_lo(fco_lo), .cout_hi(fco_hi));
  for (genvar k = 0; k < 2; k++) begin : g_xadd
    split_cla #(.H(32)) u_xadd (.split(1'b0), .x(ex2[k]), .y(ey2[k]), .cin_lo(1'b0),
                                .cin_hi(1'b0), .sum(esum3[k]), .cout_lo(eco_lo[k]),
                                .cout_hi(eco_hi[k]));
  end

  logic [127:0] f3;
  logic [47:0]  e3 [2];

  always_ff @(posedge clk) begin
    if (!rst_n) c3.v <= 1'b0;
    else        c3 <= c2;
    f3    <= fsum;
    e3[0] <= esum3[0][47:0];
    e3[1] <= esum3[1][47:0];
    mt3   <= mt2;
  end

  // ---------------------------------------------------------------- stage 4
  prod_t pr3 [4];
  prod_t pr4 [4];

  always_comb begin
    logic [47:0] q [4];
    q[0] = f3[47:0];
    q[1] = f3[111:64];
    q[2] = e3[0];
    q[3] = e3[1];
    for (int k = 0; k < 4; k++) begin
      pr3[k].nan  = mt3[k].nan;
      pr3[k].inf  = mt3[k].inf & ~mt3[k].nan;
      pr3[k].zero = mt3[k].zero & ~mt3[k].nan & ~mt3[k].inf;
      pr3[k].sign = mt3[k].sign;
      if (c3.mode == MODE_DOUBLE && k == 0) begin
        pr3[k].exp = mt3[k].esum + 14'(f3[105]);
        pr3[k].sig = f3[105] ? f3[105:0] : {f3[104:0], 1'b0};
      end else begin
        pr3[k].exp = mt3[k].esum + 14'(q[k][47]);
        pr3[k].sig = {(q[k][47] ? q[k] : {q[k][46:0], 1'b0}), 58'd0};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) c4.v <= 1'b0;
    else        c4 <= c3;
    pr4 <= pr3;
  end

  // ---------------------------------------------------------------- stage 5
  // Interval operations only: minimum and maximum of the exact products.
  prod_t pmin4, pmax4, pmin5, pmax5;
  logic  v5;

  minmax4 u_mm (.p(pr4), .pmin(pmin4), .pmax(pmax4));

  always_ff @(posedge clk) begin
    if (!rst_n) v5 <= 1'b0;
    else        v5 <= c4.v && c4.mode == MODE_INTERVAL;
    c5    <= c4;
    pmin5 <= pmin4;
    pmax5 <= pmax4;
  end

  // ---------------------------------------------------------------- stage 6
  // Two rounding units. Unit X: the double, the upper single or the lower
  // bound; unit Y: the lower single or the upper bound.
  function automatic rres_t round_prod(input prod_t p, input logic dbl, input rnd_mode_e r);
    rres_t o;
    logic  lsb, rb, st, inc;
    o.nan  = p.nan;
    o.inf  = p.inf;
    o.zero = p.zero;
    o.sign = p.sign;
    o.exp  = p.exp;
    o.rm   = r;
    if (dbl) begin
      lsb = p.sig[53]; rb = p.sig[52]; st = |p.sig[51:0];
      inc = round_inc(lsb, rb, st, p.sign, r);
      o.sig = {1'b0, p.sig[105:53]} + 54'(inc);
    end else begin
      lsb = p.sig[82]; rb = p.sig[81]; st = |p.sig[80:0];
      inc = round_inc(lsb, rb, st, p.sign, r);
      o.sig = 54'({1'b0, p.sig[105:82]}) + 54'(inc);
    end
    return o;
  endfunction

  prod_t     px, py;
  rnd_mode_e rx, ry;
  ctl_t      c6n;
  rres_t     rx6, ry6;

  always_comb begin
    if (v5) begin
      px = pmin5;  rx = RM_RD;
      py = pmax5;  ry = RM_RU;
      c6n = c5;
      c6n.v = 1'b1;
    end else begin
      px = pr4[0]; rx = c4.rm;
      py = pr4[3]; ry = c4.rm;
      c6n = c4;
      c6n.v = c4.v && c4.mode != MODE_INTERVAL;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) c6.v <= 1'b0;
    else        c6 <= c6n;
    rx6 <= round_prod(px, c6n.mode == MODE_DOUBLE, rx);
    ry6 <= round_prod(py, 1'b0, ry);
  end

  // Two operations must never meet at the rounding stage.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(v5 && c4.v && c4.mode != MODE_INTERVAL));

  // ---------------------------------------------------------------- stage 7
  function automatic logic [63:0] finish(input rres_t q, input logic dbl);
    logic [63:0] r;
    logic [51:0] fr;
    int          e;
    logic        ovf;
    ovf = dbl ? q.sig[53] : q.sig[24];
    e   = int'(q.exp) + int'(ovf);
    if (dbl) fr = ovf ? q.sig[52:1] : q.sig[51:0];
    else     fr = {29'd0, ovf ? q.sig[23:1] : q.sig[22:0]};
    if (q.nan)       r = dbl ? DP_QNAN : {32'd0, SP_QNAN};
    else if (q.inf)  r = dbl ? {q.sign, 11'h7FF, 52'd0} : {32'd0, q.sign, 8'hFF, 23'd0};
    else if (q.zero) r = dbl ? {q.sign, 63'd0} : {32'd0, q.sign, 31'd0};
    else             r = pack_fp(q.sign, e, fr, q.rm, dbl);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    logic [63:0] hx, hy;
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c6.v;
    hx = finish(rx6, c6.mode == MODE_DOUBLE);
    hy = finish(ry6, 1'b0);
    res <= (c6.mode == MODE_DOUBLE) ? hx : {hx[31:0], hy[31:0]};
  end
endmodule
