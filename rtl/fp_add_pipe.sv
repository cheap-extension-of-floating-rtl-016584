// fp_add_pipe: floating-point addition pipeline of latency 6 that doubles as
// a single-precision interval adder of the same latency.
//
// A 64-bit operand word is one double, or two singles (upper lane bits 63:32,
// lower lane bits 31:0). Three modes:
//   MODE_DOUBLE    a +/- b in double precision, rounding mode rm;
//   MODE_PAIR      two independent single additions/subtractions, both with rm;
//   MODE_INTERVAL  [a,b] + [c,d] = [a (down) c, b (up) d] and
//                  [a,b] - [c,d] = [a (down) d, b (up) c], lower bound in the
//                  upper lane rounded toward -inf, upper bound in the lower
//                  lane rounded toward +inf.
// The six stages are the document's (its Figure 1):
//   1 unpack, compare exponents, swap so that A has the larger exponent Er;
//   2 if the effective signs differ then B = -B; d = Ea - Eb;
//   3 arithmetic right shift of B by d, with sticky bit;
//   4 R = A + B, sign of R;
//   5 round (R >= 0) or convert R = -R (R < 0, only when d = 0: exact);
//   6 normalizing left shift, exponent adjust and packing.
// Every unit is split in the middle in the non-double modes: the exponent unit
// is 16 bits wide (two 8-bit halves), the mantissa datapath 64 bits (two
// 32-bit lanes). Lane layout: bit L-1 sign, L-2..L-3 integer bits, L-4 the
// hidden 2^0 bit, then the fraction and guard bits, bit 0 sticky
// (L = 64 for a double, 32 for a single lane).
// This design's own choices: zero and subnormal inputs are read as zero;
// results never become subnormal (see fpu_pkg::pack_fp); infinities and
// NaNs follow IEEE-754 through a side path; the exception flags are not
// produced.
//
// Timing: one operation per clock; an operation accepted with in_valid in
// cycle t appears with out_valid in cycle t+6. Synchronous active-low reset
// clears the valid bits only.
module fp_add_pipe
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  fpu_mode_e   mode,
  input  logic        sub,
  input  rnd_mode_e   rm,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        out_valid,
  output logic [63:0] res
);
  // Per-lane control carried down the pipe. Lane 1 is the double or the upper
  // single, lane 0 the lower single.
  typedef struct packed {
    logic        sa;      // sign of A (the operand with the larger exponent)
    logic        sx;      // sa xor effective sign of B
    rnd_mode_e   rm;
    logic        spec;    // result is a special value
    logic [63:0] spec_v;  // that value (single right-aligned)
  } lane_t;

  typedef struct packed {
    logic        v;
    logic        split;
    lane_t [1:0] ln;
  } ctl_t;

  ctl_t        c1, c2, c3, c4, c5;
  logic [15:0] ea1, eb1, er2, d2, er3, er4, er5;
  logic [63:0] ma1, mb1, ma2, mb2, ma3, mb3, r4, r5;
  logic [1:0]  rneg4;

  // ---------------------------------------------------------------- stage 1
  logic        s0_split;
  logic [1:0]  sa0, sb0, nan_a, nan_b, inf_a, inf_b;
  logic [1:0]  swp;
  logic [15:0] eaw, ebw;
  logic [63:0] fa, fb, bw;
  logic        gt_hi, eq_hi, gt_lo, eq_lo;
  ctl_t        c0;
  logic [63:0] ma0, mb0;
  logic [15:0] ea0, eb0;

  always_comb begin
    s0_split = (mode != MODE_DOUBLE);
    // Subtraction: flip the signs of B; in interval mode also swap its bounds.
    if (mode == MODE_INTERVAL && sub) bw = {b[31:0], b[63:32]};
    else                              bw = b;
    if (!s0_split) begin
      sa0 = {a[63], 1'b0};
      sb0 = {bw[63] ^ sub, 1'b0};
      eaw = {5'd0, a[62:52]};
      ebw = {5'd0, bw[62:52]};
      // Hidden bit only for a nonzero exponent: subnormals read as zero.
      fa  = {3'b000, |a[62:52], a[51:0] & {52{|a[62:52]}}, 8'd0};
      fb  = {3'b000, |bw[62:52], bw[51:0] & {52{|bw[62:52]}}, 8'd0};
      nan_a = {(&a[62:52]) & (|a[51:0]), 1'b0};
      nan_b = {(&bw[62:52]) & (|bw[51:0]), 1'b0};
      inf_a = {(&a[62:52]) & ~(|a[51:0]), 1'b0};
      inf_b = {(&bw[62:52]) & ~(|bw[51:0]), 1'b0};
    end else begin
      sa0 = {a[63], a[31]};
      sb0 = {bw[63] ^ sub, bw[31] ^ sub};
      eaw = {a[62:55], a[30:23]};
      ebw = {bw[62:55], bw[30:23]};
      fa  = {3'b000, |a[62:55], a[54:32] & {23{|a[62:55]}}, 5'd0,
             3'b000, |a[30:23], a[22:0] & {23{|a[30:23]}}, 5'd0};
      fb  = {3'b000, |bw[62:55], bw[54:32] & {23{|bw[62:55]}}, 5'd0,
             3'b000, |bw[30:23], bw[22:0] & {23{|bw[30:23]}}, 5'd0};
      nan_a = {(&a[62:55]) & (|a[54:32]), (&a[30:23]) & (|a[22:0])};
      nan_b = {(&bw[62:55]) & (|bw[54:32]), (&bw[30:23]) & (|bw[22:0])};
      inf_a = {(&a[62:55]) & ~(|a[54:32]), (&a[30:23]) & ~(|a[22:0])};
      inf_b = {(&bw[62:55]) & ~(|bw[54:32]), (&bw[30:23]) & ~(|bw[22:0])};
    end
  end

  // Exponent comparator: swap when Eb > Ea.
  split_cmp #(.H(8)) u_cmp (.split(s0_split), .a(ebw), .b(eaw),
                            .gt_hi(gt_hi), .eq_hi(eq_hi), .gt_lo(gt_lo), .eq_lo(eq_lo));

  always_comb begin
    swp = s0_split ? {gt_hi, gt_lo} : {gt_lo, gt_lo};
    c0 = '0;
    c0.v     = in_valid;
    c0.split = s0_split;
    for (int l = 0; l < 2; l++) begin
      c0.ln[l].sa = swp[l] ? sb0[l] : sa0[l];
      c0.ln[l].sx = sa0[l] ^ sb0[l];
      if (mode == MODE_INTERVAL) c0.ln[l].rm = (l == 1) ? RM_RD : RM_RU;
      else                       c0.ln[l].rm = rm;
      c0.ln[l].spec = nan_a[l] | nan_b[l] | inf_a[l] | inf_b[l];
      if (nan_a[l] | nan_b[l] | (inf_a[l] & inf_b[l] & (sa0[l] ^ sb0[l])))
        c0.ln[l].spec_v = s0_split ? {32'd0, SP_QNAN} : DP_QNAN;
      else if (inf_a[l])
        c0.ln[l].spec_v = s0_split ? {32'd0, sa0[l], 8'hFF, 23'd0} : {sa0[l], 11'h7FF, 52'd0};
      else
        c0.ln[l].spec_v = s0_split ? {32'd0, sb0[l], 8'hFF, 23'd0} : {sb0[l], 11'h7FF, 52'd0};
    end
    // Swap per lane (whole word in double mode).
    ea0 = eaw;
    eb0 = ebw;
    ma0 = fa;
    mb0 = fb;
    if (!s0_split) begin
      if (swp[1]) begin ea0 = ebw; eb0 = eaw; ma0 = fb; mb0 = fa; end
    end else begin
      if (swp[1]) begin
        ea0[15:8] = ebw[15:8]; eb0[15:8] = eaw[15:8];
        ma0[63:32] = fb[63:32]; mb0[63:32] = fa[63:32];
      end
      if (swp[0]) begin
        ea0[7:0] = ebw[7:0]; eb0[7:0] = eaw[7:0];
        ma0[31:0] = fb[31:0]; mb0[31:0] = fa[31:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) c1.v <= 1'b0;
    else        c1 <= c0;
    ea1 <= ea0; eb1 <= eb0; ma1 <= ma0; mb1 <= mb0;
  end

  // ---------------------------------------------------------------- stage 2
  logic [63:0] mb1n;
  logic [15:0] d1;
  logic        dco_lo, dco_hi;

  split_negate #(.H(32)) u_negb (.split(c1.split), .neg_hi(c1.ln[1].sx),
                                 .neg_lo(c1.split ? c1.ln[0].sx : c1.ln[1].sx),
                                 .x(mb1), .y(mb1n));
  // Exponent difference on the 16-bit integer unit split into two 8-bit units.
  split_cla #(.H(8)) u_dexp (.split(c1.split), .x(ea1), .y(~eb1), .cin_lo(1'b1), .cin_hi(1'b1),
                             .sum(d1), .cout_lo(dco_lo), .cout_hi(dco_hi));

  always_ff @(posedge clk) begin
    if (!rst_n) c2.v <= 1'b0;
    else        c2 <= c1;
    er2 <= ea1; d2 <= d1; ma2 <= ma1; mb2 <= mb1n;
  end

  // ---------------------------------------------------------------- stage 3
  logic [5:0]  sh_hi, sh_lo;
  logic [63:0] mb2s;

  always_comb begin
    if (c2.split) begin
      sh_hi = (d2[15:8] > 8'd31) ? 6'd31 : d2[13:8];
      sh_lo = (d2[7:0]  > 8'd31) ? 6'd31 : d2[5:0];
    end else begin
      sh_hi = '0;
      sh_lo = (d2 > 16'd63) ? 6'd63 : d2[5:0];
    end
  end

  split_rshift #(.H(32)) u_shr (.split(c2.split), .d_hi(sh_hi), .d_lo(sh_lo), .x(mb2), .y(mb2s));

  always_ff @(posedge clk) begin
    if (!rst_n) c3.v <= 1'b0;
    else        c3 <= c2;
    er3 <= er2; ma3 <= ma2; mb3 <= mb2s;
  end

  // ---------------------------------------------------------------- stage 4
  logic [63:0] r3;
  logic        rco_lo, rco_hi;

  split_cla #(.H(32)) u_add (.split(c3.split), .x(ma3), .y(mb3), .cin_lo(1'b0), .cin_hi(1'b0),
                             .sum(r3), .cout_lo(rco_lo), .cout_hi(rco_hi));

  always_ff @(posedge clk) begin
    if (!rst_n) c4.v <= 1'b0;
    else        c4 <= c3;
    er4 <= er3; r4 <= r3;
    rneg4 <= c3.split ? {r3[63], r3[31]} : {r3[63], r3[63]};
  end

  // ---------------------------------------------------------------- stage 5
  logic [63:0] r4n, r4r, r4o;
  logic        ix_hi, ix_lo;
  ctl_t        c4s;

  split_negate #(.H(32)) u_conv (.split(c4.split), .neg_hi(rneg4[1]), .neg_lo(rneg4[0]),
                                 .x(r4), .y(r4n));
  split_round u_rnd (.split(c4.split), .rm_hi(c4.ln[1].rm), .rm_lo(c4.ln[0].rm),
                     .sign_hi(c4.ln[1].sa), .sign_lo(c4.ln[0].sa), .x(r4),
                     .y(r4r), .inexact_hi(ix_hi), .inexact_lo(ix_lo));

  always_comb begin
    // Round or convert, chosen per lane by the sign of R.
    if (c4.split) r4o = {rneg4[1] ? r4n[63:32] : r4r[63:32], rneg4[0] ? r4n[31:0] : r4r[31:0]};
    else          r4o = rneg4[1] ? r4n : r4r;
    // Result sign becomes sa xor (R < 0).
    c4s = c4;
    for (int l = 0; l < 2; l++) c4s.ln[l].sa = c4.ln[l].sa ^ rneg4[l];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) c5.v <= 1'b0;
    else        c5 <= c4s;
    er5 <= er4; r5 <= r4o;
  end

  // ---------------------------------------------------------------- stage 6
  logic [63:0] rn;
  logic [6:0]  lz_hi, lz_lo;
  logic [63:0] res_d;

  split_normalize #(.H(32)) u_norm (.split(c5.split), .x(r5), .y(rn), .lz_hi(lz_hi), .lz_lo(lz_lo));

  always_comb begin
    logic [63:0] pk;
    logic        zs;
    int          e;
    res_d = '0;
    pk    = '0;
    zs    = 1'b0;
    e     = 0;
    if (!c5.split) begin
      e  = int'(er5[10:0]) + 3 - int'(lz_hi);
      zs = c5.ln[1].sx ? (c5.ln[1].rm == RM_RD) : c5.ln[1].sa;
      if (c5.ln[1].spec)   res_d = c5.ln[1].spec_v;
      else if (r5 == '0)   res_d = {zs, 63'd0};
      else                 res_d = pack_fp(c5.ln[1].sa, e, rn[61:10], c5.ln[1].rm, 1'b1);
    end else begin
      for (int l = 0; l < 2; l++) begin
        e  = (l == 1) ? int'(er5[15:8]) + 3 - int'(lz_hi) : int'(er5[7:0]) + 3 - int'(lz_lo);
        zs = c5.ln[l].sx ? (c5.ln[l].rm == RM_RD) : c5.ln[l].sa;
        if (c5.ln[l].spec)                          pk = c5.ln[l].spec_v;
        else if (r5[l*32 +: 32] == '0)              pk = {32'd0, zs, 31'd0};
        else pk = pack_fp(c5.ln[l].sa, e, {29'd0, rn[l*32+29 -: 23]}, c5.ln[l].rm, 1'b0);
        res_d[l*32 +: 32] = pk[31:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c5.v;
    res <= res_d;
  end
endmodule
