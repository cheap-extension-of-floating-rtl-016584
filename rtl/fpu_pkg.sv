// fpu_pkg: types and constants shared by the split double-precision FPU.
//
// A 64-bit word holds either one IEEE-754 double or two IEEE-754 singles.
// In interval use the upper single (bits 63:32) is the lower bound and the
// lower single (bits 31:0) is the upper bound, so a word reads [inf, sup]
// from left to right. The document only says that the two single endpoints
// share one double word; which half holds which bound is this design's choice.
//
// The package also holds the result packer used by both pipelines: it turns
// a sign, an unbounded biased exponent and a rounded significand into an IEEE
// word, applying overflow and underflow rules that honour the rounding
// direction (subnormals are not produced, see pack_fp).
package fpu_pkg;

  // Operating mode of the 64-bit datapath.
  typedef enum logic [1:0] {
    MODE_DOUBLE   = 2'd0,  // one double-precision operation
    MODE_PAIR     = 2'd1,  // two independent single-precision operations
    MODE_INTERVAL = 2'd2   // one single-precision interval operation
  } fpu_mode_e;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // to nearest, ties to even
    RM_RZ  = 2'd1,  // toward zero
    RM_RU  = 2'd2,  // toward +infinity (upward, "Delta")
    RM_RD  = 2'd3   // toward -infinity (downward, "Nabla")
  } rnd_mode_e;

  // An exact product between multiplier stages 4 and 6: value
  // (-1)^sign * sig * 2^(exp - bias - 105), with sig normalized so that
  // bit 105 is set (a single product uses the top 48 bits only).
  typedef struct packed {
    logic               nan;
    logic               inf;
    logic               zero;
    logic               sign;
    logic signed [13:0] exp;
    logic [105:0]       sig;
  } prod_t;


  localparam logic [63:0] DP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [31:0] SP_QNAN = 32'h7FC0_0000;

  // Round-up decision: lsb of the kept part, round (first dropped) bit,
  // sticky (OR of the rest), sign of the value, rounding mode.
  function automatic logic round_inc(input logic lsb, input logic rbit,
                                     input logic sticky, input logic sign,
                                     input rnd_mode_e rm);
    case (rm)
      RM_RNE:  return rbit & (sticky | lsb);
      RM_RZ:   return 1'b0;
      RM_RU:   return ~sign & (rbit | sticky);
      default: return sign & (rbit | sticky);
    endcase
  endfunction

  // Does a result of this sign round away from zero when it is inexact and
  // too large / too small for the format?
  function automatic logic rounds_away(input logic sign, input rnd_mode_e rm);
    return (rm == RM_RU && !sign) || (rm == RM_RD && sign);
  endfunction

  // Pack a finite nonzero result. exp is the biased exponent of a value
  // 1.frac * 2^(exp-bias), any integer. Overflow: infinity when rounding to nearest or away
  // from zero, else the largest finite number. Underflow (exp < 1):
  // the smallest normal number when rounding away from zero, else zero.
  // dbl selects double (11/52) or single (8/23); a single is right-aligned.
  function automatic logic [63:0] pack_fp(input logic sign, input int exp,
                                          input logic [51:0] frac,
                                          input rnd_mode_e rm, input bit dbl);
    int emax;
    logic [63:0] r;
    emax = dbl ? 2047 : 255;
    if (exp >= emax) begin
      if (rm == RM_RNE || rounds_away(sign, rm))
        r = dbl ? {sign, 11'h7FF, 52'd0} : {32'd0, sign, 8'hFF, 23'd0};
      else
        r = dbl ? {sign, 11'h7FE, {52{1'b1}}} : {32'd0, sign, 8'hFE, {23{1'b1}}};
    end else if (exp < 1) begin
      if (rounds_away(sign, rm))
        r = dbl ? {sign, 11'd1, 52'd0} : {32'd0, sign, 8'd1, 23'd0};
      else
        r = dbl ? {sign, 63'd0} : {32'd0, sign, 31'd0};
    end else begin
      r = dbl ? {sign, exp[10:0], frac} : {32'd0, sign, exp[7:0], frac[22:0]};
    end
    return r;
  endfunction

endpackage
