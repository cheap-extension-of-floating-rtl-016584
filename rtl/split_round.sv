// split_round: the two independent rounding units of the split datapath.
//
// Unit A rounds the whole 64-bit word as a double, or the upper lane as a
// single; unit B rounds the lower lane as a single. Their truncated words and
// ulp increments are merged per mode and added by one split carry-lookahead
// adder, so a double increment may carry across the middle while two single
// increments stay in their lanes. Both lanes use the significand layout of
// round_unit (2^0 bit at lane bit 28 for singles, word bit 60 for a double).
// The need for two rounding units is the document's; the merge through the
// split adder is this design's choice. Combinational.
module split_round (
  input  logic               split,
  input  fpu_pkg::rnd_mode_e rm_hi,    // double, or upper lane
  input  fpu_pkg::rnd_mode_e rm_lo,
  input  logic               sign_hi,  // double, or upper lane
  input  logic               sign_lo,
  input  logic [63:0]        x,
  output logic [63:0]        y,
  output logic               inexact_hi,
  output logic               inexact_lo
);
  logic [63:0] tr_a, ulp_a;
  logic [31:0] tr_b, ulp_b;
  logic        ix_a, ix_b;
  logic [63:0] tr, ulp;
  logic        co_lo, co_hi;

  round_unit #(.L(64)) u_a (.dbl(~split), .rm(rm_hi), .sign(sign_hi), .x(x),
                            .trunc(tr_a), .ulp(ulp_a), .inexact(ix_a));
  round_unit #(.L(32)) u_b (.dbl(1'b0), .rm(rm_lo), .sign(sign_lo), .x(x[31:0]),
                            .trunc(tr_b), .ulp(ulp_b), .inexact(ix_b));

  assign tr  = split ? {tr_a[63:32], tr_b}  : tr_a;
  assign ulp = split ? {ulp_a[63:32], ulp_b} : ulp_a;
  assign inexact_hi = ix_a;
  assign inexact_lo = split ? ix_b : ix_a;

  split_cla #(.H(32)) u_add (.split(split), .x(tr), .y(ulp), .cin_lo(1'b0), .cin_hi(1'b0),
                             .sum(y), .cout_lo(co_lo), .cout_hi(co_hi));
endmodule
