// split_negate: the converter. Conditional two's-complement negation of a
// 2*H-bit word, or of each H-bit lane on its own.
//
// It consists of independent inverters followed by an incrementor; the
// incrementor is a split_cla with a zero second operand and the negate
// request as carry-in, so it splits at the middle just like the adder.
// split=0: the whole word is negated when neg_lo is set (neg_hi ignored).
// split=1: the upper lane is negated when neg_hi is set, the lower lane when
// neg_lo is set, and no carry crosses the middle. This structure is the one
// the document names; reusing the prefix adder as incrementor is this design's
// choice. Combinational.
module split_negate #(
  parameter int unsigned H = 32
) (
  input  logic           split,
  input  logic           neg_hi,
  input  logic           neg_lo,
  input  logic [2*H-1:0] x,
  output logic [2*H-1:0] y
);
  logic           nh;
  logic [2*H-1:0] inv;
  logic           co_lo, co_hi;

  assign nh  = split ? neg_hi : neg_lo;
  assign inv = {x[2*H-1:H] ^ {H{nh}}, x[H-1:0] ^ {H{neg_lo}}};

  split_cla #(.H(H)) u_inc (
    .split(split), .x(inv), .y('0), .cin_lo(neg_lo), .cin_hi(nh),
    .sum(y), .cout_lo(co_lo), .cout_hi(co_hi)
  );
endmodule
