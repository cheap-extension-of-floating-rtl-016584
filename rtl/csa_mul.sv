// csa_mul: W x W unsigned mantissa sub-multiplier with carry-save output.
//
// Partial products b[i] ? a << i : 0 are accumulated row by row with 3:2
// carry-save adders (an array multiplier), so no carry is propagated; the
// product is sum + carry (mod 2^(2W)). Four such units give the four partial
// products of a double-precision significand product, or the four products
// of the interval bounds. That the mantissa is split into four partial
// products in the first pipeline stage follows the document; W = 27 (so that
// a 53-bit significand splits into 27 + 26 bits and a 24-bit single fits)
// and the array structure are this design's choices. Combinational.
module csa_mul #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] sum,
  output logic [2*W-1:0] carry
);
  always_comb begin
    logic [2*W-1:0] s, c, r, cn;
    s = '0;
    c = '0;
    for (int i = 0; i < int'(W); i++) begin
      r  = b[i] ? ((2*W)'(a) << i) : '0;
      cn = ((s & c) | (s & r) | (c & r)) << 1;
      s  = s ^ c ^ r;
      c  = cn;
    end
    sum   = s;
    carry = c;
  end
endmodule
