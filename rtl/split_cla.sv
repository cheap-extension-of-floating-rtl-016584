// split_cla: carry-lookahead adder of 2*H bits whose root can be cut in two.
//
// Each H-bit half is a Kogge-Stone parallel-prefix tree that produces its own
// sum for a given carry-in and its group generate/propagate. The root of the
// full-width adder is a single multiplexer: with split=0 the upper half takes
// its carry from the lower half (one 2H-bit adder, carry-in cin_lo); with
// split=1 the upper half takes its own carry-in cin_hi, giving two independent
// H-bit adders. Inserting the second carry-in and cutting the root with one
// multiplexer follows the document; the prefix-tree style is this design's choice.
//
// Purely combinational. cout_hi is the carry out of the top bit, cout_lo the
// carry out of the lower half.
module split_cla #(
  parameter int unsigned H = 32
) (
  input  logic         split,
  input  logic [2*H-1:0] x,
  input  logic [2*H-1:0] y,
  input  logic         cin_lo,
  input  logic         cin_hi,
  output logic [2*H-1:0] sum,
  output logic         cout_lo,
  output logic         cout_hi
);
  logic [H-1:0] s_lo, s_hi;
  logic         g_lo, p_lo, g_hi, p_hi;
  logic         c_mid;

  cla_half #(.H(H)) u_lo (.x(x[H-1:0]),   .y(y[H-1:0]),   .cin(cin_lo), .sum(s_lo), .g(g_lo), .p(p_lo));
  // Root multiplexer: carry into the upper half.
  assign cout_lo = g_lo | (p_lo & cin_lo);
  assign c_mid   = split ? cin_hi : cout_lo;
  cla_half #(.H(H)) u_hi (.x(x[2*H-1:H]), .y(y[2*H-1:H]), .cin(c_mid),  .sum(s_hi), .g(g_hi), .p(p_hi));
  assign cout_hi = g_hi | (p_hi & c_mid);
  assign sum     = {s_hi, s_lo};
endmodule
