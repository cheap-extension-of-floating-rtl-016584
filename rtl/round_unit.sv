// round_unit: one rounding unit of the datapath.
//
// It looks at an L-bit unsigned datapath word (sign position L-1 is zero)
// holding a significand whose 2^0 bit is at position L-4, with up to two
// integer bits above it. It finds the leading one among positions L-3, L-4
// and below, which fixes where the result's least significant bit lies for
// a precision of F+1 bits, and decides from the round bit, the sticky bits
// and the rounding mode whether one ulp must be added. The word is returned
// with the dropped bits cleared, together with the ulp to add (zero when not
// rounding up) and an inexact flag; the addition itself is done by the
// caller's adder so that it can share the split carry chain.
// With dbl=1 the format is double (F=52) over the whole word; with dbl=0 it is
// single (F=23) in the top 32 bits of the word, and bits below them are
// ignored (they belong to the other lane). The document asks for two
// independent rounding units; the leading-one window is this design's choice.
// Combinational.
module round_unit #(
  parameter int unsigned L = 64
) (
  input  logic              dbl,
  input  fpu_pkg::rnd_mode_e rm,
  input  logic              sign,
  input  logic [L-1:0]      x,
  output logic [L-1:0]      trunc,
  output logic [L-1:0]      ulp,
  output logic              inexact
);
  import fpu_pkg::*;

  int            f, lsb, lo_bound;
  logic [L-1:0]  keep_m, stick_m;
  logic          rbit, sticky, inc;

  always_comb begin
    f        = dbl ? 52 : 23;
    lo_bound = dbl ? 0 : int'(L) - 32;
    if (x[L-3])      lsb = int'(L) - 3 - f;
    else if (x[L-4]) lsb = int'(L) - 4 - f;
    else             lsb = int'(L) - 5 - f;
    for (int i = 0; i < int'(L); i++) begin
      keep_m[i]  = (i >= lsb);
      stick_m[i] = (i < lsb - 1) && (i >= lo_bound);
    end
    rbit    = x[lsb-1];
    sticky  = |(x & stick_m);
    inc     = round_inc(x[lsb], rbit, sticky, sign, rm);
    inexact = rbit | sticky;
    trunc   = x & keep_m;
    ulp     = inc ? (L'(1) << lsb) : '0;
  end
endmodule
