// minmax4: minimum and maximum of four exact products (interval multiply,
// pipeline stage 5).
//
// Products arrive in the fpu_pkg::prod_t form (sign, exponent, normalized
// 106-bit significand, zero/infinity/NaN flags). The values are compared
// exactly, so the two bounds can afterwards be rounded once each: the minimum
// downward and the maximum upward, as the four-product method requires.
// Ordering: -inf < negative finite < zeros (both signs equal) < positive
// finite < +inf; if any product is NaN both outputs are that NaN. The
// comparison network (three comparisons for each of min and max, as a
// two-level tree) is this design's choice. Combinational.
module minmax4
  import fpu_pkg::*;
(
  input  prod_t p [4],
  output prod_t pmin,
  output prod_t pmax
);
  // Signed ordering key: larger key means larger value.
  function automatic logic signed [123:0] key(input prod_t q);
    logic [122:0] mag;
    mag = q.zero ? '0 : q.inf ? {1'b1, 122'd0} : {1'b0, 2'b01, q.exp + 14'sd4096, q.sig};
    return q.sign ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

  function automatic prod_t pick_min(input prod_t x, input prod_t y);
    return (key(y) < key(x)) ? y : x;
  endfunction

  function automatic prod_t pick_max(input prod_t x, input prod_t y);
    return (key(y) > key(x)) ? y : x;
  endfunction

  always_comb begin
    pmin = pick_min(pick_min(p[0], p[1]), pick_min(p[2], p[3]));
    pmax = pick_max(pick_max(p[0], p[1]), pick_max(p[2], p[3]));
    if (p[0].nan | p[1].nan | p[2].nan | p[3].nan) begin
      pmin.nan = 1'b1;
      pmax.nan = 1'b1;
    end
  end
endmodule
