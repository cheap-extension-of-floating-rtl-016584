// tb_minmax4: checks the min/max unit on random sets of four products.
// Products are generated as small exact values (sign, exponent, significand
// built from an integer) so the expected minimum and maximum can be found by
// plain integer comparison; zeros, infinities and NaN are mixed in.
`timescale 1ns/1ps
module tb_minmax4;
  import fpu_pkg::*;

  prod_t p [4];
  prod_t pmin, pmax;
  int checks = 0, failures = 0;

  minmax4 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Value class for reference ordering: integer value, or +-"infinity".
  initial begin
    longint val [4], vmin, vmax;
    bit anynan;
    for (int i = 0; i < 4000; i++) begin
      anynan = 0;
      for (int k = 0; k < 4; k++) begin
        int m, sel;
        longint v;
        p[k] = '0;
        sel = int'($urandom_range(0, 19));
        m = int'($urandom_range(1, 1000));
        p[k].sign = 1'($urandom_range(0, 1));
        if (sel == 0) begin
          p[k].zero = 1; v = 0;
        end else if (sel == 1) begin
          p[k].inf = 1; v = p[k].sign ? -64'sd1 <<< 40 : 64'sd1 <<< 40;
        end else if (sel == 2 && i % 10 == 0) begin
          p[k].nan = 1; anynan = 1; v = 0;
        end else begin
          // Normalize m: sig has bit 105 set; exp is floor(log2 m).
          int lg;
          lg = $clog2(m + 1) - 1;
          p[k].exp = 14'(lg);
          p[k].sig = 106'(m) << (105 - lg);
          v = p[k].sign ? -longint'(m) : longint'(m);
        end
        val[k] = v;
      end
      vmin = val[0]; vmax = val[0];
      for (int k = 1; k < 4; k++) begin
        if (val[k] < vmin) vmin = val[k];
        if (val[k] > vmax) vmax = val[k];
      end
      #1;
      checks++;
      if (anynan) begin
        if (!pmin.nan || !pmax.nan) failures++;
      end else begin
        longint gmin, gmax;
        gmin = pmin.zero ? 0 : pmin.inf ? (pmin.sign ? -64'sd1 <<< 40 : 64'sd1 <<< 40) :
               (pmin.sign ? -longint'(pmin.sig >> (105 - int'(pmin.exp))) : longint'(pmin.sig >> (105 - int'(pmin.exp))));
        gmax = pmax.zero ? 0 : pmax.inf ? (pmax.sign ? -64'sd1 <<< 40 : 64'sd1 <<< 40) :
               (pmax.sign ? -longint'(pmax.sig >> (105 - int'(pmax.exp))) : longint'(pmax.sig >> (105 - int'(pmax.exp))));
        if (gmin != vmin || gmax != vmax) begin
          failures++;
          if (failures < 10) $display("FAIL min %0d/%0d max %0d/%0d", gmin, vmin, gmax, vmax);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
