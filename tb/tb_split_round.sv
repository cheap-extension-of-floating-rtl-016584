// tb_split_round: checks the pair of rounding units. A lane holds a
// non-negative fixed-point value whose 2^0 bit is at lane bit L-4 (bit 28 of
// a 32-bit single lane, bit 60 of a double word); the result must be that
// value rounded to 24 (or 53) significant bits counted from its leading one,
// where a leading one below the 2^-1 position counts as if at 2^-1 (those
// values are exact in the adder). Expected values are computed by integer
// division with remainder, independently of the unit's masks.
`timescale 1ns/1ps
module tb_split_round;
  import fpu_pkg::*;

  logic        split, sign_hi, sign_lo, inexact_hi, inexact_lo;
  rnd_mode_e   rm_hi, rm_lo;
  logic [63:0] x, y;
  int checks = 0, failures = 0;

  split_round dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Round v (an L-bit lane) for precision P; top = position of 2^1 bit (L-3).
  function automatic logic [64:0] rnd(logic [63:0] v, int top, int P, logic s, rnd_mode_e r,
                                      output logic inexact);
    int p, lsb;
    logic [64:0] q, rem, half, unit;
    logic up;
    p = 0;
    for (int i = 0; i < 64; i++) if (v[i]) p = i;
    if (p < top - 2) p = top - 2;
    lsb  = p - (P - 1);
    unit = 65'd1 << lsb;
    q    = 65'(v) / unit;
    rem  = 65'(v) % unit;
    half = unit >> 1;
    case (r)
      RM_RNE:  up = (rem > half) || (rem == half && q[0]);
      RM_RZ:   up = 0;
      RM_RU:   up = !s && rem != 0;
      default: up = s && rem != 0;
    endcase
    inexact = (rem != 0);
    return (q + 65'(up)) * unit;
  endfunction

  initial begin
    logic [64:0] eh, el;
    logic ih, il;
    for (int i = 0; i < 6000; i++) begin
      split   = 1'($urandom_range(0, 1));
      rm_hi   = rnd_mode_e'($urandom_range(0, 3));
      rm_lo   = rnd_mode_e'($urandom_range(0, 3));
      sign_hi = 1'($urandom_range(0, 1));
      sign_lo = 1'($urandom_range(0, 1));
      x = {$urandom, $urandom};
      if (split) begin
        x[63:62] = 0; x[31:30] = 0;
        x[63:32] = x[63:32] >> $urandom_range(0, 3);
        x[31:0]  = x[31:0] >> $urandom_range(0, 3);
        if (i % 5 == 0) x[31:0] = {4'b0011, 23'h7FFFFF, 5'b11000};  // rounds up into bit 30
      end else begin
        x[63:62] = 0;
        x = x >> $urandom_range(0, 3);
        if (i % 5 == 0) x = {4'b0011, 52'hF_FFFF_FFFF_FFFF, 8'b1100_0000};
      end
      #1;
      if (split) begin
        eh = rnd({32'd0, x[63:32]}, 29, 24, sign_hi, rm_hi, ih);
        el = rnd({32'd0, x[31:0]},  29, 24, sign_lo, rm_lo, il);
        checks++;
        if (y !== {eh[31:0], el[31:0]} || ih !== inexact_hi || il !== inexact_lo) begin
          failures++;
          if (failures < 10) $display("FAIL split x=%h y=%h exp=%h%h", x, y, eh[31:0], el[31:0]);
        end
      end else begin
        eh = rnd(x, 61, 53, sign_hi, rm_hi, ih);
        checks++;
        if (y !== eh[63:0] || ih !== inexact_hi) begin
          failures++;
          if (failures < 10) $display("FAIL dbl x=%h y=%h exp=%h", x, y, eh[63:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
