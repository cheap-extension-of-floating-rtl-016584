// tb_interval_enclosure: checks the defining property of interval arithmetic
// on the whole FPU, independently of any rounding model. Random intervals
// [a,b] and [c,d] of singles are added, subtracted and multiplied in
// interval mode; then random points x in [a,b] and y in [c,d] (the bounds
// and random reals between them) are combined in real (double) arithmetic
// and each x+y, x-y, x*y must lie inside the result interval. Rounding the
// point result to double cannot move it across a bound, since the bounds
// are singles and so also doubles. Also counts how often the
// result interval is strictly wider than the point results (outward
// rounding at work), which must happen.
`timescale 1ns/1ps
module tb_interval_enclosure;
  import fpu_pkg::*;

  localparam int N = 3000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready;
  fpu_op_e     op;
  fpu_mode_e   mode;
  rnd_mode_e   rm;
  logic [63:0] a, b, add_res, mul_res;
  logic        add_valid, mul_valid;

  int checks = 0, failures = 0, widened = 0;

  interval_fpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_single();
    logic [7:0] e;
    e = 8'($urandom_range(100, 150));
    return {1'($urandom_range(0, 1)), e, 23'($urandom)};
  endfunction

  // Value of a normal or zero single, via the double with the same value.
  function automatic real r32(logic [31:0] x);
    logic [10:0] e;
    e = (x[30:23] == 0) ? 11'd0 : 11'(int'(x[30:23]) - 127 + 1023);
    return $bitstoreal({x[31], e, x[22:0] & {23{x[30:23] != 0}}, 29'd0});
  endfunction

  // A random point of [lo, hi]: one of the bounds or a point between them.
  function automatic real pick(real lo, real hi);
    int k;
    real t, v;
    k = int'($urandom_range(0, 3));
    if (k == 0) return lo;
    if (k == 1) return hi;
    t = real'($urandom) / 4294967295.0;
    v = lo + t * (hi - lo);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic run(fpu_op_e o, logic [63:0] x, logic [63:0] y, output logic [63:0] r);
    @(negedge clk);
    op = o; mode = MODE_INTERVAL; rm = RM_RNE; a = x; b = y; in_valid = 1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
    if (o == OP_MUL) begin
      while (!mul_valid) @(negedge clk);
      r = mul_res;
    end else begin
      while (!add_valid) @(negedge clk);
      r = add_res;
    end
  endtask

  initial begin
    logic [31:0] p, q;
    logic [63:0] x, y, r;
    real lo, hi, xa, xb, ya, yb, px, py, v;
    in_valid = 0; a = 0; b = 0; op = OP_ADD; mode = MODE_INTERVAL; rm = RM_RNE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      p = rnd_single(); q = rnd_single();
      x = (r32(p) <= r32(q)) ? {p, q} : {q, p};
      p = rnd_single(); q = rnd_single();
      y = (r32(p) <= r32(q)) ? {p, q} : {q, p};
      xa = r32(x[63:32]); xb = r32(x[31:0]);
      ya = r32(y[63:32]); yb = r32(y[31:0]);
      for (int o = 0; o < 3; o++) begin
        bit wide;
        run(fpu_op_e'(o), x, y, r);
        lo = r32(r[63:32]);
        hi = r32(r[31:0]);
        wide = 1;
        for (int k = 0; k < 8; k++) begin
          px = pick(xa, xb);
          py = pick(ya, yb);
          v = (o == 0) ? px + py : (o == 1) ? px - py : px * py;
          checks++;
          if (!(lo <= v && v <= hi)) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d x=%h y=%h r=%h point %g", o, x, y, r, v);
          end
          if (v == lo || v == hi) wide = 0;
        end
        if (wide) widened++;
      end
    end
    checks++;
    if (widened == 0) failures++;
    $display("results strictly wider than all sampled points: %0d", widened);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
