// tb_split_rshift: checks the split arithmetic right shifter with sticky bit.
// Expected: each lane (or the whole word) shifted right arithmetically by its
// saturated amount, with bit 0 replaced by the OR of all input bits at
// positions 0..d of that lane. Inputs keep bit 0 clear, as in the datapath.
`timescale 1ns/1ps
module tb_split_rshift;
  logic        split;
  logic [5:0]  d_hi, d_lo;
  logic [63:0] x, y, e;
  int checks = 0, failures = 0;

  split_rshift dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] lane(logic [31:0] v, int d);
    logic [31:0] r, m;
    if (d > 31) d = 31;
    r = 32'($signed(v) >>> d);
    m = (d >= 31) ? '1 : ((32'd2 << d) - 1);
    r[0] = |(v & m);
    return r;
  endfunction

  initial begin
    logic [63:0] m;
    int d;
    for (int i = 0; i < 4000; i++) begin
      split = 1'($urandom_range(0, 1));
      d_hi  = 6'($urandom);
      d_lo  = 6'($urandom);
      x     = {$urandom, $urandom};
      x[0]  = 0;
      x[32] = 0;
      if (i % 3 == 0) x = x & 64'h0000_0000_FFFF_FF00;
      #1;
      if (split) e = {lane(x[63:32], int'(d_hi)), lane(x[31:0], int'(d_lo))};
      else begin
        d = int'(d_lo);
        e = 64'($signed(x) >>> d);
        m = (d >= 63) ? '1 : ((64'd2 << d) - 1);
        e[0] = |(x & m);
      end
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL split=%0d dh=%0d dl=%0d x=%h y=%h exp=%h", split, d_hi, d_lo, x, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
