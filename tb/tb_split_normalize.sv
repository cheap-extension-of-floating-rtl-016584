// tb_split_normalize: checks the normalizing left shifter. For every input
// (one 64-bit word or two 32-bit lanes, most significant bit clear) the
// leading-zero count must match a simple count and the output must be the
// input shifted left by count-1, so that the leading one lands just below
// the top bit of its lane, with nothing crossing between lanes.
`timescale 1ns/1ps
module tb_split_normalize;
  logic        split;
  logic [63:0] x, y;
  logic [6:0]  lz_hi, lz_lo;
  int checks = 0, failures = 0;

  split_normalize dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clz(logic [63:0] v, int w);
    for (int i = w - 1; i >= 0; i--) if (v[i]) return w - 1 - i;
    return w;
  endfunction

  initial begin
    int zh, zl;
    logic [63:0] e;
    for (int i = 0; i < 4000; i++) begin
      split = 1'($urandom_range(0, 1));
      x = {$urandom, $urandom} >> $urandom_range(1, 63);
      if (split) x = {1'b0, x[62:32] >> $urandom_range(0, 31), 1'b0, x[30:0] >> $urandom_range(0, 31)};
      if (i % 11 == 0) x[31:0] = '0;
      #1;
      if (split) begin
        zh = clz({32'd0, x[63:32]}, 32);
        zl = clz({32'd0, x[31:0]}, 32);
        e  = {x[63:32] << (zh == 0 ? 0 : zh - 1), x[31:0] << (zl == 0 ? 0 : zl - 1)};
      end else begin
        zh = clz(x, 64);
        zl = zh;
        e  = x << (zh == 0 ? 0 : zh - 1);
      end
      checks++;
      if (y !== e || int'(lz_hi) != zh || int'(lz_lo) != zl) begin
        failures++;
        if (failures < 10) $display("FAIL split=%0d x=%h y=%h exp=%h lz=%0d/%0d", split, x, y, e, lz_hi, lz_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
