// tb_split_negate: checks the converter (conditional two's-complement
// negation) on the whole 64-bit word and on each 32-bit lane separately,
// including zero lanes whose negation carries out and must not cross the middle.
`timescale 1ns/1ps
module tb_split_negate;
  logic        split, neg_hi, neg_lo;
  logic [63:0] x, y, e;
  int checks = 0, failures = 0;

  split_negate dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      split  = 1'($urandom_range(0, 1));
      neg_hi = 1'($urandom_range(0, 1));
      neg_lo = 1'($urandom_range(0, 1));
      x      = {$urandom, $urandom};
      if (i % 5 == 0) x[31:0] = '0;
      #1;
      if (!split) e = neg_lo ? -x : x;
      else        e = {neg_hi ? -x[63:32] : x[63:32], neg_lo ? -x[31:0] : x[31:0]};
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL split=%0d x=%h y=%h exp=%h", split, x, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
