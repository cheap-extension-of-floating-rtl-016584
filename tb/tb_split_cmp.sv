// tb_split_cmp: checks the split tree comparator against integer comparison,
// as one 16-bit comparator and as two 8-bit comparators (the exponent unit
// sizes), with many equal upper and lower halves.
`timescale 1ns/1ps
module tb_split_cmp;
  logic        split, gt_hi, eq_hi, gt_lo, eq_lo;
  logic [15:0] a, b;
  int checks = 0, failures = 0;

  split_cmp dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      split = 1'($urandom_range(0, 1));
      a = 16'($urandom);
      b = 16'($urandom);
      if (i % 3 == 0) b[15:8] = a[15:8];
      if (i % 5 == 0) b[7:0] = a[7:0];
      #1;
      checks++;
      if (gt_hi !== (a[15:8] > b[15:8]) || eq_hi !== (a[15:8] == b[15:8])) failures++;
      checks++;
      if (split) begin
        if (gt_lo !== (a[7:0] > b[7:0]) || eq_lo !== (a[7:0] == b[7:0])) failures++;
      end else begin
        if (gt_lo !== (a > b) || eq_lo !== (a == b)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
