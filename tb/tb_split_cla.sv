// tb_split_cla: checks the split carry-lookahead adder against plain integer
// addition, as one 64-bit adder and as two independent 32-bit adders with
// their own carry-ins, including carries that must (or must not) cross the
// middle. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_split_cla;
  logic        split, cin_lo, cin_hi, cout_lo, cout_hi;
  logic [63:0] x, y, sum;
  int checks = 0, failures = 0;

  split_cla dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [64:0] e;
    logic [32:0] el, eh;
    for (int i = 0; i < 4000; i++) begin
      split  = 1'($urandom_range(0, 1));
      x      = {$urandom, $urandom};
      y      = {$urandom, $urandom};
      if (i % 4 == 0) y = ~x;              // long carry chains
      if (i % 7 == 0) x[31:0] = '1;        // carry into the middle
      cin_lo = 1'($urandom_range(0, 1));
      cin_hi = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (!split) begin
        e = {1'b0, x} + {1'b0, y} + 65'(cin_lo);
        if ({cout_hi, sum} !== e) failures++;
      end else begin
        el = {1'b0, x[31:0]} + {1'b0, y[31:0]} + 33'(cin_lo);
        eh = {1'b0, x[63:32]} + {1'b0, y[63:32]} + 33'(cin_hi);
        if ({cout_hi, sum[63:32]} !== eh || {cout_lo, sum[31:0]} !== el) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
