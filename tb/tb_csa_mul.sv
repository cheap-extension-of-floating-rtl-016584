// tb_csa_mul: checks that the carry-save sub-multiplier's two outputs add up
// to the exact 54-bit product of its 27-bit inputs.
`timescale 1ns/1ps
module tb_csa_mul;
  logic [26:0] a, b;
  logic [53:0] sum, carry;
  int checks = 0, failures = 0;

  csa_mul dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = 27'($urandom);
      b = 27'($urandom);
      if (i % 9 == 0) a = '1;
      if (i % 13 == 0) b = '1;
      #1;
      checks++;
      if (sum + carry !== 54'(a) * 54'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
