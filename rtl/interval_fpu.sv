// interval_fpu: a double-precision floating-point unit whose adder and
// multiplier are split in the middle so that the same 64-bit buses carry
// either one double, two independent singles, or one single-precision
// interval [inf, sup] (inf in bits 63:32, sup in bits 31:0).
//
// Operations are issued on one pair of 64-bit operand buses. Additions and
// subtractions go to fp_add_pipe (latency 6 in every mode), multiplications
// to fp_mul_pipe (latency 6, or 7 for interval products). Each pipeline has
// its own 64-bit result bus with a valid bit, so both can finish in the same
// cycle. in_ready is low only when a non-interval multiplication is offered
// in the cycle after an interval multiplication was accepted (see
// fp_mul_pipe); the adder always accepts. Division is not part of the
// design. The two separate result buses and the issue rule are this design's
// choices; the split units and their latencies follow the document.
module interval_fpu
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  fpu_op_e     op,
  input  fpu_mode_e   mode,
  input  rnd_mode_e   rm,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        add_valid,
  output logic [63:0] add_res,
  output logic        mul_valid,
  output logic [63:0] mul_res
);
  logic is_mul, mul_ready;

  assign is_mul   = (op == OP_MUL);
  assign in_ready = is_mul ? mul_ready : 1'b1;

  fp_add_pipe u_add (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && !is_mul), .mode(mode),
    .sub(op == OP_SUB), .rm(rm), .a(a), .b(b), .out_valid(add_valid), .res(add_res)
  );

  fp_mul_pipe u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && is_mul), .in_ready(mul_ready),
    .mode(mode), .rm(rm), .a(a), .b(b), .out_valid(mul_valid), .res(mul_res)
  );
endmodule
