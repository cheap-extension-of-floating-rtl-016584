// tb_interval_fpu: end-to-end test of the whole FPU at its default size.
//
// Offers a random stream of additions, subtractions and multiplications in
// all three modes (double, two singles, single interval) on the shared
// operand buses, honouring in_ready, and checks every result on the adder
// and multiplier result buses against the exact-integer reference, together
// with the latencies (6; 7 for interval products). It also counts how often
// each mechanism of the design occurred, and fails if any never did:
// exponent swap, sticky bits from the alignment shift, negative sums that
// are converted (R = -R), inexact rounding, interval operations of each kind,
// the bypass of the carry-save tree, the min/max stage, refused offers, and
// overflow of a result.
`timescale 1ns/1ps
module tb_interval_fpu;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 8000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready;
  fpu_op_e     op;
  fpu_mode_e   mode;
  rnd_mode_e   rm;
  logic [63:0] a, b, add_res, mul_res;
  logic        add_valid, mul_valid;

  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [63:0] exp; int t; int lat; bit iv; } item_t;
  item_t qa[$], qm[$];

  // Mechanism counters.
  localparam int NM = 11;
  int    cnt [NM];
  string nm  [NM] = '{"exponent swap", "alignment sticky", "conversion R=-R", "inexact rounding",
                      "interval add", "interval sub", "interval mul", "carry-save bypass",
                      "min/max stage", "refused offer", "overflow"};

  interval_fpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] z0(logic [31:0] x);
    return (x[30:0] == 0) ? 32'd0 : x;
  endfunction

  function automatic logic [63:0] p_add(logic [63:0] x, logic [63:0] y, fpu_mode_e md,
                                        logic s, rnd_mode_e r);
    logic [63:0] h, l;
    case (md)
      MODE_DOUBLE: return ref_add(x, y, s, int'(r), 1);
      MODE_PAIR: begin
        h = ref_add({32'd0, x[63:32]}, {32'd0, y[63:32]}, s, int'(r), 0);
        l = ref_add({32'd0, x[31:0]},  {32'd0, y[31:0]},  s, int'(r), 0);
      end
      default: begin
        h = ref_add({32'd0, x[63:32]}, {32'd0, s ? y[31:0] : y[63:32]}, s, 3, 0);
        l = ref_add({32'd0, x[31:0]},  {32'd0, s ? y[63:32] : y[31:0]}, s, 2, 0);
      end
    endcase
    return {h[31:0], l[31:0]};
  endfunction

  function automatic logic [63:0] p_mul(logic [63:0] x, logic [63:0] y, fpu_mode_e md,
                                        rnd_mode_e r);
    logic [63:0] h, l, t;
    logic [31:0] xs [2], ys [2];
    case (md)
      MODE_DOUBLE: return ref_mul(x, y, int'(r), 1);
      MODE_PAIR: begin
        h = ref_mul({32'd0, x[63:32]}, {32'd0, y[63:32]}, int'(r), 0);
        l = ref_mul({32'd0, x[31:0]},  {32'd0, y[31:0]},  int'(r), 0);
        return {h[31:0], l[31:0]};
      end
      default: begin
        xs = '{x[63:32], x[31:0]};
        ys = '{y[63:32], y[31:0]};
        h = 64'h7F80_0000;
        l = 64'hFF80_0000;
        for (int i = 0; i < 2; i++)
          for (int j = 0; j < 2; j++) begin
            t = ref_mul({32'd0, xs[i]}, {32'd0, ys[j]}, 3, 0);
            if (sp_key(t[31:0]) < sp_key(h[31:0])) h = t;
            t = ref_mul({32'd0, xs[i]}, {32'd0, ys[j]}, 2, 0);
            if (sp_key(t[31:0]) > sp_key(l[31:0])) l = t;
          end
        return {z0(h[31:0]), z0(l[31:0])};
      end
    endcase
  endfunction

  function automatic bit is_ovf(logic [63:0] r, fpu_mode_e md);
    if (md == MODE_DOUBLE) return &r[62:52];
    return (&r[62:55]) || (&r[30:23]);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // Scoreboards.
      if (in_valid && in_ready) begin
        item_t it;
        it.t = cycle;
        it.iv = (mode == MODE_INTERVAL);
        if (op == OP_MUL) begin
          it.exp = p_mul(a, b, mode, rm);
          it.lat = it.iv ? 7 : 6;
          qm.push_back(it);
          if (it.iv) cnt[6]++;
        end else begin
          it.exp = p_add(a, b, mode, op == OP_SUB, rm);
          it.lat = 6;
          qa.push_back(it);
          if (it.iv && op == OP_ADD) cnt[4]++;
          if (it.iv && op == OP_SUB) cnt[5]++;
        end
        if (is_ovf(it.exp, mode)) cnt[10]++;
      end
      if (add_valid) begin
        item_t it;
        checks++;
        it = (qa.size() != 0) ? qa.pop_front() : '{default: 0};
        if (add_res !== it.exp || cycle - it.t != 6) begin
          failures++;
          if (failures < 20) $display("FAIL add got=%h exp=%h lat=%0d", add_res, it.exp, cycle - it.t);
        end
      end
      if (mul_valid) begin
        item_t it;
        logic [63:0] got;
        checks++;
        it = (qm.size() != 0) ? qm.pop_front() : '{default: 0};
        got = it.iv ? {z0(mul_res[63:32]), z0(mul_res[31:0])} : mul_res;
        if (got !== it.exp || cycle - it.t != it.lat) begin
          failures++;
          if (failures < 20) $display("FAIL mul got=%h exp=%h lat=%0d", mul_res, it.exp, cycle - it.t);
        end
      end
      // Internal mechanisms, observed inside the pipelines.
      if (dut.u_add.c0.v && dut.u_add.swp != 0) cnt[0]++;
      if (dut.u_add.c3.v && (dut.u_add.mb3[0] || (dut.u_add.c3.split && dut.u_add.mb3[32]))) cnt[1]++;
      if (dut.u_add.c4.v && dut.u_add.rneg4 != 0) cnt[2]++;
      if (dut.u_add.c4.v && (dut.u_add.ix_hi || dut.u_add.ix_lo)) cnt[3]++;
      if (dut.u_mul.c1.v && dut.u_mul.c1.mode != MODE_DOUBLE) cnt[7]++;
      if (dut.u_mul.v5) cnt[8]++;
      if (in_valid && !in_ready) cnt[9]++;
    end
    cycle <= cycle + 1;
  end

  initial begin
    logic [63:0] x, y;
    int c;
    in_valid = 0; a = 0; b = 0; op = OP_ADD; mode = MODE_DOUBLE; rm = RM_RNE;
    foreach (cnt[i]) cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      op   = fpu_op_e'($urandom_range(0, 2));
      mode = fpu_mode_e'($urandom_range(0, 2));
      rm   = rnd_mode_e'($urandom_range(0, 3));
      if (mode == MODE_DOUBLE) begin
        c = int'($urandom_range(1, 2046));
        x = rand_dp(c);
        y = (op == OP_MUL) ? rand_dp(2046 - c + int'($urandom_range(0, 40))) : rand_dp(c);
      end else begin
        c = int'($urandom_range(1, 254));
        x = {rand_sp(c), rand_sp(c)};
        if (op == OP_MUL) c = 254 - c + int'($urandom_range(0, 10));
        y = {rand_sp(c), rand_sp(c)};
        if (mode == MODE_INTERVAL) begin
          if (sp_key(x[63:32]) > sp_key(x[31:0])) x = {x[31:0], x[63:32]};
          if (sp_key(y[63:32]) > sp_key(y[31:0])) y = {y[31:0], y[63:32]};
        end
      end
      a = x; b = y;
      in_valid = ($urandom_range(0, 9) != 0);
      #1;
      while (in_valid && !in_ready) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(posedge clk);
    if (qa.size() != 0 || qm.size() != 0) begin
      failures++;
      $display("results missing: add %0d mul %0d", qa.size(), qm.size());
    end
    for (int i = 0; i < NM; i++) begin
      $display("mechanism %-18s occurred %0d times", nm[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
