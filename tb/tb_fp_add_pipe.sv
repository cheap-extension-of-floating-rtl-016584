// tb_fp_add_pipe: self-checking test of the split addition pipeline.
//
// Issues one random operation per cycle (random mode, add/sub and rounding
// mode, operands with exponents clustered so that every alignment and
// cancellation case occurs), predicts each result with the exact-integer
// reference in fp_ref_pkg and checks it, and checks that every result
// appears exactly 6 cycles after issue. Directed cases cover infinities,
// NaN, exact zero results and overflow. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_fp_add_pipe;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 20000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid;
  fpu_mode_e   mode;
  logic        sub;
  rnd_mode_e   rm;
  logic [63:0] a, b, res;
  logic        out_valid;

  // cycle counts clock edges; an input is sampled at edge it.t+1 and its
  // result must be visible to the checker at edge it.t+1+6.
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [63:0] exp; int t; logic [63:0] a, b; int mode, sub, rm; } item_t;
  item_t q[$];

  fp_add_pipe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] predict(logic [63:0] x, logic [63:0] y, fpu_mode_e md,
                                          logic s, rnd_mode_e r);
    logic [63:0] h, l;
    case (md)
      MODE_DOUBLE: return ref_add(x, y, s, int'(r), 1);
      MODE_PAIR: begin
        h = ref_add({32'd0, x[63:32]}, {32'd0, y[63:32]}, s, int'(r), 0);
        l = ref_add({32'd0, x[31:0]},  {32'd0, y[31:0]},  s, int'(r), 0);
        return {h[31:0], l[31:0]};
      end
      default: begin
        // [a,b] + [c,d] = [a+c down, b+d up]; [a,b] - [c,d] = [a-d down, b-c up]
        h = ref_add({32'd0, x[63:32]}, {32'd0, s ? y[31:0] : y[63:32]}, s, 3, 0);
        l = ref_add({32'd0, x[31:0]},  {32'd0, s ? y[63:32] : y[31:0]}, s, 2, 0);
        return {h[31:0], l[31:0]};
      end
    endcase
  endfunction

  task automatic issue(logic [63:0] x, logic [63:0] y, fpu_mode_e md, logic s, rnd_mode_e r,
                       logic [63:0] expv);
    item_t it;
    in_valid <= 1; a <= x; b <= y; mode <= md; sub <= s; rm <= r;
    it.exp = expv; it.t = cycle; it.a = x; it.b = y; it.mode = int'(md); it.sub = s; it.rm = int'(r);
    q.push_back(it);
    @(posedge clk);
  endtask

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected result %h", res);
      end else begin
        it = q.pop_front();
        if (res !== it.exp || cycle - it.t - 1 != 6) begin
          failures++;
          if (failures < 20)
            $display("FAIL mode=%0d sub=%0d rm=%0d a=%h b=%h got=%h exp=%h latency=%0d",
                     it.mode, it.sub, it.rm, it.a, it.b, res, it.exp, cycle - it.t - 1);
        end
      end
    end
  end

  initial begin
    logic [63:0] x, y;
    fpu_mode_e md;
    logic s;
    rnd_mode_e r;
    int c;
    in_valid = 0; a = 0; b = 0; mode = MODE_DOUBLE; sub = 0; rm = RM_RNE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Directed special values.
    issue(64'h7FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, MODE_DOUBLE, 0, RM_RNE, 64'h7FF0_0000_0000_0000);
    issue(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, MODE_DOUBLE, 1, RM_RNE, DP_QNAN);
    issue(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, MODE_DOUBLE, 1, RM_RD, 64'h8000_0000_0000_0000);
    issue(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, MODE_DOUBLE, 1, RM_RNE, 64'h0);
    issue(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, MODE_DOUBLE, 0, RM_RZ, 64'h7FEF_FFFF_FFFF_FFFF);
    issue(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, MODE_DOUBLE, 0, RM_RNE, 64'h7FF0_0000_0000_0000);
    issue({32'h7F80_0000, 32'h3F80_0000}, {32'h3F80_0000, 32'h7FC0_0000}, MODE_PAIR, 0, RM_RNE,
          {32'h7F80_0000, SP_QNAN});
    // [1,2] + [-3, 0.5] = [-2, 2.5]; [1,2] - [-3,0.5] = [0.5, 5]
    issue({32'h3F80_0000, 32'h4000_0000}, {32'hC040_0000, 32'h3F00_0000}, MODE_INTERVAL, 0, RM_RNE,
          {32'hC000_0000, 32'h4020_0000});
    issue({32'h3F80_0000, 32'h4000_0000}, {32'hC040_0000, 32'h3F00_0000}, MODE_INTERVAL, 1, RM_RNE,
          {32'h3F00_0000, 32'h40A0_0000});
    // [1,1] + [2^-30, 2^-30]: outward rounding widens the interval.
    issue({32'h3F80_0000, 32'h3F80_0000}, {32'h3080_0000, 32'h3080_0000}, MODE_INTERVAL, 0, RM_RNE,
          {32'h3F80_0000, 32'h3F80_0001});
    // Random operations, one per cycle.
    for (int i = 0; i < N; i++) begin
      md = fpu_mode_e'($urandom_range(0, 2));
      s  = 1'($urandom_range(0, 1));
      r  = rnd_mode_e'($urandom_range(0, 3));
      if (md == MODE_DOUBLE) begin
        c = int'($urandom_range(1, 2046));
        x = rand_dp(c);
        y = rand_dp(c);
      end else begin
        c = int'($urandom_range(1, 254));
        x = {rand_sp(c), rand_sp(c)};
        y = {rand_sp(c), rand_sp(c)};
        if (md == MODE_INTERVAL) begin
          // Order the bounds of each interval.
          if (sp_key(x[63:32]) > sp_key(x[31:0])) x = {x[31:0], x[63:32]};
          if (sp_key(y[63:32]) > sp_key(y[31:0])) y = {y[31:0], y[63:32]};
        end
      end
      issue(x, y, md, s, r, predict(x, y, md, s, r));
      if ($urandom_range(0, 15) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
