// tb_fp_mul_pipe: self-checking test of the split multiplier pipeline.
//
// Offers a random operation (double, pair of singles or interval, random
// rounding mode) every cycle, holding it while in_ready is low. Double and
// pair results are predicted by the exact-integer reference; an interval
// product [a,b]*[c,d] is predicted as [min of the four products rounded
// down, max of the four products rounded up], which equals rounding the exact
// minimum and maximum because rounding is monotonic (zeros of either sign are
// compared as equal there). Latency must be 6, and 7 for interval products;
// refused offers are counted and must occur.
`timescale 1ns/1ps
module tb_fp_mul_pipe;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 12000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready;
  fpu_mode_e   mode;
  rnd_mode_e   rm;
  logic [63:0] a, b, res;
  logic        out_valid;

  int checks = 0, failures = 0, cycle = 0, stalls = 0, n_iv = 0;

  typedef struct { logic [63:0] exp; int t; int lat; bit iv; logic [63:0] a, b; int mode, rm; } item_t;
  item_t q[$];

  fp_mul_pipe dut (.*);

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

  function automatic logic [63:0] predict(logic [63:0] x, logic [63:0] y, fpu_mode_e md,
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
        h = 64'h7F80_0000;  // +inf as start of the minimum
        l = 64'hFF80_0000;  // -inf as start of the maximum
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

  // Scoreboard: push on acceptance, check on result.
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      item_t it;
      it.exp = predict(a, b, mode, rm); it.t = cycle; it.iv = (mode == MODE_INTERVAL);
      it.lat = it.iv ? 7 : 6; it.a = a; it.b = b; it.mode = int'(mode); it.rm = int'(rm);
      q.push_back(it);
    end
    if (rst_n && out_valid) begin
      item_t it;
      logic [63:0] got;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected result %h", res);
      end else begin
        it = q.pop_front();
        got = it.iv ? {z0(res[63:32]), z0(res[31:0])} : res;
        if (got !== it.exp || cycle - it.t != it.lat) begin
          failures++;
          if (failures < 20)
            $display("FAIL mode=%0d rm=%0d a=%h b=%h got=%h exp=%h latency=%0d",
                     it.mode, it.rm, it.a, it.b, res, it.exp, cycle - it.t);
        end
      end
    end
    cycle <= cycle + 1;
  end

  // Offer one operation and hold it until it is accepted.
  task automatic offer(logic [63:0] x, logic [63:0] y, fpu_mode_e md, rnd_mode_e r);
    @(negedge clk);
    in_valid = 1; a = x; b = y; mode = md; rm = r;
    #1;
    while (!in_ready) begin
      stalls++;
      @(negedge clk);
      #1;
    end
    @(posedge clk);
  endtask

  initial begin
    logic [63:0] x, y;
    fpu_mode_e md;
    rnd_mode_e r;
    int c;
    in_valid = 0; a = 0; b = 0; mode = MODE_DOUBLE; rm = RM_RNE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Directed: 0 * inf is NaN; [-1,2] * [-3,4] = [-6, 8]; double 1.5 * 2.5 = 3.75.
    offer(64'h0, 64'h7FF0_0000_0000_0000, MODE_DOUBLE, RM_RNE);
    offer({32'hBF80_0000, 32'h4000_0000}, {32'hC040_0000, 32'h4080_0000}, MODE_INTERVAL, RM_RNE);
    offer(64'h3FF8_0000_0000_0000, 64'h4004_0000_0000_0000, MODE_DOUBLE, RM_RNE);
    offer({32'h7F00_0000, 32'h3F80_0000}, {32'h7F00_0000, 32'h0080_0000}, MODE_PAIR, RM_RZ);
    for (int i = 0; i < N; i++) begin
      md = fpu_mode_e'($urandom_range(0, 2));
      r  = rnd_mode_e'($urandom_range(0, 3));
      if (md == MODE_DOUBLE) begin
        c = int'($urandom_range(1, 2046));
        x = rand_dp(c);
        y = rand_dp(2046 - c + int'($urandom_range(0, 40)));
      end else begin
        c = int'($urandom_range(1, 254));
        x = {rand_sp(c), rand_sp(c)};
        c = 254 - c + int'($urandom_range(0, 10));
        y = {rand_sp(c), rand_sp(c)};
        if (md == MODE_INTERVAL) begin
          if (sp_key(x[63:32]) > sp_key(x[31:0])) x = {x[31:0], x[63:32]};
          if (sp_key(y[63:32]) > sp_key(y[31:0])) y = {y[31:0], y[63:32]};
          n_iv++;
        end
      end
      offer(x, y, md, r);
      if ($urandom_range(0, 15) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    if (stalls == 0) begin
      failures++;
      $display("the issue stall never happened");
    end
    $display("stalls=%0d interval ops=%0d", stalls, n_iv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
