// cla_half: H-bit Kogge-Stone parallel-prefix adder, one half of split_cla.
//
// Bit generate/propagate pairs are combined in ceil(log2 H) prefix levels.
// The carry-in enters as the generate of a virtual bit -1, so every prefix
// output is already the carry into the next bit. The group generate/propagate
// of the whole half (without the carry-in) are brought out so the parent can
// form its root carry. The paper asks only for a fast carry-lookahead tree;
// the Kogge-Stone form is this design's choice. Combinational.
module cla_half #(
  parameter int unsigned H = 32
) (
  input  logic [H-1:0] x,
  input  logic [H-1:0] y,
  input  logic         cin,
  output logic [H-1:0] sum,
  output logic         g,
  output logic         p
);
  localparam int unsigned LV = $clog2(H) + 1;

  logic [H-1:0] bg, bp;
  logic [H:0]   gg [LV+1];   // index 0 is the virtual carry-in bit
  logic [H:0]   pp [LV+1];
  logic [H:0]   ng [LV+1];   // same tree without the carry-in, for g/p
  logic [H:0]   np [LV+1];

  assign bg = x & y;
  assign bp = x ^ y;

  always_comb begin
    gg[0] = {bg, cin};
    pp[0] = {bp, 1'b0};
    ng[0] = {bg, 1'b0};
    np[0] = {bp, 1'b1};
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i <= H; i++) begin
        if (i >= (1 << l)) begin
          gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-(1<<l)]);
          pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
          ng[l+1][i] = ng[l][i] | (np[l][i] & ng[l][i-(1<<l)]);
          np[l+1][i] = np[l][i] & np[l][i-(1<<l)];
        end else begin
          gg[l+1][i] = gg[l][i];
          pp[l+1][i] = pp[l][i];
          ng[l+1][i] = ng[l][i];
          np[l+1][i] = np[l][i];
        end
      end
    end
  end

  // gg[LV][i] is the carry out of bit i-1, i.e. the carry into bit i-1+1.
  assign sum = bp ^ gg[LV][H-1:0];
  assign g   = ng[LV][H];
  assign p   = np[LV][H];
endmodule
