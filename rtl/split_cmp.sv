// split_cmp: tree comparator of two unsigned 2*H-bit numbers whose last
// stage can be cut off to deliver two independent H-bit comparisons.
//
// Every bit gives a (greater, equal) pair; pairs are merged in a binary tree,
// the more significant side deciding unless it is equal. Each H-bit half is
// its own tree. The last (root) stage merges the two halves; a multiplexer
// bypasses it in split mode, so the upper-half outputs then describe the
// upper lane alone. Cutting the tree at its root follows the document; the
// (greater, equal) encoding is this design's choice. H must be a power of two.
// Combinational.
//
// split=0: gt_lo/eq_lo compare the full 2H-bit words; gt_hi/eq_hi the upper halves.
// split=1: gt_hi/eq_hi compare the upper halves, gt_lo/eq_lo the lower halves.
module split_cmp #(
  parameter int unsigned H = 8
) (
  input  logic           split,
  input  logic [2*H-1:0] a,
  input  logic [2*H-1:0] b,
  output logic           gt_hi,
  output logic           eq_hi,
  output logic           gt_lo,
  output logic           eq_lo
);
  localparam int unsigned LV = $clog2(H);

  logic [H-1:0] gt_t [2][LV+1];
  logic [H-1:0] eq_t [2][LV+1];
  logic gh, eh, gl, el;

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      gt_t[h][0] = a[h*H +: H] & ~b[h*H +: H];
      eq_t[h][0] = ~(a[h*H +: H] ^ b[h*H +: H]);
      for (int l = 0; l < LV; l++) begin
        gt_t[h][l+1] = '0;
        eq_t[h][l+1] = '0;
        for (int i = 0; i < (H >> (l + 1)); i++) begin
          gt_t[h][l+1][i] = gt_t[h][l][2*i+1] | (eq_t[h][l][2*i+1] & gt_t[h][l][2*i]);
          eq_t[h][l+1][i] = eq_t[h][l][2*i+1] & eq_t[h][l][2*i];
        end
      end
    end
    gh = gt_t[1][LV][0];
    eh = eq_t[1][LV][0];
    gl = gt_t[0][LV][0];
    el = eq_t[0][LV][0];
    // Root stage, bypassed in split mode.
    gt_hi = gh;
    eq_hi = eh;
    gt_lo = split ? gl : (gh | (eh & gl));
    eq_lo = split ? el : (eh & el);
  end
endmodule
