// split_rshift: variable arithmetic right shifter with sticky bit, cut in the
// middle of every stage so that it also works as two H-bit shifters.
//
// The shift is done in log2(2H) stages; stage k shifts by 2^k. In split mode
// the bits that would cross from the upper lane into the lower lane are
// replaced, at each stage, by copies of the lower lane's sign bit (these are
// the extra multiplexers in the middle of each stage), and each lane uses its
// own shift amount. Bit 0 of each lane is reserved for the sticky bit: it
// receives the OR of every input bit of that lane at positions 0..d, i.e.
// of all bits shifted below position 1. A second sticky logic serves the
// upper lane in split mode. Amounts are saturated to the lane width minus 1.
// Cutting the stages and doubling the sticky logic follow the document;
// the sticky convention (bit 0) is this design's choice. Combinational.
//
// split=0: d_lo (up to 2H-1) shifts the whole word, d_hi is ignored.
// split=1: d_hi shifts bits 2H-1:H, d_lo shifts bits H-1:0 (each up to H-1).
module split_rshift #(
  parameter int unsigned H = 32
) (
  input  logic                   split,
  input  logic [$clog2(2*H)-1:0] d_hi,
  input  logic [$clog2(2*H)-1:0] d_lo,
  input  logic [2*H-1:0]         x,
  output logic [2*H-1:0]         y
);
  localparam int unsigned W  = 2 * H;
  localparam int unsigned NS = $clog2(W);

  logic [NS-1:0] dh, dl;
  logic [W-1:0]  st [NS+1];
  logic [W-1:0]  mask;
  logic          sticky_full, sticky_hi, sticky_lo;

  always_comb begin
    // Per-lane shift amounts, saturated.
    if (split) begin
      dh = (d_hi > NS'(H - 1)) ? NS'(H - 1) : d_hi;
      dl = (d_lo > NS'(H - 1)) ? NS'(H - 1) : d_lo;
    end else begin
      dh = d_lo;
      dl = d_lo;
    end
    // Shift stages.
    st[0] = x;
    for (int k = 0; k < NS; k++) begin
      for (int i = 0; i < W; i++) begin
        logic src;
        if (i < H) begin
          // lower lane
          if (!dl[k])                 src = st[k][i];
          else if (i + (1 << k) < H)  src = st[k][i + (1 << k)];
          else if (split)             src = st[k][H-1];          // middle cut
          else if (i + (1 << k) < W)  src = st[k][i + (1 << k)];
          else                        src = st[k][W-1];
        end else begin
          // upper lane
          if (!dh[k])                 src = st[k][i];
          else if (i + (1 << k) < W)  src = st[k][i + (1 << k)];
          else                        src = st[k][W-1];
        end
        st[k+1][i] = src;
      end
    end
    // Sticky logic: mask of bit positions 0..d.
    for (int i = 0; i < W; i++) begin
      if (split) mask[i] = (i < H) ? (i <= int'(dl)) : (i - H <= int'(dh));
      else       mask[i] = (i <= int'(dl));
    end
    sticky_full = |(x & mask);
    sticky_lo   = |(x[H-1:0] & mask[H-1:0]);
    sticky_hi   = |(x[W-1:H] & mask[W-1:H]);
    y = st[NS];
    if (split) begin
      y[0] = sticky_lo;
      y[H] = sticky_hi;
    end else begin
      y[0] = sticky_full;
    end
  end
endmodule
