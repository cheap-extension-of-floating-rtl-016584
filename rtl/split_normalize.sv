// split_normalize: normalization left shifter with leading-zero count, usable
// as one 2*H-bit unit or as two H-bit lanes.
//
// The leading zeros of each H-bit half are counted; in full-width mode the
// two counts are merged (the cut-off root stage, as in split_cmp). The word
// (or each lane) is then shifted left by lz-1, which puts its leading one
// just below the most significant bit (bit 2H-2, or bit H-2 of each lane);
// the most significant bit is the sign position of the datapath and is zero
// here. The shifter has log2(2H) stages, and in split mode no bit crosses from
// the lower lane into the upper one. A zero input gives zero, lz = lane width.
// The document names only a "variable left shift (normalization)"; the count
// and shifter structure are this design's choice. Combinational.
module split_normalize #(
  parameter int unsigned H = 32
) (
  input  logic                 split,
  input  logic [2*H-1:0]       x,
  output logic [2*H-1:0]       y,
  output logic [$clog2(2*H):0] lz_hi,   // split: upper lane count; else full count
  output logic [$clog2(2*H):0] lz_lo    // split: lower lane count; else full count
);
  localparam int unsigned W  = 2 * H;
  localparam int unsigned NS = $clog2(W);
  localparam int unsigned CW = NS + 1;

  logic [CW-1:0] zh, zl, sh_hi, sh_lo;
  logic [W-1:0]  st [NS+1];

  always_comb begin
    zh = CW'(H);
    for (int i = 0; i < H; i++) if (x[H+i]) zh = CW'(H - 1 - i);
    zl = CW'(H);
    for (int i = 0; i < H; i++) if (x[i]) zl = CW'(H - 1 - i);
    if (split) begin
      lz_hi = zh;
      lz_lo = zl;
    end else begin
      lz_hi = (zh == CW'(H)) ? zh + zl : zh;
      lz_lo = lz_hi;
    end
    sh_hi = (lz_hi == 0) ? '0 : lz_hi - 1'b1;
    sh_lo = (lz_lo == 0) ? '0 : lz_lo - 1'b1;
    st[0] = x;
    for (int k = 0; k < NS; k++) begin
      for (int i = 0; i < W; i++) begin
        logic src;
        if (i >= H) begin
          if (!sh_hi[k])                         src = st[k][i];
          else if (split && i - (1 << k) < H)    src = 1'b0;        // middle cut
          else if (i - (1 << k) >= 0)            src = st[k][i - (1 << k)];
          else                                   src = 1'b0;
        end else begin
          if (!sh_lo[k])                         src = st[k][i];
          else if (i - (1 << k) >= 0)            src = st[k][i - (1 << k)];
          else                                   src = 1'b0;
        end
        st[k+1][i] = src;
      end
    end
    y = st[NS];
  end
endmodule
