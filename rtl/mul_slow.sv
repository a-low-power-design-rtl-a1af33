// mul_slow: slow W x W -> 2W unsigned multiplier by shifted parallel additions.
//
// Pencil-and-paper multiplication adds W rows, row i being the multiplicand
// ANDed with multiplier bit i.  Here the rows are summed pairwise in a tree:
// at level 1, row 2k plus row 2k+1 shifted left by one; at level l, partial
// sum 2k plus partial sum 2k+1 shifted left by 2^(l-1).  After log2(W)
// levels one sum remains, the product.  For 234 x 196 at W = 8 the level-1
// sums are 702, 0, 234, 0, the level-2 sums 2808 and 936, and the product
// 45864.  The tree of simple adders is small and slow (about 27 ns: six
// 5 ns cycles).  W must be a power of two.  Combinational.
// The pairwise shifted-addition tree follows the original design; unsigned
// operands are this design's choice.
module mul_slow #(
  parameter int W = 32
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int L = $clog2(W);

  // t[l][k]: partial sum k of level l, aligned to bit k*2^l of the product.
  logic [2*W-1:0] t [L+1][W];

  always_comb begin
    for (int l = 0; l <= L; l++)
      for (int k = 0; k < W; k++) t[l][k] = '0;
    for (int k = 0; k < W; k++)
      t[0][k] = (2*W)'(a & {W{b[k]}});
    for (int l = 1; l <= L; l++)
      for (int k = 0; k < (W >> l); k++)
        t[l][k] = t[l-1][2*k] + (t[l-1][2*k+1] << (1 << (l-1)));
  end

  assign p = t[L][0];
endmodule
