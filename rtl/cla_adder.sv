// cla_adder: W-bit carry look-ahead adder, the fast high-power adder.
//
// The operands are split into W/4 cla4 blocks.  A second look-ahead level
// computes every block's carry in directly from the block generate and
// propagate signals and the carry in, C(j) = BG(j-1) + BP(j-1) BG(j-2) + ...
// + BP(j-1)..BP(0) Cin, so no carry ripples between blocks.  The two-level
// organisation is this design's choice: what the design asks for is only an
// adder with a parallel carry network, fast enough for one 5 ns cycle.
// W must be a multiple of 4.  Combinational.
module cla_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NB = W / 4;

  logic [NB-1:0] bg, bp, bco;
  logic [NB:0]   bc;   // carry into each block; bc[NB] is the carry out

  always_comb begin
    bc[0] = cin;
    for (int j = 1; j <= NB; j++) begin
      logic term;
      logic acc;
      acc = 1'b0;
      // sum of products over all generating blocks below j
      for (int k = 0; k < j; k++) begin
        term = bg[k];
        for (int m = k + 1; m < j; m++) term = term & bp[m];
        acc = acc | term;
      end
      term = cin;
      for (int m = 0; m < j; m++) term = term & bp[m];
      bc[j] = acc | term;
    end
  end

  for (genvar j = 0; j < NB; j++) begin : g_blk
    cla4 u_blk (
      .a   (a[4*j +: 4]),
      .b   (b[4*j +: 4]),
      .cin (bc[j]),
      .sum (sum[4*j +: 4]),
      .cout(bco[j]),
      .bg  (bg[j]),
      .bp  (bp[j])
    );
  end

  // The last block's own carry out equals the look-ahead carry out; the
  // look-ahead one is used.
  assign cout = bc[NB];
  logic unused_bco;
  assign unused_bco = ^bco;
endmodule
