// cla4: 4-bit carry look-ahead adder block.
//
// Each bit forms a propagate P = A XOR B and a generate G = A AND B.  All
// four carries are computed in parallel as sums of products of P, G and the
// carry in (C0 = G0 + P0 Cin, C1 = G1 + P1 G0 + P1 P0 Cin, ...), and each sum
// bit is P XOR the carry from the bit below.  Besides the four sums and the
// carry out C3, the block gives a block generate and block propagate so a
// second look-ahead level can compute the carries between blocks; those two
// outputs are this design's addition to the plain 4-bit block.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic       bg,    // block generate
  output logic       bp     // block propagate
);
  logic [3:0] p, g, c;
  assign p = a ^ b;
  assign g = a & b;

  assign c[0] = g[0] | (p[0] & cin);
  assign c[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
  assign c[3] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
              | (p[3] & p[2] & p[1] & p[0] & cin);

  assign sum  = p ^ {c[2:0], cin};
  assign cout = c[3];
  assign bg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign bp   = &p;
endmodule
