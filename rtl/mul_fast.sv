// mul_fast: fast W x W -> 2W unsigned multiplier.
//
// Written as a behavioural product so that synthesis builds its fastest
// parallel multiplier (about 8.2 ns in the 0.35 um library the design was
// sized for: two 5 ns cycles).  Combinational.
// A behavioural multiplier as in the original design; the 64-bit unsigned
// product is kept in full, which is this design's choice.
module mul_fast #(
  parameter int W = 32
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  assign p = (2*W)'(a) * (2*W)'(b);
endmodule
