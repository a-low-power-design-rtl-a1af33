// div_fast: fast W-bit unsigned divider giving the quotient only.
//
// Written as a behavioural division so that synthesis builds its fastest
// divider (about 30 ns in the 0.35 um library the design was sized for:
// seven 5 ns cycles).  A behavioural divide operator yields no remainder;
// divisions that need one use the slow divider.  Division by zero returns
// all ones, the value the slow divider's algorithm produces, so both units
// agree; that convention is this design's.  Combinational.
module div_fast #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,   // dividend
  input  logic [W-1:0] b,   // divisor
  output logic [W-1:0] q
);
  assign q = (b == '0) ? '1 : a / b;
endmodule
