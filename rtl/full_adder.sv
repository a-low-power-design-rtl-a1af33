// full_adder: one-bit full adder cell, the building block of the slow
// (carry ripple) adder.
//
// sum  = a XOR b XOR cin
// cout = a AND b OR (a OR b) AND cin
//
// These are the textbook full adder equations used by the design; the cell is
// purely combinational.
// The sum and carry equations follow the original design.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | ((a | b) & cin);
endmodule
