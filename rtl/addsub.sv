// addsub: adder/subtractor built around a fast or a slow adder.
//
// For subtraction the second operand passes through a complementor (one XOR
// per bit controlled by the ADD/SUB line) and an OR gate forces the adder's
// carry in high, which forms the two's complement of the subtrahend.  With
// FAST = 1 the adder is the carry look-ahead one (one 5 ns cycle), with
// FAST = 0 the carry ripple one (three cycles).  cout is the adder's carry
// out (for subtraction, 1 means no borrow).  Combinational.
// The complement-and-carry structure follows the original design; choosing
// the carry look-ahead adder for the fast and the ripple adder for the slow
// variant through one parameter is this design's choice.
module addsub #(
  parameter int W    = 32,
  parameter bit FAST = 1'b1
) (
  input  logic [W-1:0] a,     // augend / minuend
  input  logic [W-1:0] b,     // addend / subtrahend
  input  logic         sub,   // 0: a + b + cin, 1: a - b
  input  logic         cin,
  output logic [W-1:0] s,     // sum / difference
  output logic         cout
);
  logic [W-1:0] b_c;
  logic         c_in;
  assign b_c  = b ^ {W{sub}};
  assign c_in = cin | sub;

  if (FAST) begin : g_fast
    cla_adder #(.W(W)) u_add (.a(a), .b(b_c), .cin(c_in), .sum(s), .cout(cout));
  end else begin : g_slow
    ripple_adder #(.W(W)) u_add (.a(a), .b(b_c), .cin(c_in), .sum(s), .cout(cout));
  end
endmodule
