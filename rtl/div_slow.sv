// div_slow: slow W-bit unsigned divider giving quotient and remainder
// (non-performing, i.e. restoring, division).
//
// The accumulator starts as the dividend and bpower as the divisor shifted
// left by W-1; an iteration mask starts with only its MSB set.  W steps
// follow.  Each step subtracts bpower from the accumulator in 2W-bit two's
// complement; if the difference is not negative it becomes the new
// accumulator and the mask bit is ORed into the quotient, otherwise the
// accumulator is kept.  Then mask and bpower shift right by one.  The
// remainder is the final accumulator.  For 27 / 11 at W = 5 this gives
// quotient 2, remainder 5.  A zero difference counts as "positive" (the
// subtraction is kept), which the algorithm needs for exact divisions.  The
// W steps are unrolled into a chain of subtractors and multiplexers, about
// 55 ns: eleven 5 ns cycles.  Division by zero gives an all-ones quotient
// and the dividend as remainder.  Combinational.
// The algorithm and its 27 / 11 example follow the original design; the fully
// unrolled combinational form and the division-by-zero result are this
// design's own choices.
module div_slow #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,   // dividend
  input  logic [W-1:0] b,   // divisor
  output logic [W-1:0] q,
  output logic [W-1:0] r
);
  logic [W-1:0]   acc  [W+1];
  logic [W-1:0]   quo  [W+1];
  logic [2*W-1:0] upd  [W];

  always_comb begin
    acc[0] = a;
    quo[0] = '0;
    for (int i = 0; i < W; i++) begin
      // bpower at step i is the divisor shifted left by W-1-i
      upd[i] = (2*W)'(acc[i]) - ((2*W)'(b) << (W - 1 - i));
      if (!upd[i][2*W-1]) begin
        acc[i+1] = upd[i][W-1:0];
        quo[i+1] = quo[i] | (W'(1) << (W - 1 - i));
      end else begin
        acc[i+1] = acc[i];
        quo[i+1] = quo[i];
      end
    end
  end

  assign q = quo[W];
  assign r = acc[W];
endmodule
