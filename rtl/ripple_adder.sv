// ripple_adder: W-bit carry ripple adder, the slow low-power adder.
//
// W full adder cells are chained; the carry of bit i feeds bit i+1, so the
// delay grows linearly with W (about 12 ns for 32 bits in the 0.35 um
// library the design was sized for, hence 3 cycles of a 5 ns clock).  The
// module is combinational; the latency is enforced by the control unit,
// which samples the result after the unit's cycle count.
// The full-adder chain follows the original design.
module ripple_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
