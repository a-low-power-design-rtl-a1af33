// compare_unit: register compare functional unit writing one flag bit.
//
// FN_EQ sets the flag when a equals b, FN_LTU when a is below b as unsigned
// numbers.  Only the one-bit flag register is written, which is why the unit
// is cheaper than the shifter.  Its 8 ns delay makes it a two-cycle unit at a
// 5 ns clock.  The two conditions offered are this design's choice.
// Combinational.
module compare_unit
  import alu_pkg::*;
#(
  parameter int W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   fn,
  output logic         flag
);
  always_comb begin
    case (fn)
      FN_LTU:  flag = (a < b);
      default: flag = (a == b);  // FN_EQ
    endcase
  end
endmodule
