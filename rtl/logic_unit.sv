// logic_unit: the logic-operation functional unit (AND, OR, XOR, NOT) plus a
// register move.
//
// fn selects the operation: FN_MOV gives b, FN_AND a & b, FN_OR a | b,
// FN_XOR a ^ b, FN_NOT ~a.  These gates settle in 2 to 2.5 ns, well inside
// one 5 ns cycle, so the unit has a latency of one cycle.  Handling the
// register move here is this design's choice.  Combinational.
module logic_unit
  import alu_pkg::*;
#(
  parameter int W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   fn,
  output logic [W-1:0] y
);
  always_comb begin
    case (fn)
      FN_AND:  y = a & b;
      FN_OR:   y = a | b;
      FN_XOR:  y = a ^ b;
      FN_NOT:  y = ~a;
      default: y = b;     // FN_MOV
    endcase
  end
endmodule
