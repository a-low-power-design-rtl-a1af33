// shift_unit: register shift and rotate functional unit.
//
// The amount is the low log2(W) bits of b.  fn selects FN_SHL (logical left),
// FN_SHR (logical right), FN_ROL (rotate left) or FN_ROR (rotate right).  The
// circuit's 11 ns delay makes it a three-cycle unit at a 5 ns clock.  The
// choice of the four operations and of b as the amount is this design's
// own.  Combinational.
module shift_unit
  import alu_pkg::*;
#(
  parameter int W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   fn,
  output logic [W-1:0] y
);
  localparam int SW = $clog2(W);
  logic [SW-1:0]  sh;
  logic [2*W-1:0] rl, rr;
  assign sh = b[SW-1:0];
  assign rl = {a, a} << sh;
  assign rr = {a, a} >> sh;

  always_comb begin
    case (fn)
      FN_SHR:  y = a >> sh;
      FN_ROL:  y = rl[2*W-1:W];
      FN_ROR:  y = rr[W-1:0];
      default: y = a << sh;   // FN_SHL
    endcase
  end
endmodule
