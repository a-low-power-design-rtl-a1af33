// tb_logic_unit: every logic function (MOV, AND, OR, XOR, NOT) against the
// SystemVerilog operators on random operands.
module tb_logic_unit;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y;
  logic [2:0]  fn;

  logic_unit dut (.a, .b, .fn, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] exp;
      a = $urandom; b = $urandom; fn = 3'($urandom_range(0, 4));
      @(posedge clk);
      case (fn)
        FN_AND:  exp = a & b;
        FN_OR:   exp = a | b;
        FN_XOR:  exp = a ^ b;
        FN_NOT:  exp = ~a;
        default: exp = b;
      endcase
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL fn=%0d a=%h b=%h y=%h exp=%h", fn, a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
