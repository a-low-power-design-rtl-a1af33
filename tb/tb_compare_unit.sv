// tb_compare_unit: equality and unsigned less-than flags on equal, near
// and random operands.
module tb_compare_unit;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [2:0]  fn;
  logic        flag;

  compare_unit dut (.a, .b, .fn, .flag);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y, logic [2:0] f);
    logic exp;
    a = x; b = y; fn = f;
    @(posedge clk);
    exp = (f == FN_LTU) ? (x < y) : (x == y);
    checks++;
    if (flag !== exp) begin
      failures++;
      $display("FAIL fn=%0d %h %h flag=%b", f, x, y, flag);
    end
  endtask

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] x;
      x = $urandom;
      check(x, x, FN_EQ);
      check(x, x ^ (32'(1) << $urandom_range(0, 31)), FN_EQ);
      check(x, x, FN_LTU);
      check(x, $urandom, FN_LTU);
      check($urandom, x, FN_LTU);
    end
    check(32'd0, '1, FN_LTU);
    check('1, 32'd0, FN_LTU);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
