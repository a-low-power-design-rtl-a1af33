// tb_cla4: exhaustive check of the 4-bit carry look-ahead block: sum and
// carry out against +, block generate against the carry out with carry in
// 0, block propagate against "every bit propagates" (a XOR b all ones).
module tb_cla4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] a, b, sum;
  logic       cin, cout, bg, bp;

  cla4 dut (.a, .b, .cin, .sum, .cout, .bg, .bp);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [4:0] exp;
      {cin, a, b} = 9'(i);
      @(posedge clk);
      exp = 5'(a) + 5'(b) + 5'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        $display("FAIL %d + %d + %b = %d exp %d", a, b, cin, {cout, sum}, exp);
      end
      checks++;
      if (bg !== ((5'(a) + 5'(b)) > 5'd15)) begin
        failures++;
        $display("FAIL bg a=%d b=%d", a, b);
      end
      checks++;
      if (bp !== ((a ^ b) == 4'hf)) begin
        failures++;
        $display("FAIL bp a=%d b=%d", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
