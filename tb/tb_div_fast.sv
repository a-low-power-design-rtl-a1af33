// tb_div_fast: the fast divider's quotient against a long-division
// reference, including exact divisions, divisor 1 and division by zero
// (all-ones quotient).
module tb_div_fast;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, q;

  div_fast dut (.a, .b, .q);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-serial long division, independent of the / operator
  function automatic logic [31:0] ref_q(logic [31:0] x, logic [31:0] y);
    logic [32:0] r = '0;
    logic [31:0] qq = '0;
    if (y == 0) return '1;
    for (int i = 31; i >= 0; i--) begin
      r = {r[31:0], x[i]};
      if (r >= 33'(y)) begin r -= 33'(y); qq[i] = 1'b1; end
    end
    return qq;
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] y);
    a = x; b = y;
    @(posedge clk);
    checks++;
    if (q !== ref_q(x, y)) begin
      failures++;
      $display("FAIL %0d / %0d = %0d exp %0d", x, y, q, ref_q(x, y));
    end
  endtask

  initial begin
    check(32'd27, 32'd11);
    check(32'd22, 32'd11);
    check(32'd5, 32'd0);
    check('1, 32'd1);
    check(32'd3, 32'd7);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom >> $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
