// tb_div_slow: the non-performing divider's quotient and remainder against
// a long-division reference; the 5-bit example 27 / 11 = 2 remainder 5;
// exact divisions, divisor 1 and division by zero (all-ones quotient,
// remainder = dividend).
module tb_div_slow;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, q, r;
  logic [4:0]  a5, b5, q5, r5;

  div_slow dut (.a, .b, .q, .r);
  div_slow #(.W(5)) dut5 (.a(a5), .b(b5), .q(q5), .r(r5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_qr(logic [31:0] x, logic [31:0] y);
    logic [32:0] rr = '0;
    logic [31:0] qq = '0;
    if (y == 0) return {32'hffff_ffff, x};
    for (int i = 31; i >= 0; i--) begin
      rr = {rr[31:0], x[i]};
      if (rr >= 33'(y)) begin rr -= 33'(y); qq[i] = 1'b1; end
    end
    return {qq, rr[31:0]};
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [63:0] e;
    a = x; b = y;
    @(posedge clk);
    e = ref_qr(x, y);
    checks++;
    if ({q, r} !== e) begin
      failures++;
      $display("FAIL %0d / %0d = %0d r %0d, exp %0d r %0d", x, y, q, r, e[63:32], e[31:0]);
    end
  endtask

  initial begin
    a5 = 5'd27; b5 = 5'd11;
    @(posedge clk);
    checks++;
    if (q5 !== 5'd2 || r5 !== 5'd5) begin
      failures++;
      $display("FAIL W=5 27/11 = %0d r %0d", q5, r5);
    end
    for (int x = 0; x < 32; x++)
      for (int y = 1; y < 32; y++) begin
        a5 = 5'(x); b5 = 5'(y);
        @(posedge clk);
        checks++;
        if (q5 !== 5'(x / y) || r5 !== 5'(x % y)) begin
          failures++;
          $display("FAIL W=5 %0d/%0d = %0d r %0d", x, y, q5, r5);
        end
      end
    check(32'd27, 32'd11);
    check(32'd22, 32'd11);
    check(32'd5, 32'd0);
    check('1, 32'd1);
    check('1, '1);
    check(32'd3, 32'd7);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom >> $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
