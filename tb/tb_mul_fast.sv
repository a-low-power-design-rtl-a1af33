// tb_mul_fast: the fast multiplier's 64-bit product against a shift-and-add
// reference, on corner cases and random operands.
module tb_mul_fast;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [63:0] p;

  mul_fast dut (.a, .b, .p);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_mul(logic [31:0] x, logic [31:0] y);
    logic [63:0] acc = '0;
    for (int i = 0; i < 32; i++) if (y[i]) acc += 64'(x) << i;
    return acc;
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] y);
    a = x; b = y;
    @(posedge clk);
    checks++;
    if (p !== ref_mul(x, y)) begin
      failures++;
      $display("FAIL %h * %h = %h exp %h", x, y, p, ref_mul(x, y));
    end
  endtask

  initial begin
    check(32'd234, 32'd196);
    check('1, '1);
    check(32'd0, '1);
    check(32'h8000_0000, 32'd2);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
