// tb_mul_slow: the slow (shifted parallel additions) multiplier against a shift-and-add
// reference, on corner cases and random operands.
module tb_mul_slow;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [63:0] p;

  mul_slow dut (.a, .b, .p);

  // 8-bit instance: 234 x 196 = 45864 (11101010 x 11000100)
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  mul_slow #(.W(8)) dut8 (.a(a8), .b(b8), .p(p8));

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
    a8 = 8'd234; b8 = 8'd196;
    @(posedge clk);
    checks++;
    if (p8 !== 16'd45864) begin
      failures++;
      $display("FAIL W=8 234*196 = %0d", p8);
    end
    for (int i = 0; i < 256; i++) begin
      a8 = 8'(i); b8 = 8'($urandom);
      @(posedge clk);
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL W=8 %0d*%0d = %0d", a8, b8, p8);
      end
    end
    check('1, '1);
    check(32'd0, '1);
    check(32'h8000_0000, 32'd2);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
