// tb_addsub: the fast and the slow adder/subtractor against + and -,
// including the carry out (no-borrow for subtraction) and carry in.
module tb_addsub;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, sf, ss;
  logic        sub, cin, cof, cos;

  addsub #(.W(32), .FAST(1'b1)) dut_f (.a, .b, .sub, .cin, .s(sf), .cout(cof));
  addsub #(.W(32), .FAST(1'b0)) dut_s (.a, .b, .sub, .cin, .s(ss), .cout(cos));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y, logic sb, logic c);
    logic [32:0] exp;
    a = x; b = y; sub = sb; cin = c;
    @(posedge clk);
    if (sb) exp = {1'b0, x} + {1'b0, ~y} + 33'd1;   // x - y, carry = no borrow
    else    exp = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cof, sf} !== exp) begin
      failures++;
      $display("FAIL fast sub=%b %h %h -> %h exp %h", sb, x, y, {cof, sf}, exp);
    end
    checks++;
    if ({cos, ss} !== exp) begin
      failures++;
      $display("FAIL slow sub=%b %h %h -> %h exp %h", sb, x, y, {cos, ss}, exp);
    end
    if (sb) begin
      checks++;
      if (sf !== x - y) begin
        failures++;
        $display("FAIL difference %h - %h", x, y);
      end
    end
  endtask

  initial begin
    check(32'd200, 32'd4, 1'b1, 1'b0);
    check(32'd4, 32'd200, 1'b1, 1'b0);
    check(32'd5, 32'd5, 1'b1, 1'b0);
    check('1, 32'd1, 1'b0, 1'b0);
    check(32'd10, 32'd20, 1'b0, 1'b1);
    for (int i = 0; i < 3000; i++) check($urandom, $urandom, 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
