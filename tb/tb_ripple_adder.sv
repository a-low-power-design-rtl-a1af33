// tb_ripple_adder: the 32-bit carry ripple adder and a 5-bit one against
// the + operator, on corner cases and random operands.
module tb_ripple_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [4:0]  a5, b5, s5;
  logic        cin5, cout5;

  ripple_adder #(.W(32)) dut  (.a(a),  .b(b),  .cin(cin),  .sum(s),  .cout(cout));
  ripple_adder #(.W(5))  dut5 (.a(a5), .b(b5), .cin(cin5), .sum(s5), .cout(cout5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] exp;
    a = x; b = y; cin = c;
    @(posedge clk);
    exp = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, exp %h", x, y, c, {cout, s}, exp);
    end
  endtask

  initial begin
    check32('0, '0, 1'b0);
    check32('1, 32'd1, 1'b0);
    check32('1, '0, 1'b1);
    check32('1, '1, 1'b1);
    check32(32'h7fff_ffff, 32'd1, 1'b0);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 64; i++) begin
      logic [5:0] exp;
      {a5, b5} = {5'(i), 5'(31 - i)};
      cin5 = i[0];
      @(posedge clk);
      exp = 6'(a5) + 6'(b5) + 6'(cin5);
      checks++;
      if ({cout5, s5} !== exp) begin
        failures++;
        $display("FAIL W=5 %d + %d + %b", a5, b5, cin5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
