// tb_full_adder: exhaustive check of the full adder cell against the
// arithmetic sum a + b + cin of its three inputs.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic a, b, cin, sum, cout, clk = 0;
  always #5 clk = ~clk;

  full_adder dut (.a, .b, .cin, .sum, .cout);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] exp;
      {a, b, cin} = 3'(i);
      @(posedge clk);
      exp = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b got %b%b exp %b", a, b, cin, cout, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
