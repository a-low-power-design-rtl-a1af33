// tb_cla_adder: the 32-bit carry look-ahead adder against the + operator
// on carry-chain corner cases and random operands; also an 8-bit instance.
module tb_cla_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [7:0]  a8, b8, s8;
  logic        cout8;

  cla_adder #(.W(32)) dut  (.a(a),  .b(b),  .cin(cin),  .sum(s),  .cout(cout));
  cla_adder #(.W(8))  dut8 (.a(a8), .b(b8), .cin(1'b1), .sum(s8), .cout(cout8));

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
    check32('1, '0, 1'b1);          // carry through every block
    check32('1, 32'd1, 1'b0);
    check32(32'h0000_fff0, 32'h0000_0010, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(32'h0f0f_0f0f, 32'hf0f0_f0f0, 1'b1);
    for (int k = 0; k < 32; k++) check32(32'(1) << k, (32'(1) << k) - 1, 1'b1);
    for (int i = 0; i < 3000; i++) check32($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 256; i++) begin
      logic [8:0] exp;
      a8 = 8'(i); b8 = 8'(255 - i + (i % 7));
      @(posedge clk);
      exp = 9'(a8) + 9'(b8) + 9'd1;
      checks++;
      if ({cout8, s8} !== exp) begin
        failures++;
        $display("FAIL W=8 %d + %d + 1", a8, b8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
