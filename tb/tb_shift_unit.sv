// tb_shift_unit: shifts and rotates against a bit-by-bit reference model
// for every shift amount.
module tb_shift_unit;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y;
  logic [2:0]  fn;

  shift_unit dut (.a, .b, .fn, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_shift(logic [31:0] x, int n, logic [2:0] f);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      case (f)
        FN_SHL:  r[i] = (i - n >= 0) ? x[i - n] : 1'b0;
        FN_SHR:  r[i] = (i + n < 32) ? x[i + n] : 1'b0;
        FN_ROL:  r[i] = x[(i - n + 32) % 32];
        default: r[i] = x[(i + n) % 32];
      endcase
    end
    return r;
  endfunction

  initial begin
    for (int f = 0; f < 4; f++)
      for (int n = 0; n < 32; n++)
        for (int k = 0; k < 8; k++) begin
          logic [31:0] exp;
          a = $urandom; b = {27'($urandom), 5'(n)}; fn = 3'(f);
          @(posedge clk);
          exp = ref_shift(a, n, fn);
          checks++;
          if (y !== exp) begin
            failures++;
            $display("FAIL fn=%0d n=%0d a=%h y=%h exp=%h", fn, n, a, y, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
