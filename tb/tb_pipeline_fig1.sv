// tb_pipeline_fig1: the slow-unit example of the original design.  Six
// instructions, Mov ax,bx / Add ax,bx / Push bx / And bx,dx / Mov si,bx /
// Pop bx, run back to back without wait states: part A with every
// instruction on a 1-cycle unit, part B with the addition on the slow adder.
// Push and Pop are memory operations outside this ALU; a 1-cycle XOR on
// registers nobody else uses stands in for each.  Registers: ax = r0,
// dx = r2, bx = r3, si = r6.  Add ax,bx reads ax one cycle after Mov ax,bx
// issued, which works because the operand is forwarded from the output
// register being loaded.  The slow adder takes 3 cycles at this design's
// 5 ns clock, where the original sketch draws 4, so part B writes the sum
// back in cycle 6 instead of 7; every other write-back lands where the
// original draws it.  Cycle 0 is the fetch of the first instruction.  The
// testbench checks issue in cycles 1..6, the number of retirements in every
// cycle and the final registers.
module tb_pipeline_fig1;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ins_valid, ins_ready, ext_we, flag, issue, illegal, idle;
  logic [31:0]       ins_word;
  logic [RIDX-1:0]   ext_waddr, ext_raddr;
  logic [XLEN-1:0]   ext_wdata, ext_rdata;
  logic [1:0]        cu_state;
  logic [2:0]        retire_count;
  logic [3:0]        write_count;
  logic [NUNITS-1:0] unit_busy;

  lp_alu dut (.clk, .rst_n, .ins_valid, .ins_word, .ins_ready,
              .ext_we, .ext_waddr, .ext_wdata, .ext_raddr, .ext_rdata,
              .flag, .issue, .cu_state, .retire_count, .write_count,
              .unit_busy, .illegal, .idle);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] init_val(int r);
    return 32'h0001_0000 * r + 32'd7 * r + 32'd3;
  endfunction

  task automatic run_part(string name, bit slow_add, int retire_exp [11]);
    logic [31:0] w [6];
    logic [31:0] m [NREGS];
    int iss [$];
    int ret [11];
    w[0] = mk_min(OP_MOV, 0, 3);                        // Mov ax, bx
    w[1] = mk_min(slow_add ? OP_ADDS : OP_ADDF, 0, 3);  // Add ax, bx
    w[2] = mk_min(OP_XOR, 10, 11);                      // stand-in for Push bx
    w[3] = mk_min(OP_AND, 3, 2);                        // And bx, dx
    w[4] = mk_min(OP_MOV, 6, 3);                        // Mov si, bx
    w[5] = mk_min(OP_XOR, 12, 13);                      // stand-in for Pop bx
    for (int r = 0; r < NREGS; r++) m[r] = init_val(r);
    m[0]  = m[3];
    m[0]  = m[0] + m[3];
    m[10] = m[10] ^ m[11];
    m[3]  = m[3] & m[2];
    m[6]  = m[3];
    m[12] = m[12] ^ m[13];
    rst_n = 0;
    ins_valid = 0; ins_word = '0; ext_we = 0; ext_waddr = '0; ext_wdata = '0; ext_raddr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < NREGS; r++) begin
      ext_we = 1; ext_waddr = RIDX'(r); ext_wdata = init_val(r);
      @(posedge clk); #1;
    end
    ext_we = 0;
    for (int c = 0; c < 20; c++) begin
      ins_valid = (c < 6);
      ins_word  = (c < 6) ? w[c] : '0;
      #1;
      if (c < 6) chk(ins_ready, $sformatf("%s: instruction %0d accepted in its fetch cycle", name, c));
      if (issue) iss.push_back(c);
      if (c < 11) ret[c] = int'(retire_count);
      else chk(retire_count == 0, $sformatf("%s: nothing retires after cycle 10", name));
      @(posedge clk);
      #1;
    end
    for (int c = 0; c < 11; c++)
      chk(ret[c] == retire_exp[c], $sformatf("%s: %0d retired in cycle %0d, expected %0d",
                                            name, ret[c], c, retire_exp[c]));
    chk(iss.size() == 6, $sformatf("%s: %0d issued", name, iss.size()));
    for (int k = 0; k < 6 && k < iss.size(); k++)
      chk(iss[k] == k + 1, $sformatf("%s: instruction %0d issued in cycle %0d", name, k, iss[k]));
    for (int r = 0; r < NREGS; r++) begin
      ext_raddr = RIDX'(r);
      #1;
      chk(ext_rdata == m[r], $sformatf("%s: r%0d = %h, expected %h", name, r, ext_rdata, m[r]));
    end
    $display("%s: retirements per cycle %p", name, ret);
  endtask

  initial begin
    //                cycle     0  1  2  3  4  5  6  7  8  9 10
    int ra [11] = '{0, 0, 0, 1, 1, 1, 1, 1, 1, 0, 0};
    int rb [11] = '{0, 0, 0, 1, 0, 1, 2, 1, 1, 0, 0};
    run_part("part A", 0, ra);
    run_part("part B", 1, rb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
