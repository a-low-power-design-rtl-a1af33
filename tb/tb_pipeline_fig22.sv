// tb_pipeline_fig22: the three pipeline examples of concurrent retirement
// (parts A, B and C: back-to-back MIns with execution times of 1 cycle, of 1
// or 2 cycles, and of 1 to 3 cycles).  Each part is run from reset: the MIns
// are streamed without wait states, each writes its own register and reads
// only registers nobody writes, so there is no data hazard.  MIns of equal
// execution time that follow each other use different units (logic and
// fast adder for 1 cycle, compare and fast multiplier for 2, slow adder and
// shifter for 3), so no structural stall occurs either.  Cycle 0 is the cycle
// the first MIn is fetched; it is in the decoder and issues in cycle 1, and
// an MIn of n cycles writes back in cycle issue + n + 1.  The testbench checks
// the issue cycle of every MIn, the number of CORs retiring in every cycle
// (in part C three MIns retire together in cycle 9), and every result.
module tb_pipeline_fig22;
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

  // result written to op1 by an MIn on initial register values
  function automatic logic [31:0] result(opcode_e op, int r1, int r2);
    logic [31:0] a, b;
    logic [63:0] p;
    a = init_val(r1);
    b = init_val(r2);
    p = {32'd0, a} * {32'd0, b};
    case (op)
      OP_AND:  return a & b;
      OP_XOR:  return a ^ b;
      OP_ADDF: return a + b;
      OP_SUBS: return a - b;
      OP_SHL:  return a << b[4:0];
      OP_MULF: return p[31:0];
      default: return a;      // compare writes only the flag
    endcase
  endfunction

  task automatic run_part(string name, opcode_e ops [], int retire_exp [11]);
    int n, cyc, iss [$];
    int ret [11];
    n = ops.size();
    rst_n = 0;
    ins_valid = 0; ins_word = '0; ext_we = 0; ext_waddr = '0; ext_wdata = '0; ext_raddr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < NREGS; r++) begin
      ext_we = 1; ext_waddr = RIDX'(r); ext_wdata = init_val(r);
      @(posedge clk); #1;
    end
    ext_we = 0;
    for (int c = 0; c < 11; c++) ret[c] = 0;
    // MIn k is fetched in cycle k and written as op1 = k+1, op2 = k+8
    cyc = 0;
    for (int c = 0; c < 20; c++) begin
      if (c < n) begin
        ins_valid = 1;
        ins_word  = mk_min(ops[c], c + 1, c + 8);
      end else begin
        ins_valid = 0;
        ins_word  = '0;
      end
      #1;
      if (c < n) chk(ins_ready, $sformatf("%s: MIn %0d accepted in its fetch cycle", name, c));
      if (issue) iss.push_back(c);
      if (c < 11) ret[c] = int'(retire_count);
      else chk(retire_count == 0, $sformatf("%s: nothing retires after cycle 10", name));
      @(posedge clk);
      #1;
    end
    for (int c = 0; c < 11; c++)
      chk(ret[c] == retire_exp[c], $sformatf("%s: %0d retired in cycle %0d, expected %0d",
                                            name, ret[c], c, retire_exp[c]));
    chk(iss.size() == n, $sformatf("%s: %0d MIns issued", name, iss.size()));
    for (int k = 0; k < n && k < iss.size(); k++)
      chk(iss[k] == k + 1, $sformatf("%s: MIn %0d issued in cycle %0d", name, k, iss[k]));
    for (int k = 0; k < n; k++) begin
      ext_raddr = RIDX'(k + 1);
      #1;
      chk(ext_rdata == result(ops[k], k + 1, k + 8), $sformatf("%s: result of MIn %0d", name, k));
    end
    $display("%s: retirements per cycle %p", name, ret);
  endtask

  initial begin
    opcode_e a [] = '{OP_AND, OP_ADDF, OP_XOR, OP_ADDF, OP_AND};
    opcode_e b [] = '{OP_AND, OP_ADDF, OP_CMPLT, OP_MULF, OP_XOR, OP_ADDF, OP_AND, OP_ADDF};
    opcode_e c [] = '{OP_AND, OP_ADDF, OP_CMPLT, OP_SUBS, OP_SHL, OP_MULF, OP_XOR, OP_ADDF};
    //                cycle     0  1  2  3  4  5  6  7  8  9 10
    int ra [11] = '{0, 0, 0, 1, 1, 1, 1, 1, 0, 0, 0};
    int rb [11] = '{0, 0, 0, 1, 1, 0, 1, 2, 1, 1, 1};
    int rc [11] = '{0, 0, 0, 1, 1, 0, 1, 0, 1, 3, 1};
    run_part("part A", a, ra);
    run_part("part B", b, rb);
    run_part("part C", c, rc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
