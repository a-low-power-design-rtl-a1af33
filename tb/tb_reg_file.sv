// tb_reg_file: the register file against a reference array.  Each cycle a
// random set of Common Output Registers and the data-cache port write; the
// testbench applies the same writes to its model in the documented order
// (data-cache port, then groups from longest to shortest latency, high word
// before low word) and checks the read ports in the same cycle (writes are
// visible to reads of that cycle), the count of writes and the flag.
// Directed cases check that the shortest-latency write wins a conflict and
// that up to twelve registers are written in one cycle.
module tb_reg_file;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [RIDX-1:0] ra1, ra2, ext_waddr, ext_raddr;
  logic [XLEN-1:0] rd1, rd2, ext_wdata, ext_rdata;
  logic            ext_we, flag;
  cor_t            cor [NGROUPS];
  logic [3:0]      nwrites;

  logic [XLEN-1:0] model [NREGS];
  logic            mflag;

  reg_file dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .cor,
                .ext_we, .ext_waddr, .ext_wdata, .ext_raddr, .ext_rdata,
                .flag, .nwrites);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // drive inputs, compute expected state after this cycle's writes, check
  // the combinational read ports, then clock.
  task automatic cycle_check();
    logic [XLEN-1:0] nm [NREGS];
    logic            nf;
    int              nw;
    nm = model; nf = mflag; nw = 0;
    if (ext_we) begin nm[ext_waddr] = ext_wdata; nw++; end
    for (int g = NGROUPS - 1; g >= 0; g--)
      if (cor[g].valid) begin
        if (cor[g].dst.we_hi) begin nm[cor[g].dst.rd_hi] = cor[g].res.hi; nw++; end
        if (cor[g].dst.we_lo) begin nm[cor[g].dst.rd_lo] = cor[g].res.lo; nw++; end
        if (cor[g].dst.we_flag) nf = cor[g].res.flag;
      end
    #1;
    chk(rd1 === nm[ra1], "rd1");
    chk(rd2 === nm[ra2], "rd2");
    chk(ext_rdata === nm[ext_raddr], "ext_rdata");
    chk(flag === nf, "flag");
    chk(int'(nwrites) == nw, "nwrites");
    @(posedge clk);
    model = nm; mflag = nf;
    #1;
  endtask

  task automatic clear_inputs();
    ext_we = 0; ext_waddr = 0; ext_wdata = 0;
    for (int g = 0; g < NGROUPS; g++) cor[g] = '0;
  endtask

  initial begin
    clear_inputs();
    ra1 = 0; ra2 = 0; ext_raddr = 0;
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    mflag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // fill through the data-cache port
    for (int i = 0; i < NREGS; i++) begin
      ext_we = 1; ext_waddr = RIDX'(i); ext_wdata = 32'h1000 + i;
      ra1 = RIDX'(i); ra2 = RIDX'(i ^ 1); ext_raddr = RIDX'(i);
      cycle_check();
    end
    clear_inputs();
    // conflict: all six groups and the port write register 3; group 0 wins
    ext_we = 1; ext_waddr = 3; ext_wdata = 32'hdead;
    for (int g = 0; g < NGROUPS; g++) begin
      cor[g].valid = 1; cor[g].dst.we_lo = 1; cor[g].dst.rd_lo = 3;
      cor[g].res.lo = 32'h100 * (g + 1);
    end
    ra1 = 3; cycle_check();
    chk(model[3] == 32'h100, "group 0 wins a same-cycle conflict");
    clear_inputs();
    // hi and lo to the same register: lo wins
    cor[3].valid = 1; cor[3].dst = '{we_lo: 1, we_hi: 1, we_flag: 0, rd_lo: 5, rd_hi: 5};
    cor[3].res.lo = 32'haaaa; cor[3].res.hi = 32'hbbbb;
    ra1 = 5; cycle_check();
    chk(model[5] == 32'haaaa, "low word wins over high word");
    clear_inputs();
    // twelve distinct registers in one cycle
    for (int g = 0; g < NGROUPS; g++) begin
      cor[g].valid = 1;
      cor[g].dst = '{we_lo: 1, we_hi: 1, we_flag: 0, rd_lo: RIDX'(2*g), rd_hi: RIDX'(2*g+1)};
      cor[g].res.lo = 32'h5000 + g; cor[g].res.hi = 32'h6000 + g;
    end
    cycle_check();
    chk(model[10] == 32'h5005 && model[11] == 32'h6005, "twelve writes in one cycle");
    clear_inputs();
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      ext_we = 1'($urandom_range(0, 3) == 0);
      ext_waddr = RIDX'($urandom); ext_wdata = $urandom;
      for (int g = 0; g < NGROUPS; g++) begin
        cor[g].valid = 1'($urandom);
        cor[g].dst.we_lo = 1'($urandom); cor[g].dst.we_hi = 1'($urandom);
        cor[g].dst.we_flag = 1'($urandom);
        cor[g].dst.rd_lo = RIDX'($urandom); cor[g].dst.rd_hi = RIDX'($urandom);
        cor[g].res.lo = $urandom; cor[g].res.hi = $urandom; cor[g].res.flag = 1'($urandom);
      end
      ra1 = RIDX'($urandom); ra2 = RIDX'($urandom); ext_raddr = RIDX'($urandom);
      cycle_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
