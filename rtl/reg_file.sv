// reg_file: register file of the ALU.
//
// NREGS registers of XLEN bits and a one-bit flag register.  The out-port
// reads two registers (Reg1, Reg2) for the functional units' input bus.  The
// in-port takes every Common Output Register (COR) at once, because MIns of
// different latencies retire out of order and up to one per latency group in
// the same cycle.  All writes of a cycle are applied in sequence within that
// cycle, as very fast writes on one bus would be: first the data-cache
// in/out port, then the CORs from the longest-latency group to the shortest,
// each COR's high word before its low word.  A later write to the same
// register wins, so when two MIns retire together the one issued later (the
// shorter one) prevails.  Reads see the registers after this cycle's writes
// (write first, read second in the cycle), so an MIn may be issued in the
// very cycle its operand is written back.
//
// The in/out port to the data cache is a plain write port and read port;
// its form, the write order, read-after-write within a cycle and the reset
// to zero are this design's choices.
module reg_file
  import alu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // out-port
  input  logic [RIDX-1:0] ra1,
  input  logic [RIDX-1:0] ra2,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  // in-port from the Common Output Registers
  input  cor_t            cor [NGROUPS],
  // in/out port to the data cache
  input  logic            ext_we,
  input  logic [RIDX-1:0] ext_waddr,
  input  logic [XLEN-1:0] ext_wdata,
  input  logic [RIDX-1:0] ext_raddr,
  output logic [XLEN-1:0] ext_rdata,
  output logic            flag,
  output logic [$clog2(2*NGROUPS+2)-1:0] nwrites  // register writes this cycle
);
  logic [XLEN-1:0] regs_q [NREGS];
  logic [XLEN-1:0] regs_n [NREGS];
  logic            flag_q, flag_n;

  always_comb begin
    regs_n  = regs_q;
    flag_n  = flag_q;
    nwrites = '0;
    if (ext_we) begin
      regs_n[ext_waddr] = ext_wdata;
      nwrites = nwrites + 1'b1;
    end
    for (int g = NGROUPS - 1; g >= 0; g--) begin
      if (cor[g].valid) begin
        if (cor[g].dst.we_hi) begin
          regs_n[cor[g].dst.rd_hi] = cor[g].res.hi;
          nwrites = nwrites + 1'b1;
        end
        if (cor[g].dst.we_lo) begin
          regs_n[cor[g].dst.rd_lo] = cor[g].res.lo;
          nwrites = nwrites + 1'b1;
        end
        if (cor[g].dst.we_flag) flag_n = cor[g].res.flag;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs_q[i] <= '0;
      flag_q <= 1'b0;
    end else begin
      regs_q <= regs_n;
      flag_q <= flag_n;
    end
  end

  assign rd1       = regs_n[ra1];
  assign rd2       = regs_n[ra2];
  assign ext_rdata = regs_n[ext_raddr];
  assign flag      = flag_n;
endmodule
