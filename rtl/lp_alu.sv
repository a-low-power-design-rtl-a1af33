// lp_alu: low-power single-issue 32-bit integer pipelined ALU.
//
// Every arithmetic operation exists twice: on a fast unit with parallel
// carry or product logic, and on a slow unit with simple, low-switching
// logic that needs more clock cycles.  Which one an instruction uses is
// decided offline: the assembler emits the slow machine instruction (MIn)
// whenever a scheduler has found that no later instruction needs the result
// early.  The hardware only executes what it is told: there is no
// scoreboard or dependence check, and stalls needed for data dependences are
// encoded as wait states inside the MIn instead of NOP instructions.
//
// Pipeline: F (instruction stream into the decoder), D (decode register; the
// control unit reads the two operands from the register file and issues),
// E1..EL (the unit, L = 1..11 cycles), W (the group's Common Output Register
// is written into the register file).  An MIn entering D in cycle t with
// wait field d issues in t+d (later if its unit is still busy) and writes
// back in issue+L+1.  A dependent MIn can issue in the cycle before its
// producer's write-back, i.e. L cycles after it: the operand is forwarded
// from the Common Output Register input being captured in that cycle, so it
// executes in the write-back cycle as in the original pipeline sketches (the
// forwarding path itself is this design's way of achieving that timing).
//
// Ports: ins_valid/ins_word/ins_ready is the instruction stream from the
// instruction cache (the word must stay stable while ins_valid is high and
// ins_ready low); ext_* is the register file's in/out port to the data cache
// (a write port and a read port).  The remaining outputs report activity:
// issue, cu_state (0 idle, 1 issue, 2 wait states, 3 unit busy), the number
// of MIns retiring and of register writes in the cycle, which units are
// executing (the others are static), illegal (an undefined opcode was
// dropped) and idle (nothing in the pipeline).
// The block structure (decoder, control unit, register file, latency groups
// with shared output registers) follows the original design; the stream
// handshake, the data port and the status outputs are this design's choices.
// A lint tool may note that rst_n drives both asynchronous resets and the
// `disable iff` of assertions; that use is intended and is not a circuit.
module lp_alu
  import alu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins_valid,
  input  logic [31:0]       ins_word,
  output logic              ins_ready,
  input  logic              ext_we,
  input  logic [RIDX-1:0]   ext_waddr,
  input  logic [XLEN-1:0]   ext_wdata,
  input  logic [RIDX-1:0]   ext_raddr,
  output logic [XLEN-1:0]   ext_rdata,
  output logic              flag,
  output logic              issue,
  output logic [1:0]        cu_state,
  output logic [2:0]        retire_count,
  output logic [3:0]        write_count,
  output logic [NUNITS-1:0] unit_busy,
  output logic              illegal,
  output logic              idle
);
  logic              d_valid, wait_stall, take;
  dec_t              d_ins;
  logic [NUNITS-1:0] iss_en, cap;
  dst_t              cap_dst [NUNITS];
  cor_t              cor [NGROUPS], nxt [NGROUPS];
  logic [XLEN-1:0]   opa, opb;
  cu_state_e         state;
  logic [XLEN-1:0]   rd1, rd2;

  decoder u_dec (
    .clk, .rst_n,
    .ins_valid, .ins_word, .ins_ready,
    .take, .d_valid, .d_ins, .wait_stall
  );

  control_unit u_cu (
    .clk, .rst_n,
    .d_valid, .d_ins, .wait_stall,
    .take, .issue, .iss_en, .cap, .cap_dst, .unit_busy, .state, .illegal
  );

  reg_file u_rf (
    .clk, .rst_n,
    .ra1(d_ins.op1), .ra2(d_ins.op2), .rd1, .rd2,
    .cor,
    .ext_we, .ext_waddr, .ext_wdata, .ext_raddr, .ext_rdata,
    .flag, .nwrites(write_count)
  );

  exec_units u_ex (
    .clk, .rst_n,
    .iss_en, .iss_fn(d_ins.fn), .opa, .opb,
    .cap, .cap_dst, .cor, .nxt
  );

  // Write-back to execute forwarding: an MIn issued in the cycle before its
  // producer's write-back gets the value its producer's COR is capturing,
  // applied in the same order as the register file applies its writes.
  always_comb begin
    opa = rd1;
    opb = rd2;
    for (int g = NGROUPS - 1; g >= 0; g--) begin
      if (nxt[g].valid && nxt[g].dst.we_hi) begin
        if (nxt[g].dst.rd_hi == d_ins.op1) opa = nxt[g].res.hi;
        if (nxt[g].dst.rd_hi == d_ins.op2) opb = nxt[g].res.hi;
      end
      if (nxt[g].valid && nxt[g].dst.we_lo) begin
        if (nxt[g].dst.rd_lo == d_ins.op1) opa = nxt[g].res.lo;
        if (nxt[g].dst.rd_lo == d_ins.op2) opb = nxt[g].res.lo;
      end
    end
  end

  always_comb begin
    retire_count = '0;
    for (int g = 0; g < NGROUPS; g++) retire_count = retire_count + 3'(cor[g].valid);
  end

  always_comb begin
    idle = !d_valid && (unit_busy == '0);
    for (int g = 0; g < NGROUPS; g++) if (cor[g].valid) idle = 1'b0;
  end

  assign cu_state = state;

  // Instruction stream rule: a presented MIn is held until accepted.
  a_stream_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ins_valid && !ins_ready |=> ins_valid && $stable(ins_word));
endmodule
