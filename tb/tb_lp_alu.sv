// tb_lp_alu: end-to-end test of the whole ALU at its default size (32-bit
// data, 16 registers, the latencies of the 5 ns clock).  The testbench first
// loads every register through the data-cache port.  It then builds a random
// program of N MIns, scheduling it the way the offline scheduler would: the
// wait-state field of each MIn is the smallest that keeps every read no
// earlier than the cycle before its producer's write-back, where the value is
// forwarded (RAW) and every write after the previous write
// of the same register or flag (WAW; a same-cycle write is allowed only when
// the later MIn is in a shorter-latency group, whose write is applied last).
// The structural hazard of a busy unit is deliberately left in the program,
// so the control unit's stall is exercised.  From the program the testbench
// predicts, cycle by cycle, the issue of every MIn and the number of Common
// Output Registers (CORs) that retire, and it computes the final registers
// and flag sequentially.  It checks
//   * the `issue` pulses against the predicted issue cycles,
//   * retire_count in every cycle against the predicted retirements,
//   * every COR value against the sequential result of its MIn,
//   * the final registers and flag, read back through the data-cache port.
// Each mechanism is counted and the run fails if one never happened: wait
// states, busy-unit stalls, two and three CORs retiring in one cycle, out of
// order completion, every functional unit used, an illegal MIn dropped, two
// writes to one register in one cycle, operands forwarded, the multiplier's high word and the
// divider's remainder written.
module tb_lp_alu;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N      = 20000;
  localparam int MAXCYC = 40 * N;

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
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference description of the instruction set --------
  // Unit and latency (cycles) of each opcode; -1 = illegal.
  function automatic int lat_of(logic [5:0] op);
    case (op)
      6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h09: return 1;
      6'h18, 6'h19, 6'h20:                             return 2;
      6'h0A, 6'h0B, 6'h10, 6'h11, 6'h12, 6'h13:        return 3;
      6'h21:                                           return 6;
      6'h28:                                           return 7;
      6'h29, 6'h2A:                                    return 11;
      default:                                         return -1;
    endcase
  endfunction

  // Functional unit number (same order as the design's unit list).
  function automatic int unit_of(logic [5:0] op);
    case (op)
      6'h01, 6'h02, 6'h03, 6'h04, 6'h05: return 0;  // logic
      6'h08, 6'h09:                      return 1;  // fast add/sub
      6'h18, 6'h19:                      return 2;  // compare
      6'h20:                             return 3;  // fast multiplier
      6'h0A, 6'h0B:                      return 4;  // slow add/sub
      6'h10, 6'h11, 6'h12, 6'h13:        return 5;  // shift/rotate
      6'h21:                             return 6;  // slow multiplier
      6'h28:                             return 7;  // fast divider
      default:                           return 8;  // slow divider
    endcase
  endfunction

  // Latency group = index of the distinct latency.
  function automatic int grp_of(int lat);
    case (lat)
      1: return 0;  2: return 1;  3: return 2;  6: return 3;  7: return 4;
      default: return 5;
    endcase
  endfunction

  typedef struct {
    logic [31:0] word;
    int          lat, unit, grp;
    bit          wlo, whi, wfl;
    logic [RIDX-1:0] r1, r2;
    logic [31:0] lo, hi;
    bit          fl;
    int          t_iss;   // predicted issue (or drop) cycle
  } min_t;

  min_t            prog [N];
  logic [31:0]     mreg [NREGS];
  bit              mflag;
  logic [31:0]     init [NREGS];

  // Sequential semantics of one MIn on the model registers.
  task automatic execute(ref min_t m);
    logic [31:0] a, b;
    logic [63:0] p;
    logic [5:0]  op;
    logic [4:0]  sh;
    a  = mreg[m.r1];
    b  = mreg[m.r2];
    op = m.word[31:26];
    sh = b[4:0];
    m.lo = '0; m.hi = '0; m.fl = 0;
    case (op)
      6'h01: m.lo = b;
      6'h02: m.lo = a & b;
      6'h03: m.lo = a | b;
      6'h04: m.lo = a ^ b;
      6'h05: m.lo = ~a;
      6'h08, 6'h0A: m.lo = a + b;
      6'h09, 6'h0B: m.lo = a - b;
      6'h10: m.lo = a << sh;
      6'h11: m.lo = a >> sh;
      6'h12: m.lo = (a << sh) | (sh == 0 ? 32'd0 : a >> (6'd32 - sh));
      6'h13: m.lo = (a >> sh) | (sh == 0 ? 32'd0 : a << (6'd32 - sh));
      6'h18: m.fl = (a == b);
      6'h19: m.fl = (a < b);
      6'h20, 6'h21: begin p = {32'd0, a} * {32'd0, b}; m.lo = p[31:0]; m.hi = p[63:32]; end
      6'h28, 6'h29, 6'h2A: begin
        m.lo = (b == 0) ? 32'hFFFF_FFFF : a / b;
        m.hi = (b == 0) ? a : a % b;
      end
      default: ;
    endcase
    // high word first, then low word: the low word wins if both name one register
    if (m.whi) mreg[m.r2] = m.hi;
    if (m.wlo) mreg[m.r1] = m.lo;
    if (m.wfl) mflag = m.fl;
  endtask

  // ---------------- program generation and scheduling ---------------------
  int last_wb  [NREGS];     // write-back cycle of the last writer
  int last_wg  [NREGS];     // its group
  int flag_wb, flag_wg;
  int unit_free [NUNITS];   // first cycle the unit can take a new MIn
  int retire_at [int];      // cycle -> CORs valid
  logic [31:0] exp_lo [int], exp_hi [int];
  bit          exp_fl [int];
  bit          exp_wlo [int], exp_whi [int], exp_wfl [int];
  int n_ooo = 0, n_mulhi = 0, n_divr = 0, n_ill_prog = 0, max_wb = 0;

  function automatic logic [5:0] rand_op();
    logic [5:0] ops [20] = '{6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h09,
                             6'h0A, 6'h0B, 6'h10, 6'h11, 6'h12, 6'h13, 6'h18,
                             6'h19, 6'h20, 6'h21, 6'h28, 6'h29, 6'h2A};
    if ($urandom_range(0, 49) == 0) return 6'h3F;  // an unused opcode
    return ops[$urandom_range(0, 19)];
  endfunction

  function automatic bit waw_ok(int wb, int g, int prev_wb, int prev_g);
    return (wb > prev_wb) || (wb == prev_wb && g < prev_g);
  endfunction

  task automatic build();
    int prev_t;
    prev_t = -1;
    for (int r = 0; r < NREGS; r++) begin last_wb[r] = -100; last_wg[r] = 0; end
    flag_wb = -100; flag_wg = 0;
    for (int u = 0; u < NUNITS; u++) unit_free[u] = 0;
    for (int k = 0; k < N; k++) begin
      min_t m;
      logic [5:0] op;
      int need, d, t, wb;
      op     = rand_op();
      m.r1   = RIDX'($urandom);
      m.r2   = RIDX'($urandom);
      m.lat  = lat_of(op);
      m.wlo  = 0; m.whi = 0; m.wfl = 0;
      if (m.lat < 0) begin
        // illegal: dropped after its wait states, writes nothing
        d = $urandom_range(0, 3);
        m.word   = {op, 4'(d), 14'd0, 4'(m.r1), 4'(m.r2)};
        m.t_iss  = prev_t + 1 + d;
        m.unit   = -1;
        prev_t   = m.t_iss;
        prog[k]  = m;
        n_ill_prog++;
        continue;
      end
      m.unit = unit_of(op);
      m.grp  = grp_of(m.lat);
      m.wfl  = (op == 6'h18 || op == 6'h19);
      m.wlo  = !m.wfl;
      m.whi  = (op == 6'h20 || op == 6'h21 || op == 6'h2A);
      // earliest issue honouring RAW on both sources
      need = prev_t + 1;
      // MOV does not read its destination, NOT does not read op2
      // (operands are forwarded from the COR capture, one cycle before write-back)
      if (op != 6'h01 && last_wb[m.r1] - 1 > need) need = last_wb[m.r1] - 1;
      if (op != 6'h05 && last_wb[m.r2] - 1 > need) need = last_wb[m.r2] - 1;
      // wait states: the minimum, sometimes a few more
      d = need - (prev_t + 1);
      if ($urandom_range(0, 7) == 0) d += $urandom_range(1, 3);
      forever begin
        t  = prev_t + 1 + d;
        if (unit_free[m.unit] > t) t = unit_free[m.unit];   // hardware stall
        wb = t + m.lat + 1;
        if ((!m.wlo || waw_ok(wb, m.grp, last_wb[m.r1], last_wg[m.r1])) &&
            (!m.whi || waw_ok(wb, m.grp, last_wb[m.r2], last_wg[m.r2])) &&
            (!m.wfl || waw_ok(wb, m.grp, flag_wb, flag_wg)))
          break;
        d++;
      end
      if (d > 15) $fatal(1, "schedule needs %0d wait states", d);
      m.word  = {op, 4'(d), 14'd0, 4'(m.r1), 4'(m.r2)};
      m.t_iss = t;
      execute(m);
      if (wb < max_wb) n_ooo++;
      if (wb > max_wb) max_wb = wb;
      if (m.whi && op != 6'h2A) n_mulhi++;
      if (op == 6'h2A) n_divr++;
      if (m.whi) begin last_wb[m.r2] = wb; last_wg[m.r2] = m.grp; end
      if (m.wlo) begin last_wb[m.r1] = wb; last_wg[m.r1] = m.grp; end
      if (m.wfl) begin flag_wb = wb; flag_wg = m.grp; end
      unit_free[m.unit] = t + m.lat;
      if (retire_at.exists(wb)) retire_at[wb]++; else retire_at[wb] = 1;
      exp_lo[wb*8 + m.grp]  = m.lo;
      exp_hi[wb*8 + m.grp]  = m.hi;
      exp_fl[wb*8 + m.grp]  = m.fl;
      exp_wlo[wb*8 + m.grp] = m.wlo;
      exp_whi[wb*8 + m.grp] = m.whi;
      exp_wfl[wb*8 + m.grp] = m.wfl;
      prev_t  = t;
      prog[k] = m;
    end
  endtask

  // ---------------- monitors ----------------------------------------------
  int cyc = 0;          // cycle relative to the first MIn entering the decoder
  bit running = 0;
  int iss_q [$];
  int n_wait = 0, n_busy = 0, n_ret2 = 0, n_ret3 = 0, n_illegal = 0;
  int n_conflict = 0, n_wr4 = 0, n_fwd = 0;
  int unit_used [NUNITS];

  always @(posedge clk) if (running) begin
    int r;
    r = retire_at.exists(cyc) ? retire_at[cyc] : 0;
    chk(int'(retire_count) == r, $sformatf("retire count %0d vs %0d in cycle %0d",
                                           retire_count, r, cyc));
    if (issue) iss_q.push_back(cyc);
    if (cu_state == CU_WAIT) n_wait++;
    if (cu_state == CU_BUSY) n_busy++;
    if (retire_count >= 2) n_ret2++;
    if (retire_count >= 3) n_ret3++;
    if (write_count >= 4) n_wr4++;
    if (illegal) n_illegal++;
    if (issue && (dut.opa != dut.rd1 || dut.opb != dut.rd2)) n_fwd++;
    for (int u = 0; u < NUNITS; u++) if (dut.u_cu.iss_en[u]) unit_used[u]++;
    for (int g = 0; g < NGROUPS; g++) begin
      cor_t c;
      c = dut.u_ex.cor[g];
      if (c.valid) begin
        int key;
        key = cyc * 8 + g;
        chk(exp_lo.exists(key), $sformatf("unexpected retirement group %0d cycle %0d", g, cyc));
        if (exp_lo.exists(key)) begin
          chk(c.dst.we_lo == exp_wlo[key] && c.dst.we_hi == exp_whi[key] &&
              c.dst.we_flag == exp_wfl[key], "COR write enables");
          if (exp_wlo[key]) chk(c.res.lo == exp_lo[key], $sformatf("COR%0d low word cycle %0d", g, cyc));
          if (exp_whi[key]) chk(c.res.hi == exp_hi[key], $sformatf("COR%0d high word cycle %0d", g, cyc));
          if (exp_wfl[key]) chk(c.res.flag == exp_fl[key], "COR flag");
        end
        // two CORs naming one register in the same cycle
        for (int h = 0; h < g; h++) begin
          cor_t o;
          o = dut.u_ex.cor[h];
          if (o.valid && ((c.dst.we_lo && o.dst.we_lo && c.dst.rd_lo == o.dst.rd_lo) ||
                          (c.dst.we_hi && o.dst.we_lo && c.dst.rd_hi == o.dst.rd_lo) ||
                          (c.dst.we_lo && o.dst.we_hi && c.dst.rd_lo == o.dst.rd_hi) ||
                          (c.dst.we_hi && o.dst.we_hi && c.dst.rd_hi == o.dst.rd_hi)))
            n_conflict++;
        end
      end
    end
    cyc++;
  end

  // ---------------- stimulus ----------------------------------------------
  initial begin
    int sent;
    ins_valid = 0; ins_word = '0;
    ext_we = 0; ext_waddr = '0; ext_wdata = '0; ext_raddr = '0;
    for (int u = 0; u < NUNITS; u++) unit_used[u] = 0;
    for (int r = 0; r < NREGS; r++) begin
      // mix of small numbers (interesting divisions), zero and full words
      case ($urandom_range(0, 3))
        0:       init[r] = $urandom_range(0, 40);
        1:       init[r] = 32'd0 + ($urandom_range(0, 1) ? 32'hFFFF_FFFF : 32'd0);
        default: init[r] = $urandom;
      endcase
      mreg[r] = init[r];
    end
    mflag = 0;
    build();

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    chk(idle, "idle after reset");
    for (int r = 0; r < NREGS; r++) begin
      ext_we = 1; ext_waddr = RIDX'(r); ext_wdata = init[r];
      @(posedge clk); #1;
    end
    ext_we = 0;

    // stream the program; the source always has the next MIn ready
    sent = 0;
    ins_valid = 1; ins_word = prog[0].word;
    @(posedge clk);       // prog[0] accepted into the empty decoder
    sent = 1;
    #1 running = 1;       // this cycle is cycle 0: prog[0] sits in the decoder
    while (sent < N) begin
      ins_word = prog[sent].word;
      #1;
      begin
        bit acc;
        acc = ins_ready;
        @(posedge clk);
        if (acc) sent++;
      end
      #1;
    end
    ins_valid = 0; ins_word = '0;
    repeat (60) @(posedge clk);
    #1;
    chk(idle, "idle at the end");
    running = 0;

    // predicted against observed issue cycles
    begin
      int j;
      j = 0;
      for (int k = 0; k < N; k++) if (prog[k].unit >= 0) begin
        if (j < iss_q.size())
          chk(iss_q[j] == prog[k].t_iss,
              $sformatf("MIn %0d issued in cycle %0d, expected %0d", k, iss_q[j], prog[k].t_iss));
        j++;
      end
      chk(j == iss_q.size(), $sformatf("issued %0d MIns, expected %0d", iss_q.size(), j));
    end

    // final state through the data-cache port
    for (int r = 0; r < NREGS; r++) begin
      ext_raddr = RIDX'(r);
      #1;
      chk(ext_rdata == mreg[r], $sformatf("r%0d = %h, expected %h", r, ext_rdata, mreg[r]));
    end
    chk(flag == mflag, "final flag");

    $display("mechanisms: wait=%0d busy=%0d retire2=%0d retire3=%0d out_of_order=%0d",
             n_wait, n_busy, n_ret2, n_ret3, n_ooo);
    $display("            illegal=%0d conflicts=%0d writes>=4=%0d forwarded=%0d mul_hi=%0d div_rem=%0d",
             n_illegal, n_conflict, n_wr4, n_fwd, n_mulhi, n_divr);
    chk(n_wait > 0, "wait states happened");
    chk(n_busy > 0, "busy-unit stalls happened");
    chk(n_ret2 > 0, "two CORs retired together");
    chk(n_ret3 > 0, "three CORs retired together");
    chk(n_ooo > 0, "out-of-order completion happened");
    chk(n_illegal == n_ill_prog && n_illegal > 0, "illegal MIns dropped");
    chk(n_conflict > 0, "same-cycle writes to one register");
    chk(n_wr4 > 0, "four register writes in one cycle");
    chk(n_fwd > 0, "operands forwarded");
    chk(n_mulhi > 0 && n_divr > 0, "high word and remainder written");
    for (int u = 0; u < NUNITS; u++)
      chk(unit_used[u] > 0, $sformatf("unit %0d used", u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
