// tb_control_unit: the control unit against a cycle model.  Each cycle the
// testbench offers a random decoded MIn (random unit, destination, legality)
// with or without outstanding wait states, and holds it until the control
// unit takes it, like the decoder does.  A model keeps one down-counter per
// functional unit.  The testbench checks in every cycle
//   * the state (WAIT while wait states remain, drop of an illegal MIn,
//     BUSY while the target unit still has more than one cycle to go, ISSUE
//     otherwise) and the take/issue/illegal outputs,
//   * that only the target unit's operand registers are enabled,
//   * that a unit's capture strobe comes exactly its latency after issue,
//     with the destination of the MIn that was issued to it,
//   * the busy (clock enable) flag of every unit.
// Every state must occur and every unit must issue and capture.
module tb_control_unit;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              d_valid, wait_stall, take, issue, illegal;
  dec_t              d_ins;
  logic [NUNITS-1:0] iss_en, cap, unit_busy;
  dst_t              cap_dst [NUNITS];
  cu_state_e         state;

  control_unit dut (.clk, .rst_n, .d_valid, .d_ins, .wait_stall, .take, .issue,
                    .iss_en, .cap, .cap_dst, .unit_busy, .state, .illegal);

  initial begin
    repeat (30000) @(posedge clk);
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

  function automatic int lat(int u);
    int l [NUNITS] = '{1, 1, 2, 2, 3, 3, 6, 7, 11};
    return l[u];
  endfunction

  int   mcnt [NUNITS];
  dst_t mdst [NUNITS];
  int   n_state [4];
  int   n_cap [NUNITS];
  int   n_iss [NUNITS];
  bit   taken = 0;

  initial begin
    d_valid = 0; wait_stall = 0; d_ins = '0;
    for (int u = 0; u < NUNITS; u++) begin mcnt[u] = 0; mdst[u] = '0; n_cap[u] = 0; n_iss[u] = 0; end
    for (int s = 0; s < 4; s++) n_state[s] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      cu_state_e es;
      bit        busy;
      int        u;
      // offer a new MIn when the previous one was taken (or none is held)
      if (!d_valid || taken) begin
        d_valid = ($urandom_range(0, 5) != 0);
        d_ins   = '0;
        d_ins.legal = ($urandom_range(0, 19) != 0);
        d_ins.unit  = unit_e'($urandom_range(0, NUNITS - 1));
        d_ins.fn    = 3'($urandom);
        d_ins.op1   = RIDX'($urandom);
        d_ins.op2   = RIDX'($urandom);
        d_ins.dst   = dst_t'($urandom);
        wait_stall  = ($urandom_range(0, 2) == 0);
      end else if (wait_stall) begin
        wait_stall  = ($urandom_range(0, 1) == 0);
      end
      #1;
      u    = int'(d_ins.unit);
      busy = mcnt[u] > 1;
      if (!d_valid)            es = CU_IDLE;
      else if (wait_stall)     es = CU_WAIT;
      else if (!d_ins.legal)   es = CU_ISSUE;
      else if (busy)           es = CU_BUSY;
      else                     es = CU_ISSUE;
      chk(state == es, $sformatf("state %0d vs %0d", state, es));
      chk(take == (es == CU_ISSUE), "take");
      chk(illegal == (es == CU_ISSUE && !d_ins.legal), "illegal");
      chk(issue == (es == CU_ISSUE && d_ins.legal), "issue");
      chk(iss_en == ((es == CU_ISSUE && d_ins.legal) ? NUNITS'(1) << u : '0), "operand enables");
      for (int v = 0; v < NUNITS; v++) begin
        chk(cap[v] == (mcnt[v] == 1), $sformatf("capture of unit %0d", v));
        chk(unit_busy[v] == (mcnt[v] != 0), $sformatf("busy of unit %0d", v));
        if (mcnt[v] == 1) begin
          chk(cap_dst[v] == mdst[v], $sformatf("capture destination unit %0d", v));
          n_cap[v]++;
        end
      end
      n_state[int'(state)]++;
      taken = take;
      @(posedge clk);
      for (int v = 0; v < NUNITS; v++) if (mcnt[v] != 0) mcnt[v]--;
      if (es == CU_ISSUE && d_ins.legal) begin
        mcnt[u] = lat(u);
        mdst[u] = d_ins.dst;
        n_iss[u]++;
      end
      #1;
    end
    for (int s = 0; s < 4; s++) chk(n_state[s] > 0, $sformatf("state %0d reached", s));
    for (int v = 0; v < NUNITS; v++) chk(n_iss[v] > 0 && n_cap[v] > 0, $sformatf("unit %0d used", v));
    $display("states idle=%0d issue=%0d wait=%0d busy=%0d",
             n_state[0], n_state[1], n_state[2], n_state[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
