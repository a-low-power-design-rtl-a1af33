// control_unit: issue and write-back control of the ALU.
//
// Each cycle the control unit looks at the MIn in the decode stage and
// either issues it, waits, or drops it:
//   CU_WAIT   the decoder is still serving the MIn's embedded wait states;
//   CU_BUSY   the target unit is still executing its previous MIn;
//   CU_ISSUE  the MIn is issued: only the target unit's operand registers are
//             loaded (iss_en is one-hot), so every other unit stays static,
//             the register-level equivalent of gating its clock off.
//             An MIn with an undefined opcode is dropped in the same way,
//             with illegal high;
//   CU_IDLE   the decode stage is empty.
// At most one MIn is issued per cycle, in program order.
//
// Write-back is deferred by the unit's latency.  On issue a per-unit counter
// is loaded with the latency L and the destination is stored; it counts down
// every cycle, and in the L-th cycle after issue (counter = 1) cap[u] tells
// the execution units to load the unit's result into its group's Common
// Output Register.  The register file is written from that register in the
// next cycle.  So an MIn issued in cycle t executes in t+1..t+L and writes
// back in t+L+1; results of different latencies can retire out of order and
// several in the same cycle.
//
// A unit can accept a new MIn in the last cycle of its current one.  The
// busy interlock (CU_BUSY) is this design's addition for a unit that is
// reissued too early; data dependences are not checked in hardware, they are
// resolved by the instruction order and the wait states chosen offline.
// rst_n drives the asynchronous reset of the flops and also the `disable iff`
// of the assertions below; a lint tool may report it as used both ways.  The
// assertion use is not hardware, so this stands.
module control_unit
  import alu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              d_valid,
  input  dec_t              d_ins,
  input  logic              wait_stall,
  output logic              take,        // decode stage emptied this cycle
  output logic              issue,       // an MIn is issued this cycle
  output logic [NUNITS-1:0] iss_en,      // load operand registers of this unit
  output logic [NUNITS-1:0] cap,         // load this unit's result into its COR
  output dst_t              cap_dst [NUNITS],
  output logic [NUNITS-1:0] unit_busy,   // unit executing (clock enabled)
  output cu_state_e         state,
  output logic              illegal
);
  logic [LATW-1:0] cnt_q [NUNITS];
  dst_t            dst_q [NUNITS];
  logic            tgt_busy;

  always_comb begin
    tgt_busy = 1'b0;
    for (int u = 0; u < NUNITS; u++)
      if (d_ins.unit == unit_e'(u) && cnt_q[u] > LATW'(1)) tgt_busy = 1'b1;
  end

  always_comb begin
    state   = CU_IDLE;
    take    = 1'b0;
    issue   = 1'b0;
    iss_en  = '0;
    illegal = 1'b0;
    if (d_valid) begin
      if (wait_stall) begin
        state = CU_WAIT;
      end else if (!d_ins.legal) begin
        state   = CU_ISSUE;
        take    = 1'b1;
        illegal = 1'b1;
      end else if (tgt_busy) begin
        state = CU_BUSY;
      end else begin
        state  = CU_ISSUE;
        take   = 1'b1;
        issue  = 1'b1;
        for (int u = 0; u < NUNITS; u++)
          iss_en[u] = (d_ins.unit == unit_e'(u));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < NUNITS; u++) begin
        cnt_q[u] <= '0;
        dst_q[u] <= '0;
      end
    end else begin
      for (int u = 0; u < NUNITS; u++) begin
        if (iss_en[u]) begin
          cnt_q[u] <= LATW'(unit_lat(unit_e'(u)));
          dst_q[u] <= d_ins.dst;
        end else if (cnt_q[u] != '0) begin
          cnt_q[u] <= cnt_q[u] - 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int u = 0; u < NUNITS; u++) begin
      cap[u]       = (cnt_q[u] == LATW'(1));
      unit_busy[u] = (cnt_q[u] != '0);
      cap_dst[u]   = dst_q[u];
    end
  end

  a_one_issue: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(iss_en));
endmodule
