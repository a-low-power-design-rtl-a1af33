// exec_units: the functional units and their Common Output Registers.
//
// Nine units are instantiated: logic, fast add/sub (carry look-ahead),
// compare, fast multiplier, slow add/sub (carry ripple), shift/rotate, slow
// multiplier (shifted parallel additions), fast divider (quotient only) and
// slow divider (quotient and remainder).  Each unit has its own operand
// registers, loaded only in the cycle the control unit issues to it
// (iss_en); otherwise its inputs do not change and the unit does not switch.
// The units themselves are combinational; a unit of latency L is a
// multicycle path of L clock cycles from its operand registers to its Common
// Output Register, and the control unit samples it only after L cycles.
//
// Units of equal latency form a group and share one Common Output Register
// (COR): group 0 (1 cycle) logic and fast add/sub, group 1 (2 cycles)
// compare and fast multiplier, group 2 (3 cycles) slow add/sub and shifter,
// group 3 (6) slow multiplier, group 4 (7) fast divider, group 5 (11) slow
// divider.  Since MIns issue one per cycle, two units of one group never
// finish in the same cycle.  cap[u] loads unit u's result and the
// destination cap_dst[u] into its group's COR, whose valid bit then lasts one
// cycle, the write-back cycle.  Operand registers and CORs reset to zero.
// Output nxt shows what each COR captures at the end of the current cycle,
// for forwarding to an MIn that issues in that cycle.
// rst_n drives the asynchronous reset of the flops and also the `disable iff`
// of the assertions below; a lint tool may report it as used both ways.  The
// assertion use is not hardware, so this stands.
module exec_units
  import alu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUNITS-1:0] iss_en,
  input  logic [2:0]        iss_fn,
  input  logic [XLEN-1:0]   opa,      // register file out-port, Reg1
  input  logic [XLEN-1:0]   opb,      // register file out-port, Reg2
  input  logic [NUNITS-1:0] cap,
  input  dst_t              cap_dst [NUNITS],
  output cor_t              cor [NGROUPS],
  output cor_t              nxt [NGROUPS]  // what each COR captures this cycle
);
  logic [XLEN-1:0] a_q  [NUNITS];
  logic [XLEN-1:0] b_q  [NUNITS];
  logic [2:0]      fn_q [NUNITS];
  fu_out_t         res  [NUNITS];

  // Operand registers, one set per unit, enabled only on issue.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < NUNITS; u++) begin
        a_q[u]  <= '0;
        b_q[u]  <= '0;
        fn_q[u] <= '0;
      end
    end else begin
      for (int u = 0; u < NUNITS; u++) begin
        if (iss_en[u]) begin
          a_q[u]  <= opa;
          b_q[u]  <= opb;
          fn_q[u] <= iss_fn;
        end
      end
    end
  end

  // ---- group 0: 1 cycle ----
  logic [XLEN-1:0] logic_y, addf_s;
  logic            addf_co;
  logic_unit #(.W(XLEN)) u_logic (.a(a_q[U_LOGIC]), .b(b_q[U_LOGIC]), .fn(fn_q[U_LOGIC]), .y(logic_y));
  addsub #(.W(XLEN), .FAST(1'b1)) u_addf (
    .a(a_q[U_ADDF]), .b(b_q[U_ADDF]), .sub(fn_q[U_ADDF] == FN_SUB), .cin(1'b0),
    .s(addf_s), .cout(addf_co));

  // ---- group 1: 2 cycles ----
  logic            cmp_flag;
  logic [2*XLEN-1:0] mulf_p;
  compare_unit #(.W(XLEN)) u_cmp (.a(a_q[U_CMP]), .b(b_q[U_CMP]), .fn(fn_q[U_CMP]), .flag(cmp_flag));
  mul_fast #(.W(XLEN)) u_mulf (.a(a_q[U_MULF]), .b(b_q[U_MULF]), .p(mulf_p));

  // ---- group 2: 3 cycles ----
  logic [XLEN-1:0] adds_s, shift_y;
  logic            adds_co;
  addsub #(.W(XLEN), .FAST(1'b0)) u_adds (
    .a(a_q[U_ADDS]), .b(b_q[U_ADDS]), .sub(fn_q[U_ADDS] == FN_SUB), .cin(1'b0),
    .s(adds_s), .cout(adds_co));
  shift_unit #(.W(XLEN)) u_shift (.a(a_q[U_SHIFT]), .b(b_q[U_SHIFT]), .fn(fn_q[U_SHIFT]), .y(shift_y));

  // ---- group 3: 6 cycles ----
  logic [2*XLEN-1:0] muls_p;
  mul_slow #(.W(XLEN)) u_muls (.a(a_q[U_MULS]), .b(b_q[U_MULS]), .p(muls_p));

  // ---- group 4: 7 cycles ----
  logic [XLEN-1:0] divf_q;
  div_fast #(.W(XLEN)) u_divf (.a(a_q[U_DIVF]), .b(b_q[U_DIVF]), .q(divf_q));

  // ---- group 5: 11 cycles ----
  logic [XLEN-1:0] divs_q, divs_r;
  div_slow #(.W(XLEN)) u_divs (.a(a_q[U_DIVS]), .b(b_q[U_DIVS]), .q(divs_q), .r(divs_r));

  // The adders' carry outs are not architectural state in this design.
  logic unused_co;
  assign unused_co = addf_co ^ adds_co;

  always_comb begin
    for (int u = 0; u < NUNITS; u++) res[u] = '0;
    res[U_LOGIC].lo = logic_y;
    res[U_ADDF].lo  = addf_s;
    res[U_CMP].flag = cmp_flag;
    res[U_MULF].lo  = mulf_p[XLEN-1:0];
    res[U_MULF].hi  = mulf_p[2*XLEN-1:XLEN];
    res[U_ADDS].lo  = adds_s;
    res[U_SHIFT].lo = shift_y;
    res[U_MULS].lo  = muls_p[XLEN-1:0];
    res[U_MULS].hi  = muls_p[2*XLEN-1:XLEN];
    res[U_DIVF].lo  = divf_q;
    res[U_DIVS].lo  = divs_q;
    res[U_DIVS].hi  = divs_r;
  end

  // Common Output Registers.
  logic [NGROUPS-1:0] gcap;
  fu_out_t            gres [NGROUPS];
  dst_t               gdst [NGROUPS];

  always_comb begin
    for (int g = 0; g < NGROUPS; g++) begin
      gcap[g] = 1'b0;
      gres[g] = '0;
      gdst[g] = '0;
      for (int u = 0; u < NUNITS; u++) begin
        if (unit_grp(unit_e'(u)) == g && cap[u]) begin
          gcap[g] = 1'b1;
          gres[g] = res[u];
          gdst[g] = cap_dst[u];
        end
      end
    end
  end

  // The capture of this cycle, offered for forwarding to the operand
  // registers of an MIn issued in the same cycle.
  always_comb
    for (int g = 0; g < NGROUPS; g++) begin
      nxt[g].valid = gcap[g];
      nxt[g].res   = gres[g];
      nxt[g].dst   = gdst[g];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NGROUPS; g++) cor[g] <= '0;
    end else begin
      for (int g = 0; g < NGROUPS; g++) begin
        cor[g].valid <= gcap[g];
        if (gcap[g]) begin
          cor[g].res <= gres[g];
          cor[g].dst <= gdst[g];
        end
      end
    end
  end

  // Two units of one group never finish in the same cycle.
  for (genvar g = 0; g < NGROUPS; g++) begin : g_chk
    logic [NUNITS-1:0] gm;
    always_comb
      for (int u = 0; u < NUNITS; u++) gm[u] = cap[u] && (unit_grp(unit_e'(u)) == g);
    a_one_cap: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gm));
  end
endmodule
