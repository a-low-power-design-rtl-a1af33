// tb_exec_units: the functional units, their operand registers and the
// Common Output Registers (CORs).  The testbench plays the control unit: each
// cycle it issues, with random operands and function code, to at most one
// unit that is free, keeps a down-counter per unit and raises that unit's
// capture strobe with a random destination when the counter reaches one.
// The operand inputs are randomised in every cycle, so a unit that did not
// hold its operands would give a wrong result.  In the cycle after a capture
// the COR of the unit's latency group must be valid with the destination and
// the result computed by the testbench from the issued operands; otherwise
// the COR must not be valid.  Every unit must be checked.
module tb_exec_units;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUNITS-1:0] iss_en, cap;
  logic [2:0]        iss_fn;
  logic [XLEN-1:0]   opa, opb;
  dst_t              cap_dst [NUNITS];
  cor_t              cor [NGROUPS], nxt [NGROUPS];

  exec_units dut (.clk, .rst_n, .iss_en, .iss_fn, .opa, .opb, .cap, .cap_dst, .cor, .nxt);

  initial begin
    repeat (40000) @(posedge clk);
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

  int lat [NUNITS] = '{1, 1, 2, 2, 3, 3, 6, 7, 11};
  int grp [NUNITS] = '{0, 0, 1, 1, 2, 2, 3, 4, 5};

  // expected result of unit u for operands a, b and function fn
  function automatic fu_out_t ref_res(int u, logic [31:0] a, logic [31:0] b, logic [2:0] fn);
    fu_out_t r;
    logic [63:0] p;
    logic [4:0]  sh;
    r  = '0;
    sh = b[4:0];
    p  = {32'd0, a} * {32'd0, b};
    case (u)
      0: case (fn)
           FN_AND: r.lo = a & b;
           FN_OR:  r.lo = a | b;
           FN_XOR: r.lo = a ^ b;
           FN_NOT: r.lo = ~a;
           default: r.lo = b;
         endcase
      1, 4: r.lo = fn[0] ? a - b : a + b;
      2: r.flag = fn[0] ? (a < b) : (a == b);
      3, 6: begin r.lo = p[31:0]; r.hi = p[63:32]; end
      5: case (fn[1:0])
           2'd0: r.lo = a << sh;
           2'd1: r.lo = a >> sh;
           2'd2: r.lo = (a << sh) | (sh == 0 ? 32'd0 : a >> (6'd32 - sh));
           default: r.lo = (a >> sh) | (sh == 0 ? 32'd0 : a << (6'd32 - sh));
         endcase
      7: r.lo = (b == 0) ? '1 : a / b;
      default: begin r.lo = (b == 0) ? '1 : a / b; r.hi = (b == 0) ? a : a % b; end
    endcase
    return r;
  endfunction

  function automatic logic [2:0] rand_fn(int u);
    case (u)
      0:       return 3'($urandom_range(0, 4));
      1, 2, 4: return 3'($urandom_range(0, 1));
      5:       return 3'($urandom_range(0, 3));
      default: return 3'd0;
    endcase
  endfunction

  function automatic logic [31:0] rand_val();
    case ($urandom_range(0, 3))
      0:       return $urandom_range(0, 20);
      1:       return 32'hFFFF_FFFF - $urandom_range(0, 3);
      default: return $urandom;
    endcase
  endfunction

  int      cnt [NUNITS];
  fu_out_t exp_r [NUNITS];
  dst_t    dst [NUNITS];
  // expectations for the CORs in the next cycle
  bit      nv [NGROUPS];
  fu_out_t nr [NGROUPS];
  dst_t    nd [NGROUPS];
  int      nu [NGROUPS];
  int      n_chk [NUNITS];

  initial begin
    iss_en = '0; iss_fn = '0; opa = '0; opb = '0; cap = '0;
    for (int u = 0; u < NUNITS; u++) begin cnt[u] = 0; dst[u] = '0; cap_dst[u] = '0; n_chk[u] = 0; end
    for (int g = 0; g < NGROUPS; g++) nv[g] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      int u;
      // CORs loaded at the last edge
      for (int g = 0; g < NGROUPS; g++) begin
        chk(cor[g].valid == nv[g], $sformatf("COR%0d valid", g));
        if (nv[g] && cor[g].valid) begin
          chk(cor[g].dst == nd[g], $sformatf("COR%0d destination", g));
          chk(cor[g].res == nr[g], $sformatf("COR%0d result of unit %0d: %h/%h vs %h/%h",
              g, nu[g], cor[g].res.lo, cor[g].res.hi, nr[g].lo, nr[g].hi));
          n_chk[nu[g]]++;
        end
      end
      // capture strobes for units finishing this cycle
      for (int g = 0; g < NGROUPS; g++) nv[g] = 0;
      for (int v = 0; v < NUNITS; v++) begin
        cap[v] = (cnt[v] == 1);
        cap_dst[v] = dst_t'($urandom);
        if (cap[v]) begin
          nv[grp[v]] = 1; nr[grp[v]] = exp_r[v]; nd[grp[v]] = cap_dst[v]; nu[grp[v]] = v;
        end
      end
      // issue to one free unit whose group has no capture due in the same cycle
      opa = rand_val(); opb = rand_val(); iss_fn = 3'($urandom);
      iss_en = '0;
      u = $urandom_range(0, NUNITS - 1);
      if ($urandom_range(0, 2) != 0 && cnt[u] <= 1) begin
        bit clash;
        clash = 0;
        for (int v = 0; v < NUNITS; v++)
          if (v != u && grp[v] == grp[u] && cnt[v] == lat[u] + 1) clash = 1;
        if (!clash) begin
          iss_fn    = rand_fn(u);
          iss_en[u] = 1'b1;
          exp_r[u]  = ref_res(u, opa, opb, iss_fn);
        end
      end
      @(posedge clk);
      for (int v = 0; v < NUNITS; v++) begin
        if (iss_en[v]) cnt[v] = lat[v] + 1;
        if (cnt[v] != 0) cnt[v]--;
      end
      #1;
      opa = rand_val(); opb = rand_val(); iss_fn = 3'($urandom);   // operand bus moves on
    end
    for (int v = 0; v < NUNITS; v++) chk(n_chk[v] > 50, $sformatf("unit %0d checked", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
