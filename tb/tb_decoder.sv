// tb_decoder: a stream of random MIns (all opcodes, some undefined, random
// wait-state fields) goes through the decoder; the testbench plays the
// control unit and takes the held MIn at random once its wait states are
// served.  Checked: MIns come out in order; each is held with wait_stall
// high for exactly its wait-state count of cycles after entering the decode
// register; unit, function, operands and destinations match a table
// written from the instruction set; ins_ready follows the decode register.
module tb_decoder;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ins_valid, ins_ready, take, d_valid, wait_stall;
  logic [31:0] ins_word;
  dec_t        d_ins;

  decoder dut (.clk, .rst_n, .ins_valid, .ins_word, .ins_ready,
               .take, .d_valid, .d_ins, .wait_stall);

  initial begin
    repeat (50000) @(posedge clk);
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

  // expected decode: {legal, unit[3:0], fn[2:0], we_lo, we_hi, we_flag}
  function automatic logic [10:0] expect_of(logic [5:0] op);
    case (op)
      6'h01: return {1'b1, 4'd0, 3'd0, 3'b100};
      6'h02: return {1'b1, 4'd0, 3'd1, 3'b100};
      6'h03: return {1'b1, 4'd0, 3'd2, 3'b100};
      6'h04: return {1'b1, 4'd0, 3'd3, 3'b100};
      6'h05: return {1'b1, 4'd0, 3'd4, 3'b100};
      6'h08: return {1'b1, 4'd1, 3'd0, 3'b100};
      6'h09: return {1'b1, 4'd1, 3'd1, 3'b100};
      6'h0A: return {1'b1, 4'd4, 3'd0, 3'b100};
      6'h0B: return {1'b1, 4'd4, 3'd1, 3'b100};
      6'h10: return {1'b1, 4'd5, 3'd0, 3'b100};
      6'h11: return {1'b1, 4'd5, 3'd1, 3'b100};
      6'h12: return {1'b1, 4'd5, 3'd2, 3'b100};
      6'h13: return {1'b1, 4'd5, 3'd3, 3'b100};
      6'h18: return {1'b1, 4'd2, 3'd0, 3'b001};
      6'h19: return {1'b1, 4'd2, 3'd1, 3'b001};
      6'h20: return {1'b1, 4'd3, 3'd0, 3'b110};
      6'h21: return {1'b1, 4'd6, 3'd0, 3'b110};
      6'h28: return {1'b1, 4'd7, 3'd0, 3'b100};
      6'h29: return {1'b1, 4'd8, 3'd0, 3'b100};
      6'h2A: return {1'b1, 4'd8, 3'd0, 3'b110};
      default: return {1'b0, 10'd0};
    endcase
  endfunction

  localparam logic [5:0] OPS [22] = '{6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h09,
    6'h0A, 6'h0B, 6'h10, 6'h11, 6'h12, 6'h13, 6'h18, 6'h19, 6'h20, 6'h21, 6'h28,
    6'h29, 6'h2A, 6'h00, 6'h3F};

  localparam int N = 400;
  logic [31:0] prog [N];
  logic last_acc = 1'b0;
  int sent = 0, got = 0, held = 0, stalled = 0, total_wait = 0;

  initial begin
    for (int i = 0; i < N; i++) begin
      prog[i] = '0;
      prog[i][31:26] = OPS[$urandom_range(0, 21)];
      prog[i][25:22] = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'd0;
      prog[i][7:0]   = 8'($urandom);
    end
    ins_valid = 0; ins_word = '0; take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < N) begin
      // source side: present the next MIn, sometimes with a bubble
      #1; take = 0;
      if (!ins_valid || last_acc) begin
        ins_valid = (sent < N) && ($urandom_range(0, 4) != 0);
        ins_word  = ins_valid ? prog[sent] : '0;
      end
      #1;
      chk(ins_ready === (!d_valid || take), "ins_ready");
      // control side
      take = d_valid && !wait_stall && ($urandom_range(0, 3) != 0);
      #1;
      chk(ins_ready === (!d_valid || take), "ins_ready after take");
      if (d_valid) begin
        logic [10:0] e;
        e = expect_of(prog[got][31:26]);
        if (wait_stall) begin
          stalled++;
          chk(!take, "no take while waiting");
        end
        if (take) begin
          chk(d_ins.legal === e[10], "legal");
          if (e[10]) begin
            chk(d_ins.unit === unit_e'(e[9:6]), "unit");
            chk(d_ins.fn === e[5:3], "fn");
            chk({d_ins.dst.we_lo, d_ins.dst.we_hi, d_ins.dst.we_flag} === e[2:0], "write enables");
            chk(d_ins.op1 === prog[got][7:4] && d_ins.op2 === prog[got][3:0], "operands");
            chk(d_ins.dst.rd_lo === prog[got][7:4] && d_ins.dst.rd_hi === prog[got][3:0], "destinations");
          end
          // wait cycles served before the take
          chk(stalled == int'(prog[got][25:22]), $sformatf("wait count %0d vs %0d", stalled, prog[got][25:22]));
          total_wait += stalled;
          stalled = 0;
          got++;
        end
      end
      begin
        logic accepted;
        accepted = ins_valid && ins_ready;
        @(posedge clk);
        if (accepted) sent++;
        last_acc = accepted;
      end
    end
    chk(total_wait > 100, "wait states exercised");
    $display("served %0d wait cycles", total_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
