// decoder: decode stage of the ALU.
//
// It accepts machine instructions (MIns) from the instruction cache over a
// valid/ready stream, holds one MIn in its decode register and splits it into
// the unit that executes it, the unit function, the two register operands
// and the write-back destinations.  It also serves the wait states the
// assembler embeds in the MIn in place of NOP instructions: an MIn whose
// delay field is d stays in the decode register for d cycles with
// wait_stall high, telling the control unit not to issue it; it becomes
// issuable on the (d+1)-th cycle.  No instruction is fetched or executed for
// those cycles.
//
// Interface: ins_ready is high when the decode register is empty or is being
// emptied this cycle (take from the control unit), so one MIn per cycle can
// flow.  An undefined opcode decodes with legal = 0; the control unit drops
// it.  Results go to operand 1 (and, for the multipliers' high word and the
// slow divider's remainder, to operand 2); this destination convention, the
// MIn bit layout and the valid/ready stream are this design's choices.
// rst_n drives the asynchronous reset of the flops and also the `disable iff`
// of the assertions below; a lint tool may report it as used both ways.  The
// assertion use is not hardware, so this stands.
module decoder
  import alu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ins_valid,
  input  logic [31:0] ins_word,
  output logic        ins_ready,
  input  logic        take,        // control unit consumes the held MIn
  output logic        d_valid,
  output dec_t        d_ins,
  output logic        wait_stall   // embedded wait states still being served
);
  logic            valid_q;
  dec_t            dec_q;
  logic [DLYW-1:0] dly_q;

  function automatic dec_t decode(logic [31:0] w);
    dec_t d;
    d            = '0;
    d.legal      = 1'b1;
    d.op1        = w[2*RIDX-1:RIDX];
    d.op2        = w[RIDX-1:0];
    d.dst.rd_lo  = d.op1;
    d.dst.rd_hi  = d.op2;
    d.dst.we_lo  = 1'b1;
    d.unit       = U_LOGIC;
    case (w[31:OPC_LSB])
      OP_MOV:   d.fn = FN_MOV;
      OP_AND:   d.fn = FN_AND;
      OP_OR:    d.fn = FN_OR;
      OP_XOR:   d.fn = FN_XOR;
      OP_NOT:   d.fn = FN_NOT;
      OP_ADDF:  begin d.unit = U_ADDF;  d.fn = FN_ADD; end
      OP_SUBF:  begin d.unit = U_ADDF;  d.fn = FN_SUB; end
      OP_ADDS:  begin d.unit = U_ADDS;  d.fn = FN_ADD; end
      OP_SUBS:  begin d.unit = U_ADDS;  d.fn = FN_SUB; end
      OP_SHL:   begin d.unit = U_SHIFT; d.fn = FN_SHL; end
      OP_SHR:   begin d.unit = U_SHIFT; d.fn = FN_SHR; end
      OP_ROL:   begin d.unit = U_SHIFT; d.fn = FN_ROL; end
      OP_ROR:   begin d.unit = U_SHIFT; d.fn = FN_ROR; end
      OP_CMPEQ: begin d.unit = U_CMP; d.fn = FN_EQ;  d.dst.we_lo = 1'b0; d.dst.we_flag = 1'b1; end
      OP_CMPLT: begin d.unit = U_CMP; d.fn = FN_LTU; d.dst.we_lo = 1'b0; d.dst.we_flag = 1'b1; end
      OP_MULF:  begin d.unit = U_MULF; d.dst.we_hi = 1'b1; end
      OP_MULS:  begin d.unit = U_MULS; d.dst.we_hi = 1'b1; end
      OP_DIVF:  d.unit = U_DIVF;
      OP_DIVS:  d.unit = U_DIVS;
      OP_DIVRS: begin d.unit = U_DIVS; d.dst.we_hi = 1'b1; end
      default:  begin d.legal = 1'b0; d.dst = '0; end
    endcase
    return d;
  endfunction

  assign ins_ready = !valid_q || take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      dec_q   <= '0;
      dly_q   <= '0;
    end else if (ins_ready) begin
      valid_q <= ins_valid;
      if (ins_valid) begin
        dec_q <= decode(ins_word);
        dly_q <= ins_word[DLY_LSB +: DLYW];
      end
    end else if (dly_q != '0) begin
      dly_q <= dly_q - 1'b1;
    end
  end

  assign d_valid    = valid_q;
  assign d_ins      = dec_q;
  assign wait_stall = valid_q && (dly_q != '0);

  // The control unit never consumes an MIn whose wait states are not served.
  a_no_early_take: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> valid_q && dly_q == '0);
endmodule
