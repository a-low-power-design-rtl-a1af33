// alu_pkg: types and constants shared by the low-power ALU.
//
// The ALU is a single-issue 32-bit integer pipeline whose operations can be
// executed either by a fast, power-hungry functional unit or by a slow,
// frugal one.  Units are grouped by latency; each group shares one Common
// Output Register.  This package holds the machine-instruction (MIn) format,
// the opcode and unit enumerations, the latency of every unit in clock
// cycles and the records passed between decoder, control unit, functional
// units and register file.
//
// Latencies are those of a 5 ns clock: 1 cycle for the fast adder/subtractor,
// 3 for the ripple-carry ones, 2 and 6 for the fast and slow multipliers,
// 7 and 11 for the fast and slow dividers.  The logic, shift/rotate and
// compare units are given 1, 3 and 2 cycles, from their 2-2.5 ns, 11 ns and
// 8 ns delays rounded up to whole 5 ns cycles.  The register count, the MIn
// bit layout, the opcode values and the width of the wait-state field are
// this design's own choices.
package alu_pkg;

  localparam int XLEN  = 32;            // integer width
  localparam int NREGS = 16;            // programmer-visible registers
  localparam int RIDX  = $clog2(NREGS); // register specifier width
  localparam int DLYW  = 4;             // wait-state field width (0..15 cycles)

  // Functional units.  The order is also the priority order used nowhere
  // else; grouping is given by unit_grp().
  typedef enum logic [3:0] {
    U_LOGIC = 4'd0,  // AND/OR/XOR/NOT/MOV, 1 cycle
    U_ADDF  = 4'd1,  // fast (carry look-ahead) add/sub, 1 cycle
    U_CMP   = 4'd2,  // compare -> flag, 2 cycles
    U_MULF  = 4'd3,  // fast multiplier, 2 cycles
    U_ADDS  = 4'd4,  // slow (carry ripple) add/sub, 3 cycles
    U_SHIFT = 4'd5,  // shift/rotate, 3 cycles
    U_MULS  = 4'd6,  // slow shifted-parallel-addition multiplier, 6 cycles
    U_DIVF  = 4'd7,  // fast divider (quotient only), 7 cycles
    U_DIVS  = 4'd8   // slow non-performing divider (quotient+remainder), 11 cycles
  } unit_e;
  localparam int NUNITS  = 9;
  localparam int NGROUPS = 6;

  localparam int LAT_LOGIC    = 1;
  localparam int LAT_ADD_FAST = 1;
  localparam int LAT_CMP      = 2;
  localparam int LAT_MUL_FAST = 2;
  localparam int LAT_ADD_SLOW = 3;
  localparam int LAT_SHIFT    = 3;
  localparam int LAT_MUL_SLOW = 6;
  localparam int LAT_DIV_FAST = 7;
  localparam int LAT_DIV_SLOW = 11;
  localparam int LATW         = 4;      // width of a latency counter


  function automatic int unit_lat(unit_e u);
    case (u)
      U_LOGIC: return LAT_LOGIC;
      U_ADDF:  return LAT_ADD_FAST;
      U_CMP:   return LAT_CMP;
      U_MULF:  return LAT_MUL_FAST;
      U_ADDS:  return LAT_ADD_SLOW;
      U_SHIFT: return LAT_SHIFT;
      U_MULS:  return LAT_MUL_SLOW;
      U_DIVF:  return LAT_DIV_FAST;
      default: return LAT_DIV_SLOW;
    endcase
  endfunction

  // Common Output Register group of a unit: units of equal latency share one.
  function automatic int unit_grp(unit_e u);
    case (u)
      U_LOGIC, U_ADDF:  return 0;
      U_CMP,   U_MULF:  return 1;
      U_ADDS,  U_SHIFT: return 2;
      U_MULS:           return 3;
      U_DIVF:           return 4;
      default:          return 5;
    endcase
  endfunction

  // Machine instruction opcodes (MIn bits [31:26]).  The programmer's ADD,
  // SUB, MUL and DIV each map to a fast and a slow MIn; the offline scheduler
  // chooses which one the assembler emits.
  typedef enum logic [5:0] {
    OP_MOV   = 6'h01,
    OP_AND   = 6'h02,
    OP_OR    = 6'h03,
    OP_XOR   = 6'h04,
    OP_NOT   = 6'h05,
    OP_ADDF  = 6'h08,
    OP_SUBF  = 6'h09,
    OP_ADDS  = 6'h0A,
    OP_SUBS  = 6'h0B,
    OP_SHL   = 6'h10,
    OP_SHR   = 6'h11,
    OP_ROL   = 6'h12,
    OP_ROR   = 6'h13,
    OP_CMPEQ = 6'h18,
    OP_CMPLT = 6'h19,
    OP_MULF  = 6'h20,
    OP_MULS  = 6'h21,
    OP_DIVF  = 6'h28,
    OP_DIVS  = 6'h29,
    OP_DIVRS = 6'h2A
  } opcode_e;

  // Unit function codes.
  localparam logic [2:0] FN_MOV = 3'd0, FN_AND = 3'd1, FN_OR = 3'd2,
                         FN_XOR = 3'd3, FN_NOT = 3'd4;
  localparam logic [2:0] FN_ADD = 3'd0, FN_SUB = 3'd1;
  localparam logic [2:0] FN_SHL = 3'd0, FN_SHR = 3'd1, FN_ROL = 3'd2, FN_ROR = 3'd3;
  localparam logic [2:0] FN_EQ  = 3'd0, FN_LTU = 3'd1;

  // MIn layout: [31:26] opcode, [25:22] wait states before issue,
  // [2*RIDX-1:RIDX] operand 1 (destination and first source),
  // [RIDX-1:0] operand 2 (second source; high word or remainder destination).
  localparam int OPC_LSB = 26;
  localparam int DLY_LSB = 22;

  // Where a result goes.
  typedef struct packed {
    logic            we_lo;    // write lo word to rd_lo
    logic            we_hi;    // write hi word to rd_hi
    logic            we_flag;  // write the flag bit
    logic [RIDX-1:0] rd_lo;
    logic [RIDX-1:0] rd_hi;
  } dst_t;

  // Decoded instruction held in the decode stage.
  typedef struct packed {
    logic            legal;
    unit_e           unit;
    logic [2:0]      fn;
    logic [RIDX-1:0] op1;
    logic [RIDX-1:0] op2;
    dst_t            dst;
  } dec_t;

  // Output of one functional unit.
  typedef struct packed {
    logic [XLEN-1:0] lo;
    logic [XLEN-1:0] hi;
    logic            flag;
  } fu_out_t;

  // Content of a Common Output Register.
  typedef struct packed {
    logic            valid;
    fu_out_t         res;
    dst_t            dst;
  } cor_t;

  // Control unit issue decision, reported for observation.
  typedef enum logic [1:0] {
    CU_IDLE  = 2'd0,  // decode stage empty
    CU_ISSUE = 2'd1,  // instruction issued (or an illegal one dropped)
    CU_WAIT  = 2'd2,  // wait states embedded in the MIn are being served
    CU_BUSY  = 2'd3   // target unit still executing its previous MIn
  } cu_state_e;

  // Assemble an MIn (used by testbenches and by anyone building programs).
  function automatic logic [31:0] mk_min(opcode_e op, int unsigned op1,
                                         int unsigned op2, int unsigned dly = 0);
    logic [31:0] w;
    w = '0;
    w[31:OPC_LSB]             = op;
    w[DLY_LSB +: DLYW]        = DLYW'(dly);
    w[2*RIDX-1:RIDX]          = RIDX'(op1);
    w[RIDX-1:0]               = RIDX'(op2);
    return w;
  endfunction

endpackage
