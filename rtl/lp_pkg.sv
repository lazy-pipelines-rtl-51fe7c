// lp_pkg: types and constants shared by the Lazy Pipelines execution core.
//
// A Lazy Pipeline runs a set of voltage-over-scaled ("imprecise") functional
// units next to the normal ("precise") ones. An imprecise unit keeps working
// on an operation after its nominal latency has elapsed (the slack) until
// another operation is issued to it or until further slack would not improve
// the result. Its result may be forwarded during that window (Lazy
// Forwarding) and is written back only when the operation leaves the unit
// (Lazy Writeback).
//
// This package holds the decoded-instruction format, the functional-unit
// status encoding (free / occupied / freeOnDemand, two bits per unit) and
// the identifiers of the ten units of the core (five types, each in a
// precise and an imprecise copy). The instruction format is
// this design's own: the core receives instructions already decoded.
package lp_pkg;

  localparam int unsigned XLEN    = 32;  // data width (ARM-like integer core)
  localparam int unsigned NREGS   = 16;  // architectural registers r0..r15
  localparam int unsigned RADDR_W = $clog2(NREGS);
  // Width of the precision field carried by marking instructions and by the
  // datapath pipeline registers; the marking instructions print a three-bit
  // level (0b000 = precise at 1.2 V, 0b111 = imprecise at 0.5 V).
  localparam int unsigned PREC_W  = 3;

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [RADDR_W-1:0] reg_idx_t;
  typedef logic [PREC_W-1:0]  prec_t;

  localparam prec_t PREC_PRECISE = '0;

  // Instruction classes seen by the core.
  typedef enum logic [2:0] {
    K_NOP       = 3'd0,
    K_ALU       = 3'd1,  // single-cycle integer ALU operation
    K_MUL       = 3'd2,  // integer multiply
    K_START_IMP = 3'd3,  // startImprecise: set precision level
    K_START_PRE = 3'd4,  // startPrecise: return to precise level
    K_FADD      = 3'd5,  // binary32 add (op OP_ADD) or subtract (OP_SUB)
    K_FMUL      = 3'd6,  // binary32 multiply
    K_FDIV      = 3'd7   // binary32 divide
  } kind_e;

  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_RSB = 4'd2,
    OP_AND = 4'd3,
    OP_ORR = 4'd4,
    OP_EOR = 4'd5,
    OP_MOV = 4'd6,
    OP_LSL = 4'd7,
    OP_LSR = 4'd8
  } alu_op_e;

  // Decoded instruction entering the core.
  typedef struct packed {
    kind_e    kind;
    alu_op_e  op;
    reg_idx_t rd;
    reg_idx_t rs1;
    reg_idx_t rs2;
    logic     use_imm;  // second operand is imm instead of rs2
    word_t    imm;
    prec_t    prec;     // level of a marking instruction; after decode,
                        // the level of the region the instruction is in
  } instr_t;

  // Functional-unit status, two bits per unit.
  typedef enum logic [1:0] {
    FU_FREE           = 2'd0,  // nothing held
    FU_OCCUPIED       = 2'd1,  // operation before its nominal end
    FU_FREE_ON_DEMAND = 2'd2   // past nominal end, using slack until evicted
  } fu_state_e;

  // Functional-unit types; each has a precise and an imprecise unit.
  typedef enum logic [2:0] {
    FT_ALU  = 3'd0,
    FT_MUL  = 3'd1,
    FT_FADD = 3'd2,
    FT_FMUL = 3'd3,
    FT_FDIV = 3'd4
  } fu_type_e;

  // Functional units of the core, identified by {type, set}: index 2*t is
  // the precise unit of type t, 2*t+1 its imprecise twin.
  localparam int unsigned NFU     = 10;
  localparam int unsigned FUID_W  = 4;
  typedef logic [FUID_W-1:0] fu_id_t;
  localparam fu_id_t FU_ALU_PRE  = 4'd0;
  localparam fu_id_t FU_ALU_IMP  = 4'd1;
  localparam fu_id_t FU_MUL_PRE  = 4'd2;
  localparam fu_id_t FU_MUL_IMP  = 4'd3;
  localparam fu_id_t FU_FADD_PRE = 4'd4;
  localparam fu_id_t FU_FADD_IMP = 4'd5;
  localparam fu_id_t FU_FMUL_PRE = 4'd6;
  localparam fu_id_t FU_FMUL_IMP = 4'd7;
  localparam fu_id_t FU_FDIV_PRE = 4'd8;
  localparam fu_id_t FU_FDIV_IMP = 4'd9;

  function automatic logic is_arith_kind(kind_e k);
    return k inside {K_ALU, K_MUL, K_FADD, K_FMUL, K_FDIV};
  endfunction

  function automatic fu_type_e kind_to_type(kind_e k);
    case (k)
      K_MUL:   return FT_MUL;
      K_FADD:  return FT_FADD;
      K_FMUL:  return FT_FMUL;
      K_FDIV:  return FT_FDIV;
      default: return FT_ALU;
    endcase
  endfunction

  localparam int unsigned SLACK_W = 4;
  typedef logic [SLACK_W-1:0] slack_t;

  // Logic and move operations converge after one slack cycle; arithmetic
  // ones need more.
  function automatic logic is_logic_op(alu_op_e op);
    return op inside {OP_AND, OP_ORR, OP_EOR, OP_MOV};
  endfunction

endpackage
