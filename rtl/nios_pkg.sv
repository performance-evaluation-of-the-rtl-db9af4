// nios_pkg: types and constants shared by the 4-stage Nios pipeline.
//
// The machine is a 32-bit, two-operand RISC with 16-bit instructions, an
// 11-bit K (prefix) register loaded by PFX, conditional skip instructions,
// branches with one delay slot, and a windowed register file of which 32
// registers are visible through the current window pointer (CWP).  Those
// properties follow the architecture description; the bit-level encoding
// below (opcode values, field positions, status register layout) is this
// design's own, since no encoding table is available for it.
//
// Instruction formats (op6 = instr[15:10]):
//   RR    : op6 | B[9:5]    | A[4:0]       A <- A op B
//   Ri5   : op6 | IMM5[9:5] | A[4:0]       A <- A op {K,IMM5}
//   I8    : op6 | --[9:8]   | IMM8[7:0]    SAVE
//   I11   : op5 [15:11]     | IMM11[10:0]  BR, BSR, PFX
//   SKPS  : op6 | ------    | cond[3:0]
// Registers r0..r7 are global, r8..r15 outs (%o, r14=%sp, r15=%o7 link),
// r16..r23 locals, r24..r31 ins; SAVE decrements CWP so that the new
// window's ins are the old window's outs.
package nios_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned ILEN   = 16;
  localparam int unsigned KLEN   = 11;
  localparam int unsigned CWPW   = 5;   // width of the CWP field in STATUS
  localparam logic [4:0]  REG_SP   = 5'd14;
  localparam logic [4:0]  REG_LINK = 5'd15;

  // 6-bit primary opcodes
  localparam logic [5:0] OP_NOP    = 6'o00;
  localparam logic [5:0] OP_ADD    = 6'o01;
  localparam logic [5:0] OP_SUB    = 6'o02;
  localparam logic [5:0] OP_CMP    = 6'o03;
  localparam logic [5:0] OP_AND    = 6'o04;
  localparam logic [5:0] OP_OR     = 6'o05;
  localparam logic [5:0] OP_XOR    = 6'o06;
  localparam logic [5:0] OP_MOV    = 6'o07;
  localparam logic [5:0] OP_LSL    = 6'o10;
  localparam logic [5:0] OP_LSR    = 6'o11;
  localparam logic [5:0] OP_ASR    = 6'o12;
  localparam logic [5:0] OP_MUL    = 6'o13;
  localparam logic [5:0] OP_ADDI   = 6'o14;
  localparam logic [5:0] OP_SUBI   = 6'o15;
  localparam logic [5:0] OP_CMPI   = 6'o16;
  localparam logic [5:0] OP_MOVI   = 6'o17;
  localparam logic [5:0] OP_MOVHI  = 6'o20;
  localparam logic [5:0] OP_LSLI   = 6'o21;
  localparam logic [5:0] OP_LSRI   = 6'o22;
  localparam logic [5:0] OP_ASRI   = 6'o23;
  localparam logic [5:0] OP_LD     = 6'o24;
  localparam logic [5:0] OP_ST     = 6'o25;
  localparam logic [5:0] OP_JMP    = 6'o26;
  localparam logic [5:0] OP_CALL   = 6'o27;
  localparam logic [5:0] OP_SKPS   = 6'o30;
  localparam logic [5:0] OP_SKPRZ  = 6'o31;
  localparam logic [5:0] OP_SKPRNZ = 6'o32;
  localparam logic [5:0] OP_SKP0   = 6'o33;
  localparam logic [5:0] OP_SKP1   = 6'o34;
  localparam logic [5:0] OP_SAVE   = 6'o35;
  localparam logic [5:0] OP_RESTORE= 6'o36;
  localparam logic [5:0] OP_RDCTL  = 6'o37;
  localparam logic [5:0] OP_WRCTL  = 6'o50;
  // 5-bit opcodes of the 11-bit-immediate format
  localparam logic [4:0] OP5_BR    = 5'b10000;
  localparam logic [4:0] OP5_BSR   = 5'b10001;
  localparam logic [4:0] OP5_PFX   = 5'b10011;

  // SKPS condition codes: the following instruction is skipped when true
  typedef enum logic [3:0] {
    CC_C  = 4'd0, CC_NC = 4'd1, CC_Z  = 4'd2, CC_NZ = 4'd3,
    CC_N  = 4'd4, CC_PL = 4'd5, CC_V  = 4'd6, CC_NV = 4'd7,
    CC_LT = 4'd8, CC_GE = 4'd9, CC_LE = 4'd10, CC_GT = 4'd11,
    CC_HI = 4'd12, CC_LS = 4'd13, CC_AL = 4'd14, CC_NV2 = 4'd15
  } cond_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB,
    ALU_LSL, ALU_LSR, ALU_ASR, ALU_MUL, ALU_MOVHI
  } alu_op_e;

  typedef enum logic [1:0] { FL_NONE, FL_NZ, FL_NZVC } flag_upd_e;
  typedef enum logic [1:0] { WB_ALU, WB_MEM, WB_CTL, WB_LINK } wb_sel_e;
  typedef enum logic [1:0] { DST_A, DST_LINK, DST_SP_NEW } dst_sel_e;
  typedef enum logic [1:0] { BR_NONE, BR_REL, BR_REG } br_kind_e;
  typedef enum logic [2:0] { SK_NONE, SK_FLAGS, SK_RZ, SK_RNZ, SK_B0, SK_B1 } skip_kind_e;
  typedef enum logic [1:0] { CWP_NONE, CWP_SAVE, CWP_RESTORE, CWP_WRCTL } cwp_op_e;
  // immediate formed in the operand stage
  typedef enum logic [1:0] { IMM_NONE, IMM_5, IMM_8x4, IMM_SHAMT } imm_kind_e;

  // Output word of the instruction decoder
  typedef struct packed {
    alu_op_e    alu_op;
    logic       b_is_imm;   // second ALU operand is an immediate
    imm_kind_e  imm_kind;
    logic       a_is_sp;    // first source is %sp instead of field A (SAVE)
    logic       we;         // writes a general-purpose register
    dst_sel_e   dst_sel;
    wb_sel_e    wb_sel;
    flag_upd_e  flags;
    logic       is_ld;
    logic       is_st;
    br_kind_e   br_kind;
    logic       link;       // BSR/CALL: writes the return address
    skip_kind_e skip_kind;
    cwp_op_e    cwp_op;
    logic       is_pfx;
    logic       wrctl;
  } dec_t;

  localparam dec_t DEC_NOP = '{alu_op: ALU_ADD, b_is_imm: 1'b0, imm_kind: IMM_NONE,
                               a_is_sp: 1'b0, we: 1'b0, dst_sel: DST_A, wb_sel: WB_ALU,
                               flags: FL_NONE, is_ld: 1'b0, is_st: 1'b0, br_kind: BR_NONE,
                               link: 1'b0, skip_kind: SK_NONE, cwp_op: CWP_NONE,
                               is_pfx: 1'b0, wrctl: 1'b0};

  typedef struct packed {
    logic n, v, z, c;
  } flags_t;

  // Status control register layout: [3:0] = N V Z C, [8:4] = CWP
  function automatic logic [XLEN-1:0] pack_status(flags_t f, logic [CWPW-1:0] cwp);
    return {{(XLEN-4-CWPW){1'b0}}, cwp, f};
  endfunction

endpackage
