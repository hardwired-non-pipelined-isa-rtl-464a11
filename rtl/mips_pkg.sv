// mips_pkg: types and constants shared by the MIPS-subset processors.
//
// The instruction formats (R-type: opcode 0, rs, rt, rd, shamt 0, func;
// I-type: opcode, rs, rt, 16-bit immediate; J-type: opcode, 26-bit target)
// and the names of the control signals (ExtSel, BSrc, OpSel, MemWrite,
// RegWrite, WBSrc, RegDst, PCSrc, and for the two-phase machine PCen, IRen,
// AddrSrc, Wen) follow the hardwired-control description of the design.
// The numeric opcode and func values are this implementation's choice:
// they follow the classic MIPS/DLX assignments, with BEQZ/BNEZ/JR/JALR given
// opcodes of their own as in DLX.
package mips_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;
  localparam logic [4:0] LINK_REG = 5'd31;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0] regaddr_t;

  // Primary opcodes, inst[31:26]
  typedef enum logic [5:0] {
    OP_ALU   = 6'h00,  // register-register, operation in func
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQZ  = 6'h04,
    OP_BNEZ  = 6'h05,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_SLTI  = 6'h0A,
    OP_SLTIU = 6'h0B,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_XORI  = 6'h0E,
    OP_LUI   = 6'h0F,
    OP_JR    = 6'h12,
    OP_JALR  = 6'h13,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // Function codes of register-register instructions, inst[5:0]
  typedef enum logic [5:0] {
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A,
    FN_SLTU = 6'h2B
  } func_e;

  // Operations the ALU performs
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,
    ALU_SUB   = 4'd1,
    ALU_AND   = 4'd2,
    ALU_OR    = 4'd3,
    ALU_XOR   = 4'd4,
    ALU_NOR   = 4'd5,
    ALU_SLT   = 4'd6,
    ALU_SLTU  = 4'd7,
    ALU_PASSB = 4'd8,  // result = B (used by LUI)
    ALU_ZERO  = 4'd9   // "0?": result = A, zero flag tests A
  } alu_op_e;

  typedef enum logic [1:0] {EXT_SEXT16, EXT_UEXT16, EXT_HIGH16} ext_sel_e;
  typedef enum logic [0:0] {BSRC_REG, BSRC_IMM} bsrc_e;
  typedef enum logic [1:0] {OPSEL_FUNC, OPSEL_OP, OPSEL_ADD, OPSEL_ZERO} opsel_e;
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC} wbsrc_e;
  typedef enum logic [1:0] {DST_RT, DST_RD, DST_R31} regdst_e;
  typedef enum logic [1:0] {PC_PLUS4, PC_BR, PC_RIND, PC_JABS} pcsrc_e;
  typedef enum logic [0:0] {ADDR_PC, ADDR_ALU} addrsrc_e;

  // Outputs of the hardwired control table
  typedef struct packed {
    ext_sel_e ext_sel;
    bsrc_e    bsrc;
    opsel_e   opsel;
    logic     mem_write;
    logic     reg_write;
    wbsrc_e   wbsrc;
    regdst_e  regdst;
    pcsrc_e   pcsrc;
  } ctrl_t;

  // Instruction encoders, handy for testbenches and program images
  function automatic word_t enc_r(func_e fn, regaddr_t rd, regaddr_t rs, regaddr_t rt);
    return {OP_ALU, rs, rt, rd, 5'd0, fn};
  endfunction

  function automatic word_t enc_i(opcode_e op, regaddr_t rt, regaddr_t rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic word_t enc_j(opcode_e op, logic [25:0] target);
    return {op, target};
  endfunction

endpackage
