// hardwired_control: the single-cycle controller, pure combinational logic.
//
// Inputs are the opcode inst[31:26] and the ALU's zero? output; outputs are
// the datapath controls ExtSel, BSrc, OpSel, MemWrite, RegWrite, WBSrc,
// RegDst and PCSrc, one row of the hardwired control table per instruction
// class:
//   ALU    : BSrc=Reg OpSel=Func RegW WBSrc=ALU RegDst=rd  PCSrc=pc+4
//   ALUi   : sExt16 BSrc=Imm OpSel=Op RegW WBSrc=ALU RegDst=rt pc+4
//   ALUiu  : uExt16 BSrc=Imm OpSel=Op RegW WBSrc=ALU RegDst=rt pc+4
//   LW     : sExt16 BSrc=Imm OpSel=+ RegW WBSrc=Mem RegDst=rt pc+4
//   SW     : sExt16 BSrc=Imm OpSel=+ MemW pc+4
//   BEQZ   : sExt16 OpSel=0? PCSrc=br if taken, else pc+4
//   J / JAL: PCSrc=jabs; JAL also writes PC+4 to R31
//   JR/JALR: PCSrc=rind; JALR also writes PC+4 to R31
// Grouping of opcodes is this implementation's choice: ADDI, ADDIU, SLTI,
// SLTIU are ALUi (sign-extended); ANDI, ORI, XORI are ALUiu (zero-extended);
// LUI is an ALUi row with ExtSel=High16. BEQZ branches when the register is
// zero (zero?=1) and BNEZ, the mirror image, when it is not. Don't-care
// entries are driven with fixed values and an unknown opcode does nothing
// but advance the PC.
module hardwired_control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic       zero,
  output ctrl_t      ctrl
);
  always_comb begin
    // defaults: no state change except PC <- PC+4
    ctrl.ext_sel   = EXT_SEXT16;
    ctrl.bsrc      = BSRC_REG;
    ctrl.opsel     = OPSEL_FUNC;
    ctrl.mem_write = 1'b0;
    ctrl.reg_write = 1'b0;
    ctrl.wbsrc     = WB_ALU;
    ctrl.regdst    = DST_RT;
    ctrl.pcsrc     = PC_PLUS4;

    unique case (opcode)
      OP_ALU: begin
        ctrl.bsrc      = BSRC_REG;
        ctrl.opsel     = OPSEL_FUNC;
        ctrl.reg_write = 1'b1;
        ctrl.wbsrc     = WB_ALU;
        ctrl.regdst    = DST_RD;
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_LUI: begin
        ctrl.ext_sel   = (opcode == OP_LUI) ? EXT_HIGH16 : EXT_SEXT16;
        ctrl.bsrc      = BSRC_IMM;
        ctrl.opsel     = OPSEL_OP;
        ctrl.reg_write = 1'b1;
        ctrl.wbsrc     = WB_ALU;
        ctrl.regdst    = DST_RT;
      end
      OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.ext_sel   = EXT_UEXT16;
        ctrl.bsrc      = BSRC_IMM;
        ctrl.opsel     = OPSEL_OP;
        ctrl.reg_write = 1'b1;
        ctrl.wbsrc     = WB_ALU;
        ctrl.regdst    = DST_RT;
      end
      OP_LW: begin
        ctrl.ext_sel   = EXT_SEXT16;
        ctrl.bsrc      = BSRC_IMM;
        ctrl.opsel     = OPSEL_ADD;
        ctrl.reg_write = 1'b1;
        ctrl.wbsrc     = WB_MEM;
        ctrl.regdst    = DST_RT;
      end
      OP_SW: begin
        ctrl.ext_sel   = EXT_SEXT16;
        ctrl.bsrc      = BSRC_IMM;
        ctrl.opsel     = OPSEL_ADD;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQZ: begin
        ctrl.ext_sel = EXT_SEXT16;
        ctrl.opsel   = OPSEL_ZERO;
        ctrl.pcsrc   = zero ? PC_BR : PC_PLUS4;
      end
      OP_BNEZ: begin
        ctrl.ext_sel = EXT_SEXT16;
        ctrl.opsel   = OPSEL_ZERO;
        ctrl.pcsrc   = zero ? PC_PLUS4 : PC_BR;
      end
      OP_J: begin
        ctrl.pcsrc = PC_JABS;
      end
      OP_JAL: begin
        ctrl.reg_write = 1'b1;
        ctrl.wbsrc     = WB_PC;
        ctrl.regdst    = DST_R31;
        ctrl.pcsrc     = PC_JABS;
      end
      OP_JR: begin
        ctrl.pcsrc = PC_RIND;
      end
      OP_JALR: begin
        ctrl.reg_write = 1'b1;
        ctrl.wbsrc     = WB_PC;
        ctrl.regdst    = DST_R31;
        ctrl.pcsrc     = PC_RIND;
      end
      default: ;
    endcase
  end
endmodule
