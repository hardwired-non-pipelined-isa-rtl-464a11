// alu_control: chooses the ALU operation.
//
// A four-way selection under OpSel: Func takes the operation from the
// function field inst[5:0] of a register-register instruction, Op takes it
// from the opcode inst[31:26] of a register-immediate instruction, "+" forces
// an add (address arithmetic of loads and stores) and "0?" forces the zero
// test used by conditional branches. The mapping of individual func and
// opcode values onto ALU operations is this implementation's choice; an
// unknown value maps to add. Combinational.
module alu_control
  import mips_pkg::*;
(
  input  logic [5:0] func,
  input  logic [5:0] opcode,
  input  opsel_e     opsel,
  output alu_op_e    alu_op
);
  alu_op_e func_op, opcode_op;

  always_comb begin
    unique case (func)
      FN_ADD, FN_ADDU: func_op = ALU_ADD;
      FN_SUB, FN_SUBU: func_op = ALU_SUB;
      FN_AND:          func_op = ALU_AND;
      FN_OR:           func_op = ALU_OR;
      FN_XOR:          func_op = ALU_XOR;
      FN_NOR:          func_op = ALU_NOR;
      FN_SLT:          func_op = ALU_SLT;
      FN_SLTU:         func_op = ALU_SLTU;
      default:         func_op = ALU_ADD;
    endcase
  end

  always_comb begin
    unique case (opcode)
      OP_ADDI, OP_ADDIU: opcode_op = ALU_ADD;
      OP_SLTI:           opcode_op = ALU_SLT;
      OP_SLTIU:          opcode_op = ALU_SLTU;
      OP_ANDI:           opcode_op = ALU_AND;
      OP_ORI:            opcode_op = ALU_OR;
      OP_XORI:           opcode_op = ALU_XOR;
      OP_LUI:            opcode_op = ALU_PASSB;
      default:           opcode_op = ALU_ADD;
    endcase
  end

  always_comb begin
    unique case (opsel)
      OPSEL_FUNC: alu_op = func_op;
      OPSEL_OP:   alu_op = opcode_op;
      OPSEL_ADD:  alu_op = ALU_ADD;
      OPSEL_ZERO: alu_op = ALU_ZERO;
      default:    alu_op = ALU_ADD;
    endcase
  end
endmodule
