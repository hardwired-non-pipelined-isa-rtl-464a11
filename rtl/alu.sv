// alu: 32-bit arithmetic and logic unit.
//
// result = A op B for the operation selected by alu_op (add, subtract, and,
// or, xor, nor, signed and unsigned set-less-than, pass B, and the zero test
// "0?" which passes A). The comparison output z is 1 when the result is 0,
// so under the "0?" operation z tells whether operand A, the branch
// register, is zero. Purely combinational. The operation list beyond add and
// zero-test is this implementation's choice.
module alu
  import mips_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e alu_op,
  output word_t   result,
  output logic    z
);
  always_comb begin
    unique case (alu_op)
      ALU_ADD:   result = a + b;
      ALU_SUB:   result = a - b;
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_XOR:   result = a ^ b;
      ALU_NOR:   result = ~(a | b);
      ALU_SLT:   result = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  result = {31'd0, a < b};
      ALU_PASSB: result = b;
      ALU_ZERO:  result = a;
      default:   result = a + b;
    endcase
  end

  assign z = (result == '0);
endmodule
