// next_pc: next-instruction-address logic of the datapath.
//
// Computes pc+4 with the 0x4 adder, the branch target pc+4 + offset*4 with
// the second adder (the offset arrives already sign-extended by the
// immediate extender), the absolute jump target formed by appending
// target*4 to the top four bits of pc+4, and the register-indirect target
// (rs). PCSrc picks one of pc+4 / br / rind / jabs. Combinational; the PC
// register that it feeds lives in the processor. Taking the top bits from
// pc+4 (as the datapath drawing wires it) rather than from pc only differs
// at a 256 MB boundary.
module next_pc
  import mips_pkg::*;
(
  input  word_t       pc,
  input  word_t       offset_ext,
  input  logic [25:0] target,
  input  word_t       rs_val,
  input  pcsrc_e      pcsrc,
  output word_t       pc_plus4,
  output word_t       npc
);
  word_t br_target, jabs_target;

  assign pc_plus4    = pc + 32'd4;
  assign br_target   = pc_plus4 + {offset_ext[29:0], 2'b00};
  assign jabs_target = {pc_plus4[31:28], target, 2'b00};

  mux #(.N(4), .W(XLEN)) u_pcsrc_mux (
    .a   ({jabs_target, rs_val, br_target, pc_plus4}),
    .sel (pcsrc),
    .o   (npc)
  );
endmodule
