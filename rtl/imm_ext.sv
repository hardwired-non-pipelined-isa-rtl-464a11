// imm_ext: immediate extension unit ("Imm Ext").
//
// Turns the 16-bit immediate inst[15:0] into a 32-bit operand under the
// ExtSel control: sExt16 sign-extends, uExt16 zero-extends, High16 places
// the immediate in the upper half with zeros below (for LUI). Combinational.
module imm_ext
  import mips_pkg::*;
(
  input  logic [15:0] imm,
  input  ext_sel_e    ext_sel,
  output word_t       ext
);
  always_comb begin
    unique case (ext_sel)
      EXT_SEXT16: ext = {{16{imm[15]}}, imm};
      EXT_UEXT16: ext = {16'h0000, imm};
      EXT_HIGH16: ext = {imm, 16'h0000};
      default:    ext = {{16{imm[15]}}, imm};
    endcase
  end
endmodule
