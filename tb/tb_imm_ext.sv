// tb_imm_ext: random immediates under each ExtSel value against the
// expected sign-extended, zero-extended and high-half results.
module tb_imm_ext;
  import mips_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] imm; ext_sel_e ext_sel; word_t ext, exp_v;

  imm_ext dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      imm = (i < 4) ? 16'h8000 + 16'(i) : 16'($urandom);
      ext_sel = ext_sel_e'(i % 3);
      #1;
      case (i % 3)
        0: exp_v = 32'($signed(imm));
        1: exp_v = 32'(imm);
        default: exp_v = 32'(imm) * 65536;
      endcase
      checks++; if (ext !== exp_v) begin failures++; $display("FAIL sel=%0d imm=%h ext=%h", i % 3, imm, ext); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
