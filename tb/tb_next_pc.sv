// tb_next_pc: random PCs, offsets, jump targets and register values for
// each PCSrc choice; checks pc+4, the branch target pc+4+offset*4, the
// absolute target {pc+4[31:28], target, 00} and the register target.
module tb_next_pc;
  import mips_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  word_t pc, offset_ext, rs_val, pc_plus4, npc, e;
  logic [25:0] target; pcsrc_e pcsrc;

  next_pc dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      pc = {$urandom} & ~32'd3;
      if (i % 50 == 0) pc = 32'hFFFF_FFFC;
      if (i % 50 == 1) pc = 32'h0FFF_FFFC;
      offset_ext = 32'($signed(16'($urandom)));
      target = 26'($urandom); rs_val = $urandom; pcsrc = pcsrc_e'(i % 4);
      #1;
      case (i % 4)
        0: e = pc + 4;
        1: e = pc + 4 + offset_ext * 4;
        2: e = rs_val;
        default: e = ((pc + 4) & 32'hF000_0000) | (32'(target) * 4);
      endcase
      checks++; if (pc_plus4 !== pc + 4) begin failures++; $display("FAIL pc+4"); end
      checks++; if (npc !== e) begin failures++; $display("FAIL pcsrc=%0d pc=%h npc=%h exp %h", i % 4, pc, npc, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
