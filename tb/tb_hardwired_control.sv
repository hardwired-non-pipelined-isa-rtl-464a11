// tb_hardwired_control: every opcode of the instruction set, with zero? at
// 0 and at 1, against the rows of the hardwired control table (don't-care
// entries are not checked), plus an unused opcode that must write nothing.
module tb_hardwired_control;
  import mips_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] opcode; logic zero; ctrl_t ctrl;

  hardwired_control dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL op=%h zero=%0d: %s", opcode, zero, what); end
  endtask

  // expected row: ext (-1 = don't care), bsrc (-1), opsel (-1), memw, regw,
  // wbsrc (-1), regdst (-1), pcsrc
  task automatic row(int ext, int bsrc, int opsel, bit memw, bit regw,
                     int wb, int dst, int pcs);
    if (ext >= 0)   chk(ctrl.ext_sel == ext_sel_e'(ext), "ExtSel");
    if (bsrc >= 0)  chk(ctrl.bsrc == bsrc_e'(bsrc), "BSrc");
    if (opsel >= 0) chk(ctrl.opsel == opsel_e'(opsel), "OpSel");
    chk(ctrl.mem_write == memw, "MemWrite");
    chk(ctrl.reg_write == regw, "RegWrite");
    if (wb >= 0)  chk(ctrl.wbsrc == wbsrc_e'(wb), "WBSrc");
    if (dst >= 0) chk(ctrl.regdst == regdst_e'(dst), "RegDst");
    chk(ctrl.pcsrc == pcsrc_e'(pcs), "PCSrc");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // encodings: ExtSel sExt=0 uExt=1 High=2; BSrc Reg=0 Imm=1;
  // OpSel Func=0 Op=1 +=2 0?=3; WBSrc ALU=0 Mem=1 PC=2; RegDst rt=0 rd=1 R31=2;
  // PCSrc pc+4=0 br=1 rind=2 jabs=3
  initial begin
    for (int zz = 0; zz < 2; zz++) begin
      zero = 1'(zz);
      @(negedge clk); opcode = 6'h00; #1; row(-1, 0, 0, 0, 1, 0, 1, 0);          // ALU
      @(negedge clk); opcode = 6'h08; #1; row(0, 1, 1, 0, 1, 0, 0, 0);           // ALUi
      @(negedge clk); opcode = 6'h09; #1; row(0, 1, 1, 0, 1, 0, 0, 0);
      @(negedge clk); opcode = 6'h0A; #1; row(0, 1, 1, 0, 1, 0, 0, 0);
      @(negedge clk); opcode = 6'h0B; #1; row(0, 1, 1, 0, 1, 0, 0, 0);
      @(negedge clk); opcode = 6'h0C; #1; row(1, 1, 1, 0, 1, 0, 0, 0);           // ALUiu
      @(negedge clk); opcode = 6'h0D; #1; row(1, 1, 1, 0, 1, 0, 0, 0);
      @(negedge clk); opcode = 6'h0E; #1; row(1, 1, 1, 0, 1, 0, 0, 0);
      @(negedge clk); opcode = 6'h0F; #1; row(2, 1, 1, 0, 1, 0, 0, 0);           // LUI
      @(negedge clk); opcode = 6'h23; #1; row(0, 1, 2, 0, 1, 1, 0, 0);           // LW
      @(negedge clk); opcode = 6'h2B; #1; row(0, 1, 2, 1, 0, -1, -1, 0);         // SW
      @(negedge clk); opcode = 6'h04; #1; row(0, -1, 3, 0, 0, -1, -1, (zz != 0) ? 1 : 0); // BEQZ
      @(negedge clk); opcode = 6'h05; #1; row(0, -1, 3, 0, 0, -1, -1, (zz != 0) ? 0 : 1); // BNEZ
      @(negedge clk); opcode = 6'h02; #1; row(-1, -1, -1, 0, 0, -1, -1, 3);      // J
      @(negedge clk); opcode = 6'h03; #1; row(-1, -1, -1, 0, 1, 2, 2, 3);        // JAL
      @(negedge clk); opcode = 6'h12; #1; row(-1, -1, -1, 0, 0, -1, -1, 2);      // JR
      @(negedge clk); opcode = 6'h13; #1; row(-1, -1, -1, 0, 1, 2, 2, 2);        // JALR
      @(negedge clk); opcode = 6'h3F; #1; row(-1, -1, -1, 0, 0, -1, -1, 0);      // unused
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
