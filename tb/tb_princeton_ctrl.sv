// tb_princeton_ctrl: after reset the controller must start in fetch and
// alternate fetch/execute every cycle; in fetch AddrSrc=PC, IRen=on,
// PCen=off and both write enables are forced off; in execute AddrSrc=ALU,
// IRen=off, PCen=on and MemWrite/RegWrite pass through.
module tb_princeton_ctrl;
  import mips_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, mem_write_in, reg_write_in, execute, pc_en, ir_en, wen, mem_write, reg_write;
  addrsrc_e addr_src;

  princeton_ctrl dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit exp_exec;
    rst = 1; mem_write_in = 0; reg_write_in = 0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    exp_exec = 0;
    for (int i = 0; i < 200; i++) begin
      mem_write_in = 1'($urandom); reg_write_in = 1'($urandom);
      #1;
      chk(execute == exp_exec, $sformatf("phase at cycle %0d", i));
      if (!exp_exec) begin
        chk(addr_src == ADDR_PC && ir_en && !pc_en && !wen, "fetch controls");
        chk(!mem_write && !reg_write, "writes gated in fetch");
      end else begin
        chk(addr_src == ADDR_ALU && !ir_en && pc_en && wen, "execute controls");
        chk(mem_write == mem_write_in && reg_write == reg_write_in, "writes pass in execute");
      end
      @(negedge clk);
      exp_exec = !exp_exec;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
