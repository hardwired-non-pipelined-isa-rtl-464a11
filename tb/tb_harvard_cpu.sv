// tb_harvard_cpu: runs generated programs on the single-cycle Harvard
// processor and compares every register-file write, every data-memory write
// and the PC of every instruction with the reference model. Also checks that
// one instruction completes per cycle (CPI = 1).
module tb_harvard_cpu;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int unsigned IMEM_WORDS = 1024;
  localparam int unsigned DMEM_WORDS = 1024;
  localparam int NPROG = 3;
  localparam int NCYC  = 400;

  logic clk = 0, rst = 1;
  logic load_we = 0;
  logic [$clog2(IMEM_WORDS)-1:0] load_addr = '0;
  word_t load_data = '0;
  word_t pc, instr, rf_wd, dm_addr, dm_wdata;
  logic rf_we, dm_we, retire;
  regaddr_t rf_ws;
  int checks = 0, failures = 0;

  harvard_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NPROG * (NCYC + IMEM_WORDS + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prog[$];
    mips_ref ref_m;
    event_t ev;
    int retired;
    for (int p = 0; p < NPROG; p++) begin
      gen_program(prog, 60 + 40 * p);
      ref_m = new(IMEM_WORDS, DMEM_WORDS, 1'b0);
      rst = 1;
      @(negedge clk);
      // load the whole instruction memory (zeros beyond the program)
      for (int i = 0; i < IMEM_WORDS; i++) begin
        load_we = 1; load_addr = i[$clog2(IMEM_WORDS)-1:0];
        load_data = (i < prog.size()) ? prog[i] : '0;
        if (i < prog.size()) ref_m.imem[i] = prog[i];
        @(negedge clk);
      end
      load_we = 0;
      @(negedge clk);
      rst = 0;
      retired = 0;
      for (int c = 0; c < NCYC; c++) begin
        #1;
        if (retire) begin
          retired++;
          ref_m.step(ev);
          check(pc == ev.pc, $sformatf("pc %h exp %h", pc, ev.pc));
          check(rf_we == ev.rf_we, $sformatf("rf_we at pc %h", ev.pc));
          if (ev.rf_we) begin
            check(rf_ws == ev.rf_ws, $sformatf("rf_ws %0d exp %0d at pc %h", rf_ws, ev.rf_ws, ev.pc));
            check(rf_wd == ev.rf_wd, $sformatf("rf_wd %h exp %h at pc %h", rf_wd, ev.rf_wd, ev.pc));
          end
          check(dm_we == ev.dm_we, $sformatf("dm_we at pc %h", ev.pc));
          if (ev.dm_we) begin
            check(dm_addr == ev.dm_addr, $sformatf("dm_addr at pc %h", ev.pc));
            check(dm_wdata == ev.dm_wdata, $sformatf("dm_wdata at pc %h", ev.pc));
          end
        end
        @(negedge clk);
      end
      // CPI = 1: every cycle after reset completes an instruction
      check(retired == NCYC, $sformatf("retired %0d in %0d cycles", retired, NCYC));
      check(ref_m.st.br_taken > 0 && ref_m.st.br_not_taken > 0 && ref_m.st.j > 0 &&
            ref_m.st.jal > 0 && ref_m.st.jr > 0 && ref_m.st.jalr > 0 &&
            ref_m.st.lw > 0 && ref_m.st.sw > 0 && ref_m.st.lui > 0, "instruction coverage");
      check(ref_m.r[22] == 32'd3, "counted loop result in r22 (reference)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
