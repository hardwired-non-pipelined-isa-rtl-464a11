// tb_mips_top: end-to-end test of both processors at their default sizes.
// The same generated program is loaded into the Harvard instruction memory
// and into the Princeton shared memory; both run from reset and every
// instruction each completes is compared with its own reference model.
// It also checks that the Princeton machine needs exactly twice the cycles
// (CPI 2 against CPI 1) and counts how often each mechanism happened: taken
// and not-taken branches, J, JAL, JR, JALR, loads, stores, LUI (High16
// extension), writes to R0 being dropped, fetch and execute phases, and
// memory accesses in the Princeton execute phase. A mechanism that never
// happened counts as a failure.
module tb_mips_top;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int unsigned IMEM_WORDS = 1024;
  localparam int unsigned MEM_WORDS  = 2048;
  localparam int NPROG = 4;
  localparam int NINSTR = 600;   // instructions run per program

  logic clk = 0, rst = 1;
  logic h_load_we = 0, p_load_we = 0;
  logic [9:0]  h_load_addr = '0;
  logic [10:0] p_load_addr = '0;
  word_t h_load_data = '0, p_load_data = '0;
  word_t h_pc, h_instr, h_rf_wd, h_dm_addr, h_dm_wdata;
  word_t p_pc, p_instr, p_rf_wd, p_dm_addr, p_dm_wdata;
  logic h_rf_we, h_dm_we, h_retire, p_rf_we, p_dm_we, p_execute, p_retire;
  regaddr_t h_rf_ws, p_rf_ws;
  int checks = 0, failures = 0;
  int n_fetch = 0, n_exec = 0, n_exec_mem = 0;
  stats_t tot;

  mips_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic cmp(string who, logic rf_we, regaddr_t rf_ws, word_t rf_wd,
                     logic dm_we, word_t dm_addr, word_t dm_wdata, word_t pc,
                     const ref event_t ev);
    check(pc == ev.pc, $sformatf("%s pc %h exp %h", who, pc, ev.pc));
    check(rf_we == ev.rf_we, $sformatf("%s rf_we at %h", who, ev.pc));
    if (ev.rf_we) check(rf_ws == ev.rf_ws && rf_wd == ev.rf_wd,
                        $sformatf("%s rf write at %h", who, ev.pc));
    check(dm_we == ev.dm_we, $sformatf("%s dm_we at %h", who, ev.pc));
    if (ev.dm_we) check(dm_addr == ev.dm_addr && dm_wdata == ev.dm_wdata,
                        $sformatf("%s dm write at %h", who, ev.pc));
  endtask

  initial begin
    repeat (NPROG * (3 * NINSTR + MEM_WORDS + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prog[$];
    mips_ref href, pref;
    event_t ev;
    int h_done, p_done, cyc, h_cyc, p_cyc;
    tot = '{default: 0};
    for (int p = 0; p < NPROG; p++) begin
      gen_program(prog, 150 + 100 * p);
      href = new(IMEM_WORDS, 1024, 1'b0);
      pref = new(MEM_WORDS, 0, 1'b1);
      rst = 1;
      @(negedge clk);
      for (int i = 0; i < MEM_WORDS; i++) begin
        h_load_we = (i < IMEM_WORDS); h_load_addr = 10'(i);
        h_load_data = (i < prog.size()) ? prog[i] : '0;
        p_load_we = 1; p_load_addr = 11'(i);
        p_load_data = (i < prog.size()) ? prog[i] : '0;
        if (i < prog.size()) begin href.imem[i] = prog[i]; pref.imem[i] = prog[i]; end
        @(negedge clk);
      end
      h_load_we = 0; p_load_we = 0;
      @(negedge clk);
      rst = 0;
      h_done = 0; p_done = 0; cyc = 0; h_cyc = 0; p_cyc = 0;
      while (p_done < NINSTR) begin
        #1;
        if (h_retire && h_done < NINSTR) begin
          href.step(ev);
          cmp("harvard", h_rf_we, h_rf_ws, h_rf_wd, h_dm_we, h_dm_addr, h_dm_wdata, h_pc, ev);
          h_done++;
          if (h_done == NINSTR) h_cyc = cyc + 1;
        end
        if (p_execute) begin
          n_exec++;
          if (p_instr[31:26] == OP_LW || p_instr[31:26] == OP_SW) n_exec_mem++;
        end else begin
          n_fetch++;
          check(!p_rf_we && !p_dm_we, "princeton write in fetch phase");
        end
        if (p_retire) begin
          pref.step(ev);
          cmp("princeton", p_rf_we, p_rf_ws, p_rf_wd, p_dm_we, p_dm_addr, p_dm_wdata, p_pc, ev);
          p_done++;
          if (p_done == NINSTR) p_cyc = cyc + 1;
        end
        cyc++;
        @(negedge clk);
      end
      check(h_cyc == NINSTR, $sformatf("harvard took %0d cycles for %0d instructions", h_cyc, NINSTR));
      check(p_cyc == 2 * NINSTR, $sformatf("princeton took %0d cycles for %0d instructions", p_cyc, NINSTR));
      check(href.r == pref.r, "both machines end with the same registers");
      tot.rtype += href.st.rtype; tot.itype += href.st.itype; tot.lui += href.st.lui;
      tot.lw += href.st.lw; tot.sw += href.st.sw; tot.br_taken += href.st.br_taken;
      tot.br_not_taken += href.st.br_not_taken; tot.j += href.st.j; tot.jal += href.st.jal;
      tot.jr += href.st.jr; tot.jalr += href.st.jalr; tot.r0_write += href.st.r0_write;
    end
    $display("mechanisms: rtype=%0d itype=%0d lui=%0d lw=%0d sw=%0d br_taken=%0d br_not_taken=%0d j=%0d jal=%0d jr=%0d jalr=%0d r0_write=%0d fetch=%0d execute=%0d execute_mem=%0d",
             tot.rtype, tot.itype, tot.lui, tot.lw, tot.sw, tot.br_taken, tot.br_not_taken,
             tot.j, tot.jal, tot.jr, tot.jalr, tot.r0_write, n_fetch, n_exec, n_exec_mem);
    check(tot.rtype > 0, "register-register ALU never ran");
    check(tot.itype > 0, "register-immediate ALU never ran");
    check(tot.lui > 0, "LUI never ran");
    check(tot.lw > 0, "LW never ran");
    check(tot.sw > 0, "SW never ran");
    check(tot.br_taken > 0, "no branch taken");
    check(tot.br_not_taken > 0, "no branch not taken");
    check(tot.j > 0, "J never ran");
    check(tot.jal > 0, "JAL never ran");
    check(tot.jr > 0, "JR never ran");
    check(tot.jalr > 0, "JALR never ran");
    check(tot.r0_write > 0, "no write to R0");
    check(n_fetch > 0 && n_exec > 0, "princeton phases");
    check(n_exec_mem > 0, "no princeton data access in execute phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
