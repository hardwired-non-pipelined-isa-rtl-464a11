// mips_ref_pkg: instruction-level reference model of the MIPS subset and a
// program generator, used by the processor testbenches.
//
// mips_ref executes one instruction per call of step() directly from the
// architectural definition (it shares no code with the RTL datapath) and
// reports the register-file and memory writes the instruction makes. It can
// model separate instruction and data memories (Harvard) or one memory
// (Princeton). Memory indices wrap modulo the memory size, as in the RTL.
package mips_ref_pkg;
  import mips_pkg::*;

  typedef struct {
    word_t    pc;
    bit       rf_we;
    regaddr_t rf_ws;
    word_t    rf_wd;
    bit       dm_we;
    word_t    dm_addr;
    word_t    dm_wdata;
    bit       taken;     // control transfer away from pc+4
  } event_t;

  // counters of the mechanisms a program exercised
  typedef struct {
    int rtype, itype, lui, lw, sw;
    int br_taken, br_not_taken, j, jal, jr, jalr, r0_write;
  } stats_t;

  class mips_ref;
    word_t imem[];
    word_t dmem[];
    bit    unified;
    word_t r[32];
    word_t pc;
    stats_t st;

    function new(int unsigned imem_words, int unsigned dmem_words, bit unified_mem);
      unified = unified_mem;
      imem = new[imem_words];
      dmem = new[unified_mem ? 0 : dmem_words];
      foreach (imem[i]) imem[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (r[i]) r[i] = '0;
      pc = '0;
      st = '{default: 0};
    endfunction

    function word_t rd_mem(word_t byte_addr, bit fetch);
      if (unified || fetch) return imem[(byte_addr >> 2) % imem.size()];
      return dmem[(byte_addr >> 2) % dmem.size()];
    endfunction

    function void wr_mem(word_t byte_addr, word_t v);
      if (unified) imem[(byte_addr >> 2) % imem.size()] = v;
      else         dmem[(byte_addr >> 2) % dmem.size()] = v;
    endfunction

    function void step(output event_t ev);
      word_t ins, a, b, res, sx, zx, npc;
      logic [5:0] op, fn;
      regaddr_t rs, rt, rd;
      ins = rd_mem(pc, 1'b1);
      op = ins[31:26]; fn = ins[5:0];
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      a  = r[rs]; b = r[rt];
      sx = {{16{ins[15]}}, ins[15:0]};
      zx = {16'h0, ins[15:0]};
      npc = pc + 4;
      ev = '{pc: pc, default: 0};
      case (op)
        6'h00: begin
          case (fn)
            6'h20, 6'h21: res = a + b;
            6'h22, 6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h27: res = ~(a | b);
            6'h2A: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h2B: res = (a < b) ? 1 : 0;
            default: res = a + b;
          endcase
          ev.rf_we = 1; ev.rf_ws = rd; ev.rf_wd = res; st.rtype++;
        end
        6'h08, 6'h09: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = a + sx; st.itype++; end
        6'h0A: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = ($signed(a) < $signed(sx)) ? 1 : 0; st.itype++; end
        6'h0B: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = (a < sx) ? 1 : 0; st.itype++; end
        6'h0C: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = a & zx; st.itype++; end
        6'h0D: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = a | zx; st.itype++; end
        6'h0E: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = a ^ zx; st.itype++; end
        6'h0F: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = {ins[15:0], 16'h0}; st.lui++; end
        6'h23: begin ev.rf_we = 1; ev.rf_ws = rt; ev.rf_wd = rd_mem(a + sx, 1'b0); st.lw++; end
        6'h2B: begin ev.dm_we = 1; ev.dm_addr = a + sx; ev.dm_wdata = b; st.sw++; end
        6'h04, 6'h05: begin
          if ((a == 0) == (op == 6'h04)) begin
            npc = pc + 4 + (sx << 2); ev.taken = 1; st.br_taken++;
          end else st.br_not_taken++;
        end
        6'h02: begin npc = {npc[31:28], ins[25:0], 2'b00}; ev.taken = 1; st.j++; end
        6'h03: begin
          ev.rf_we = 1; ev.rf_ws = 31; ev.rf_wd = pc + 4;
          npc = {npc[31:28], ins[25:0], 2'b00}; ev.taken = 1; st.jal++;
        end
        6'h12: begin npc = a; ev.taken = 1; st.jr++; end
        6'h13: begin ev.rf_we = 1; ev.rf_ws = 31; ev.rf_wd = pc + 4; npc = a; ev.taken = 1; st.jalr++; end
        default: ;
      endcase
      if (ev.rf_we && ev.rf_ws == 0) st.r0_write++;
      if (ev.rf_we && ev.rf_ws != 0) r[ev.rf_ws] = ev.rf_wd;
      if (ev.dm_we) wr_mem(ev.dm_addr, ev.dm_wdata);
      pc = npc;
    endfunction
  endclass

  localparam word_t DATA_BASE = 32'h0000_1000;
  localparam int    DATA_SLOTS = 16;

  function automatic word_t rnd_data_addr();
    return DATA_BASE + 4 * ($urandom % DATA_SLOTS);
  endfunction

  // A program of about n instructions that starts with a directed part
  // (clears the data slots, seeds registers, runs a counted loop and every
  // kind of control transfer) followed by random instructions with forward
  // branches and jumps, and ends in a jump to itself.
  function automatic void gen_program(ref word_t prog[$], input int n);
    int idx;
    prog.delete();
    for (int k = 0; k < DATA_SLOTS; k++)
      prog.push_back(enc_i(OP_SW, 5'd0, 5'd0, 16'(DATA_BASE + 4 * k)));
    for (int k = 1; k < 8; k++)
      prog.push_back(enc_i(OP_ADDI, 5'(k), 5'd0, 16'($urandom)));
    // counted loop: r21 = 3; loop: r21 -= 1; r22 += r21; BNEZ r21, loop
    prog.push_back(enc_i(OP_ADDI, 5'd21, 5'd0, 16'd3));
    prog.push_back(enc_i(OP_ADDI, 5'd21, 5'd21, 16'hFFFF));
    prog.push_back(enc_r(FN_ADD, 5'd22, 5'd22, 5'd21));
    prog.push_back(enc_i(OP_BNEZ, 5'd0, 5'd21, 16'hFFFD));
    // BEQZ r0 (always taken) over one instruction, BEQZ r1 (r1 != 0 unless
    // the random seed made it 0)
    prog.push_back(enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd1));
    prog.push_back(enc_i(OP_ADDI, 5'd23, 5'd0, 16'hDEAD));
    prog.push_back(enc_i(OP_BNEZ, 5'd0, 5'd0, 16'd1));   // never taken
    prog.push_back(enc_i(OP_LUI, 5'd24, 5'd0, 16'h1234));
    // J, JAL forward by two
    idx = prog.size();
    prog.push_back(enc_j(OP_J, 26'(idx + 2)));
    prog.push_back(enc_i(OP_ADDI, 5'd23, 5'd0, 16'hBEEF));
    idx = prog.size();
    prog.push_back(enc_j(OP_JAL, 26'(idx + 2)));
    prog.push_back(enc_i(OP_ADDI, 5'd23, 5'd0, 16'hBEEF));
    // JR, JALR forward by two
    idx = prog.size();
    prog.push_back(enc_i(OP_ADDI, 5'd20, 5'd0, 16'((idx + 3) * 4)));
    prog.push_back(enc_i(OP_JR, 5'd0, 5'd20, 16'd0));
    prog.push_back(enc_i(OP_ADDI, 5'd23, 5'd0, 16'hBEEF));
    idx = prog.size();
    prog.push_back(enc_i(OP_ADDI, 5'd20, 5'd0, 16'((idx + 3) * 4)));
    prog.push_back(enc_i(OP_JALR, 5'd0, 5'd20, 16'd0));
    prog.push_back(enc_i(OP_ADDI, 5'd23, 5'd0, 16'hBEEF));
    // write to R0 must be ignored
    prog.push_back(enc_i(OP_ADDI, 5'd0, 5'd1, 16'd5));
    prog.push_back(enc_r(FN_ADD, 5'd25, 5'd0, 5'd0));

    while (prog.size() < n) begin
      regaddr_t rs, rt, rd;
      int kind, off;
      rs = 5'($urandom % 16); rt = 5'($urandom % 16); rd = 5'(1 + $urandom % 15);
      kind = $urandom % 12;
      case (kind)
        0, 1, 2: begin
          func_e fns[10] = '{FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR, FN_SLT, FN_SLTU};
          prog.push_back(enc_r(fns[$urandom % 10], rd, rs, rt));
        end
        3, 4: begin
          opcode_e ops[8] = '{OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI};
          prog.push_back(enc_i(ops[$urandom % 8], rd, rs, 16'($urandom)));
        end
        5: prog.push_back(enc_i(OP_LW, rd, 5'd0, 16'(rnd_data_addr())));
        6: prog.push_back(enc_i(OP_SW, rt, 5'd0, 16'(rnd_data_addr())));
        7: prog.push_back(enc_i(($urandom % 2 == 1) ? OP_BEQZ : OP_BNEZ, 5'd0,
                                ($urandom % 4 == 0) ? 5'd0 : rs, 16'($urandom % 4)));
        8: begin
          idx = prog.size(); off = 1 + $urandom % 4;
          prog.push_back(enc_j(($urandom % 2 == 1) ? OP_J : OP_JAL, 26'(idx + off)));
        end
        9: begin
          idx = prog.size(); off = 2 + $urandom % 3;
          prog.push_back(enc_i(OP_ADDI, 5'd20, 5'd0, 16'((idx + off) * 4)));
          prog.push_back(enc_i(($urandom % 2 == 1) ? OP_JR : OP_JALR, 5'd0, 5'd20, 16'd0));
        end
        default: prog.push_back(enc_r(FN_ADD, rd, rs, rt));
      endcase
    end
    // landing pad for forward transfers, then spin
    for (int k = 0; k < 5; k++) prog.push_back(enc_i(OP_ADDI, 5'd26, 5'd26, 16'd1));
    idx = prog.size();
    prog.push_back(enc_j(OP_J, 26'(idx)));
  endfunction
endpackage
