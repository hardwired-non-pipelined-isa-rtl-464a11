// princeton_cpu: non-pipelined MIPS-subset processor whose instructions and
// data share one memory (Princeton style), with hardwired control.
//
// Because the instruction fetch and a load or store cannot use the single
// memory port in the same cycle, every instruction takes two cycles. In the
// fetch cycle the memory is addressed by the PC and its output is captured
// in the instruction register (IR); nothing else changes. In the execute
// cycle the IR drives the same datapath and single-cycle controller as the
// Harvard machine, the memory is addressed by the ALU result (for LW/SW),
// and at the closing edge the PC, the register file and (for SW) the memory
// are written. The phase is kept by princeton_ctrl.
//
// Interface
//   load_we/load_addr/load_data : writes a memory word (word index); it
//                                 overrides the processor's memory access
//                                 and is meant for use while rst is held
//   pc, instr                   : the PC and the IR
//   rf_*/dm_*                   : register-file and memory writes of this
//                                 cycle (dm_addr is the byte address)
//   execute                     : phase flag, 1 in the execute cycle
//   retire                      : 1 in every cycle an instruction completes
// Memory size, the load port and the reset values (PC = RESET_PC, IR = 0,
// fetch phase) are this implementation's choices.
module princeton_cpu
  import mips_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 2048,
  parameter word_t       RESET_PC  = 32'h0000_0000,
  parameter int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  word_t         load_data,
  output word_t         pc,
  output word_t         instr,
  output logic          rf_we,
  output regaddr_t      rf_ws,
  output word_t         rf_wd,
  output logic          dm_we,
  output word_t         dm_addr,
  output word_t         dm_wdata,
  output logic          execute,
  output logic          retire
);
  ctrl_t    ctrl;
  word_t    npc, pc_plus4;
  word_t    rd1, rd2, imm, alu_b, alu_y, mem_rdata, mem_addr_sel;
  alu_op_e  alu_op;
  logic     zero;
  logic     pc_en, ir_en, mem_we, reg_we;
  addrsrc_e addr_src;
  logic [AW-1:0] mem_addr;

  princeton_ctrl u_phase (
    .clk(clk), .rst(rst),
    .mem_write_in(ctrl.mem_write), .reg_write_in(ctrl.reg_write),
    .execute(execute), .pc_en(pc_en), .ir_en(ir_en), .addr_src(addr_src),
    .wen(), .mem_write(mem_we), .reg_write(reg_we)
  );

  register #(.W(XLEN), .RESET_VALUE(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .en(pc_en), .d(npc), .q(pc)
  );

  register #(.W(XLEN), .RESET_VALUE('0)) u_ir (
    .clk(clk), .rst(rst), .en(ir_en), .d(mem_rdata), .q(instr)
  );

  hardwired_control u_ctrl (.opcode(instr[31:26]), .zero(zero), .ctrl(ctrl));

  mux #(.N(3), .W(5)) u_regdst_mux (
    .a({LINK_REG, instr[15:11], instr[20:16]}), .sel(ctrl.regdst), .o(rf_ws)
  );

  regfile #(.NREGS(NREGS), .W(XLEN)) u_gprs (
    .clk(clk), .rst(rst),
    .rs1(instr[25:21]), .rs2(instr[20:16]), .rd1(rd1), .rd2(rd2),
    .we(rf_we), .ws(rf_ws), .wd(rf_wd)
  );
  assign rf_we = reg_we & ~rst;

  imm_ext u_immext (.imm(instr[15:0]), .ext_sel(ctrl.ext_sel), .ext(imm));

  alu_control u_aluctl (
    .func(instr[5:0]), .opcode(instr[31:26]), .opsel(ctrl.opsel), .alu_op(alu_op)
  );

  mux #(.N(2), .W(XLEN)) u_bsrc_mux (.a({imm, rd2}), .sel(ctrl.bsrc), .o(alu_b));

  alu u_alu (.a(rd1), .b(alu_b), .alu_op(alu_op), .result(alu_y), .z(zero));

  // AddrSrc mux: PC / ALU; the loader overrides it
  mux #(.N(2), .W(XLEN)) u_addr_mux (.a({alu_y, pc}), .sel(addr_src), .o(mem_addr_sel));
  assign mem_addr = load_we ? load_addr : mem_addr_sel[AW+1:2];

  assign dm_we    = mem_we & ~rst;
  assign dm_addr  = alu_y;
  assign dm_wdata = rd2;
  magic_ram #(.WORDS(MEM_WORDS), .W(XLEN)) u_mem (
    .clk(clk), .addr(mem_addr), .we(dm_we | load_we),
    .wdata(load_we ? load_data : rd2), .rdata(mem_rdata)
  );

  mux #(.N(3), .W(XLEN)) u_wb_mux (
    .a({pc_plus4, mem_rdata, alu_y}), .sel(ctrl.wbsrc), .o(rf_wd)
  );

  next_pc u_npc (
    .pc(pc), .offset_ext(imm), .target(instr[25:0]), .rs_val(rd1),
    .pcsrc(ctrl.pcsrc), .pc_plus4(pc_plus4), .npc(npc)
  );

  assign retire = execute & ~rst;
endmodule
