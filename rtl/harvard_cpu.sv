// harvard_cpu: single-cycle, non-pipelined MIPS-subset processor with
// hardwired control and separate instruction and data memories (Harvard
// style).
//
// Every instruction completes in one clock cycle (CPI = 1). Within the cycle
// the PC addresses the instruction memory, the instruction's rs/rt fields
// read the register file, the immediate extender and ALU control prepare the
// ALU, the ALU result addresses the data memory, and the write-back mux
// (ALU / Mem / PC) drives the register file's write port. At the next rising
// edge the PC, the register file and the data memory are all updated. The
// hardwired controller sees only the opcode and the ALU's zero? flag.
// Control transfers are not delayed (no branch delay slot).
//
// Interface
//   load_we/load_addr/load_data : writes a word of the instruction memory
//                                 (word index). Use while rst is held.
//   pc, instr                   : current instruction address and word
//   rf_we/rf_ws/rf_wd           : the register-file write of this cycle
//   dm_we/dm_addr/dm_wdata      : the data-memory write of this cycle
//                                 (dm_addr is the byte address)
//   retire                      : 1 in every cycle an instruction completes
// Memories are word-organised; only word loads and stores exist, so the low
// two address bits are ignored. Memory sizes, the load port and the
// synchronous reset of the PC to RESET_PC are this implementation's choices.
module harvard_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0000_0000,
  parameter int unsigned IAW = $clog2(IMEM_WORDS),
  parameter int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           load_we,
  input  logic [IAW-1:0] load_addr,
  input  word_t          load_data,
  output word_t          pc,
  output word_t          instr,
  output logic           rf_we,
  output regaddr_t       rf_ws,
  output word_t          rf_wd,
  output logic           dm_we,
  output word_t          dm_addr,
  output word_t          dm_wdata,
  output logic           retire
);
  ctrl_t    ctrl;
  word_t    npc, pc_plus4;
  word_t    rd1, rd2, imm, alu_b, alu_y, dm_rdata;
  alu_op_e  alu_op;
  logic     zero;
  logic [IAW-1:0] imem_addr;

  // PC
  register #(.W(XLEN), .RESET_VALUE(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .en(1'b1), .d(npc), .q(pc)
  );

  // Instruction memory: read-only for the processor, written by the loader
  assign imem_addr = load_we ? load_addr : pc[IAW+1:2];
  magic_ram #(.WORDS(IMEM_WORDS), .W(XLEN)) u_imem (
    .clk(clk), .addr(imem_addr), .we(load_we), .wdata(load_data), .rdata(instr)
  );

  hardwired_control u_ctrl (.opcode(instr[31:26]), .zero(zero), .ctrl(ctrl));

  // RegDst mux: rt / rd / R31
  mux #(.N(3), .W(5)) u_regdst_mux (
    .a({LINK_REG, instr[15:11], instr[20:16]}), .sel(ctrl.regdst), .o(rf_ws)
  );

  regfile #(.NREGS(NREGS), .W(XLEN)) u_gprs (
    .clk(clk), .rst(rst),
    .rs1(instr[25:21]), .rs2(instr[20:16]), .rd1(rd1), .rd2(rd2),
    .we(rf_we), .ws(rf_ws), .wd(rf_wd)
  );
  assign rf_we = ctrl.reg_write & ~rst;

  imm_ext u_immext (.imm(instr[15:0]), .ext_sel(ctrl.ext_sel), .ext(imm));

  alu_control u_aluctl (
    .func(instr[5:0]), .opcode(instr[31:26]), .opsel(ctrl.opsel), .alu_op(alu_op)
  );

  // BSrc mux: Reg / Imm
  mux #(.N(2), .W(XLEN)) u_bsrc_mux (.a({imm, rd2}), .sel(ctrl.bsrc), .o(alu_b));

  alu u_alu (.a(rd1), .b(alu_b), .alu_op(alu_op), .result(alu_y), .z(zero));

  // Data memory
  assign dm_we    = ctrl.mem_write & ~rst;
  assign dm_addr  = alu_y;
  assign dm_wdata = rd2;
  magic_ram #(.WORDS(DMEM_WORDS), .W(XLEN)) u_dmem (
    .clk(clk), .addr(alu_y[DAW+1:2]), .we(dm_we), .wdata(rd2), .rdata(dm_rdata)
  );

  // WBSrc mux: ALU / Mem / PC (the PC+4 link value)
  mux #(.N(3), .W(XLEN)) u_wb_mux (
    .a({pc_plus4, dm_rdata, alu_y}), .sel(ctrl.wbsrc), .o(rf_wd)
  );

  next_pc u_npc (
    .pc(pc), .offset_ext(imm), .target(instr[25:0]), .rs_val(rd1),
    .pcsrc(ctrl.pcsrc), .pc_plus4(pc_plus4), .npc(npc)
  );

  assign retire = ~rst;
endmodule
