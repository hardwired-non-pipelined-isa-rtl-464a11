// princeton_ctrl: two-state controller that lets the single-cycle hardwired
// control drive a datapath with a single memory (Princeton style).
//
// A one-bit toggle flipflop S remembers the phase: S=0 is instruction fetch,
// S=1 is execute, and S flips at every rising edge, so each instruction
// takes two cycles (CPI = 2). New combinational logic decodes S:
//   fetch   : AddrSrc=PC,  IRen=on,  PCen=off, Wen=off
//   execute : AddrSrc=ALU, IRen=off, PCen=on,  Wen=on
// Wen gates the MemWrite and RegWrite outputs of the unchanged single-cycle
// controller with AND gates, so no architectural state other than the
// instruction register changes during fetch. Reset (synchronous, active
// high) puts the controller into the fetch phase; that is this
// implementation's choice.
module princeton_ctrl
  import mips_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     mem_write_in,   // MemWrite from the single-cycle controller
  input  logic     reg_write_in,   // RegWrite from the single-cycle controller
  output logic     execute,        // phase flipflop S
  output logic     pc_en,
  output logic     ir_en,
  output addrsrc_e addr_src,
  output logic     wen,
  output logic     mem_write,
  output logic     reg_write
);
  logic s_q;

  // 1-bit toggle flipflop: I-fetch / Execute
  register #(.W(1), .RESET_VALUE(1'b0)) u_phase (
    .clk(clk), .rst(rst), .en(1'b1), .d(~s_q), .q(s_q)
  );

  assign execute   = s_q;
  assign addr_src  = s_q ? ADDR_ALU : ADDR_PC;
  assign ir_en     = ~s_q;
  assign pc_en     = s_q;
  assign wen       = s_q;
  assign mem_write = mem_write_in & wen;
  assign reg_write = reg_write_in & wen;
endmodule
