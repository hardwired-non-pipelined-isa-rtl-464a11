// regfile: general-purpose register file with two read ports and one
// write port (2R+1W), NREGS registers of W bits.
//
// Structure follows the classic implementation: the write select ws and the
// write enable we go through a demultiplexer that enables exactly one
// register, every register sees the same write data wd, and each read port
// is a multiplexer over all register outputs. Register 0 is not stored and
// always reads as 0 (MIPS R0). Reads are combinational (rd1/rd2 follow
// rs1/rs2 and the register contents in the same cycle); a write takes effect
// at the rising edge of clk, so a read of the register being written sees the
// old value until that edge. Resetting all registers to 0 is this
// implementation's choice.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] rs1,
  input  logic [AW-1:0] rs2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] ws,
  input  logic [W-1:0]  wd
);
  logic [NREGS-1:0]        reg_en;
  logic [NREGS-1:0][W-1:0] regs;

  demux #(.N(NREGS), .W(1), .SW(AW)) u_wdemux (.a(we), .sel(ws), .o(reg_en));

  assign regs[0] = '0;  // R0 always contains 0

  for (genvar i = 1; i < NREGS; i++) begin : g_reg
    register #(.W(W)) u_reg (
      .clk(clk), .rst(rst), .en(reg_en[i]), .d(wd), .q(regs[i])
    );
  end

  mux #(.N(NREGS), .W(W), .SW(AW)) u_rmux1 (.a(regs), .sel(rs1), .o(rd1));
  mux #(.N(NREGS), .W(W), .SW(AW)) u_rmux2 (.a(regs), .sel(rs2), .o(rd2));
endmodule
