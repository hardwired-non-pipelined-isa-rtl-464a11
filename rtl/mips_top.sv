// mips_top: the two hardwired, non-pipelined implementations of the same
// MIPS-subset instruction set, side by side.
//
// harvard_cpu executes one instruction per (long) cycle using separate
// instruction and data memories; princeton_cpu shares one memory and takes
// two (shorter) cycles per instruction, fetch then execute. The two share a
// clock and reset but nothing else, and each brings out its own program
// loading port and write-trace outputs (see the two modules for the port
// meanings). Given the same program, both produce the same sequence of
// register and memory writes; the Princeton machine takes twice as many
// cycles.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned MEM_WORDS  = 2048,
  parameter int unsigned IAW = $clog2(IMEM_WORDS),
  parameter int unsigned PAW = $clog2(MEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  // Harvard machine
  input  logic           h_load_we,
  input  logic [IAW-1:0] h_load_addr,
  input  word_t          h_load_data,
  output word_t          h_pc,
  output word_t          h_instr,
  output logic           h_rf_we,
  output regaddr_t       h_rf_ws,
  output word_t          h_rf_wd,
  output logic           h_dm_we,
  output word_t          h_dm_addr,
  output word_t          h_dm_wdata,
  output logic           h_retire,
  // Princeton machine
  input  logic           p_load_we,
  input  logic [PAW-1:0] p_load_addr,
  input  word_t          p_load_data,
  output word_t          p_pc,
  output word_t          p_instr,
  output logic           p_rf_we,
  output regaddr_t       p_rf_ws,
  output word_t          p_rf_wd,
  output logic           p_dm_we,
  output word_t          p_dm_addr,
  output word_t          p_dm_wdata,
  output logic           p_execute,
  output logic           p_retire
);
  harvard_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_harvard (
    .clk(clk), .rst(rst),
    .load_we(h_load_we), .load_addr(h_load_addr), .load_data(h_load_data),
    .pc(h_pc), .instr(h_instr),
    .rf_we(h_rf_we), .rf_ws(h_rf_ws), .rf_wd(h_rf_wd),
    .dm_we(h_dm_we), .dm_addr(h_dm_addr), .dm_wdata(h_dm_wdata),
    .retire(h_retire)
  );

  princeton_cpu #(.MEM_WORDS(MEM_WORDS)) u_princeton (
    .clk(clk), .rst(rst),
    .load_we(p_load_we), .load_addr(p_load_addr), .load_data(p_load_data),
    .pc(p_pc), .instr(p_instr),
    .rf_we(p_rf_we), .rf_ws(p_rf_ws), .rf_wd(p_rf_wd),
    .dm_we(p_dm_we), .dm_addr(p_dm_addr), .dm_wdata(p_dm_wdata),
    .execute(p_execute), .retire(p_retire)
  );
endmodule
