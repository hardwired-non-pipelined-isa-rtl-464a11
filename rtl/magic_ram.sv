// magic_ram: the simple ("magic") memory model, WORDS words of W bits.
//
// A read can happen at any time and is combinational: rdata follows addr.
// When we is 1, wdata is written to addr at the rising edge of clk, so
// address and data must be stable at that edge. Reads and writes therefore
// complete in one cycle, as the simple memory model requires. The address is
// a word index; the memory has no reset (its contents are whatever was last
// written), and addresses at or beyond WORDS wrap onto the low index bits.
// The word organisation and the wrap-around are this implementation's
// choices.
module magic_ram #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
endmodule
