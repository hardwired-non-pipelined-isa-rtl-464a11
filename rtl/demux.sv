// demux: 1-to-N demultiplexer for a W-bit input.
//
// Output o[sel] carries the input a, every other output is 0. It is built
// from the one-hot decoder gating the input, which is how the register file
// turns its write enable and write select into per-register enables.
// Combinational.
module demux #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 1,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]        a,
  input  logic [SW-1:0]       sel,
  output logic [N-1:0][W-1:0] o
);
  logic [N-1:0] onehot;

  decoder #(.N(N), .SW(SW)) u_dec (.a(sel), .o(onehot));

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      o[i] = onehot[i] ? a : '0;
  end
endmodule
