// mux: N-input, W-bit multiplexer with a lg(N)-bit select.
//
// Output O equals input A[sel]; a select value at or above N gives 0.
// Purely combinational. The generic element is one of the combinational
// building blocks of the datapath; the zero output for out-of-range selects
// is this implementation's choice.
module mux #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 32,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] a,
  input  logic [SW-1:0]       sel,
  output logic [W-1:0]        o
);
  always_comb begin
    o = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SW'(i)) o = a[i];
  end
endmodule
