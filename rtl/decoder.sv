// decoder: lg(N)-to-N one-hot decoder.
//
// Output bit o[i] is 1 exactly when the input a equals i. Combinational.
module decoder #(
  parameter int unsigned N = 32,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SW-1:0] a,
  output logic [N-1:0]  o
);
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      o[i] = (a == SW'(i));
  end
endmodule
