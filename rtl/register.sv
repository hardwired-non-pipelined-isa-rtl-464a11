// register: W edge-triggered flipflops sharing one enable.
//
// At the rising edge of clk, q takes d when en is 1 and holds otherwise.
// The synchronous, active-high reset to RESET_VALUE is this
// implementation's addition; the element as described has only D, En and
// Clk. Timing: q changes only at the rising edge.
module register #(
  parameter int unsigned    W = 32,
  parameter logic [W-1:0]   RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (en) q <= d;
  end
endmodule
