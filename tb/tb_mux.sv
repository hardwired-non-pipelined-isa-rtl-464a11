// tb_mux: random selects on a 4-input and a 3-input multiplexer; the output
// must equal the selected input, and an out-of-range select must give 0.
module tb_mux;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][7:0] a4;  logic [1:0] s4;  logic [7:0] o4;
  logic [2:0][4:0] a3;  logic [1:0] s3;  logic [4:0] o3;

  mux #(.N(4), .W(8)) dut4 (.a(a4), .sel(s4), .o(o4));
  mux #(.N(3), .W(5)) dut3 (.a(a3), .sel(s3), .o(o3));

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a4 = $urandom; s4 = 2'($urandom);
      a3 = 15'($urandom); s3 = 2'($urandom);
      #1;
      checks++; if (o4 !== a4[s4]) begin failures++; $display("FAIL mux4 sel=%0d", s4); end
      checks++;
      if (o3 !== ((s3 == 2'd3) ? 5'd0 : a3[s3])) begin failures++; $display("FAIL mux3 sel=%0d", s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
