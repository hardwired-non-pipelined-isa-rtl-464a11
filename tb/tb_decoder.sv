// tb_decoder: every input value of a 5-to-32 decoder must give exactly the
// one-hot output 1 << value.
module tb_decoder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [4:0] a; logic [31:0] o;

  decoder #(.N(32)) dut (.a(a), .o(o));

  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); a = 5'(i); #1;
      checks++; if (o !== (32'd1 << i)) begin failures++; $display("FAIL a=%0d o=%h", i, o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
