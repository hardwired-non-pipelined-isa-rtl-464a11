// tb_demux: the input must appear on the selected output only, for a 1-bit
// 32-way demultiplexer (write-enable use) and an 8-bit 4-way one.
module tb_demux;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a1; logic [4:0] s1; logic [31:0] o1;
  logic [7:0] a8; logic [1:0] s8; logic [3:0][7:0] o8;

  demux #(.N(32), .W(1)) dut1 (.a(a1), .sel(s1), .o(o1));
  demux #(.N(4), .W(8)) dut8 (.a(a8), .sel(s8), .o(o8));

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0][7:0] exp8;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); a1 = i[5]; s1 = i[4:0]; #1;
      checks++;
      if (o1 !== (a1 ? (32'd1 << s1) : 32'd0)) begin failures++; $display("FAIL w1 sel=%0d", s1); end
    end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); a8 = 8'($urandom); s8 = 2'($urandom); #1;
      exp8 = '0; exp8[s8] = a8;
      checks++; if (o8 !== exp8) begin failures++; $display("FAIL w8 sel=%0d", s8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
