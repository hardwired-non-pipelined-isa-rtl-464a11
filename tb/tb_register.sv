// tb_register: q must take d at a rising edge only when en is 1, hold
// otherwise, and go to the reset value under reset.
module tb_register;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, en; logic [15:0] d, q, model;

  register #(.W(16), .RESET_VALUE(16'hA5A5)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; en = 0; d = '0;
    @(posedge clk); #1;
    checks++; if (q !== 16'hA5A5) begin failures++; $display("FAIL reset"); end
    model = 16'hA5A5;
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = 1'($urandom); d = 16'($urandom); rst = ($urandom % 50 == 0);
      #1;
      checks++; if (q !== model) begin failures++; $display("FAIL before edge q=%h exp %h", q, model); end
      if (rst) model = 16'hA5A5; else if (en) model = d;
      @(posedge clk); #1;
      checks++; if (q !== model) begin failures++; $display("FAIL after edge q=%h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
