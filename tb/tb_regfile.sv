// tb_regfile: random writes and reads against a shadow array. Checks that
// both read ports are combinational, that a write is seen only after the
// rising edge, that we=0 writes nothing and that register 0 reads as 0.
module tb_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, we; logic [4:0] rs1, rs2, ws; logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];

  regfile dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; we = 0; ws = '0; wd = '0; rs1 = '0; rs2 = '0;
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      we = ($urandom % 4 != 0); ws = 5'($urandom); wd = $urandom;
      if (i % 7 == 0) ws = 5'd0;
      rs1 = 5'($urandom); rs2 = (i % 3 == 0) ? ws : 5'($urandom);
      #1;
      checks++; if (rd1 !== shadow[rs1]) begin failures++; $display("FAIL rd1 r%0d", rs1); end
      checks++; if (rd2 !== shadow[rs2]) begin failures++; $display("FAIL rd2 r%0d (old value)", rs2); end
      @(posedge clk);
      if (we && ws != 0) shadow[ws] = wd;
      @(negedge clk);
    end
    // register 0 stays 0 after explicit writes
    rs1 = 0; #1;
    checks++; if (rd1 !== 32'd0) begin failures++; $display("FAIL r0 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
