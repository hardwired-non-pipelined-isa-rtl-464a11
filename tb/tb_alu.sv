// tb_alu: every operation on random and corner-case operands, against
// results worked out here, and the zero? output.
module tb_alu;
  import mips_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  word_t a, b, result, e;
  alu_op_e alu_op;
  logic z;
  word_t corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};

  alu dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a = (i % 4 == 0) ? corner[$urandom % 6] : $urandom;
      b = (i % 5 == 0) ? corner[$urandom % 6] : $urandom;
      if (i % 9 == 0) b = a;
      alu_op = alu_op_e'(i % 10);
      #1;
      case (i % 10)
        0: e = a + b;
        1: e = a + ~b + 1;
        2: e = a & b;
        3: e = a | b;
        4: e = a ^ b;
        5: e = ~a & ~b;
        6: e = (a[31] != b[31]) ? 32'(a[31]) : 32'(a < b);
        7: e = 32'(a < b);
        8: e = b;
        default: e = a;
      endcase
      checks++; if (result !== e) begin failures++; $display("FAIL op=%0d a=%h b=%h r=%h exp %h", i % 10, a, b, result, e); end
      checks++; if (z !== (e == 0)) begin failures++; $display("FAIL zero op=%0d", i % 10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
