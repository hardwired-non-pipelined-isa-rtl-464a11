// tb_alu_control: for each OpSel value, the ALU operation must come from the
// func field, from the opcode, or be forced to add or to the zero test.
module tb_alu_control;
  import mips_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] func, opcode; opsel_e opsel; alu_op_e alu_op, e;

  alu_control dut (.*);

  function automatic alu_op_e exp_func(logic [5:0] f);
    case (f)
      6'h20, 6'h21: return ALU_ADD;
      6'h22, 6'h23: return ALU_SUB;
      6'h24: return ALU_AND;
      6'h25: return ALU_OR;
      6'h26: return ALU_XOR;
      6'h27: return ALU_NOR;
      6'h2A: return ALU_SLT;
      6'h2B: return ALU_SLTU;
      default: return ALU_ADD;
    endcase
  endfunction

  function automatic alu_op_e exp_op(logic [5:0] o);
    case (o)
      6'h08, 6'h09: return ALU_ADD;
      6'h0A: return ALU_SLT;
      6'h0B: return ALU_SLTU;
      6'h0C: return ALU_AND;
      6'h0D: return ALU_OR;
      6'h0E: return ALU_XOR;
      6'h0F: return ALU_PASSB;
      default: return ALU_ADD;
    endcase
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4 * 64; i++) begin
      @(negedge clk);
      opsel = opsel_e'(i / 64);
      func = 6'(i); opcode = 6'(i + 5);
      if (i % 2 == 0) begin func = 6'h20 + 6'(i % 12); opcode = 6'h08 + 6'(i % 8); end
      #1;
      case (i / 64)
        0: e = exp_func(func);
        1: e = exp_op(opcode);
        2: e = ALU_ADD;
        default: e = ALU_ZERO;
      endcase
      checks++; if (alu_op !== e) begin failures++; $display("FAIL opsel=%0d func=%h op=%h got %0d exp %0d", opsel, func, opcode, alu_op, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
