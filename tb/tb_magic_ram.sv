// tb_magic_ram: random reads and writes against a shadow array. A read is
// combinational at any time; a write lands at the rising edge, so the old
// value is read until the edge and the new one after it.
module tb_magic_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int WORDS = 64;
  logic [5:0] addr; logic we; logic [31:0] wdata, rdata;
  logic [31:0] shadow [WORDS];

  magic_ram #(.WORDS(WORDS)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // initialise every word first
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); addr = 6'(i); we = 1; wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      addr = 6'($urandom); we = 1'($urandom); wdata = $urandom;
      #1;
      checks++; if (rdata !== shadow[addr]) begin failures++; $display("FAIL read @%0d", addr); end
      @(posedge clk); #1;
      if (we) shadow[addr] = wdata;
      checks++; if (rdata !== shadow[addr]) begin failures++; $display("FAIL after write @%0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
