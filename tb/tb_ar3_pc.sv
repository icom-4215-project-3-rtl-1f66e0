// tb_ar3_pc: self-checking test of the program counter: reset to 0,
// increment with wrap at 255, load with priority over increment.
module tb_ar3_pc;
  import ar3_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0, inc = 0;
  byte_t bus = 0, pc, model;
  int checks = 0, failures = 0;

  ar3_pc dut (.clk, .rst_n, .bus, .ld, .inc, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1; @(negedge clk); rst_n = 1; model = 0;
    repeat (2000) begin
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%h exp %h", pc, model); end
      ld = ($urandom_range(7) == 0); inc = 1'($urandom); bus = byte_t'($urandom);
      @(negedge clk);
      if (ld) model = bus; else if (inc) model = byte_t'(model + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
