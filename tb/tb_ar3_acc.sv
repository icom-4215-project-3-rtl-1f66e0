// tb_ar3_acc: self-checking test of the accumulator: reset value, load on
// ld, hold without ld, over random stimulus.
module tb_ar3_acc;
  import ar3_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0;
  byte_t d = 0, a, model;
  int checks = 0, failures = 0;

  ar3_acc dut (.clk, .rst_n, .ld, .d, .a);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1; @(negedge clk); rst_n = 1; model = 0;
    repeat (1000) begin
      checks++;
      if (a !== model) begin failures++; $display("FAIL a=%h exp %h", a, model); end
      ld = 1'($urandom); d = byte_t'($urandom);
      @(negedge clk);
      if (ld) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
