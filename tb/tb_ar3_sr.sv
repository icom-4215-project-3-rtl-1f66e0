// tb_ar3_sr: self-checking test of the Z C N O status register: each flag
// must change only when ld is high and its enable bit is set.
module tb_ar3_sr;
  import ar3_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0;
  sr_t we = 0, d = 0, q, model;
  int checks = 0, failures = 0;

  ar3_sr dut (.clk, .rst_n, .ld, .we, .d, .q);

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
      if (q !== model) begin failures++; $display("FAIL q=%b exp %b", q, model); end
      ld = 1'($urandom); we = 4'($urandom); d = 4'($urandom);
      @(negedge clk);
      if (ld) for (int i = 0; i < 4; i++) if (we[i]) model[i] = d[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
