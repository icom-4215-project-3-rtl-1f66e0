// tb_ar3_regfile: self-checking test of the eight-register file.
//
// Checks that reset clears R0..R7, then performs random writes and reads
// through the bus port and the debug port against a reference array.
module tb_ar3_regfile;
  import ar3_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] sel = 0, dbg_sel = 0;
  logic wr = 0;
  byte_t wdata = 0, rdata, dbg_data;
  byte_t ref_r [8];
  int checks = 0, failures = 0;

  ar3_regfile dut (.clk, .rst_n, .sel, .wr, .wdata, .rdata, .dbg_sel, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(byte_t got, byte_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      ref_r[i] = 0; sel = 3'(i); #1; expect_eq(rdata, 8'h00, "reset value");
    end
    @(negedge clk);
    repeat (2000) begin
      #1;
      sel = 3'($urandom); dbg_sel = 3'($urandom);
      wr = 1'($urandom); wdata = byte_t'($urandom);
      #1;
      expect_eq(rdata, ref_r[sel], "read");
      expect_eq(dbg_data, ref_r[dbg_sel], "debug read");
      @(negedge clk);
      if (wr) ref_r[sel] = wdata;
      wr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
