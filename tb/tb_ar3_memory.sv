// tb_ar3_memory: self-checking test of the 256-byte memory and its MAR.
//
// Fills all 256 bytes through the load port, then mixes random bus writes
// (MAR load, then write) and reads against a reference array, checks the
// debug port, and checks that the load port wins over a bus write.
module tb_ar3_memory;
  import ar3_pkg::*;
  logic clk = 0, rst_n = 0;
  byte_t bus, rdata, prog_data, dbg_data;
  logic mar_ld = 0, wr = 0, prog_we = 0;
  logic [7:0] prog_addr, dbg_addr;
  byte_t ref_mem [256];
  int checks = 0, failures = 0;

  ar3_memory dut (.clk, .rst_n, .bus, .mar_ld, .wr, .rdata, .prog_we, .prog_addr,
                  .prog_data, .dbg_addr, .dbg_data);

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
    bus = 0; prog_addr = 0; prog_data = 0; dbg_addr = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = byte_t'($urandom);
      ref_mem[i] = prog_data;
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < 256; i++) begin
      dbg_addr = 8'(i); #1;
      expect_eq(dbg_data, ref_mem[i], "debug read");
    end
    @(negedge clk);
    repeat (1000) begin
      logic [7:0] ad;
      ad = 8'($urandom);
      bus = ad; mar_ld = 1; @(negedge clk); mar_ld = 0;
      if ($urandom_range(1)) begin
        bus = byte_t'($urandom); wr = 1; ref_mem[ad] = bus; @(negedge clk); wr = 0;
      end
      expect_eq(rdata, ref_mem[ad], "bus read");
    end
    // load port has priority over a bus write to another address
    bus = 8'h10; mar_ld = 1; @(negedge clk); mar_ld = 0;
    bus = 8'hAA; wr = 1; prog_we = 1; prog_addr = 8'h20; prog_data = 8'h3C;
    @(negedge clk); wr = 0; prog_we = 0;
    expect_eq(rdata, ref_mem[8'h10], "no bus write under prog_we");
    dbg_addr = 8'h20; #1;
    expect_eq(dbg_data, 8'h3C, "prog write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
