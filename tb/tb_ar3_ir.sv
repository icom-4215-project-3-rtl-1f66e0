// tb_ar3_ir: self-checking test of the instruction register: byte-wise
// loading (high byte, then low byte) and the opcode / register f / operand
// fields (bits 15:11, 10:8, 7:0).
module tb_ar3_ir;
  import ar3_pkg::*;
  logic clk = 0, rst_n = 0, ldh = 0, ldl = 0;
  byte_t bus = 0, operand;
  logic [15:0] ir, model;
  opcode_e opcode;
  logic [2:0] regf;
  int checks = 0, failures = 0;

  ar3_ir dut (.clk, .rst_n, .bus, .ldh, .ldl, .ir, .opcode, .regf, .operand);

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
      if (ir !== model || opcode !== opcode_e'(model[15:11]) || regf !== model[10:8] ||
          operand !== model[7:0]) begin
        failures++;
        $display("FAIL ir=%h exp %h op=%b f=%0d opnd=%h", ir, model, opcode, regf, operand);
      end
      ldh = 1'($urandom); ldl = 1'($urandom); bus = byte_t'($urandom);
      @(negedge clk);
      if (ldh) model[15:8] = bus;
      if (ldl) model[7:0]  = bus;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
