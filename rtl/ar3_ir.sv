// ar3_ir: the 16-bit instruction register.
//
// The byte-wide bus fills the IR in two steps: ldh loads bits 15:8 (the byte
// at the lower address, since instructions are stored big-endian) and ldl
// loads bits 7:0. The fields are decoded as the instruction formats give
// them: opcode in 15:11, register f in 10:8, immediate operand or direct
// address in 7:0. The low byte is also driven onto the bus (through the bus
// mux) for LDI and for direct addressing.
//
// Timing: each half loads on the rising clock edge.
module ar3_ir
  import ar3_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  byte_t       bus,
  input  logic        ldh,
  input  logic        ldl,
  output logic [INSN_W-1:0] ir,
  output opcode_e     opcode,
  output logic [2:0]  regf,
  output byte_t       operand
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= '0;
    end else begin
      if (ldh) ir[INSN_W-1:8] <= bus;
      if (ldl) ir[7:0]  <= bus;
    end
  end

  assign opcode  = opcode_e'(ir[15:11]);
  assign regf    = ir[10:8];
  assign operand = ir[7:0];

endmodule
