// ar3_acc: the 8-bit accumulator A.
//
// A is the implicit first operand of every ALU and multiplier instruction and
// the destination of every result and every load (LDA, LDI). The ALU output,
// which for MUL carries the multiplier's product, is its only input. Its value
// goes to the ALU, to the multiplier and, for stores, onto the internal bus.
// Reset to zero is this design's choice.
//
// Timing: loads on the rising clock edge when ld is high.
module ar3_acc
  import ar3_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld,
  input  byte_t d,
  output byte_t a
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   a <= '0;
    else if (ld)  a <= d;
  end

endmodule
