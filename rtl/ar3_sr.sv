// ar3_sr: the 4-bit status register, laid out Z C N O (Z = bit 3, O = bit 0).
//
// Each flag is updated only when the instruction's flag-enable bit (we, same
// layout) is set and the controller asserts ld, so an instruction that does
// not affect a flag leaves it unchanged. Which instruction affects which flag
// is decided by the ALU; reset to all zero is this design's choice.
//
// Timing: flags update on the rising clock edge.
module ar3_sr
  import ar3_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ld,
  input  sr_t  we,
  input  sr_t  d,
  output sr_t  q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (ld) begin
      q <= (q & ~we) | (d & we);
    end
  end

endmodule
