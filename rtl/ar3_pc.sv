// ar3_pc: the 8-bit program counter.
//
// Counts bytes: the controller increments it once for each of the two bytes
// of an instruction fetch. A taken branch loads it from the bus (which then
// carries R7). It wraps from 255 to 0. Reset to address 0 is this design's
// choice.
//
// Timing: ld has priority over inc; both act on the rising clock edge.
module ar3_pc
  import ar3_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t bus,
  input  logic  ld,
  input  logic  inc,
  output byte_t pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pc <= '0;
    else if (ld)   pc <= bus;
    else if (inc)  pc <= pc + 8'd1;
  end

endmodule
