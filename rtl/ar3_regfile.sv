// ar3_regfile: the eight 8-bit general purpose registers R0..R7.
//
// One register, chosen by sel, is read onto the internal bus or written from
// it; sel normally comes from the register field f (instruction bits 10:8)
// and is forced to 7 by the controller for branches, since R7 holds the
// branch target. Reset clearing all registers is this design's choice.
//
// Timing: rdata = R[sel] combinationally; a write (wr) takes effect on the
// rising clock edge. dbg_sel/dbg_data lets the registers be observed.
module ar3_regfile
  import ar3_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] sel,
  input  logic                 wr,
  input  byte_t                wdata,
  output byte_t                rdata,
  input  logic [$clog2(N)-1:0] dbg_sel,
  output byte_t                dbg_data
);

  byte_t r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) r[i] <= '0;
    end else if (wr) begin
      r[sel] <= wdata;
    end
  end

  assign rdata    = r[sel];
  assign dbg_data = r[dbg_sel];

endmodule
