// ar3_bus: the single 8-bit internal bus of the AR3.
//
// All transfers between the PC, memory, registers, accumulator and IR pass
// over this one bus, one source per clock cycle. A tri-state bus is modelled
// as a multiplexer selected by the controller's bus_src; with BUS_NONE the
// bus carries zero.
//
// Timing: purely combinational.
module ar3_bus
  import ar3_pkg::*;
(
  input  bus_src_e src,
  input  byte_t    pc,
  input  byte_t    mem,
  input  byte_t    rf,
  input  byte_t    acc,
  input  byte_t    irl,
  output byte_t    bus
);

  always_comb begin
    unique case (src)
      BUS_PC:  bus = pc;
      BUS_MEM: bus = mem;
      BUS_REG: bus = rf;
      BUS_ACC: bus = acc;
      BUS_IRL: bus = irl;
      default: bus = '0;
    endcase
  end

endmodule
