// ar3_top: the RISC AR3, an 8-bit accumulator processor built around a
// single internal bus, with its multi-cycle controller.
//
// Blocks: 256-byte memory with address register, eight registers R0..R7,
// accumulator A, status register Z C N O, 16-bit instruction register,
// program counter, ALU, 4 x 4 bit multiplier, the bus multiplexer and the
// controller. The accumulator and the multiplier product feed the ALU, whose
// result is the accumulator's only input; everything else moves over the
// bus. The two external I/O pins of the processor have no described
// function and are not modelled.
//
// Interface: hold rst_n low while writing the program through prog_we /
// prog_addr / prog_data (byte writes, big-endian instructions from address
// 0). After reset is released the processor fetches from address 0 and runs
// until a STOP instruction raises halted. insn_done pulses once per executed
// instruction. dbg_* ports read the memory and the registers; pc, acc, sr
// and ir show the architectural state.
module ar3_top
  import ar3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       prog_we,
  input  logic [7:0] prog_addr,
  input  logic [7:0] prog_data,
  input  logic [7:0] dbg_mem_addr,
  output logic [7:0] dbg_mem_data,
  input  logic [2:0] dbg_reg_sel,
  output logic [7:0] dbg_reg_data,
  output logic [7:0] pc,
  output logic [7:0] acc,
  output logic [3:0] sr,
  output logic [15:0] ir,
  output logic       halted,
  output logic       insn_done
);

  ctrl_t      ctrl;
  byte_t      bus, mem_rdata, rf_rdata, irl, alu_y, prod;
  opcode_e    opcode;
  logic [2:0] regf, rsel;
  sr_t        sr_q, flags, flag_we;

  ar3_control u_ctrl (
    .clk, .rst_n, .opcode, .sr(sr_q), .ctrl, .done(insn_done), .halted
  );

  ar3_bus u_bus (
    .src(ctrl.bus_src), .pc, .mem(mem_rdata), .rf(rf_rdata), .acc, .irl, .bus
  );

  ar3_memory u_mem (
    .clk, .rst_n, .bus, .mar_ld(ctrl.mar_ld), .wr(ctrl.mem_wr), .rdata(mem_rdata),
    .prog_we, .prog_addr, .prog_data, .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  assign rsel = ctrl.rsel_r7 ? 3'(BR_REG) : regf;

  ar3_regfile u_rf (
    .clk, .rst_n, .sel(rsel), .wr(ctrl.rf_wr), .wdata(bus), .rdata(rf_rdata),
    .dbg_sel(dbg_reg_sel), .dbg_data(dbg_reg_data)
  );

  ar3_ir u_ir (
    .clk, .rst_n, .bus, .ldh(ctrl.irh_ld), .ldl(ctrl.irl_ld),
    .ir, .opcode, .regf, .operand(irl)
  );

  ar3_pc u_pc (
    .clk, .rst_n, .bus, .ld(ctrl.pc_ld), .inc(ctrl.pc_inc), .pc
  );

  ar3_mult u_mult (.a(acc), .b(bus), .p(prod));

  ar3_alu u_alu (
    .op(ctrl.alu_op), .a(acc), .b(bus), .prod, .cin(sr_q.c), .y(alu_y), .flags, .flag_we
  );

  ar3_acc u_acc (.clk, .rst_n, .ld(ctrl.acc_ld), .d(alu_y), .a(acc));

  ar3_sr u_sr (.clk, .rst_n, .ld(ctrl.sr_ld), .we(flag_we), .d(flags), .q(sr_q));

  assign sr = sr_q;

endmodule
