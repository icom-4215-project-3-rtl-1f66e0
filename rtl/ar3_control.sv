// ar3_control: the multi-cycle controller of the one-bus RISC AR3.
//
// A state machine issues one control word (ar3_pkg::ctrl_t) per
// clock cycle. Every instruction starts with a four-cycle fetch of its two
// bytes over the byte-wide bus:
//   F0  MAR <- PC, PC <- PC + 1
//   F1  IR[15:8] <- mem[MAR]
//   F2  MAR <- PC, PC <- PC + 1
//   F3  IR[7:0]  <- mem[MAR]
// followed by one execute cycle (EX), or two for the direct-address
// instructions (EX, EX2):
//   AND OR XOR ADDC SUB MUL   bus <- R[f]; A <- A op bus; SR updated
//   NEG NOT RLC RRC           A <- op A; SR updated
//   LDA rf                    bus <- R[f]; A <- bus
//   STA rf                    bus <- A; R[f] <- bus
//   LDI imm                   bus <- IR[7:0]; A <- bus
//   LDA addr                  EX: MAR <- IR[7:0]   EX2: A <- mem[MAR]
//   STA addr                  EX: MAR <- IR[7:0]   EX2: mem[MAR] <- A
//   BRZ BRC BRN BRO           if flag set: bus <- R7; PC <- bus
//   NOP                       nothing
//   STOP                      enter HALT, which only reset leaves
// So an instruction takes 5 cycles, or 6 for LDA/STA addr. The state
// sequence and the cycle counts are this design's choice; the instruction
// set, its opcodes and the one-bus organisation follow the processor
// description. In the execute cycles the control word also depends on the
// opcode held in the IR and, for branches, on the status flags. Opcodes
// that the instruction set does not define execute as NOP. done pulses in
// the last cycle of each instruction.
module ar3_control
  import ar3_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  opcode_e opcode,
  input  sr_t     sr,
  output ctrl_t   ctrl,
  output logic    done,
  output logic    halted
);

  typedef enum logic [2:0] {S_F0, S_F1, S_F2, S_F3, S_EX, S_EX2, S_HALT} state_e;

  state_e state, state_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_F0;
    else        state <= state_n;
  end

  logic br_taken;
  always_comb begin
    unique case (opcode)
      OP_BRZ:  br_taken = sr.z;
      OP_BRC:  br_taken = sr.c;
      OP_BRN:  br_taken = sr.n;
      OP_BRO:  br_taken = sr.o;
      default: br_taken = 1'b0;
    endcase
  end

  always_comb begin
    ctrl    = CTRL_IDLE;
    state_n = state;
    done    = 1'b0;
    unique case (state)
      S_F0: begin
        ctrl.bus_src = BUS_PC;
        ctrl.mar_ld  = 1'b1;
        ctrl.pc_inc  = 1'b1;
        state_n      = S_F1;
      end
      S_F1: begin
        ctrl.bus_src = BUS_MEM;
        ctrl.irh_ld  = 1'b1;
        state_n      = S_F2;
      end
      S_F2: begin
        ctrl.bus_src = BUS_PC;
        ctrl.mar_ld  = 1'b1;
        ctrl.pc_inc  = 1'b1;
        state_n      = S_F3;
      end
      S_F3: begin
        ctrl.bus_src = BUS_MEM;
        ctrl.irl_ld  = 1'b1;
        state_n      = S_EX;
      end
      S_EX: begin
        state_n = S_F0;
        done    = 1'b1;
        unique case (opcode)
          OP_AND, OP_OR, OP_XOR, OP_ADDC, OP_SUB, OP_MUL: begin
            ctrl.bus_src = BUS_REG;
            ctrl.acc_ld  = 1'b1;
            ctrl.sr_ld   = 1'b1;
            unique case (opcode)
              OP_AND:  ctrl.alu_op = ALU_AND;
              OP_OR:   ctrl.alu_op = ALU_OR;
              OP_XOR:  ctrl.alu_op = ALU_XOR;
              OP_ADDC: ctrl.alu_op = ALU_ADDC;
              OP_SUB:  ctrl.alu_op = ALU_SUB;
              default: ctrl.alu_op = ALU_MUL;
            endcase
          end
          OP_NEG, OP_NOT, OP_RLC, OP_RRC: begin
            ctrl.acc_ld = 1'b1;
            ctrl.sr_ld  = 1'b1;
            unique case (opcode)
              OP_NEG:  ctrl.alu_op = ALU_NEG;
              OP_NOT:  ctrl.alu_op = ALU_NOT;
              OP_RLC:  ctrl.alu_op = ALU_RLC;
              default: ctrl.alu_op = ALU_RRC;
            endcase
          end
          OP_LDAR: begin
            ctrl.bus_src = BUS_REG;
            ctrl.acc_ld  = 1'b1;
          end
          OP_STAR: begin
            ctrl.bus_src = BUS_ACC;
            ctrl.rf_wr   = 1'b1;
          end
          OP_LDI: begin
            ctrl.bus_src = BUS_IRL;
            ctrl.acc_ld  = 1'b1;
          end
          OP_LDAM, OP_STAM: begin
            ctrl.bus_src = BUS_IRL;
            ctrl.mar_ld  = 1'b1;
            state_n      = S_EX2;
            done         = 1'b0;
          end
          OP_BRZ, OP_BRC, OP_BRN, OP_BRO: begin
            ctrl.rsel_r7 = 1'b1;
            ctrl.bus_src = BUS_REG;
            ctrl.pc_ld   = br_taken;
          end
          OP_STOP: state_n = S_HALT;
          default: ;  // NOP and undefined opcodes
        endcase
      end
      S_EX2: begin
        state_n = S_F0;
        done    = 1'b1;
        if (opcode == OP_STAM) begin
          ctrl.bus_src = BUS_ACC;
          ctrl.mem_wr  = 1'b1;
        end else begin
          ctrl.bus_src = BUS_MEM;
          ctrl.acc_ld  = 1'b1;
        end
      end
      default: ;  // S_HALT: stay, drive nothing
    endcase
  end

  assign halted = (state == S_HALT);

  // One bus means one transfer per cycle: at most one of these destinations
  // takes a value in any cycle.
  a_one_load: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.irh_ld, ctrl.irl_ld, ctrl.pc_ld, ctrl.rf_wr, ctrl.mem_wr, ctrl.acc_ld}));

endmodule
