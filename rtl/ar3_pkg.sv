// ar3_pkg: types and constants shared by the RISC AR3 blocks.
//
// The AR3 is an 8-bit accumulator machine with 16-bit instructions. An
// instruction holds a 5-bit opcode in bits 15:11, a register number f in
// bits 10:8 and an 8-bit immediate operand or direct address in bits 7:0.
// The opcode values below are those of the instruction set table; the bus
// source codes, ALU operation codes and the control-word layout are this
// design's own choice.
package ar3_pkg;

  localparam int unsigned DATA_W = 8;   // internal bus / register width
  localparam int unsigned ADDR_W = 8;   // memory address width (256 bytes)
  localparam int unsigned NREGS  = 8;   // general purpose registers R0..R7
  localparam int unsigned INSN_W = 16;  // instruction width
  localparam int unsigned BR_REG = 7;   // register that holds branch targets

  typedef logic [DATA_W-1:0] byte_t;

  // Opcodes (instruction bits 15:11).
  typedef enum logic [4:0] {
    OP_AND   = 5'b00_000,
    OP_OR    = 5'b00_001,
    OP_XOR   = 5'b00_010,
    OP_ADDC  = 5'b00_011,
    OP_SUB   = 5'b00_100,
    OP_MUL   = 5'b00_101,
    OP_NEG   = 5'b00_110,
    OP_NOT   = 5'b00_111,
    OP_RLC   = 5'b01_000,
    OP_RRC   = 5'b01_001,
    OP_LDAR  = 5'b01_010,  // LDA rf
    OP_STAR  = 5'b01_011,  // STA rf
    OP_LDAM  = 5'b01_100,  // LDA addr
    OP_STAM  = 5'b01_101,  // STA addr
    OP_LDI   = 5'b01_110,
    OP_BRZ   = 5'b10_000,
    OP_BRC   = 5'b10_001,
    OP_BRN   = 5'b10_010,
    OP_BRO   = 5'b10_011,
    OP_NOP   = 5'b11_000,
    OP_STOP  = 5'b11_111
  } opcode_e;

  // Status register, in the printed order Z C N O (Z is bit 3, O is bit 0).
  typedef struct packed {
    logic z;
    logic c;
    logic n;
    logic o;
  } sr_t;

  // ALU operations. ALU_PASS copies the bus into A (loads).
  typedef enum logic [3:0] {
    ALU_AND, ALU_OR, ALU_XOR, ALU_ADDC, ALU_SUB, ALU_NEG, ALU_NOT,
    ALU_RLC, ALU_RRC, ALU_PASS, ALU_MUL
  } alu_op_e;

  // Which block drives the single internal bus.
  typedef enum logic [2:0] {
    BUS_NONE, BUS_PC, BUS_MEM, BUS_REG, BUS_ACC, BUS_IRL
  } bus_src_e;

  // Control lines issued by the controller in one clock cycle.
  typedef struct packed {
    bus_src_e bus_src;  // bus driver
    logic     mar_ld;   // memory address register <- bus
    logic     mem_wr;   // memory[MAR] <- bus
    logic     irh_ld;   // IR[15:8] <- bus
    logic     irl_ld;   // IR[7:0]  <- bus
    logic     pc_inc;   // PC <- PC + 1
    logic     pc_ld;    // PC <- bus
    logic     rf_wr;    // R[rsel] <- bus
    logic     rsel_r7;  // select R7 instead of IR field f
    logic     acc_ld;   // A <- ALU/multiplier result
    logic     sr_ld;    // SR <- flags, masked by the ALU's flag enables
    alu_op_e  alu_op;   // ALU operation
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{bus_src: BUS_NONE, alu_op: ALU_PASS, default: 1'b0};

endpackage
