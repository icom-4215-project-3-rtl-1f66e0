// tb_ar3_control: self-checking test of the AR3 controller.
//
// For every opcode of the instruction set (and an undefined one), and for
// each branch both with its flag set and clear, the controller is reset and
// stepped through one instruction. The control word of each cycle is
// compared with the expected register-transfer sequence written out here:
// four fetch cycles, then one execute cycle (two for LDA/STA addr), then the
// next fetch, or the halt state for STOP. The instruction length in cycles
// (5, or 6 for direct addressing) is checked through the done pulse.
module tb_ar3_control;
  import ar3_pkg::*;
  logic    clk = 0, rst_n = 0;
  opcode_e opcode = OP_NOP;
  sr_t     sr = '0;
  ctrl_t   ctrl;
  logic    done, halted;
  int checks = 0, failures = 0;

  ar3_control dut (.clk, .rst_n, .opcode, .sr, .ctrl, .done, .halted);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t cw(bus_src_e src, string sig, alu_op_e op = ALU_PASS);
    ctrl_t c = CTRL_IDLE;
    c.bus_src = src;
    c.alu_op  = op;
    for (int i = 0; i < sig.len(); i++)
      case (sig[i])
        "M": c.mar_ld = 1; "W": c.mem_wr = 1; "H": c.irh_ld = 1; "L": c.irl_ld = 1;
        "I": c.pc_inc = 1; "P": c.pc_ld = 1; "R": c.rf_wr = 1; "7": c.rsel_r7 = 1;
        "A": c.acc_ld = 1; "S": c.sr_ld = 1;
        default: ;
      endcase
    return c;
  endfunction

  task automatic expect_cycle(ctrl_t exp, logic exp_done, logic exp_halt, string what);
    #1;
    checks++;
    if (ctrl !== exp || done !== exp_done || halted !== exp_halt) begin
      failures++;
      $display("FAIL %s op=%s: ctrl=%h exp %h done=%b halt=%b", what, opcode.name(),
               ctrl, exp, done, halted);
    end
    @(negedge clk);
  endtask

  task automatic run(opcode_e op, sr_t flags, ctrl_t ex [$], logic stop);
    rst_n = 0; opcode = op; sr = flags;
    @(negedge clk); rst_n = 1;
    expect_cycle(cw(BUS_PC, "MI"), 0, 0, "F0");
    expect_cycle(cw(BUS_MEM, "H"), 0, 0, "F1");
    expect_cycle(cw(BUS_PC, "MI"), 0, 0, "F2");
    expect_cycle(cw(BUS_MEM, "L"), 0, 0, "F3");
    foreach (ex[i]) expect_cycle(ex[i], (i == ex.size() - 1), 0, "EX");
    if (stop) begin
      expect_cycle(CTRL_IDLE, 0, 1, "HALT");
      expect_cycle(CTRL_IDLE, 0, 1, "HALT");
    end else begin
      expect_cycle(cw(BUS_PC, "MI"), 0, 0, "next F0");
    end
  endtask

  initial begin
    sr_t f;
    opcode_e bop;
    @(negedge clk);
    run(OP_AND,  '0, '{cw(BUS_REG, "AS", ALU_AND)}, 0);
    run(OP_OR,   '0, '{cw(BUS_REG, "AS", ALU_OR)}, 0);
    run(OP_XOR,  '0, '{cw(BUS_REG, "AS", ALU_XOR)}, 0);
    run(OP_ADDC, '0, '{cw(BUS_REG, "AS", ALU_ADDC)}, 0);
    run(OP_SUB,  '0, '{cw(BUS_REG, "AS", ALU_SUB)}, 0);
    run(OP_MUL,  '0, '{cw(BUS_REG, "AS", ALU_MUL)}, 0);
    run(OP_NEG,  '0, '{cw(BUS_NONE, "AS", ALU_NEG)}, 0);
    run(OP_NOT,  '0, '{cw(BUS_NONE, "AS", ALU_NOT)}, 0);
    run(OP_RLC,  '0, '{cw(BUS_NONE, "AS", ALU_RLC)}, 0);
    run(OP_RRC,  '0, '{cw(BUS_NONE, "AS", ALU_RRC)}, 0);
    run(OP_LDAR, '0, '{cw(BUS_REG, "A")}, 0);
    run(OP_STAR, '0, '{cw(BUS_ACC, "R")}, 0);
    run(OP_LDI,  '0, '{cw(BUS_IRL, "A")}, 0);
    run(OP_LDAM, '0, '{cw(BUS_IRL, "M"), cw(BUS_MEM, "A")}, 0);
    run(OP_STAM, '0, '{cw(BUS_IRL, "M"), cw(BUS_ACC, "W")}, 0);
    run(OP_NOP,  '0, '{CTRL_IDLE}, 0);
    run(opcode_e'(5'b10_100), '0, '{CTRL_IDLE}, 0);
    // each branch: taken only with its own flag
    for (int b = 0; b < 4; b++) begin
      bop = opcode_e'({3'b100, 2'(b)});
      f = '0; f[3 - b] = 1'b1;                 // the branch's own flag
      run(bop, f, '{cw(BUS_REG, "7P")}, 0);
      run(bop, ~f, '{cw(BUS_REG, "7")}, 0);    // every other flag set
    end
    run(OP_STOP, '0, '{CTRL_IDLE}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
