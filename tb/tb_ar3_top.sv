// tb_ar3_top: end-to-end, self-checking test of the complete RISC AR3.
//
// An instruction-level reference model of the processor (memory, R0..R7,
// A, Z C N O, PC) is kept in this testbench and stepped once for each
// instruction the RTL completes. After every instruction the accumulator,
// status register, program counter, halt state, the register named by the
// instruction and the memory byte a direct store wrote are compared with the
// model, and so is the instruction's length in clock cycles (5, or 6 for
// LDA/STA addr).
//
// Phase 1 loads a directed program that uses all twenty-one instructions,
// takes and skips each branch, produces carry, borrow, overflow and zero,
// and ends with STOP; all of memory and every register are then compared.
// Phase 1b runs a counted loop (13 x 11 by repeated addition) and checks
// the product and the total cycle count (169 instructions x 5 cycles).
// Phase 2 runs several random programs (random bytes with opcodes drawn
// from the instruction set) in lock-step with the model for a fixed number
// of instructions or until STOP. The testbench counts how often each
// instruction and each mechanism (taken and untaken branch, halt, direct
// memory access, flag events) occurred and fails if one never did.
// The processor is used at its only configuration.
module tb_ar3_top;
  import ar3_pkg::*;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [7:0] prog_addr = 0, prog_data = 0, dbg_mem_addr = 0, dbg_mem_data;
  logic [2:0] dbg_reg_sel = 0;
  logic [7:0] dbg_reg_data, pc, acc;
  logic [3:0] sr;
  logic [15:0] ir;
  logic halted, insn_done;

  ar3_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  byte_t m_mem [256];
  byte_t m_r   [8];
  byte_t m_a, m_pc;
  logic [15:0] m_ir;
  logic  m_z, m_c, m_n, m_o, m_halt;

  // statistics
  int n_op [32];
  int n_taken, n_untaken, n_halt, n_carry, n_ovf, n_zero, n_direct, n_insn;

  function automatic void set_zn(byte_t v);
    m_z = (v == 0);
    m_n = v[7];
  endfunction

  // Executes one instruction; returns its expected length in clock cycles.
  function automatic int m_step(output logic [2:0] f_out, output logic [7:0] st_addr,
                                output logic stored);
    byte_t hi, lo, b;
    logic [4:0] op;
    logic [2:0] f;
    int s, cyc;
    hi = m_mem[m_pc];
    lo = m_mem[8'(m_pc + 1)];
    m_pc = 8'(m_pc + 2);
    m_ir = {hi, lo};
    op = hi[7:3];
    f  = hi[2:0];
    b  = m_r[f];
    cyc = 5;
    stored = 0;
    st_addr = lo;
    n_op[op]++;
    case (op)
      5'b00000: begin m_a = m_a & b; set_zn(m_a); end
      5'b00001: begin m_a = m_a | b; set_zn(m_a); end
      5'b00010: begin m_a = m_a ^ b; set_zn(m_a); end
      5'b00011: begin
        s = int'(m_a) + int'(b) + int'(m_c);
        m_o = (m_a[7] == b[7]) && (8'(s) >> 7 != m_a[7]);
        m_c = s > 255;
        m_a = 8'(s); set_zn(m_a);
      end
      5'b00100: begin
        s = int'(m_a) - int'(b);
        m_o = ((int'($signed(m_a)) - int'($signed(b))) > 127) ||
              ((int'($signed(m_a)) - int'($signed(b))) < -128);
        m_c = s < 0;
        m_a = 8'(s); set_zn(m_a);
      end
      5'b00101: begin m_a = 8'(int'(m_a % 16) * int'(b % 16)); set_zn(m_a); end
      5'b00110: begin
        m_c = (m_a != 0);
        m_o = (m_a == 8'h80);
        m_a = 8'(256 - int'(m_a)); set_zn(m_a);
      end
      5'b00111: begin m_a = 8'hFF - m_a; set_zn(m_a); end
      5'b01000: begin s = int'(m_a) * 2 + int'(m_c); m_c = s > 255; m_a = 8'(s); set_zn(m_a); end
      5'b01001: begin s = int'(m_a) + 256 * int'(m_c); m_c = s % 2 == 1; m_a = 8'(s / 2); set_zn(m_a); end
      5'b01010: m_a = b;
      5'b01011: m_r[f] = m_a;
      5'b01100: begin m_a = m_mem[lo]; cyc = 6; n_direct++; end
      5'b01101: begin m_mem[lo] = m_a; cyc = 6; stored = 1; n_direct++; end
      5'b01110: m_a = lo;
      5'b10000, 5'b10001, 5'b10010, 5'b10011: begin
        logic t;
        t = (op == 5'b10000) ? m_z : (op == 5'b10001) ? m_c : (op == 5'b10010) ? m_n : m_o;
        if (t) begin m_pc = m_r[7]; n_taken++; end
        else n_untaken++;
      end
      5'b11111: begin m_halt = 1; n_halt++; end
      default: ;
    endcase
    if (m_c) n_carry++;
    if (m_o) n_ovf++;
    if (m_z) n_zero++;
    n_insn++;
    f_out = f;
    return cyc;
  endfunction

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h (insn %0d)", what, got, exp, n_insn);
    end
  endtask

  // ---------------- program loading ----------------
  byte_t image [256];
  int    asm_pc;

  function automatic void emit(logic [4:0] op, logic [2:0] f = 0, byte_t lo = 0);
    image[8'(asm_pc)]     = {op, f};
    image[8'(asm_pc + 1)] = lo;
    asm_pc += 2;
  endfunction

  // Load R7 with the address after "Bx; STOP" and branch: a taken branch
  // skips the STOP.
  function automatic void branch_skip(logic [4:0] op);
    emit(5'b01110, 0, 8'(asm_pc + 8));  // LDI target
    emit(5'b01011, 7);                  // STA r7
    emit(op);                           // Bx
    emit(5'b11111);                     // STOP (skipped when taken)
  endfunction

  // Branch that must not be taken: R7 points at a STOP far away.
  function automatic void branch_fall(logic [4:0] op);
    emit(5'b01110, 0, 8'hFE);
    emit(5'b01011, 7);
    emit(op);
  endfunction

  task automatic load_and_reset();
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = image[i];
      m_mem[i] = image[i];
      @(negedge clk);
    end
    prog_we = 0;
    foreach (m_r[i]) m_r[i] = 0;
    m_a = 0; m_pc = 0; {m_z, m_c, m_n, m_o} = 0; m_halt = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  // Run in lock-step with the model for at most max_insn instructions.
  task automatic run_lockstep(int max_insn);
    int cycles, exp_cyc, k;
    logic [2:0] f;
    logic [7:0] sa;
    logic st;
    k = 0;
    while (k < max_insn && !m_halt) begin
      cycles = 0;
      // wait until the last cycle of the instruction
      forever begin
        #1;
        cycles++;
        if (insn_done || cycles >= 20) break;
        @(negedge clk);
      end
      exp_cyc = m_step(f, sa, st);
      @(negedge clk);  // the instruction has completed at the posedge
      expect_eq(cycles, exp_cyc, "instruction length");
      expect_eq(acc, m_a, "A");
      expect_eq(sr, {m_z, m_c, m_n, m_o}, "SR");
      expect_eq(pc, m_pc, "PC");
      expect_eq(halted, m_halt, "halted");
      expect_eq(ir, m_ir, "IR");
      dbg_reg_sel = f;
      dbg_mem_addr = sa;
      #1;
      expect_eq(dbg_reg_data, m_r[f], "R[f]");
      if (st) expect_eq(dbg_mem_data, m_mem[sa], "stored byte");
      k++;
    end
  endtask

  task automatic compare_all();
    for (int i = 0; i < 8; i++) begin
      dbg_reg_sel = 3'(i); #1;
      expect_eq(dbg_reg_data, m_r[i], $sformatf("final R%0d", i));
    end
    for (int i = 0; i < 256; i++) begin
      dbg_mem_addr = 8'(i); #1;
      expect_eq(dbg_mem_data, m_mem[i], "final memory");
    end
  endtask

  initial begin
    logic [4:0] ops [20] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100, 5'b00101,
                            5'b00110, 5'b00111, 5'b01000, 5'b01001, 5'b01010, 5'b01011,
                            5'b01100, 5'b01101, 5'b01110, 5'b10000, 5'b10001, 5'b10010,
                            5'b10011, 5'b11000};
    // ---------------- phase 1: directed program ----------------
    foreach (image[i]) image[i] = 0;
    asm_pc = 0;
    emit(5'b01110, 0, 8'h7F); emit(5'b01011, 1);          // r1 = 7F
    emit(5'b01110, 0, 8'h01); emit(5'b01011, 2);          // r2 = 01
    emit(5'b01110, 0, 8'hFF); emit(5'b01011, 3);          // r3 = FF
    emit(5'b01110, 0, 8'h0D); emit(5'b01011, 5);          // r5 = 0D
    emit(5'b01010, 1);                                    // LDA r1
    emit(5'b00011, 2);                                    // ADDC r2: 80, O=1 N=1
    branch_fall(5'b10000);                                // BRZ not taken
    branch_skip(5'b10011);                                // BRO taken
    branch_skip(5'b10010);                                // BRN taken
    emit(5'b01110, 0, 8'h01); emit(5'b00011, 3);          // 01+FF = 00, C=1 Z=1
    branch_skip(5'b10001);                                // BRC taken
    branch_skip(5'b10000);                                // BRZ taken
    emit(5'b01110, 0, 8'h05); emit(5'b00100, 3);          // 05-FF: borrow
    emit(5'b01110, 0, 8'hFB); emit(5'b00101, 5);          // MUL: 11*13 = 8F
    emit(5'b00000, 1); emit(5'b00001, 2); emit(5'b00010, 3);
    emit(5'b00110); emit(5'b00111); emit(5'b01000); emit(5'b01001);
    emit(5'b01101, 0, 8'hC0);                             // STA [C0]
    emit(5'b01110, 0, 8'h00);
    emit(5'b01100, 0, 8'hC0);                             // LDA [C0]
    emit(5'b01011, 6);                                    // STA r6
    emit(5'b01110, 0, 8'h80); emit(5'b00110);             // NEG 80: O=1
    emit(5'b01110, 0, 8'h00); emit(5'b00100, 2);          // 00-01: borrow
    branch_fall(5'b10011);                                // BRO not taken? (SUB clears O)
    emit(5'b11000);                                       // NOP
    emit(5'b11111);                                       // STOP
    image[8'hFE] = 8'hF8; image[8'hFF] = 8'h00;          // STOP
    load_and_reset();
    run_lockstep(1000);
    expect_eq(halted, 1, "directed program halted");
    expect_eq(m_pc, asm_pc, "directed program ended at its last STOP");
    repeat (3) @(negedge clk);
    expect_eq(halted, 1, "stays halted");
    expect_eq(pc, m_pc, "PC frozen after STOP");
    compare_all();

    // ---------------- phase 1b: a loop (13 x 11 by repeated addition) ----------------
    foreach (image[i]) image[i] = 0;
    asm_pc = 0;
    emit(5'b01110, 0, 8'd13); emit(5'b01011, 1);          // r1 = 13 (addend)
    emit(5'b01110, 0, 8'd11); emit(5'b01011, 2);          // r2 = 11 (counter)
    emit(5'b01110, 0, 8'd0);  emit(5'b01011, 3);          // r3 = 0  (sum)
    emit(5'b01011, 0);                                    // r0 = 0
    emit(5'b01110, 0, 8'd1);  emit(5'b01011, 4);          // r4 = 1
    // loop at 0x12
    emit(5'b01110, 0, 8'h2E); emit(5'b01011, 7);          // r7 = exit
    emit(5'b01010, 2); emit(5'b00001, 0);                 // A = r2 | r0: Z when done
    emit(5'b10000);                                       // BRZ exit
    emit(5'b00100, 4); emit(5'b01011, 2);                 // r2 = r2 - 1 (C = 0)
    emit(5'b01010, 3); emit(5'b00011, 1); emit(5'b01011, 3); // r3 = r3 + r1
    emit(5'b01110, 0, 8'h12); emit(5'b01011, 7);          // r7 = loop
    emit(5'b00000, 0);                                    // A & 0: Z = 1
    emit(5'b10000);                                       // BRZ loop
    expect_eq(asm_pc, 8'h2E, "loop program layout");
    emit(5'b11111);                                       // exit: STOP
    begin
      int taken0, cyc0;
      taken0 = n_taken;
      load_and_reset();
      cyc0 = 0;
      fork
        begin : count_cycles
          forever begin @(posedge clk); cyc0++; end
        end
        run_lockstep(1000);
      join_any
      disable count_cycles;
      expect_eq(halted, 1, "loop program halted");
      dbg_reg_sel = 3; #1;
      expect_eq(dbg_reg_data, 13 * 11, "13 x 11 by repeated addition");
      // 11 taken back-branches, then the taken exit branch
      expect_eq(n_taken - taken0, 11 + 1, "taken branches in loop");
      // 9 set-up instructions, 11 passes of 14, 5 on the exit pass and
      // STOP: 169 instructions of 5 cycles each
      expect_eq(cyc0, 169 * 5, "loop program cycle count");
    end

    // ---------------- phase 2: random programs ----------------
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < 256; i += 2) begin
        image[i]     = {ops[$urandom_range(19)], 3'($urandom)};
        image[i + 1] = byte_t'($urandom);
      end
      image[8'hFE] = 8'hF8;  // a STOP at the top of memory
      load_and_reset();
      run_lockstep(400);
    end

    // ---------------- coverage of instructions and mechanisms ----------------
    foreach (ops[i]) begin
      checks++;
      if (n_op[ops[i]] == 0) begin failures++; $display("FAIL opcode %b never executed", ops[i]); end
    end
    if (n_op[5'b11111] == 0) failures++;
    checks += 7;
    if (n_taken == 0)   begin failures++; $display("FAIL no branch taken"); end
    if (n_untaken == 0) begin failures++; $display("FAIL no branch untaken"); end
    if (n_halt == 0)    begin failures++; $display("FAIL never halted"); end
    if (n_carry == 0)   begin failures++; $display("FAIL carry never set"); end
    if (n_ovf == 0)     begin failures++; $display("FAIL overflow never set"); end
    if (n_zero == 0)    begin failures++; $display("FAIL zero never set"); end
    if (n_direct == 0)  begin failures++; $display("FAIL no direct access"); end
    $display("instructions=%0d taken=%0d untaken=%0d halts=%0d direct=%0d carry=%0d ovf=%0d zero=%0d",
             n_insn, n_taken, n_untaken, n_halt, n_direct, n_carry, n_ovf, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
