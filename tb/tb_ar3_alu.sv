// tb_ar3_alu: self-checking test of the AR3 ALU.
//
// Applies every operation to directed corner values and to random operands,
// and compares result, flags and flag enables with a reference computed here
// independently (integer arithmetic on wide values).
module tb_ar3_alu;
  import ar3_pkg::*;

  alu_op_e op;
  byte_t   a, b, prod, y;
  logic    cin;
  sr_t     flags, flag_we;
  int      checks = 0, failures = 0;

  ar3_alu dut (.op, .a, .b, .prod, .cin, .y, .flags, .flag_we);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(alu_op_e o, byte_t ta, byte_t tb_, logic tc);
    int    ia, ib, r;
    byte_t ey;
    logic  ec, eo;
    sr_t   ewe;
    op = o; a = ta; b = tb_; cin = tc; prod = ta ^ 8'h5A;
    #1;
    ia = int'(ta); ib = int'(tb_);
    ec = 1'b0; eo = 1'b0; ewe = 4'b1010;
    case (o)
      ALU_AND:  ey = ta & tb_;
      ALU_OR:   ey = ta | tb_;
      ALU_XOR:  ey = ta ^ tb_;
      ALU_ADDC: begin
        r = ia + ib + int'(tc); ey = byte_t'(r); ec = (r > 255);
        eo = ($signed(ta) + $signed(tb_) + int'(tc) > 127) || ($signed(ta) + $signed(tb_) + int'(tc) < -128);
        ewe = 4'b1111;
      end
      ALU_SUB: begin
        r = ia - ib; ey = byte_t'(r); ec = (r < 0);
        eo = ($signed(ta) - $signed(tb_) > 127) || ($signed(ta) - $signed(tb_) < -128);
        ewe = 4'b1111;
      end
      ALU_NEG: begin
        r = -ia; ey = byte_t'(r); ec = (ia != 0); eo = (-$signed(ta) > 127); ewe = 4'b1111;
      end
      ALU_NOT:  ey = ~ta;
      ALU_RLC:  begin ey = byte_t'((ia * 2) + int'(tc)); ec = ta[7]; ewe = 4'b1110; end
      ALU_RRC:  begin ey = byte_t'((ia / 2) + 128 * int'(tc)); ec = ta[0]; ewe = 4'b1110; end
      ALU_MUL:  ey = ta ^ 8'h5A;
      default:  begin ey = tb_; ewe = 4'b0000; end
    endcase
    checks++;
    if (y !== ey || flag_we !== ewe ||
        (ewe[3] && flags.z !== (ey == 0)) || (ewe[1] && flags.n !== ey[7]) ||
        (ewe[2] && flags.c !== ec) || (ewe[0] && flags.o !== eo)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h c=%b: y=%h (exp %h) flags=%b we=%b (exp c=%b o=%b we=%b)",
               o.name(), ta, tb_, tc, y, ey, flags, flag_we, ec, eo, ewe);
    end
  endtask

  initial begin
    alu_op_e ops [11] = '{ALU_AND, ALU_OR, ALU_XOR, ALU_ADDC, ALU_SUB, ALU_NEG, ALU_NOT,
                         ALU_RLC, ALU_RRC, ALU_PASS, ALU_MUL};
    byte_t corner [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFF, 8'h55};
    foreach (ops[k])
      foreach (corner[i])
        foreach (corner[j]) begin
          check(ops[k], corner[i], corner[j], 1'b0);
          check(ops[k], corner[i], corner[j], 1'b1);
        end
    repeat (3000) check(ops[$urandom_range(10)], byte_t'($urandom), byte_t'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
