// ar3_alu: the AR3's arithmetic and logic unit with status flag generation.
//
// Operand a is the accumulator, operand b the internal bus (register f, a
// memory byte or the immediate). The operations follow the instruction set:
//   AND/OR/XOR  y = a op b
//   ADDC        y = a + b + C
//   SUB         y = a - b
//   NEG         y = -a (two's complement)
//   NOT         y = ~a
//   RLC         y = {a[6:0], C}, C <- a[7]   (rotate left through carry)
//   RRC         y = {C, a[7:1]}, C <- a[0]   (rotate right through carry)
//   MUL         y = prod (the multiplier's product, passed through here so
//               that its flags are formed like all others)
//   PASS        y = b (LDA, LDI)
// Flag rules are this design's choice, as the instruction set does not state
// them: every operation except PASS sets Z and N from y; ADDC, SUB and NEG
// also set C and O; RLC and RRC also set C; the rest leave C and O alone.
// For SUB and NEG, C is the borrow (1 when the unsigned result wrapped below
// zero). O is two's complement overflow. flag_we marks the flags to update.
//
// Timing: purely combinational.
module ar3_alu
  import ar3_pkg::*;
(
  input  alu_op_e op,
  input  byte_t   a,
  input  byte_t   b,
  input  byte_t   prod,
  input  logic    cin,
  output byte_t   y,
  output sr_t     flags,
  output sr_t     flag_we
);

  logic [8:0] wide;

  always_comb begin
    y       = '0;
    wide    = '0;
    flags   = '0;
    flag_we = '{z: 1'b1, n: 1'b1, default: 1'b0};
    unique case (op)
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_ADDC: begin
        wide      = {1'b0, a} + {1'b0, b} + {8'd0, cin};
        y         = wide[7:0];
        flags.c   = wide[8];
        flags.o   = (a[7] == b[7]) && (y[7] != a[7]);
        flag_we.c = 1'b1;
        flag_we.o = 1'b1;
      end
      ALU_SUB: begin
        wide      = {1'b0, a} - {1'b0, b};
        y         = wide[7:0];
        flags.c   = wide[8];
        flags.o   = (a[7] != b[7]) && (y[7] != a[7]);
        flag_we.c = 1'b1;
        flag_we.o = 1'b1;
      end
      ALU_NEG: begin
        wide      = 9'd0 - {1'b0, a};
        y         = wide[7:0];
        flags.c   = wide[8];
        flags.o   = (a == 8'h80);
        flag_we.c = 1'b1;
        flag_we.o = 1'b1;
      end
      ALU_NOT:  y = ~a;
      ALU_RLC: begin
        y         = {a[6:0], cin};
        flags.c   = a[7];
        flag_we.c = 1'b1;
      end
      ALU_RRC: begin
        y         = {cin, a[7:1]};
        flags.c   = a[0];
        flag_we.c = 1'b1;
      end
      ALU_MUL:  y = prod;
      default: begin  // ALU_PASS
        y       = b;
        flag_we = '0;
      end
    endcase
    flags.z = (y == '0);
    flags.n = y[7];
  end

endmodule
