// tb_ar3_mult: exhaustive self-checking test of the 4 x 4 bit multiplier.
//
// All 256 pairs of 4-bit operands are applied with random upper nibbles,
// which must be ignored; each product is compared with integer multiplication.
module tb_ar3_mult;
  import ar3_pkg::*;
  byte_t a, b, p;
  int checks = 0, failures = 0;

  ar3_mult dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = {4'($urandom), 4'(i)};
        b = {4'($urandom), 4'(j)};
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
