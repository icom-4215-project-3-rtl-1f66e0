// ar3_mult: the on-chip 4 x 4 bit hardware multiplier with an 8-bit result.
//
// MUL multiplies the four least significant bits of A by the four least
// significant bits of register f, both taken as unsigned (the signedness is
// this design's choice). The product of two 4-bit numbers is at most 225, so
// it always fits the 8-bit result. Built as an array multiplier: each bit of
// b gates a shifted copy of a, and the four partial products are summed.
//
// The upper four bits of both operand ports are ignored by design; lint
// reports them as unused.
//
// Timing: purely combinational.
module ar3_mult
  import ar3_pkg::*;
(
  input  byte_t a,  // only bits 3:0 are used
  input  byte_t b,  // only bits 3:0 are used
  output byte_t p
);

  always_comb begin
    p = '0;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p = p + (byte_t'(a[3:0]) << i);
    end
  end

endmodule
