// tb_ar3_bus: self-checking test of the internal bus multiplexer.
//
// For random source values, each bus source selection must put exactly that
// source's value on the bus, and BUS_NONE must give zero.
module tb_ar3_bus;
  import ar3_pkg::*;
  bus_src_e src;
  byte_t pc, mem, rf, acc, irl, bus;
  int checks = 0, failures = 0;

  ar3_bus dut (.src, .pc, .mem, .rf, .acc, .irl, .bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t exp;
    repeat (200) begin
      pc = byte_t'($urandom); mem = byte_t'($urandom); rf = byte_t'($urandom);
      acc = byte_t'($urandom); irl = byte_t'($urandom);
      for (int s = 0; s < 6; s++) begin
        src = bus_src_e'(s);
        #1;
        case (s)
          1: exp = pc;  2: exp = mem; 3: exp = rf; 4: exp = acc; 5: exp = irl;
          default: exp = 8'h00;
        endcase
        checks++;
        if (bus !== exp) begin
          failures++;
          $display("FAIL src=%0d bus=%h exp=%h", s, bus, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
