// tb_secd_flagsunit -- self-checking test of secd_flagsunit.
//
// Random ARG and bus words, with directed cases for equal atoms, equal
// numbers at the LEQ boundary and the NIL and TRUE cells, checked against a
// reference computed with integer comparisons.
`timescale 1ns/1ps
module tb_secd_flagsunit;
  import secd_pkg::*;

  word_t arg, bus;
  flags_t flags, exp_f;
  int checks = 0, failures = 0;

  secd_flagsunit dut (.arg, .bus, .flags);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int s28(word_t w);
    automatic int v = int'(w & 32'h0FFF_FFFF);
    if (v >= 32'h0800_0000) v -= 32'h1000_0000;
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      arg = $urandom;
      bus = $urandom;
      case (n % 6)
        1: bus = arg ^ 32'hC000_0000;                 // same atom, other gc bits
        2: bus = arg;
        3: arg = (arg & 32'hFFFF_C000) | NIL_ADDR;
        4: arg = (arg & 32'hFFFF_C000) | TRUE_ADDR;
        5: bus = arg + 1;
        default: ;
      endcase
      #1;
      exp_f.atom    = ((arg >> 28) & 3) != 0;
      exp_f.eq      = (arg & 32'h3FFF_FFFF) == (bus & 32'h3FFF_FFFF);
      exp_f.leq     = s28(arg) <= s28(bus);
      exp_f.is_nil  = (arg & 32'h3FFF) == 0;
      exp_f.is_true = (arg & 32'h3FFF) == 1;
      exp_f.mark    = arg[31];
      exp_f.field   = arg[30];
      checks++;
      if (flags !== exp_f) begin
        failures++;
        $display("FAIL arg %h bus %h: flags %b expected %b", arg, bus, flags, exp_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
