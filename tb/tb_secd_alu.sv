// tb_secd_alu -- self-checking test of secd_alu.
//
// Applies each of the twelve operation lines (and none) to random ARG and bus
// words and compares with a reference written with integer arithmetic and bit
// masks.  Combinational: one check per vector, no clock.
`timescale 1ns/1ps
module tb_secd_alu;
  import secd_pkg::*;

  logic [N_ALU-1:0] op;
  word_t arg, bus, result;
  int checks = 0, failures = 0;

  secd_alu dut (.op, .arg, .bus, .result);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_model(alu_e a, word_t x, word_t y);
    longint sx, sy, r;
    sx = longint'(x & 32'h0FFF_FFFF);
    sy = longint'(y & 32'h0FFF_FFFF);
    case (a)
      A_ADD:                      r = sx + sy;
      A_SUB:                      r = sx - sy;
      A_MUL, A_DIV, A_REM, A_DEC: r = sx - 1;
      default:                    r = 0;
    endcase
    case (a)
      A_ADD, A_SUB, A_MUL, A_DIV, A_REM, A_DEC:
        return 32'h1000_0000 | (word_t'(r) & 32'h0FFF_FFFF);
      A_SETM:    return x | 32'h8000_0000;
      A_CLRM:    return x & 32'h7FFF_FFFF;
      A_SETF:    return x | 32'h4000_0000;
      A_CLRF:    return x & 32'hBFFF_FFFF;
      A_REPLCAR: return (x & 32'hF000_3FFF) | ((y & 32'h3FFF) << 14);
      A_REPLCDR: return (x & 32'hFFFF_C000) | (y & 32'h3FFF);
      default:   return 32'h0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int a = 0; a <= N_ALU; a++) begin
        arg = $urandom;
        bus = $urandom;
        if (n == 0) begin arg = 32'h1000_0000; bus = 32'h1000_0001; end  // 0 - 1 wraps
        op = alu_line(alu_e'(a));
        #1;
        checks++;
        if (result !== ref_model(alu_e'(a), arg, bus)) begin
          failures++;
          $display("FAIL op %0d arg %h bus %h: got %h expected %h", a, arg, bus, result,
                   ref_model(alu_e'(a), arg, bus));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
