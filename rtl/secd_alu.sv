// secd_alu -- the arithmetic and record-manipulation unit of the SECD datapath.
//
// Operand A is the 32-bit ARG register, operand B is the 32-bit bus.  The
// twelve operation lines arrive decoded (one-hot, bit i = alu code i+1 of
// secd_pkg::alu_e); with no line high the result is zero.  The unit is purely
// combinational: its result is latched into BUF1 or BUF2, or gated onto the bus,
// by the same microinstruction that selects the operation.
//
//   ADD, SUB   28-bit two's complement ARG + bus, ARG - bus
//   DEC        ARG - 1 (also steps addresses in the sweep and environment lookup)
//   MUL, DIV, REM  computed as DEC: the fabricated datapath dropped these three
//              for area but kept their codes, and this unit does the same
//   SETM/CLRM  set/clear the mark bit (31) of ARG
//   SETF/CLRF  set/clear the field bit (30) of ARG
//   REPLCAR    ARG with its car field replaced by the bus cdr field
//   REPLCDR    ARG with its cdr field replaced by the bus cdr field
//
// Arithmetic results carry the integer type with both gc bits clear; the
// logical operations keep every bit they do not change.  Both rules follow the
// design description.  Overflow wraps silently (no error is raised), and the
// operand order of SUB (ARG - bus) is this design's choice: the microcode puts
// the deeper stack operand in ARG, so SUB computes b - a for (a b . s).
module secd_alu
  import secd_pkg::*;
(
  input  logic [N_ALU-1:0] op,     // decoded alu lines
  input  word_t            arg,    // ARG register
  input  word_t            bus,    // bus value
  output word_t            result
);

  logic [27:0] sum, diff, decr;

  always_comb begin
    sum  = arg[27:0] + bus[27:0];
    diff = arg[27:0] - bus[27:0];
    decr = arg[27:0] - 28'd1;
  end

  function automatic word_t mk_int(logic [27:0] v);
    return {2'b00, T_INT, v};
  endfunction

  always_comb begin
    result = '0;
    if (op[int'(A_ADD) - 1])          result = mk_int(sum);
    else if (op[int'(A_SUB) - 1])     result = mk_int(diff);
    else if (op[int'(A_MUL) - 1] || op[int'(A_DIV) - 1] || op[int'(A_REM) - 1] ||
             op[int'(A_DEC) - 1])     result = mk_int(decr);
    else if (op[int'(A_SETM) - 1])    result = {1'b1, arg[30:0]};
    else if (op[int'(A_CLRM) - 1])    result = {1'b0, arg[30:0]};
    else if (op[int'(A_SETF) - 1])    result = {arg[31], 1'b1, arg[29:0]};
    else if (op[int'(A_CLRF) - 1])    result = {arg[31], 1'b0, arg[29:0]};
    else if (op[int'(A_REPLCAR) - 1]) result = {arg[31:28], bus[13:0], arg[13:0]};
    else if (op[int'(A_REPLCDR) - 1]) result = {arg[31:14], bus[13:0]};
  end

endmodule
