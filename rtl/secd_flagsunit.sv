// secd_flagsunit -- status flags of the SECD datapath for the microcode's
// conditional jumps.
//
// All flags are combinational.  The unary flags look at the ARG register; the
// binary flags compare ARG with the value on the bus in the same cycle, so a
// microinstruction that reads the second operand onto the bus can jump on the
// result directly (both as the description states).
//
//   atom    ARG holds a number or symbol record (type bits not cons)
//   eq      ARG and bus hold the same atom: type and 28-bit body equal
//   leq     ARG <= bus as 28-bit two's complement numbers
//   is_nil  ARG's cdr field is the address of the NIL cell
//   is_true ARG's cdr field is the address of the TRUE cell
//   mark    mark bit of ARG
//   field   field bit of ARG
//
// The comparisons for NIL and TRUE are made on pointers: the built-in symbols
// live in fixed cells, so a pointer equals NIL exactly when it addresses that
// cell.  That choice, and the exact bits compared by eq and leq, are this
// design's own.  The mark and field flags are plain copies of ARG bits 31
// and 30; they go through this unit only so that all seven conditions reach
// the control unit as one bundle.
module secd_flagsunit
  import secd_pkg::*;
(
  input  word_t  arg,
  input  word_t  bus,
  output flags_t flags
);

  always_comb begin
    flags.atom    = (arg[29:28] != T_CONS);
    flags.eq      = (arg[29:0] == bus[29:0]);
    flags.leq     = ($signed(arg[27:0]) <= $signed(bus[27:0]));
    flags.is_nil  = (arg[13:0] == NIL_ADDR);
    flags.is_true = (arg[13:0] == TRUE_ADDR);
    flags.mark    = arg[31];
    flags.field   = arg[30];
  end

endmodule
