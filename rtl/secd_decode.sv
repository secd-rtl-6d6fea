// secd_decode -- the DECODE block of the SECD control unit.
//
// Three decoders expand the encoded read, write and alu fields of the current
// microword into discrete control lines (23, 17 and 12 of them), and a test
// PLA turns the 4-bit test field, the seven datapath flags and the button
// input into the controls of the next-address multiplexer and the subroutine
// stack:
//
//   INC       next word                      JUMP   address field
//   CALL      address field, push mpc+1      RET    stack top, pop
//   DISPATCH  SECD instruction code
//   JBUTTON JATOM JEQ JLEQ JNIL JTRUE JMARK JFIELD
//             address field if the condition holds, next word otherwise
//
// The block also derives the two major-state outputs from mpc: the microwords
// of the idle loop, the first error loop and the second error loop each map to
// one state, every other address means the machine is running.  Which lines
// the fields decode to, and the placing of this state decode here, follow the
// description's split of the control unit; the field codes are this design's.
// Purely combinational.
module secd_decode
  import secd_pkg::*;
  import secd_ucode_pkg::*;
(
  input  uinstr_t uw,       // current microword
  input  uaddr_t  mpc,      // current microaddress
  input  flags_t  flags,
  input  logic    button,
  output ctl_t    ctl,
  output seq_t    seq,
  output mstate_e mstate
);

  logic cond;

  always_comb begin
    ctl.rd  = rd_line(uw.rd);
    ctl.wr  = wr_line(uw.wr);
    ctl.alu = alu_line(uw.alu);
  end

  always_comb begin
    unique case (uw.test)
      U_JBUTTON: cond = button;
      U_JATOM:   cond = flags.atom;
      U_JEQ:     cond = flags.eq;
      U_JLEQ:    cond = flags.leq;
      U_JNIL:    cond = flags.is_nil;
      U_JTRUE:   cond = flags.is_true;
      U_JMARK:   cond = flags.mark;
      U_JFIELD:  cond = flags.field;
      default:   cond = 1'b0;
    endcase

    seq.push = 1'b0;
    seq.pop  = 1'b0;
    unique case (uw.test)
      U_INC:      seq.sel = NX_INC;
      U_JUMP:     seq.sel = NX_A;
      U_CALL:     begin seq.sel = NX_A; seq.push = 1'b1; end
      U_RET:      begin seq.sel = NX_STACK; seq.pop = 1'b1; end
      U_DISPATCH: seq.sel = NX_OP;
      default:    seq.sel = cond ? NX_A : NX_INC;
    endcase
  end

  always_comb begin
    if (mpc == 9'd0 || mpc == UA_IDLE || mpc == UA_IDLE + 9'd1) mstate = MS_IDLE;
    else if (mpc == UA_ERR1 || mpc == UA_ERR1 + 9'd1)           mstate = MS_ERROR1;
    else if (mpc == UA_ERR2 || mpc == UA_ERR2 + 9'd1)           mstate = MS_ERROR2;
    else                                                        mstate = MS_RUN;
  end

endmodule
