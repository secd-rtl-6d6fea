// secd_ucode_rom -- microcode store of the SECD control unit.
//
// One 27-bit microword (secd_pkg::uinstr_t: read, write, alu, test and address
// fields) per microaddress, read combinationally from mpc.  The microprogram
// follows the structure the design description gives and is written out here
// in full as this design's own:
//
//   0          reset entry, jumps to the idle loop
//   1..21      dispatch table: each SECD instruction code is the address of a
//              word that jumps to that instruction's routine
//   IDLE       wait for button, then START loads S and C from the reserved cell
//              (S := cdr(car(NUM)), C := car(cdr(NUM))), clears E, D and FREE
//   ERR1/ERR2  the two error states; button moves ERR1 -> ERR2, releasing it
//              moves ERR2 -> IDLE
//   TOP        top of cycle: fetch car(C) into ARG and dispatch on its code
//   I_xx       one routine per instruction, each ending back at TOP; STOP
//              writes cons(S, NIL) to the reserved cell and returns to IDLE
//   BIN        common operand fetch of the binary operations
//   CONS/ALLOC take a cell from the free list; an empty list runs the collector
//   GC         marks from S, E, C, D, X1, X2 with pointer reversal (MARK) and
//              sweeps from NUM-1 down to FALSE+1, rebuilding the free list; if
//              it is still empty the machine enters ERR1 (memory exhausted)
//
// Conditional jumps go to the address field when their condition holds and to
// the following word otherwise; calls push the following word.  Addresses not
// used by the program hold a jump to ERR1.  The listing below is produced from
// a symbolic microprogram; each word's comment gives its label and fields.
module secd_ucode_rom
  import secd_pkg::*;
(
  input  uaddr_t  addr,  // mpc
  output uinstr_t uw     // microword at addr
);

  always_comb begin
    unique case (addr)
      9'd0  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd22};  // jump IDLE
      9'd1  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd46};  // jump I_LD
      9'd2  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd77};  // jump I_LDC
      9'd3  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd84};  // jump I_LDF
      9'd4  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd93};  // jump I_AP
      9'd5  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd118};  // jump I_RTN
      9'd6  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd135};  // jump I_DUM
      9'd7  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd140};  // jump I_RAP
      9'd8  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd169};  // jump I_SEL
      9'd9  : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd189};  // jump I_JOIN
      9'd10 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd193};  // jump I_CAR
      9'd11 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd202};  // jump I_CDR
      9'd12 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd210};  // jump I_ATOM
      9'd13 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd219};  // jump I_CONS
      9'd14 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd232};  // jump I_EQ
      9'd15 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd238};  // jump I_ADD
      9'd16 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd240};  // jump I_SUB
      9'd17 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd242};  // jump I_MUL
      9'd18 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd244};  // jump I_DIV
      9'd19 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd246};  // jump I_REM
      9'd20 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd235};  // jump I_LEQ
      9'd21 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd248};  // jump I_STOP
      9'd22 : uw = '{R_NONE, W_NONE, A_NONE, U_JBUTTON, 9'd28};  // IDLE: jbutton START
      9'd23 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd22};  // jump IDLE
      9'd24 : uw = '{R_NONE, W_NONE, A_NONE, U_JBUTTON, 9'd26};  // ERR1: jbutton ERR2
      9'd25 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd24};  // jump ERR1
      9'd26 : uw = '{R_NONE, W_NONE, A_NONE, U_JBUTTON, 9'd26};  // ERR2: jbutton ERR2
      9'd27 : uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd22};  // jump IDLE
      9'd28 : uw = '{R_NUM, W_MAR, A_NONE, U_INC, 9'd0};  // START: rnum wmar
      9'd29 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd30 : uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd31 : uw = '{R_MEM, W_S, A_NONE, U_INC, 9'd0};  // rmem ws
      9'd32 : uw = '{R_NUM, W_MAR, A_NONE, U_INC, 9'd0};  // rnum wmar
      9'd33 : uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd34 : uw = '{R_X1, W_MAR, A_NONE, U_INC, 9'd0};  // rx1 wmar
      9'd35 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd36 : uw = '{R_CAR, W_C, A_NONE, U_INC, 9'd0};  // rcar wc
      9'd37 : uw = '{R_NIL, W_E, A_NONE, U_INC, 9'd0};  // rnil we
      9'd38 : uw = '{R_NIL, W_D, A_NONE, U_INC, 9'd0};  // rnil wd
      9'd39 : uw = '{R_NIL, W_FREE, A_NONE, U_INC, 9'd0};  // rnil wfree
      9'd40 : uw = '{R_NIL, W_X1, A_NONE, U_INC, 9'd0};  // rnil wx1
      9'd41 : uw = '{R_NIL, W_X2, A_NONE, U_JUMP, 9'd42};  // rnil wx2 jump TOP
      9'd42 : uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // TOP: rc wmar
      9'd43 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd44 : uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd45 : uw = '{R_MEM, W_ARG, A_NONE, U_DISPATCH, 9'd0};  // rmem warg dispatch
      9'd46 : uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_LD: rc wmar
      9'd47 : uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd48 : uw = '{R_X1, W_MAR, A_NONE, U_INC, 9'd0};  // rx1 wmar
      9'd49 : uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd50 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd51 : uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd52 : uw = '{R_MEM, W_X2, A_NONE, U_INC, 9'd0};  // rmem wx2
      9'd53 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd54 : uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd55 : uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd56 : uw = '{R_E, W_X1, A_NONE, U_INC, 9'd0};  // re wx1
      9'd57 : uw = '{R_NIL, W_NONE, A_NONE, U_JLEQ, 9'd62};  // LDM: rnil jleq LDMD
      9'd58 : uw = '{R_X1, W_MAR, A_NONE, U_INC, 9'd0};  // rx1 wmar
      9'd59 : uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd60 : uw = '{R_NONE, W_BUF1, A_DEC, U_INC, 9'd0};  // wbuf1 dec
      9'd61 : uw = '{R_BUF1, W_ARG, A_NONE, U_JUMP, 9'd57};  // rbuf1 warg jump LDM
      9'd62 : uw = '{R_X1, W_MAR, A_NONE, U_INC, 9'd0};  // LDMD: rx1 wmar
      9'd63 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd64 : uw = '{R_CAR, W_X1, A_NONE, U_INC, 9'd0};  // rcar wx1
      9'd65 : uw = '{R_X2, W_MAR, A_NONE, U_INC, 9'd0};  // rx2 wmar
      9'd66 : uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd67 : uw = '{R_NIL, W_NONE, A_NONE, U_JLEQ, 9'd72};  // LDN: rnil jleq LDND
      9'd68 : uw = '{R_X1, W_MAR, A_NONE, U_INC, 9'd0};  // rx1 wmar
      9'd69 : uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd70 : uw = '{R_NONE, W_BUF1, A_DEC, U_INC, 9'd0};  // wbuf1 dec
      9'd71 : uw = '{R_BUF1, W_ARG, A_NONE, U_JUMP, 9'd67};  // rbuf1 warg jump LDN
      9'd72 : uw = '{R_X1, W_MAR, A_NONE, U_INC, 9'd0};  // LDND: rx1 wmar
      9'd73 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd74 : uw = '{R_CAR, W_X1, A_NONE, U_INC, 9'd0};  // rcar wx1
      9'd75 : uw = '{R_S, W_X2, A_NONE, U_CALL, 9'd271};  // rs wx2 call CONS
      9'd76 : uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd77 : uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_LDC: rc wmar
      9'd78 : uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd79 : uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd80 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd81 : uw = '{R_CAR, W_X1, A_NONE, U_INC, 9'd0};  // rcar wx1
      9'd82 : uw = '{R_S, W_X2, A_NONE, U_CALL, 9'd271};  // rs wx2 call CONS
      9'd83 : uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd84 : uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_LDF: rc wmar
      9'd85 : uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd86 : uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd87 : uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd88 : uw = '{R_CAR, W_X1, A_NONE, U_INC, 9'd0};  // rcar wx1
      9'd89 : uw = '{R_E, W_X2, A_NONE, U_CALL, 9'd271};  // re wx2 call CONS
      9'd90 : uw = '{R_MAR, W_X1, A_NONE, U_INC, 9'd0};  // rmar wx1
      9'd91 : uw = '{R_S, W_X2, A_NONE, U_CALL, 9'd271};  // rs wx2 call CONS
      9'd92 : uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd93 : uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_AP: rc wmar
      9'd94 : uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd95 : uw = '{R_D, W_X2, A_NONE, U_CALL, 9'd271};  // rd wx2 call CONS
      9'd96 : uw = '{R_MAR, W_X2, A_NONE, U_INC, 9'd0};  // rmar wx2
      9'd97 : uw = '{R_E, W_X1, A_NONE, U_CALL, 9'd271};  // re wx1 call CONS
      9'd98 : uw = '{R_MAR, W_X2, A_NONE, U_INC, 9'd0};  // rmar wx2
      9'd99 : uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd100: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd101: uw = '{R_MEM, W_X1, A_NONE, U_CALL, 9'd271};  // rmem wx1 call CONS
      9'd102: uw = '{R_MAR, W_D, A_NONE, U_INC, 9'd0};  // rmar wd
      9'd103: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd104: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd105: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd106: uw = '{R_MEM, W_X2, A_NONE, U_INC, 9'd0};  // rmem wx2
      9'd107: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd108: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd109: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd110: uw = '{R_CAR, W_X1, A_NONE, U_CALL, 9'd271};  // rcar wx1 call CONS
      9'd111: uw = '{R_MAR, W_E, A_NONE, U_INC, 9'd0};  // rmar we
      9'd112: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd113: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd114: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd115: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd116: uw = '{R_CAR, W_C, A_NONE, U_INC, 9'd0};  // rcar wc
      9'd117: uw = '{R_NIL, W_S, A_NONE, U_JUMP, 9'd42};  // rnil ws jump TOP
      9'd118: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // I_RTN: rs wmar
      9'd119: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd120: uw = '{R_CAR, W_X1, A_NONE, U_INC, 9'd0};  // rcar wx1
      9'd121: uw = '{R_D, W_MAR, A_NONE, U_INC, 9'd0};  // rd wmar
      9'd122: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd123: uw = '{R_CAR, W_X2, A_NONE, U_INC, 9'd0};  // rcar wx2
      9'd124: uw = '{R_MEM, W_D, A_NONE, U_INC, 9'd0};  // rmem wd
      9'd125: uw = '{R_D, W_MAR, A_NONE, U_INC, 9'd0};  // rd wmar
      9'd126: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd127: uw = '{R_CAR, W_E, A_NONE, U_INC, 9'd0};  // rcar we
      9'd128: uw = '{R_MEM, W_D, A_NONE, U_INC, 9'd0};  // rmem wd
      9'd129: uw = '{R_D, W_MAR, A_NONE, U_INC, 9'd0};  // rd wmar
      9'd130: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd131: uw = '{R_CAR, W_C, A_NONE, U_INC, 9'd0};  // rcar wc
      9'd132: uw = '{R_MEM, W_D, A_NONE, U_INC, 9'd0};  // rmem wd
      9'd133: uw = '{R_X2, W_S, A_NONE, U_CALL, 9'd271};  // rx2 ws call CONS
      9'd134: uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd135: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_DUM: rc wmar
      9'd136: uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd137: uw = '{R_NIL, W_X1, A_NONE, U_INC, 9'd0};  // rnil wx1
      9'd138: uw = '{R_E, W_X2, A_NONE, U_CALL, 9'd271};  // re wx2 call CONS
      9'd139: uw = '{R_MAR, W_E, A_NONE, U_JUMP, 9'd42};  // rmar we jump TOP
      9'd140: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_RAP: rc wmar
      9'd141: uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd142: uw = '{R_D, W_X2, A_NONE, U_CALL, 9'd271};  // rd wx2 call CONS
      9'd143: uw = '{R_MAR, W_X2, A_NONE, U_INC, 9'd0};  // rmar wx2
      9'd144: uw = '{R_E, W_MAR, A_NONE, U_INC, 9'd0};  // re wmar
      9'd145: uw = '{R_MEM, W_X1, A_NONE, U_CALL, 9'd271};  // rmem wx1 call CONS
      9'd146: uw = '{R_MAR, W_X2, A_NONE, U_INC, 9'd0};  // rmar wx2
      9'd147: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd148: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd149: uw = '{R_MEM, W_X1, A_NONE, U_CALL, 9'd271};  // rmem wx1 call CONS
      9'd150: uw = '{R_MAR, W_D, A_NONE, U_INC, 9'd0};  // rmar wd
      9'd151: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd152: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd153: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd154: uw = '{R_MEM, W_E, A_NONE, U_INC, 9'd0};  // rmem we
      9'd155: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd156: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd157: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd158: uw = '{R_CAR, W_X1, A_NONE, U_INC, 9'd0};  // rcar wx1
      9'd159: uw = '{R_E, W_MAR, A_NONE, U_INC, 9'd0};  // re wmar
      9'd160: uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd161: uw = '{R_X1, W_BUF1, A_REPLCAR, U_INC, 9'd0};  // rx1 wbuf1 replcar
      9'd162: uw = '{R_BUF1, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf1 wmem
      9'd163: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd164: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd165: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd166: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd167: uw = '{R_CAR, W_C, A_NONE, U_INC, 9'd0};  // rcar wc
      9'd168: uw = '{R_NIL, W_S, A_NONE, U_JUMP, 9'd42};  // rnil ws jump TOP
      9'd169: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_SEL: rc wmar
      9'd170: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd171: uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd172: uw = '{R_X1, W_MAR, A_NONE, U_INC, 9'd0};  // rx1 wmar
      9'd173: uw = '{R_MEM, W_X1, A_NONE, U_INC, 9'd0};  // rmem wx1
      9'd174: uw = '{R_D, W_X2, A_NONE, U_CALL, 9'd271};  // rd wx2 call CONS
      9'd175: uw = '{R_MAR, W_D, A_NONE, U_INC, 9'd0};  // rmar wd
      9'd176: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd177: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd178: uw = '{R_CAR, W_ARG, A_NONE, U_INC, 9'd0};  // rcar warg
      9'd179: uw = '{R_MEM, W_S, A_NONE, U_JTRUE, 9'd185};  // rmem ws jtrue SELT
      9'd180: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // rc wmar
      9'd181: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd182: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd183: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd184: uw = '{R_CAR, W_C, A_NONE, U_JUMP, 9'd42};  // rcar wc jump TOP
      9'd185: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // SELT: rc wmar
      9'd186: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd187: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd188: uw = '{R_CAR, W_C, A_NONE, U_JUMP, 9'd42};  // rcar wc jump TOP
      9'd189: uw = '{R_D, W_MAR, A_NONE, U_INC, 9'd0};  // I_JOIN: rd wmar
      9'd190: uw = '{R_MEM, W_D, A_NONE, U_INC, 9'd0};  // rmem wd
      9'd191: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd192: uw = '{R_CAR, W_C, A_NONE, U_JUMP, 9'd42};  // rcar wc jump TOP
      9'd193: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_CAR: rc wmar
      9'd194: uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd195: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd196: uw = '{R_MEM, W_X2, A_NONE, U_INC, 9'd0};  // rmem wx2
      9'd197: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd198: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd199: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd200: uw = '{R_CAR, W_X1, A_NONE, U_CALL, 9'd271};  // rcar wx1 call CONS
      9'd201: uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd202: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_CDR: rc wmar
      9'd203: uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd204: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd205: uw = '{R_MEM, W_X2, A_NONE, U_INC, 9'd0};  // rmem wx2
      9'd206: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd207: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd208: uw = '{R_MEM, W_X1, A_NONE, U_CALL, 9'd271};  // rmem wx1 call CONS
      9'd209: uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd210: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_ATOM: rc wmar
      9'd211: uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd212: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd213: uw = '{R_MEM, W_X2, A_NONE, U_INC, 9'd0};  // rmem wx2
      9'd214: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd215: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd216: uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd217: uw = '{R_NONE, W_NONE, A_NONE, U_JATOM, 9'd263};  // jatom PUSHT
      9'd218: uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd265};  // jump PUSHF
      9'd219: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // I_CONS: rc wmar
      9'd220: uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd221: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd222: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd223: uw = '{R_CAR, W_X1, A_NONE, U_INC, 9'd0};  // rcar wx1
      9'd224: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd225: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd226: uw = '{R_CAR, W_X2, A_NONE, U_CALL, 9'd271};  // rcar wx2 call CONS
      9'd227: uw = '{R_MAR, W_X1, A_NONE, U_INC, 9'd0};  // rmar wx1
      9'd228: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd229: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd230: uw = '{R_MEM, W_X2, A_NONE, U_CALL, 9'd271};  // rmem wx2 call CONS
      9'd231: uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd232: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd252};  // I_EQ: call BIN
      9'd233: uw = '{R_MEM, W_NONE, A_NONE, U_JEQ, 9'd263};  // rmem jeq PUSHT
      9'd234: uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd265};  // jump PUSHF
      9'd235: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd252};  // I_LEQ: call BIN
      9'd236: uw = '{R_MEM, W_NONE, A_NONE, U_JLEQ, 9'd263};  // rmem jleq PUSHT
      9'd237: uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd265};  // jump PUSHF
      9'd238: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd252};  // I_ADD: call BIN
      9'd239: uw = '{R_MEM, W_BUF1, A_ADD, U_JUMP, 9'd267};  // rmem wbuf1 add jump PUSHNUM
      9'd240: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd252};  // I_SUB: call BIN
      9'd241: uw = '{R_MEM, W_BUF1, A_SUB, U_JUMP, 9'd267};  // rmem wbuf1 sub jump PUSHNUM
      9'd242: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd252};  // I_MUL: call BIN
      9'd243: uw = '{R_MEM, W_BUF1, A_MUL, U_JUMP, 9'd267};  // rmem wbuf1 mul jump PUSHNUM
      9'd244: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd252};  // I_DIV: call BIN
      9'd245: uw = '{R_MEM, W_BUF1, A_DIV, U_JUMP, 9'd267};  // rmem wbuf1 div jump PUSHNUM
      9'd246: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd252};  // I_REM: call BIN
      9'd247: uw = '{R_MEM, W_BUF1, A_REM, U_JUMP, 9'd267};  // rmem wbuf1 rem jump PUSHNUM
      9'd248: uw = '{R_S, W_X1, A_NONE, U_INC, 9'd0};  // I_STOP: rs wx1
      9'd249: uw = '{R_NIL, W_X2, A_NONE, U_INC, 9'd0};  // rnil wx2
      9'd250: uw = '{R_NUM, W_MAR, A_NONE, U_INC, 9'd0};  // rnum wmar
      9'd251: uw = '{R_CONS, W_MEM, A_NONE, U_JUMP, 9'd22};  // rcons wmem jump IDLE
      9'd252: uw = '{R_C, W_MAR, A_NONE, U_INC, 9'd0};  // BIN: rc wmar
      9'd253: uw = '{R_MEM, W_C, A_NONE, U_INC, 9'd0};  // rmem wc
      9'd254: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd255: uw = '{R_MEM, W_MAR, A_NONE, U_INC, 9'd0};  // rmem wmar
      9'd256: uw = '{R_MEM, W_X2, A_NONE, U_INC, 9'd0};  // rmem wx2
      9'd257: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd258: uw = '{R_CAR, W_MAR, A_NONE, U_INC, 9'd0};  // rcar wmar
      9'd259: uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd260: uw = '{R_S, W_MAR, A_NONE, U_INC, 9'd0};  // rs wmar
      9'd261: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd262: uw = '{R_CAR, W_MAR, A_NONE, U_RET, 9'd0};  // rcar wmar ret
      9'd263: uw = '{R_TRUE, W_X1, A_NONE, U_CALL, 9'd271};  // PUSHT: rtrue wx1 call CONS
      9'd264: uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd265: uw = '{R_FALSE, W_X1, A_NONE, U_CALL, 9'd271};  // PUSHF: rfalse wx1 call CONS
      9'd266: uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd267: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd273};  // PUSHNUM: call ALLOC
      9'd268: uw = '{R_BUF1, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf1 wmem
      9'd269: uw = '{R_MAR, W_X1, A_NONE, U_CALL, 9'd271};  // rmar wx1 call CONS
      9'd270: uw = '{R_MAR, W_S, A_NONE, U_JUMP, 9'd42};  // rmar ws jump TOP
      9'd271: uw = '{R_NONE, W_NONE, A_NONE, U_CALL, 9'd273};  // CONS: call ALLOC
      9'd272: uw = '{R_CONS, W_MEM, A_NONE, U_RET, 9'd0};  // rcons wmem ret
      9'd273: uw = '{R_FREE, W_ARG, A_NONE, U_INC, 9'd0};  // ALLOC: rfree warg
      9'd274: uw = '{R_NONE, W_NONE, A_NONE, U_JNIL, 9'd277};  // jnil GC
      9'd275: uw = '{R_FREE, W_MAR, A_NONE, U_INC, 9'd0};  // ALLOC2: rfree wmar
      9'd276: uw = '{R_MEM, W_FREE, A_NONE, U_RET, 9'd0};  // rmem wfree ret
      9'd277: uw = '{R_S, W_ROOT, A_NONE, U_CALL, 9'd301};  // GC: rs wroot call MARK
      9'd278: uw = '{R_E, W_ROOT, A_NONE, U_CALL, 9'd301};  // re wroot call MARK
      9'd279: uw = '{R_C, W_ROOT, A_NONE, U_CALL, 9'd301};  // rc wroot call MARK
      9'd280: uw = '{R_D, W_ROOT, A_NONE, U_CALL, 9'd301};  // rd wroot call MARK
      9'd281: uw = '{R_X1, W_ROOT, A_NONE, U_CALL, 9'd301};  // rx1 wroot call MARK
      9'd282: uw = '{R_X2, W_ROOT, A_NONE, U_CALL, 9'd301};  // rx2 wroot call MARK
      9'd283: uw = '{R_NUM, W_ARG, A_NONE, U_INC, 9'd0};  // rnum warg
      9'd284: uw = '{R_ALU, W_MAR, A_DEC, U_INC, 9'd0};  // SWL: ralu wmar dec
      9'd285: uw = '{R_MAR, W_ARG, A_NONE, U_INC, 9'd0};  // rmar warg
      9'd286: uw = '{R_FALSE, W_NONE, A_NONE, U_JLEQ, 9'd298};  // rfalse jleq SWDONE
      9'd287: uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd288: uw = '{R_NONE, W_NONE, A_NONE, U_JMARK, 9'd293};  // jmark SWMK
      9'd289: uw = '{R_FREE, W_BUF2, A_REPLCDR, U_INC, 9'd0};  // rfree wbuf2 replcdr
      9'd290: uw = '{R_BUF2, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf2 wmem
      9'd291: uw = '{R_MAR, W_FREE, A_NONE, U_INC, 9'd0};  // rmar wfree
      9'd292: uw = '{R_MAR, W_ARG, A_NONE, U_JUMP, 9'd284};  // rmar warg jump SWL
      9'd293: uw = '{R_NONE, W_BUF2, A_CLRM, U_INC, 9'd0};  // SWMK: wbuf2 clrm
      9'd294: uw = '{R_BUF2, W_ARG, A_NONE, U_INC, 9'd0};  // rbuf2 warg
      9'd295: uw = '{R_NONE, W_BUF2, A_CLRF, U_INC, 9'd0};  // wbuf2 clrf
      9'd296: uw = '{R_BUF2, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf2 wmem
      9'd297: uw = '{R_MAR, W_ARG, A_NONE, U_JUMP, 9'd284};  // rmar warg jump SWL
      9'd298: uw = '{R_FREE, W_ARG, A_NONE, U_INC, 9'd0};  // SWDONE: rfree warg
      9'd299: uw = '{R_NONE, W_NONE, A_NONE, U_JNIL, 9'd24};  // jnil ERR1
      9'd300: uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd275};  // jump ALLOC2
      9'd301: uw = '{R_NIL, W_PARENT, A_NONE, U_INC, 9'd0};  // MARK: rnil wparent
      9'd302: uw = '{R_ROOT, W_MAR, A_NONE, U_INC, 9'd0};  // DESC: rroot wmar
      9'd303: uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd304: uw = '{R_NONE, W_NONE, A_NONE, U_JMARK, 9'd317};  // jmark RETR
      9'd305: uw = '{R_NONE, W_BUF2, A_SETM, U_INC, 9'd0};  // wbuf2 setm
      9'd306: uw = '{R_BUF2, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf2 wmem
      9'd307: uw = '{R_NONE, W_NONE, A_NONE, U_JATOM, 9'd317};  // jatom RETR
      9'd308: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd309: uw = '{R_CAR, W_Y1, A_NONE, U_INC, 9'd0};  // rcar wy1
      9'd310: uw = '{R_BUF2, W_ARG, A_NONE, U_INC, 9'd0};  // rbuf2 warg
      9'd311: uw = '{R_NONE, W_BUF2, A_CLRF, U_INC, 9'd0};  // wbuf2 clrf
      9'd312: uw = '{R_BUF2, W_ARG, A_NONE, U_INC, 9'd0};  // rbuf2 warg
      9'd313: uw = '{R_PARENT, W_BUF2, A_REPLCAR, U_INC, 9'd0};  // rparent wbuf2 replcar
      9'd314: uw = '{R_BUF2, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf2 wmem
      9'd315: uw = '{R_ROOT, W_PARENT, A_NONE, U_INC, 9'd0};  // rroot wparent
      9'd316: uw = '{R_Y1, W_ROOT, A_NONE, U_JUMP, 9'd302};  // ry1 wroot jump DESC
      9'd317: uw = '{R_PARENT, W_ARG, A_NONE, U_INC, 9'd0};  // RETR: rparent warg
      9'd318: uw = '{R_NONE, W_NONE, A_NONE, U_JNIL, 9'd337};  // jnil MRET
      9'd319: uw = '{R_PARENT, W_MAR, A_NONE, U_INC, 9'd0};  // rparent wmar
      9'd320: uw = '{R_MEM, W_ARG, A_NONE, U_INC, 9'd0};  // rmem warg
      9'd321: uw = '{R_NONE, W_NONE, A_NONE, U_JFIELD, 9'd332};  // jfield RCDR
      9'd322: uw = '{R_MEM, W_CAR, A_NONE, U_INC, 9'd0};  // rmem wcar
      9'd323: uw = '{R_CAR, W_Y1, A_NONE, U_INC, 9'd0};  // rcar wy1
      9'd324: uw = '{R_MEM, W_Y2, A_NONE, U_INC, 9'd0};  // rmem wy2
      9'd325: uw = '{R_ROOT, W_BUF2, A_REPLCAR, U_INC, 9'd0};  // rroot wbuf2 replcar
      9'd326: uw = '{R_BUF2, W_ARG, A_NONE, U_INC, 9'd0};  // rbuf2 warg
      9'd327: uw = '{R_Y1, W_BUF2, A_REPLCDR, U_INC, 9'd0};  // ry1 wbuf2 replcdr
      9'd328: uw = '{R_BUF2, W_ARG, A_NONE, U_INC, 9'd0};  // rbuf2 warg
      9'd329: uw = '{R_NONE, W_BUF2, A_SETF, U_INC, 9'd0};  // wbuf2 setf
      9'd330: uw = '{R_BUF2, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf2 wmem
      9'd331: uw = '{R_Y2, W_ROOT, A_NONE, U_JUMP, 9'd302};  // ry2 wroot jump DESC
      9'd332: uw = '{R_MEM, W_Y1, A_NONE, U_INC, 9'd0};  // RCDR: rmem wy1
      9'd333: uw = '{R_ROOT, W_BUF2, A_REPLCDR, U_INC, 9'd0};  // rroot wbuf2 replcdr
      9'd334: uw = '{R_BUF2, W_MEM, A_NONE, U_INC, 9'd0};  // rbuf2 wmem
      9'd335: uw = '{R_PARENT, W_ROOT, A_NONE, U_INC, 9'd0};  // rparent wroot
      9'd336: uw = '{R_Y1, W_PARENT, A_NONE, U_JUMP, 9'd317};  // ry1 wparent jump RETR
      9'd337: uw = '{R_NONE, W_NONE, A_NONE, U_RET, 9'd0};  // MRET: ret
      default: uw = '{R_NONE, W_NONE, A_NONE, U_JUMP, 9'd24};
    endcase
  end

endmodule
