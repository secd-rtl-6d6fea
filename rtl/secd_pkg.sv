// secd_pkg -- types and constants shared by the SECD chip.
//
// A memory word (a "record") is 32 bits: two garbage-collector bits (mark,
// field), two type bits, and a 28-bit body that is either a number, a symbol
// id, or two 14-bit pointers (car in bits 27:14, cdr in bits 13:0).  This
// layout and the 14-bit pointer follow the design description.  The type-bit
// encoding, the addresses of the three built-in symbols and the address of the
// reserved problem/result cell are this design's own choices.
//
// The microinstruction is 27 bits: a 5-bit read field, a 5-bit write field, a
// 4-bit alu field, a 4-bit test field and a 9-bit address.  The field widths
// come from the counts the description gives (23 read lines, 17 write lines,
// 12 alu operations, 13 next-address methods, about 400 microwords); the code
// assignments inside each field are this design's own.
package secd_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned PTR_W  = 14;
  localparam int unsigned UADDR_W = 9;

  typedef logic [PTR_W-1:0]  ptr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [UADDR_W-1:0] uaddr_t;

  // Record type bits (bits 29:28).
  typedef enum logic [1:0] {
    T_CONS   = 2'b00,
    T_INT    = 2'b01,
    T_SYMBOL = 2'b10
  } rtype_e;

  typedef struct packed {
    logic       mark;   // bit 31
    logic       field;  // bit 30
    logic [1:0] rtype;  // bits 29:28
    ptr_t       car;    // bits 27:14
    ptr_t       cdr;    // bits 13:0
  } record_t;

  // Built-in symbol cells and the reserved cell used to pass the problem in
  // and the result out.  Memory holds 2**14 words; the sweep of the garbage
  // collector starts just below NUM and stops above FALSE.
  localparam ptr_t NIL_ADDR   = 14'd0;
  localparam ptr_t TRUE_ADDR  = 14'd1;
  localparam ptr_t FALSE_ADDR = 14'd2;
  localparam ptr_t NUM_ADDR   = 14'h3FFF;

  // SECD machine instruction codes (Henderson's numbering).  The code is also
  // the microcode address of the instruction's dispatch entry.
  localparam int unsigned OP_LD   = 1;
  localparam int unsigned OP_LDC  = 2;
  localparam int unsigned OP_LDF  = 3;
  localparam int unsigned OP_AP   = 4;
  localparam int unsigned OP_RTN  = 5;
  localparam int unsigned OP_DUM  = 6;
  localparam int unsigned OP_RAP  = 7;
  localparam int unsigned OP_SEL  = 8;
  localparam int unsigned OP_JOIN = 9;
  localparam int unsigned OP_CAR  = 10;
  localparam int unsigned OP_CDR  = 11;
  localparam int unsigned OP_ATOM = 12;
  localparam int unsigned OP_CONS = 13;
  localparam int unsigned OP_EQ   = 14;
  localparam int unsigned OP_ADD  = 15;
  localparam int unsigned OP_SUB  = 16;
  localparam int unsigned OP_MUL  = 17;
  localparam int unsigned OP_DIV  = 18;
  localparam int unsigned OP_REM  = 19;
  localparam int unsigned OP_LEQ  = 20;
  localparam int unsigned OP_STOP = 21;

  // ---------------------------------------------------------------- read field
  // 23 bus sources; code 0 drives nothing.
  typedef enum logic [4:0] {
    R_NONE, R_MEM, R_MAR, R_NUM, R_NIL, R_TRUE, R_FALSE,
    R_S, R_E, R_C, R_D, R_X1, R_X2, R_CONS, R_CAR, R_FREE,
    R_PARENT, R_ROOT, R_Y1, R_Y2, R_ARG, R_ALU, R_BUF1, R_BUF2
  } rd_e;
  localparam int unsigned N_RD = 23;

  // --------------------------------------------------------------- write field
  // 17 destinations; code 0 writes nothing.
  typedef enum logic [4:0] {
    W_NONE, W_MEM, W_MAR, W_S, W_E, W_C, W_D, W_X1, W_X2, W_CAR,
    W_FREE, W_PARENT, W_ROOT, W_Y1, W_Y2, W_ARG, W_BUF1, W_BUF2
  } wr_e;
  localparam int unsigned N_WR = 17;

  // ----------------------------------------------------------------- alu field
  // 12 operations; code 0 is no operation.
  typedef enum logic [3:0] {
    A_NONE, A_ADD, A_SUB, A_MUL, A_DIV, A_REM, A_DEC,
    A_SETM, A_CLRM, A_SETF, A_CLRF, A_REPLCAR, A_REPLCDR
  } alu_e;
  localparam int unsigned N_ALU = 12;

  // ---------------------------------------------------------------- test field
  // 13 ways of choosing the next microaddress.  Conditional jumps go to the
  // address field when the condition holds and to the next word otherwise.
  typedef enum logic [3:0] {
    U_INC, U_JUMP, U_CALL, U_RET, U_DISPATCH,
    U_JBUTTON, U_JATOM, U_JEQ, U_JLEQ, U_JNIL, U_JTRUE, U_JMARK, U_JFIELD
  } test_e;

  typedef struct packed {
    rd_e    rd;
    wr_e    wr;
    alu_e   alu;
    test_e  test;
    uaddr_t addr;
  } uinstr_t;

  // Flags from the datapath, in the order of the bits of flags_t.
  typedef struct packed {
    logic field;
    logic mark;
    logic is_true;
    logic is_nil;
    logic leq;
    logic eq;
    logic atom;
  } flags_t;

  // Source of the next microaddress (the 4x1 multiplexer in front of nextmpc).
  typedef enum logic [1:0] {
    NX_INC   = 2'd0,  // mpc + 1
    NX_A     = 2'd1,  // address field of the microinstruction
    NX_OP    = 2'd2,  // SECD instruction code
    NX_STACK = 2'd3   // top of the microcode subroutine stack
  } nxsel_e;

  // Major state of the top-level state machine, shown on two output pins.
  typedef enum logic [1:0] {
    MS_IDLE   = 2'd0,
    MS_ERROR1 = 2'd1,
    MS_ERROR2 = 2'd2,
    MS_RUN    = 2'd3
  } mstate_e;

  // Discrete control lines after decoding (the bundle that crosses the shift
  // register block from control unit to datapath).  Bit i of rd is read code
  // i+1, and likewise for wr and alu.
  typedef struct packed {
    logic [N_RD-1:0]  rd;
    logic [N_WR-1:0]  wr;
    logic [N_ALU-1:0] alu;
  } ctl_t;

  // Control of the mpc unit from the test PLA.
  typedef struct packed {
    nxsel_e sel;
    logic   push;
    logic   pop;
  } seq_t;

  function automatic logic [N_RD-1:0] rd_line(rd_e r);
    rd_line = '0;
    if (r != R_NONE) rd_line[int'(r) - 1] = 1'b1;
  endfunction

  function automatic logic [N_WR-1:0] wr_line(wr_e w);
    wr_line = '0;
    if (w != W_NONE) wr_line[int'(w) - 1] = 1'b1;
  endfunction

  function automatic logic [N_ALU-1:0] alu_line(alu_e a);
    alu_line = '0;
    if (a != A_NONE) alu_line[int'(a) - 1] = 1'b1;
  endfunction

endpackage
