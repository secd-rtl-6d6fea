// secd_ucode_pkg -- microcode addresses of the SECD control unit.
//
// Entry points of the microprogram held in secd_ucode_rom: the top-level
// state loops (idle, first and second error state), the start-up sequence, the
// instruction fetch at the top of the cycle, the shared subroutines and the
// garbage collector.  The state decode and the testbenches use them; the
// values must match the ROM contents.
package secd_ucode_pkg;

  localparam logic [8:0] UA_IDLE = 9'd22;
  localparam logic [8:0] UA_ERR1 = 9'd24;
  localparam logic [8:0] UA_ERR2 = 9'd26;
  localparam logic [8:0] UA_START = 9'd28;
  localparam logic [8:0] UA_TOP = 9'd42;
  localparam logic [8:0] UA_BIN = 9'd252;
  localparam logic [8:0] UA_PUSHNUM = 9'd267;
  localparam logic [8:0] UA_CONS = 9'd271;
  localparam logic [8:0] UA_ALLOC = 9'd273;
  localparam logic [8:0] UA_GC = 9'd277;
  localparam logic [8:0] UA_SWL = 9'd284;
  localparam logic [8:0] UA_SWDONE = 9'd298;
  localparam logic [8:0] UA_MARK = 9'd301;
  localparam logic [8:0] UA_DESC = 9'd302;
  localparam logic [8:0] UA_RETR = 9'd317;
  localparam logic [8:0] UA_RCDR = 9'd332;
  localparam logic [8:0] UA_I_LD = 9'd46;
  localparam logic [8:0] UA_I_LDC = 9'd77;
  localparam logic [8:0] UA_I_LDF = 9'd84;
  localparam logic [8:0] UA_I_AP = 9'd93;
  localparam logic [8:0] UA_I_RTN = 9'd118;
  localparam logic [8:0] UA_I_DUM = 9'd135;
  localparam logic [8:0] UA_I_RAP = 9'd140;
  localparam logic [8:0] UA_I_SEL = 9'd169;
  localparam logic [8:0] UA_I_JOIN = 9'd189;
  localparam logic [8:0] UA_I_CAR = 9'd193;
  localparam logic [8:0] UA_I_CDR = 9'd202;
  localparam logic [8:0] UA_I_ATOM = 9'd210;
  localparam logic [8:0] UA_I_CONS = 9'd219;
  localparam logic [8:0] UA_I_EQ = 9'd232;
  localparam logic [8:0] UA_I_ADD = 9'd238;
  localparam logic [8:0] UA_I_SUB = 9'd240;
  localparam logic [8:0] UA_I_MUL = 9'd242;
  localparam logic [8:0] UA_I_DIV = 9'd244;
  localparam logic [8:0] UA_I_REM = 9'd246;
  localparam logic [8:0] UA_I_LEQ = 9'd235;
  localparam logic [8:0] UA_I_STOP = 9'd248;
  localparam int unsigned UCODE_WORDS = 338;

endpackage
