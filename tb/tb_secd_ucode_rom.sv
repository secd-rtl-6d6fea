// tb_secd_ucode_rom -- self-checking test of the microcode store.
//
// Reads every address and checks the rules the microprogram must keep:
//   - address 0 jumps to the idle loop; addresses 1..21 jump to the routine of
//     the instruction with that code (dispatch by instruction code);
//   - the idle and error loops follow the top-level state diagram: idle waits
//     for button, error 1 moves to error 2 on button, error 2 returns to idle
//     when button is released;
//   - the fourth word of the fetch sequence loads ARG from memory and
//     dispatches; the allocator tests for an empty free list;
//   - BUF1/BUF2 are only written together with an alu operation, and the alu
//     result is only read onto the bus with an operation selected;
//   - every jump or call target lies inside the program, unused addresses
//     jump to error 1, and field codes are in range.
`timescale 1ns/1ps
module tb_secd_ucode_rom;
  import secd_pkg::*;
  import secd_ucode_pkg::*;

  uaddr_t addr;
  uinstr_t uw;
  int checks = 0, failures = 0;

  secd_ucode_rom dut (.addr, .uw);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd_at(input int a, output uinstr_t w);
    addr = 9'(a);
    #1;
    w = uw;
  endtask

  uaddr_t entry [22];

  initial begin
    uinstr_t w;
    entry = '{0, UA_I_LD, UA_I_LDC, UA_I_LDF, UA_I_AP, UA_I_RTN, UA_I_DUM, UA_I_RAP, UA_I_SEL,
              UA_I_JOIN, UA_I_CAR, UA_I_CDR, UA_I_ATOM, UA_I_CONS, UA_I_EQ, UA_I_ADD, UA_I_SUB,
              UA_I_MUL, UA_I_DIV, UA_I_REM, UA_I_LEQ, UA_I_STOP};
    rd_at(0, w);
    check(w.test == U_JUMP && w.addr == UA_IDLE, "reset word jumps to idle");
    for (int op = 1; op <= 21; op++) begin
      rd_at(op, w);
      check(w.test == U_JUMP && w.addr == entry[op] && w.rd == R_NONE && w.wr == W_NONE,
            $sformatf("dispatch entry %0d", op));
    end
    rd_at(UA_IDLE, w);     check(w.test == U_JBUTTON && w.addr == UA_START, "idle waits for button");
    rd_at(UA_IDLE + 1, w); check(w.test == U_JUMP && w.addr == UA_IDLE, "idle loops");
    rd_at(UA_ERR1, w);     check(w.test == U_JBUTTON && w.addr == UA_ERR2, "error 1 -> error 2 on button");
    rd_at(UA_ERR1 + 1, w); check(w.test == U_JUMP && w.addr == UA_ERR1, "error 1 loops");
    rd_at(UA_ERR2, w);     check(w.test == U_JBUTTON && w.addr == UA_ERR2, "error 2 holds on button");
    rd_at(UA_ERR2 + 1, w); check(w.test == U_JUMP && w.addr == UA_IDLE, "error 2 -> idle");
    rd_at(UA_TOP + 3, w);  check(w.rd == R_MEM && w.wr == W_ARG && w.test == U_DISPATCH, "fetch dispatches");
    rd_at(UA_ALLOC, w);    check(w.rd == R_FREE && w.wr == W_ARG, "allocator reads free");
    rd_at(UA_ALLOC + 1, w); check(w.test == U_JNIL && w.addr == UA_GC, "empty free list starts collection");
    rd_at(UA_CONS, w);     check(w.test == U_CALL && w.addr == UA_ALLOC, "cons allocates");
    rd_at(UA_CONS + 1, w); check(w.rd == R_CONS && w.wr == W_MEM && w.test == U_RET, "cons writes the record");
    for (int a = 0; a < 512; a++) begin
      rd_at(a, w);
      if (a >= int'(UCODE_WORDS)) begin
        check(w.test == U_JUMP && w.addr == UA_ERR1, $sformatf("unused word %0d", a));
        continue;
      end
      check(int'(w.rd) <= N_RD && int'(w.wr) <= N_WR && int'(w.alu) <= N_ALU && int'(w.test) <= 12,
            $sformatf("field ranges at %0d", a));
      if (w.wr == W_BUF1 || w.wr == W_BUF2) check(w.alu != A_NONE, $sformatf("buffer write without alu at %0d", a));
      if (w.rd == R_ALU) check(w.alu != A_NONE, $sformatf("alu read without operation at %0d", a));
      if (w.test inside {U_JUMP, U_CALL, U_JBUTTON, U_JATOM, U_JEQ, U_JLEQ, U_JNIL, U_JTRUE, U_JMARK, U_JFIELD})
        check(w.addr < 9'(UCODE_WORDS) && w.addr != 0, $sformatf("target at %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
