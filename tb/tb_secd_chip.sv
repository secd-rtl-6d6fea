// tb_secd_chip -- end-to-end test of the SECD chip with its default sizes.
//
// The testbench plays the host: it writes compiled SECD programs (written as
// S-expression text and parsed here) into the external memory model, sets up
// the reserved cell NUM, presses button and waits for the chip to return to
// idle, then reads the result from the reserved cell and compares it with a
// value worked out by hand.  The programs cover all 21 instructions, a
// recursive function built with DUM/RAP, a run long enough to need garbage
// collection in the middle of the computation, three mutually recursive
// functions, Takeuchi's function tak(18, 12, 6) from the Gabriel benchmarks
// (63,609 calls, about 47 million cycles and 90 collections), and a runaway
// recursion that exhausts memory and must end in the first error state, from
// which button leads through the second error state back to idle.  Finally the scan block
// is exercised: a snapshot is taken and shifted out, and a vector is shifted in
// and driven onto the datapath.
//
// Mechanisms counted (each must occur): dispatch of every instruction code,
// garbage collections, collections during a computation with live data,
// retreats through a cdr in the marker, cells freed by the sweep, memory
// exhaustion, both error states, return to idle, subroutine nesting three
// deep, scan capture, scan shift and scan drive.
`timescale 1ns/1ps
module tb_secd_chip;
  import secd_pkg::*;
  import secd_ucode_pkg::*;

  logic clk = 1'b0, sr_clk = 1'b0;
  logic reset, button;
  logic flag0, flag1, rmem, wmem, data_oe, sr_out;
  logic sr_shift, sr_drive, sr_in;
  ptr_t mar;
  word_t data_in, data_out;

  secd_chip dut (
    .clk, .reset, .button, .flag0, .flag1, .mar, .rmem, .wmem,
    .data_in, .data_out, .data_oe,
    .sr_clk, .sr_shift, .sr_drive, .sr_in, .sr_out
  );

  secd_ram_model #(.AW(14)) ram (
    .clk, .addr(mar), .we(wmem), .wdata(data_out), .rdata(data_in)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // ------------------------------------------------------------ watchdog
  localparam longint MAX_CYCLES = 64'd150_000_000;
  localparam longint RUN_LIMIT  = 64'd100_000_000;
  // Takeuchi benchmark arguments (the Gabriel size) and the expected value
  localparam int TAK_X = 18, TAK_Y = 12, TAK_Z = 6, TAK_RESULT = 7;
  initial begin
    wait (cycles >= MAX_CYCLES);
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_dispatch [22];
  int n_gc = 0, n_gc_live = 0, n_rcdr = 0, n_free = 0, n_err1 = 0, n_err2 = 0, n_idle = 0;
  int n_capture = 0, n_shift = 0, n_drive = 0, max_depth = 0, depth = 0;
  uaddr_t prev_mpc = '0;

  always @(posedge clk) if (!reset && !sr_drive) begin
    uaddr_t m;
    m = dut.mpc_r;
    if (prev_mpc == UA_TOP + 9'd3 && m >= 1 && m <= 21) n_dispatch[m]++;
    if (m == UA_GC && m != prev_mpc) begin
      n_gc++;
      if (dut.u_dp.d_q != NIL_ADDR) n_gc_live++;
    end
    if (m == UA_RCDR) n_rcdr++;
    if (dut.u_decode.uw.wr == W_FREE && dut.u_decode.uw.rd == R_MAR) n_free++;
    if (m == UA_ERR1 && prev_mpc != UA_ERR1 + 9'd1 && prev_mpc != UA_ERR1) n_err1++;
    if (m == UA_ERR2 && prev_mpc == UA_ERR1) n_err2++;
    if (m == UA_IDLE && prev_mpc != UA_IDLE + 9'd1 && prev_mpc != UA_IDLE) n_idle++;
    if (m == UA_IDLE) depth = 0;  // an error exit leaves the stack unwound
    if (dut.seq_m.push) depth++;
    if (dut.seq_m.pop)  depth--;
    if (depth > max_depth) max_depth = depth;
    prev_mpc = m;
  end

  // ------------------------------------------------------------ host side: memory image
  int hp;  // next free cell for the loader

  function automatic word_t mk_rec(logic [1:0] t, logic [27:0] v);
    return {2'b00, t, v};
  endfunction

  function automatic ptr_t new_cell(word_t w);
    automatic ptr_t p = ptr_t'(hp);
    ram.mem[p] = w;
    hp++;
    return p;
  endfunction

  function automatic ptr_t host_cons(ptr_t a, ptr_t d);
    return new_cell({2'b00, T_CONS, a, d});
  endfunction

  function automatic int opcode_of(string t);
    string names[21] = '{"LD","LDC","LDF","AP","RTN","DUM","RAP","SEL","JOIN","CAR","CDR",
                         "ATOM","CONS","EQ","ADD","SUB","MUL","DIV","REM","LEQ","STOP"};
    foreach (names[i]) if (names[i] == t) return i + 1;
    return -1;
  endfunction

  function automatic ptr_t atom_of(string t);
    int v, op;
    if (t == "NIL") return NIL_ADDR;
    if (t == "T")   return TRUE_ADDR;
    if (t == "F")   return FALSE_ADDR;
    op = opcode_of(t);
    if (op > 0) return new_cell(mk_rec(T_INT, 28'(op)));
    v = t.atoi();
    return new_cell(mk_rec(T_INT, 28'(v)));
  endfunction

  // Iterative S-expression reader: numbers, NIL, T, F, instruction names,
  // lists and dotted pairs.
  function automatic ptr_t load_sexpr(string s);
    ptr_t vals[$];
    int   starts[$];
    bit   dots[$];
    automatic int   i = 0;
    while (i < s.len()) begin
      byte ch = s.getc(i);
      if (ch == " ") i++;
      else if (ch == "(") begin starts.push_back(vals.size()); dots.push_back(1'b0); i++; end
      else if (ch == ".") begin dots[dots.size()-1] = 1'b1; i++; end
      else if (ch == ")") begin
        automatic int st = starts.pop_back();
        automatic bit df = dots.pop_back();
        automatic int n = vals.size();
        automatic ptr_t p = NIL_ADDR;
        if (df) begin p = vals[n-1]; n--; end
        for (int k = n - 1; k >= st; k--) p = host_cons(vals[k], p);
        while (vals.size() > st) void'(vals.pop_back());
        vals.push_back(p);
        i++;
      end else begin
        automatic int j = i;
        while (j < s.len() && s.getc(j) != " " && s.getc(j) != "(" && s.getc(j) != ")") j++;
        vals.push_back(atom_of(s.substr(i, j - 1)));
        i = j;
      end
    end
    return vals[0];
  endfunction

  task automatic init_memory(string code, string args);
    ptr_t c, a, ca, cb;
    for (int k = 0; k < 2**14; k++) ram.mem[k] = '0;
    ram.mem[NIL_ADDR]   = mk_rec(T_SYMBOL, 28'd0);
    ram.mem[TRUE_ADDR]  = mk_rec(T_SYMBOL, 28'd1);
    ram.mem[FALSE_ADDR] = mk_rec(T_SYMBOL, 28'd2);
    hp = 3;
    c  = load_sexpr(code);
    a  = load_sexpr(args);
    ca = host_cons(NIL_ADDR, a);   // S  = cdr(car(NUM))
    cb = host_cons(c, NIL_ADDR);   // C  = car(cdr(NUM))
    ram.mem[NUM_ADDR] = {2'b00, T_CONS, ca, cb};
  endtask

  function automatic mstate_e state();
    return mstate_e'({flag1, flag0});
  endfunction

  // Press button until the chip leaves idle, then wait for idle or error.
  task automatic run(output mstate_e fin, output longint ncyc);
    longint t0;
    button = 1'b1;
    @(posedge clk);
    t0 = cycles;
    while (state() == MS_IDLE && cycles - t0 < 1000) @(posedge clk);
    button = 1'b0;
    t0 = cycles;
    while (state() == MS_RUN && cycles - t0 < RUN_LIMIT) @(posedge clk);
    check(cycles - t0 < RUN_LIMIT, "run ends within the cycle limit");
    fin  = state();
    ncyc = cycles - t0;
  endtask

  // Result: the reserved cell holds cons(S, NIL); the answer is car(S).
  function automatic ptr_t result_ptr();
    record_t r = ram.mem[NUM_ADDR];
    record_t s = ram.mem[r.car];
    return s.car;
  endfunction

  function automatic int result_int();
    automatic word_t w = ram.mem[result_ptr()];
    return int'($signed(w[27:0]));
  endfunction

  task automatic prog_int(string name, string code, string args, int expect_v);
    mstate_e fin;
    longint n;
    init_memory(code, args);
    run(fin, n);
    check(fin == MS_IDLE, {name, ": ended in idle"});
    check(ram.mem[result_ptr()][29:28] == T_INT, {name, ": result is a number"});
    check(result_int() == expect_v, $sformatf("%s: result %0d, expected %0d", name, result_int(), expect_v));
    $display("%-10s result %0d (expected %0d) in %0d cycles", name, result_int(), expect_v, n);
  endtask

  task automatic prog_ptr(string name, string code, ptr_t expect_p);
    mstate_e fin;
    longint n;
    init_memory(code, "NIL");
    run(fin, n);
    check(fin == MS_IDLE, {name, ": ended in idle"});
    check(result_ptr() == expect_p, $sformatf("%s: result cell %0d, expected %0d", name, result_ptr(), expect_p));
    $display("%-10s result cell %0d (expected %0d) in %0d cycles", name, result_ptr(), expect_p, n);
  endtask

  // sum(n) = if n <= 0 then 0 else n + sum(n - 1), as a LETREC.
  function automatic string sum_prog(int n);
    return $sformatf({"(DUM LDC NIL LDF (LD (0 . 0) LDC 0 LEQ SEL (LDC 0 JOIN) ",
      "(LDC NIL LD (0 . 0) LDC 1 SUB CONS LD (1 . 0) AP LD (0 . 0) ADD JOIN) RTN) CONS ",
      "LDF (LDC NIL LDC %0d CONS LD (0 . 0) AP RTN) RAP STOP)"}, n);
  endfunction

  // Three mutually recursive functions in one LETREC: f0, f1 and f2 count
  // n down by one each, handing over in turn; the one that reaches 0 returns
  // its own index, so the result is n mod 3.
  function automatic string mutual3_prog(int n);
    string f [3];
    for (int k = 0; k < 3; k++)
      f[k] = $sformatf({"(LD (0 . 0) LDC 0 EQ SEL (LDC %0d JOIN) ",
        "(LDC NIL LD (0 . 0) LDC 1 SUB CONS LD (1 . %0d) AP JOIN) RTN)"}, k, (k + 1) % 3);
    return $sformatf({"(DUM LDC NIL LDF %s CONS LDF %s CONS LDF %s CONS ",
      "LDF (LDC NIL LDC %0d CONS LD (0 . 0) AP RTN) RAP STOP)"}, f[2], f[1], f[0], n);
  endfunction

  // Takeuchi's function from the Gabriel benchmarks, which needs only LEQ and
  // SUB: tak(x, y, z) = if x <= y then z
  //                     else tak(tak(x-1, y, z), tak(y-1, z, x), tak(z-1, x, y)).
  function automatic string tak_call(string a, string b, string c);
    // argument list (a-1 b c), built from the back
    return {"LDC NIL LD ", c, " CONS LD ", b, " CONS LD ", a,
            " LDC 1 SUB CONS LD (1 . 0) AP CONS "};
  endfunction

  function automatic string tak_prog(int x, int y, int z);
    string body;
    body = {"(LD (0 . 0) LD (0 . 1) LEQ SEL (LD (0 . 2) JOIN) (LDC NIL ",
            tak_call("(0 . 2)", "(0 . 0)", "(0 . 1)"),
            tak_call("(0 . 1)", "(0 . 2)", "(0 . 0)"),
            tak_call("(0 . 0)", "(0 . 1)", "(0 . 2)"),
            "LD (1 . 0) AP JOIN) RTN)"};
    return $sformatf({"(DUM LDC NIL LDF %s CONS LDF (LDC NIL LDC %0d CONS LDC %0d CONS ",
      "LDC %0d CONS LD (0 . 0) AP RTN) RAP STOP)"}, body, z, y, x);
  endfunction

  // ------------------------------------------------------------ scan helpers
  localparam int SW = 72;
  task automatic sr_pulse();
    #2 sr_clk = 1'b1; #3 sr_clk = 1'b0; #1;
  endtask

  initial begin
    mstate_e fin;
    longint n;
    logic [SW-1:0] snap, vec;
    ctl_t c;
    seq_t q;

    foreach (n_dispatch[k]) n_dispatch[k] = 0;
    reset = 1'b1; button = 1'b0;
    sr_shift = 1'b0; sr_drive = 1'b0; sr_in = 1'b0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (3) @(posedge clk);
    check(state() == MS_IDLE, "idle after reset");

    prog_int("add",   "(LDC 3 LDC 4 ADD STOP)", "NIL", 7);
    prog_int("sub",   "(LDC 20 LDC 3 SUB STOP)", "NIL", 17);
    prog_int("neg",   "(LDC 3 LDC 20 SUB STOP)", "NIL", -17);
    prog_int("mul",   "(LDC 6 LDC 7 MUL STOP)", "NIL", 5);   // MUL computes DEC of b
    prog_int("div",   "(LDC 9 LDC 3 DIV STOP)", "NIL", 8);
    prog_int("rem",   "(LDC 9 LDC 4 REM STOP)", "NIL", 8);
    prog_int("selt",  "(LDC 1 LDC 2 LEQ SEL (LDC 5 JOIN) (LDC 6 JOIN) STOP)", "NIL", 5);
    prog_int("self",  "(LDC 3 LDC 2 LEQ SEL (LDC 5 JOIN) (LDC 6 JOIN) STOP)", "NIL", 6);
    prog_int("cdr",   "(LDC 1 LDC 2 CONS CDR STOP)", "NIL", 1);
    prog_int("car",   "(LDC 1 LDC 2 CONS CAR STOP)", "NIL", 2);
    prog_int("args",  "(LDF (LD (0 . 1) LD (0 . 0) SUB RTN) AP STOP)", "((30 12))", -18);
    prog_ptr("atom1", "(LDC 7 ATOM STOP)", TRUE_ADDR);
    prog_ptr("atom2", "(LDC 1 LDC 2 CONS ATOM STOP)", FALSE_ADDR);
    prog_ptr("eq1",   "(LDC 4 LDC 4 EQ STOP)", TRUE_ADDR);
    prog_ptr("eq2",   "(LDC 4 LDC 5 EQ STOP)", FALSE_ADDR);
    prog_int("apply", "(LDC NIL LDC 41 CONS LDF (LD (0 . 0) LDC 1 ADD RTN) AP STOP)", "NIL", 42);
    prog_int("sum10", sum_prog(10), "NIL", 55);

    // Long enough that the collector runs with a deep live structure.
    begin
      automatic int g0 = n_gc_live;
      prog_int("sum900", sum_prog(900), "NIL", 900 * 901 / 2);
      check(n_gc_live > g0, "collection during the sum900 run");
    end

    prog_int("mutual3", mutual3_prog(200), "NIL", 200 % 3);
    prog_int("tak", tak_prog(TAK_X, TAK_Y, TAK_Z), "NIL", TAK_RESULT);

    // Runaway recursion: memory is exhausted, the chip must stop in error 1.
    init_memory({"(DUM LDC NIL LDF (LDC NIL LD (0 . 0) CONS LD (1 . 0) AP LDC 1 ADD RTN) CONS ",
                 "LDF (LDC NIL LDC 0 CONS LD (0 . 0) AP RTN) RAP STOP)"}, "NIL");
    run(fin, n);
    check(fin == MS_ERROR1, "memory exhausted ends in error 1");
    $display("runaway    ended in state %0d after %0d cycles", fin, n);
    repeat (5) @(posedge clk);
    check(state() == MS_ERROR1, "error 1 holds while button is low");
    button = 1'b1;
    repeat (3) @(posedge clk);
    check(state() == MS_ERROR2, "button moves error 1 to error 2");
    repeat (5) @(posedge clk);
    check(state() == MS_ERROR2, "error 2 holds while button is high");
    button = 1'b0;
    repeat (3) @(posedge clk);
    check(state() == MS_IDLE, "releasing button moves error 2 to idle");

    // The machine runs again after an error.
    prog_int("again", "(LDC 3 LDC 4 ADD STOP)", "NIL", 7);

    // ---------------- scan block: snapshot of the idle state
    @(negedge clk);
    sr_shift = 1'b0;
    sr_pulse();
    n_capture++;
    sr_shift = 1'b1;
    for (int k = SW - 1; k >= 0; k--) begin
      snap[k] = sr_out;
      sr_pulse();
      n_shift++;
    end
    check(snap[SW-1 -: 9] == UA_IDLE || snap[SW-1 -: 9] == UA_IDLE + 9'd1,
          $sformatf("snapshot mpc %0d is in the idle loop", snap[SW-1 -: 9]));
    check(snap[SW-10 -: 52] == '0, "no datapath line active while idle");

    // ---------------- scan block: drive "rnum wmar" onto the datapath
    c = '0;
    c.rd[int'(R_NUM) - 1] = 1'b1;
    c.wr[int'(W_MAR) - 1] = 1'b1;
    q = '{sel: NX_INC, push: 1'b0, pop: 1'b0};
    vec = {UA_IDLE, c, 7'b0, q};
    for (int k = SW - 1; k >= 0; k--) begin
      sr_in = vec[k];
      sr_pulse();
    end
    sr_drive = 1'b1;
    n_drive++;
    #1;
    check(data_out == {18'b0, NUM_ADDR}, "driven vector gates NUM onto the bus");
    @(posedge clk); #1;
    check(mar == NUM_ADDR, "driven vector loads MAR from NUM");
    @(negedge clk);
    sr_drive = 1'b0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    reset = 1'b0;
    prog_int("afterscan", "(LDC 2 LDC 2 ADD STOP)", "NIL", 4);

    // ---------------- mechanisms
    for (int k = 1; k <= 21; k++)
      check(n_dispatch[k] > 0, $sformatf("instruction %0d executed", k));
    check(n_gc > 0,      "garbage collection ran");
    check(n_gc_live > 0, "garbage collection with live data");
    check(n_rcdr > 0,    "marker retreated through a cdr");
    check(n_free > 0,    "sweep freed cells");
    check(n_err1 > 0,    "memory exhausted (error 1)");
    check(n_err2 > 0,    "error 2 reached");
    check(n_idle > 0,    "return to idle");
    check(max_depth >= 3, "subroutines nested three deep");
    check(n_capture > 0 && n_shift > 0 && n_drive > 0, "scan capture, shift and drive");
    $display("mechanisms: gc=%0d gc_live=%0d rcdr=%0d freed=%0d err1=%0d err2=%0d idle=%0d depth=%0d capture=%0d shift=%0d drive=%0d",
             n_gc, n_gc_live, n_rcdr, n_free, n_err1, n_err2, n_idle, max_depth, n_capture, n_shift, n_drive);
    $display("total cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
