// tb_secd_decode -- self-checking test of secd_decode.
//
// For random microwords covering every test code, flag pattern and button
// level it checks that the read, write and alu fields decode to a single line
// at the right position (or none), and that the next-address controls follow
// the table of the 13 next-address methods.  It also checks the major-state
// decode at the state-loop addresses and at ordinary ones.  Combinational.
`timescale 1ns/1ps
module tb_secd_decode;
  import secd_pkg::*;
  import secd_ucode_pkg::*;

  uinstr_t uw;
  uaddr_t mpc;
  flags_t flags;
  logic button;
  ctl_t ctl;
  seq_t seq;
  mstate_e mstate;
  int checks = 0, failures = 0;

  secd_decode dut (.uw, .mpc, .flags, .button, .ctl, .seq, .mstate);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      automatic int r = $urandom_range(0, 23), w = $urandom_range(0, 17), a = $urandom_range(0, 12);
      automatic int t = n % 13;
      bit c;
      logic [22:0] er;
      logic [16:0] ew;
      logic [11:0] ea;
      uw = '{rd: rd_e'(r), wr: wr_e'(w), alu: alu_e'(a), test: test_e'(t), addr: 9'($urandom)};
      flags = 7'($urandom);
      button = 1'($urandom);
      mpc = 9'($urandom);
      #1;
      er = (r == 0) ? 23'b0 : 23'(1) << (r - 1);
      ew = (w == 0) ? 17'b0 : 17'(1) << (w - 1);
      ea = (a == 0) ? 12'b0 : 12'(1) << (a - 1);
      check(ctl.rd == er && ctl.wr == ew && ctl.alu == ea,
            $sformatf("field decode r%0d w%0d a%0d", r, w, a));
      case (t)
        5:  c = button;
        6:  c = flags.atom;
        7:  c = flags.eq;
        8:  c = flags.leq;
        9:  c = flags.is_nil;
        10: c = flags.is_true;
        11: c = flags.mark;
        12: c = flags.field;
        default: c = 0;
      endcase
      case (t)
        0: check(seq.sel == NX_INC && !seq.push && !seq.pop, "inc");
        1: check(seq.sel == NX_A && !seq.push && !seq.pop, "jump");
        2: check(seq.sel == NX_A && seq.push && !seq.pop, "call");
        3: check(seq.sel == NX_STACK && !seq.push && seq.pop, "ret");
        4: check(seq.sel == NX_OP && !seq.push && !seq.pop, "dispatch");
        default: check(seq.sel == (c ? NX_A : NX_INC) && !seq.push && !seq.pop,
                       $sformatf("conditional test %0d cond %0d", t, c));
      endcase
    end
    for (int m = 0; m < 512; m++) begin
      mstate_e e;
      mpc = 9'(m);
      #1;
      if (m == 0 || m == UA_IDLE || m == UA_IDLE + 1) e = MS_IDLE;
      else if (m == UA_ERR1 || m == UA_ERR1 + 1) e = MS_ERROR1;
      else if (m == UA_ERR2 || m == UA_ERR2 + 1) e = MS_ERROR2;
      else e = MS_RUN;
      check(mstate == e, $sformatf("major state at %0d", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
