// tb_secd_mpc -- self-checking test of secd_mpc (microprogram counter, next
// address multiplexer, 4-deep subroutine stack).
//
// Random sequences of increments, jumps, dispatches, calls and returns are
// applied and mpc is compared every cycle with a reference model that keeps
// the stack in a queue truncated to four entries.  Reset must return mpc to 0
// in one cycle.  Every transfer takes exactly one clock.
`timescale 1ns/1ps
module tb_secd_mpc;
  import secd_pkg::*;

  logic clk = 0, reset;
  seq_t seq;
  uaddr_t a_addr, opcode, mpc;
  int checks = 0, failures = 0;

  secd_mpc dut (.clk, .reset, .seq, .a_addr, .opcode, .mpc);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned model_mpc;
  int unsigned stack[$];

  initial begin
    reset = 1; seq = '{sel: NX_INC, push: 0, pop: 0}; a_addr = 0; opcode = 0;
    @(posedge clk); #1;
    reset = 0;
    checks++;
    if (mpc != 0) begin failures++; $display("FAIL: reset"); end
    model_mpc = 0;
    for (int n = 0; n < 20000; n++) begin
      automatic int k = $urandom_range(0, 9);
      int unsigned nxt;
      a_addr = 9'($urandom);
      opcode = 9'($urandom);
      seq = '{sel: NX_INC, push: 0, pop: 0};
      if (k <= 2)      begin seq.sel = NX_INC; nxt = (model_mpc + 1) % 512; end
      else if (k == 3) begin seq.sel = NX_A;   nxt = a_addr; end
      else if (k == 4) begin seq.sel = NX_OP;  nxt = opcode; end
      else if (k <= 6) begin
        seq.sel = NX_A; seq.push = 1; nxt = a_addr;
        stack.push_front((model_mpc + 1) % 512);
        if (stack.size() > 4) void'(stack.pop_back());
      end else if (stack.size() > 0) begin
        seq.sel = NX_STACK; seq.pop = 1; nxt = stack.pop_front();
      end else begin
        seq.sel = NX_INC; nxt = (model_mpc + 1) % 512;
      end
      if (n % 5000 == 4999) begin
        reset = 1; nxt = 0; stack.delete();
        seq = '{sel: NX_INC, push: 0, pop: 0};
      end
      @(posedge clk); #1;
      reset = 0;
      model_mpc = nxt;
      checks++;
      if (mpc != 9'(model_mpc)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: mpc %0d expected %0d", n, mpc, model_mpc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
