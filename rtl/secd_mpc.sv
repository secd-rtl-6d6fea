// secd_mpc -- microprogram counter, next-address multiplexer and microcode
// subroutine stack of the SECD control unit.
//
// Each clock the multiplexer picks one of four next-address sources, as the
// design description lays out: the following microword (mpc + 1), the address
// field of the current microword, the SECD instruction code from the datapath
// (a dispatch: instruction codes are microcode addresses), or the top of the
// subroutine stack.  The choice and the push/pop strobes come from the test
// PLA in the decode block.
//
// The stack is DEPTH words deep and built as a shift stack: a push moves every
// entry one place down and writes mpc + 1 on top (the return address of a call
// is always the following word); a pop moves every entry up.  A push beyond
// DEPTH loses the deepest entry.  No stack pointer is kept.
//
// The chip held mpc in a pair of latches (nextmpc on one clock phase, mpc on
// the other).  Here one edge-triggered register plays both parts: the value
// the multiplexer selects in a cycle becomes mpc at the next rising edge.
// A synchronous reset forces mpc to 0, the idle state; the stack is not
// cleared, because nothing reads it before a call has written it.
module secd_mpc
  import secd_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   reset,
  input  seq_t   seq,      // next-address select, push, pop
  input  uaddr_t a_addr,   // address field of the current microword
  input  uaddr_t opcode,   // SECD instruction code
  output uaddr_t mpc
);

  uaddr_t mpc_q, nextmpc;
  uaddr_t stk [DEPTH];

  always_comb begin
    unique case (seq.sel)
      NX_INC:   nextmpc = mpc_q + 1'b1;
      NX_A:     nextmpc = a_addr;
      NX_OP:    nextmpc = opcode;
      NX_STACK: nextmpc = stk[0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) mpc_q <= '0;
    else       mpc_q <= nextmpc;
  end

  always_ff @(posedge clk) begin
    if (!reset) begin
      if (seq.push) begin
        stk[0] <= mpc_q + 1'b1;
        for (int i = 1; i < DEPTH; i++) stk[i] <= stk[i-1];
      end else if (seq.pop) begin
        for (int i = 0; i < DEPTH - 1; i++) stk[i] <= stk[i+1];
      end
    end
  end

  assign mpc = mpc_q;

endmodule
