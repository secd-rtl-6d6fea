// secd_datapath -- registers, combinational units and the single 32-bit bus of
// the SECD chip.
//
// Every transfer is one microinstruction: exactly one source is gated onto the
// bus and at most one register (or the external memory) latches it at the
// rising clock edge.  Sources and destinations arrive as decoded one-hot lines
// (secd_pkg::ctl_t).  The registers and their bus connections follow the
// design description:
//
//   S E C D X1 X2 MAR FREE PARENT ROOT Y1 Y2   14-bit, on the cdr field (13:0)
//   CAR        loads the car field (27:14) of the bus, drives the cdr field
//   ARG        32-bit; operand A of the alu and input of the flags unit
//   BUF1 BUF2  32-bit; load the alu result (never the bus)
//   NIL TRUE FALSE NUM   read-only constant registers (cell addresses)
//   consunit   drives a cons record built from X1 (car) and X2 (cdr)
//   clearunit  the car field of the bus is zero when MAR or NUM is read, so an
//              address can be decremented as a 28-bit integer
//   read-mem   the data pads reach the bus only while rmem is high
//
// Reading a 14-bit register drives zeros on bus bits 31:14 here; on the chip
// those lines were simply not driven.  The alu result can also be read onto
// the bus (the ralu line); the alu's bus operand is then the bus with no
// source, which keeps the path free of a combinational loop.  Registers have
// no reset: the microcode writes each one before reading it, as on the chip.
//
// The instruction code sent to the control unit is the low 9 bits of ARG.  In
// the cycle that loads ARG it is taken from the bus instead, so that the fetch
// can dispatch in the same cycle; the chip got the same effect from ARG's
// transparent latch.
//
// Timing: bus, flags and opcode settle within the cycle; writes take effect at
// the next rising edge of clk.  The memory is written at that edge when the
// wmem line (an output of the control unit) is high; its address is MAR.
module secd_datapath
  import secd_pkg::*;
(
  input  logic      clk,
  input  ctl_t      ctl,        // decoded read / write / alu lines
  input  word_t     mem_rdata,  // data pads, input direction
  output word_t     bus,        // the bus, also the data pads' output value
  output ptr_t      mar,        // memory address pins
  output flags_t    flags,      // to the control unit
  output uaddr_t    opcode      // instruction code, to the control unit
);

  ptr_t  s_q, e_q, c_q, d_q, x1_q, x2_q, mar_q, free_q, car_q;
  ptr_t  parent_q, root_q, y1_q, y2_q;
  word_t arg_q, buf1_q, buf2_q;

  word_t alu_out, bus_src;

  function automatic word_t p2w(ptr_t p);
    return {18'b0, p};
  endfunction

  function automatic logic rd(rd_e r);
    return ctl.rd[int'(r) - 1];
  endfunction

  function automatic logic wr(wr_e w);
    return ctl.wr[int'(w) - 1];
  endfunction

  // Wired bus: the OR of every gated source (at most one is enabled).
  always_comb begin
    bus_src = '0;
    if (rd(R_MEM))    bus_src |= mem_rdata;
    if (rd(R_MAR))    bus_src |= p2w(mar_q);
    if (rd(R_NUM))    bus_src |= p2w(NUM_ADDR);
    if (rd(R_NIL))    bus_src |= p2w(NIL_ADDR);
    if (rd(R_TRUE))   bus_src |= p2w(TRUE_ADDR);
    if (rd(R_FALSE))  bus_src |= p2w(FALSE_ADDR);
    if (rd(R_S))      bus_src |= p2w(s_q);
    if (rd(R_E))      bus_src |= p2w(e_q);
    if (rd(R_C))      bus_src |= p2w(c_q);
    if (rd(R_D))      bus_src |= p2w(d_q);
    if (rd(R_X1))     bus_src |= p2w(x1_q);
    if (rd(R_X2))     bus_src |= p2w(x2_q);
    if (rd(R_CONS))   bus_src |= {2'b00, T_CONS, x1_q, x2_q};
    if (rd(R_CAR))    bus_src |= p2w(car_q);
    if (rd(R_FREE))   bus_src |= p2w(free_q);
    if (rd(R_PARENT)) bus_src |= p2w(parent_q);
    if (rd(R_ROOT))   bus_src |= p2w(root_q);
    if (rd(R_Y1))     bus_src |= p2w(y1_q);
    if (rd(R_Y2))     bus_src |= p2w(y2_q);
    if (rd(R_ARG))    bus_src |= arg_q;
    if (rd(R_BUF1))   bus_src |= buf1_q;
    if (rd(R_BUF2))   bus_src |= buf2_q;
  end

  secd_alu u_alu (
    .op     (ctl.alu),
    .arg    (arg_q),
    .bus    (bus_src),
    .result (alu_out)
  );

  always_comb bus = rd(R_ALU) ? alu_out : bus_src;

  secd_flagsunit u_flags (
    .arg   (arg_q),
    .bus   (bus),
    .flags (flags)
  );

  always_ff @(posedge clk) begin
    if (wr(W_MAR))    mar_q    <= bus[13:0];
    if (wr(W_S))      s_q      <= bus[13:0];
    if (wr(W_E))      e_q      <= bus[13:0];
    if (wr(W_C))      c_q      <= bus[13:0];
    if (wr(W_D))      d_q      <= bus[13:0];
    if (wr(W_X1))     x1_q     <= bus[13:0];
    if (wr(W_X2))     x2_q     <= bus[13:0];
    if (wr(W_CAR))    car_q    <= bus[27:14];
    if (wr(W_FREE))   free_q   <= bus[13:0];
    if (wr(W_PARENT)) parent_q <= bus[13:0];
    if (wr(W_ROOT))   root_q   <= bus[13:0];
    if (wr(W_Y1))     y1_q     <= bus[13:0];
    if (wr(W_Y2))     y2_q     <= bus[13:0];
    if (wr(W_ARG))    arg_q    <= bus;
    if (wr(W_BUF1))   buf1_q   <= alu_out;
    if (wr(W_BUF2))   buf2_q   <= alu_out;
  end

  assign mar    = mar_q;
  assign opcode = wr(W_ARG) ? bus[8:0] : arg_q[8:0];

  // Only one device may drive the bus, and one register latch it, per cycle.
  a_one_source: assert property (@(posedge clk) $onehot0(ctl.rd))
    else $error("secd_datapath: more than one bus source");
  a_one_dest: assert property (@(posedge clk) $onehot0(ctl.wr))
    else $error("secd_datapath: more than one bus destination");

endmodule
