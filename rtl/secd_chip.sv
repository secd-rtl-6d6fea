// secd_chip -- an SECD machine on one chip: a microcoded co-processor that runs
// compiled functional programs held as S-expressions in an external memory.
//
// A host loads a problem into the memory, pulses button, and the chip runs
// until the program's STOP, returning a pointer to the result in the reserved
// cell NUM (see secd_ucode_rom).  The chip is built from a control unit (mpc
// and subroutine stack, microcode ROM, DECODE) and a datapath (registers,
// alu, flags unit, consunit around one 32-bit bus), with the 72-bit scan block
// secd_scan placed between the two on every signal that crosses, except the
// instruction code.  The trapped signals are, MSB first: mpc (9, on its way to
// the ROM), the decoded read, write and alu lines (52, to the datapath), the
// flags (7, to DECODE) and the next-address controls (4, to secd_mpc).
//
// Pins (plain signals; the bidirectional data pads appear as data_in,
// data_out and data_oe):
//   clk            system clock; one microinstruction per rising edge
//   reset          synchronous, forces mpc to 0 (idle)
//   button         start from idle, acknowledge an error
//   flag0, flag1   major state: 00 idle, 10 error1, 01 error2, 11 running
//                  (flag0 is the low bit of secd_pkg::mstate_e)
//   mar            memory address (14 bits)
//   rmem, wmem     memory read / write strobes; the memory drives data_in
//                  whenever it is not being written, and is written at the
//                  clock edge that ends a cycle with wmem high
//   data_out/_oe   bus value and pad output enable (= wmem)
//   sr_clk, sr_shift, sr_drive, sr_in, sr_out   scan block
//
// The chip ran on a two-phase non-overlapping clock with level-sensitive
// latches (datapath on one phase, control unit on the other); this RTL uses a
// single edge-triggered clock, so a microinstruction's transfer and the mpc
// update both happen at the same rising edge.
module secd_chip
  import secd_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   button,
  output logic   flag0,
  output logic   flag1,
  output ptr_t   mar,
  output logic   rmem,
  output logic   wmem,
  input  word_t  data_in,
  output word_t  data_out,
  output logic   data_oe,
  input  logic   sr_clk,
  input  logic   sr_shift,
  input  logic   sr_drive,
  input  logic   sr_in,
  output logic   sr_out
);

  // control-unit side of the scan block
  uaddr_t  mpc_c;
  ctl_t    ctl_c;
  flags_t  flags_c;
  seq_t    seq_c;
  // far side of the scan block
  uaddr_t  mpc_r;     // to ROM and DECODE
  ctl_t    ctl_d;     // to the datapath
  flags_t  flags_d;   // from the datapath
  seq_t    seq_m;     // to secd_mpc

  uinstr_t uw;
  uaddr_t  opcode;
  mstate_e mstate;
  word_t   bus;

  secd_mpc u_mpc (
    .clk    (clk),
    .reset  (reset),
    .seq    (seq_m),
    .a_addr (uw.addr),
    .opcode (opcode),
    .mpc    (mpc_c)
  );

  secd_ucode_rom u_rom (
    .addr (mpc_r),
    .uw   (uw)
  );

  secd_decode u_decode (
    .uw     (uw),
    .mpc    (mpc_r),
    .flags  (flags_c),
    .button (button),
    .ctl    (ctl_c),
    .seq    (seq_c),
    .mstate (mstate)
  );

  // The scan chain is four segments in series, one per signal group, so that
  // each group stays a signal of its own.  Serial order from sr_in: seq,
  // flags, ctl, mpc; sr_out is the MSB of mpc.
  logic sr_1, sr_2, sr_3;

  secd_scan #(.W($bits(seq_t))) u_scan_seq (
    .sr_clk (sr_clk), .shift (sr_shift), .drive (sr_drive),
    .sr_in  (sr_in),  .sr_out (sr_1),
    .par_in (seq_c),  .par_out (seq_m)
  );

  secd_scan #(.W($bits(flags_t))) u_scan_flags (
    .sr_clk (sr_clk), .shift (sr_shift), .drive (sr_drive),
    .sr_in  (sr_1),   .sr_out (sr_2),
    .par_in (flags_d), .par_out (flags_c)
  );

  secd_scan #(.W($bits(ctl_t))) u_scan_ctl (
    .sr_clk (sr_clk), .shift (sr_shift), .drive (sr_drive),
    .sr_in  (sr_2),   .sr_out (sr_3),
    .par_in (ctl_c),  .par_out (ctl_d)
  );

  secd_scan #(.W(UADDR_W)) u_scan_mpc (
    .sr_clk (sr_clk), .shift (sr_shift), .drive (sr_drive),
    .sr_in  (sr_3),   .sr_out (sr_out),
    .par_in (mpc_c),  .par_out (mpc_r)
  );

  secd_datapath u_dp (
    .clk       (clk),
    .ctl       (ctl_d),
    .mem_rdata (data_in),
    .bus       (bus),
    .mar       (mar),
    .flags     (flags_d),
    .opcode    (opcode)
  );

  assign rmem     = ctl_d.rd[int'(R_MEM) - 1];
  assign wmem     = ctl_d.wr[int'(W_MEM) - 1];
  assign data_out = bus;
  assign data_oe  = wmem;
  assign flag0    = mstate[0];
  assign flag1    = mstate[1];

endmodule
