// tb_secd_datapath -- self-checking test of secd_datapath with a memory model.
//
// Drives decoded control lines one microinstruction per clock, the way the
// control unit does, and checks: every 14-bit register loads the cdr field of
// the bus and reads back with bits 31:14 clear; CAR loads the car field and
// drives it on the cdr field; MAR and NUM reads clear the car field; NIL, TRUE
// and FALSE drive their cell addresses; the consunit builds a cons record from
// X1 and X2 and writes it to memory; the memory reaches the bus only with
// rmem; BUF1 and BUF2 latch the alu result; the alu result can be read onto
// the bus; flags and the instruction code (including the same-cycle code while
// ARG loads) follow ARG and the bus.
`timescale 1ns/1ps
module tb_secd_datapath;
  import secd_pkg::*;

  logic clk = 0;
  ctl_t ctl = '0;
  word_t mem_rdata, bus;
  ptr_t mar;
  flags_t flags;
  uaddr_t opcode;
  logic wmem;
  int checks = 0, failures = 0;

  secd_datapath dut (.clk, .ctl, .mem_rdata, .bus, .mar, .flags, .opcode);
  secd_ram_model #(.AW(14)) ram (.clk, .addr(mar), .we(wmem), .wdata(bus), .rdata(mem_rdata));

  assign wmem = ctl.wr[int'(W_MEM) - 1];

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Set up one microinstruction; it takes effect at the next rising edge.
  task automatic set(rd_e r, wr_e w, alu_e a = A_NONE);
    ctl.rd  = rd_line(r);
    ctl.wr  = wr_line(w);
    ctl.alu = alu_line(a);
    #1;
  endtask

  task automatic step(rd_e r, wr_e w, alu_e a = A_NONE);
    set(r, w, a);
    @(posedge clk); #1;
  endtask

  // Put word v in memory at a fixed scratch cell and point MAR at it.
  localparam ptr_t SCR = 14'd100;
  task automatic mem_to_mar(word_t v);
    ram.mem[SCR] = v;
    ram.mem[NUM_ADDR] = {18'b0, SCR};
    step(R_NUM, W_MAR);
    step(R_MEM, W_MAR);
  endtask

  rd_e rlist[12] = '{R_S, R_E, R_C, R_D, R_X1, R_X2, R_FREE, R_PARENT, R_ROOT, R_Y1, R_Y2, R_MAR};
  wr_e wlist[12] = '{W_S, W_E, W_C, W_D, W_X1, W_X2, W_FREE, W_PARENT, W_ROOT, W_Y1, W_Y2, W_MAR};

  initial begin
    word_t v, w2;
    @(negedge clk);
    set(R_NONE, W_NONE);

    // clearunit and constants
    step(R_NUM, W_MAR);
    check(mar == NUM_ADDR, "NUM into MAR");
    set(R_MAR, W_NONE);
    check(bus == {18'b0, NUM_ADDR}, "MAR read clears the car field");
    set(R_NIL, W_NONE);   check(bus == 32'(NIL_ADDR), "NIL constant");
    set(R_TRUE, W_NONE);  check(bus == 32'(TRUE_ADDR), "TRUE constant");
    set(R_FALSE, W_NONE); check(bus == 32'(FALSE_ADDR), "FALSE constant");

    // read-mem gates
    ram.mem[NUM_ADDR] = 32'hDEAD_BEEF;
    set(R_NONE, W_NONE);  check(bus == 32'h0, "memory does not reach the bus without rmem");
    set(R_MEM, W_NONE);   check(bus == 32'hDEAD_BEEF, "memory on the bus with rmem");

    // 14-bit registers: load from memory (cdr field), read back
    for (int n = 0; n < 40; n++) begin
      automatic int k = n % 12;
      v = $urandom;
      mem_to_mar(v);
      step(R_MEM, wlist[k]);
      set(rlist[k], W_NONE);
      check(bus == {18'b0, v[13:0]}, $sformatf("register %0d loads and drives the cdr field", k));
    end

    // CAR register
    for (int n = 0; n < 20; n++) begin
      v = $urandom;
      mem_to_mar(v);
      step(R_MEM, W_CAR);
      set(R_CAR, W_NONE);
      check(bus == {18'b0, v[27:14]}, "CAR takes the car field, drives the cdr field");
    end

    // consunit and memory write
    ram.mem[SCR] = {18'b0, 14'h1234};
    step(R_NUM, W_MAR); ram.mem[NUM_ADDR] = {18'b0, SCR}; step(R_MEM, W_MAR);
    step(R_MEM, W_X1);
    ram.mem[SCR] = {18'b0, 14'h0ABC};
    step(R_MEM, W_X2);
    step(R_NUM, W_MAR);
    step(R_CONS, W_MEM);
    check(ram.mem[NUM_ADDR] == {2'b00, T_CONS, 14'h1234, 14'h0ABC}, "cons record written to memory");

    // ALU through ARG and BUF1/BUF2, flags, opcode bypass
    for (int n = 0; n < 30; n++) begin
      logic [27:0] x, y;
      x = 28'($urandom);
      y = 28'($urandom);
      v = {2'b00, T_INT, x};
      w2 = {2'b00, T_INT, y};
      mem_to_mar(v);
      set(R_MEM, W_ARG);
      check(opcode == v[8:0], "instruction code follows the bus while ARG loads");
      @(posedge clk); #1;
      check(opcode == v[8:0], "instruction code from ARG");
      ram.mem[SCR] = w2;
      set(R_MEM, W_BUF1, A_ADD);
      check(flags.eq == (x == y) && flags.leq == ($signed(x) <= $signed(y)) && flags.atom,
            "binary flags compare ARG with the bus");
      @(posedge clk); #1;
      set(R_MEM, W_BUF2, A_SUB);
      @(posedge clk); #1;
      set(R_BUF1, W_NONE);
      check(bus == {2'b00, T_INT, 28'(x + y)}, "BUF1 holds ARG + bus");
      set(R_BUF2, W_NONE);
      check(bus == {2'b00, T_INT, 28'(x - y)}, "BUF2 holds ARG - bus");
      set(R_ALU, W_NONE, A_DEC);
      check(bus == {2'b00, T_INT, 28'(x - 1)}, "alu result read onto the bus");
      step(R_ALU, W_ARG, A_SETM);
      check(flags.mark && !flags.field, "mark flag after SETM");
    end

    // ralu + replcar/replcdr through the bus operand
    v = {2'b01, T_CONS, 14'h0111, 14'h0222};
    mem_to_mar(v);
    step(R_MEM, W_ARG);
    step(R_NUM, W_Y1);
    set(R_Y1, W_BUF1, A_REPLCAR);
    @(posedge clk); #1;
    set(R_BUF1, W_NONE);
    check(bus == {2'b01, T_CONS, NUM_ADDR, 14'h0222}, "replcar takes the bus cdr field");
    set(R_Y1, W_NONE, A_REPLCDR);
    set(R_ALU, W_NONE, A_REPLCDR);
    check(bus == {2'b01, T_CONS, 14'h0111, 14'h0000}, "ralu: alu bus operand is empty while the alu is read");
    check(flags.field && !flags.atom, "field flag and cons type");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
