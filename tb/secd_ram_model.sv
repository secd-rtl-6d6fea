// secd_ram_model -- behavioural model of the external memory of the SECD chip,
// for simulation only.
//
// 2**AW words of 32 bits.  Reads are asynchronous: rdata always shows the word
// at addr (the memory defaults to reading).  A write of wdata to addr happens
// at the rising clock edge when we is high.  Testbenches load and inspect the
// array `mem` directly to play the part of the host processor.
module secd_ram_model #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
  assign rdata = mem[addr];

endmodule
