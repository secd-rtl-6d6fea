// secd_scan -- the shift-register block between the SECD control unit and
// datapath, used to observe and to force the signals crossing between them.
//
// W signals pass through the block.  In normal operation (drive low) each
// output simply equals its input and the block is invisible.  On its own
// clock, sr_clk, the register either captures a snapshot of all W inputs
// (shift low) or shifts one place towards the MSB, taking sr_in at bit 0
// (shift high); sr_out is the MSB.  With drive high the outputs come from the
// register instead of the inputs, so a vector shifted in can be applied to the
// datapath and control unit while the system clock is pulsed.
//
// A separate clock for this block, and the rule that the system clock and the
// shift clock never run in the same cycle, follow the design description, as
// does the width of 72 trapped signals.  The two control pins (shift, drive)
// and their meaning are this design's own choice.  The register has no reset.
module secd_scan #(
  parameter int unsigned W = 72
) (
  input  logic         sr_clk,
  input  logic         shift,   // 1: shift serially, 0: capture par_in
  input  logic         drive,   // 1: par_out from the register
  input  logic         sr_in,
  output logic         sr_out,
  input  logic [W-1:0] par_in,
  output logic [W-1:0] par_out
);

  logic [W-1:0] sr_q;

  always_ff @(posedge sr_clk) begin
    if (shift) sr_q <= {sr_q[W-2:0], sr_in};
    else       sr_q <= par_in;
  end

  assign sr_out  = sr_q[W-1];
  assign par_out = drive ? sr_q : par_in;

endmodule
