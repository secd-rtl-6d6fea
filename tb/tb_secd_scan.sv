// tb_secd_scan -- self-checking test of secd_scan at its default width.
//
// Checks transparency with drive low, a parallel snapshot shifted out MSB
// first, a vector shifted in and driven onto the outputs, and that the
// register holds its value while its clock is still.
`timescale 1ns/1ps
module tb_secd_scan;
  localparam int W = 72;
  logic sr_clk = 0, shift, drive, sr_in, sr_out;
  logic [W-1:0] par_in, par_out, snap, vec;
  int checks = 0, failures = 0;

  secd_scan dut (.sr_clk, .shift, .drive, .sr_in, .sr_out, .par_in, .par_out);

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

  task automatic pulse();
    #2 sr_clk = 1; #2 sr_clk = 0; #1;
  endtask

  initial begin
    shift = 0; drive = 0; sr_in = 0;
    for (int n = 0; n < 20; n++) begin
      par_in = {$urandom, $urandom, $urandom};
      #1 check(par_out == par_in, "transparent with drive low");
    end
    for (int n = 0; n < 10; n++) begin
      logic [W-1:0] want;
      want = {$urandom, $urandom, $urandom};
      par_in = want;
      shift = 0;
      pulse();                           // snapshot
      par_in = ~want;
      shift = 1;
      for (int k = W - 1; k >= 0; k--) begin
        snap[k] = sr_out;
        sr_in = 1'b0;
        pulse();
      end
      check(snap == want, "snapshot shifted out");
      vec = {$urandom, $urandom, $urandom};
      for (int k = W - 1; k >= 0; k--) begin
        sr_in = vec[k];
        pulse();
      end
      drive = 1;
      #1 check(par_out == vec, "shifted-in vector driven");
      par_in = {$urandom, $urandom, $urandom};
      #5 check(par_out == vec, "register holds without its clock");
      drive = 0;
      #1 check(par_out == par_in, "transparent again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
