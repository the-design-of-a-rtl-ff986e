// tb_tdmmf: checks the TDM matched filter against a direct correlation in
// three configurations: the two-segment filter (255 chips, 128 taps), the
// four-segment filter (255 chips, 64 taps) and a three-segment 31-chip
// filter whose last segment has two zero padding taps. Each run includes a
// reset in the middle; outputs, valid timing and the sample rate (one
// sample every NSEG clocks) are checked.
module tb_tdmmf;
  logic clk = 0;
  always #5 clk = ~clk;

  int c2, f2, c4, f4, c3, f3;
  bit d2, d4, d3;
  int checks, failures;

  tdmmf_check #(.PN_LEN(255), .NSEG(2), .SAMPLES(1000)) u2 (.clk, .checks(c2), .failures(f2), .done(d2));
  tdmmf_check #(.PN_LEN(255), .NSEG(4), .SAMPLES(1000)) u4 (.clk, .checks(c4), .failures(f4), .done(d4));
  tdmmf_check #(.PN_LEN(31),  .NSEG(3), .SAMPLES(200))  u3 (.clk, .checks(c3), .failures(f3), .done(d3));

  initial begin
    wait (d2 && d4 && d3);
    checks = c2 + c4 + c3;
    failures = f2 + f4 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c3, f2 + f4 + f3 + 1);
    $finish;
  end
endmodule
