// tb_phase_counter: checks the segment counter for 2, 3 and 4 segments.
// After reset the phase must count 0,1,..,NSEG-1 and wrap, with last high
// exactly in phase NSEG-1; a reset in mid-count must return it to 0.
module tb_phase_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [0:0] ph2; logic l2;
  logic [1:0] ph3; logic l3;
  logic [1:0] ph4; logic l4;
  phase_counter #(.NSEG(2)) u2 (.clk, .rst, .phase(ph2), .last(l2));
  phase_counter #(.NSEG(3)) u3 (.clk, .rst, .phase(ph3), .last(l3));
  phase_counter #(.NSEG(4)) u4 (.clk, .rst, .phase(ph4), .last(l4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    n = 0;
    for (int c = 0; c < 40; c++) begin
      check(ph2 == 1'(n % 2) && l2 == (n % 2 == 1), $sformatf("nseg2 c=%0d ph=%0d", c, ph2));
      check(ph3 == 2'(n % 3) && l3 == (n % 3 == 2), $sformatf("nseg3 c=%0d ph=%0d", c, ph3));
      check(ph4 == 2'(n % 4) && l4 == (n % 4 == 3), $sformatf("nseg4 c=%0d ph=%0d", c, ph4));
      @(negedge clk); n++;
    end
    // Reset in the middle of a count.
    check(ph4 != 0 || ph3 != 0, "counters are mid-count before reset");
    rst = 1; @(negedge clk); rst = 0;
    check(ph2 == 0 && ph3 == 0 && ph4 == 0, "phase 0 after reset");
    @(negedge clk);
    check(ph2 == 1 && ph3 == 1 && ph4 == 1, "phase 1 after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
