// tb_threshold_detect: feeds random signed outputs, valid pulses and
// thresholds and checks hit (|r| >= threshold on a valid output, one clock
// later) and the sticky acquired flag, including the most negative input.
module tb_threshold_detect;
  localparam int W = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, r_valid = 0;
  logic signed [W-1:0] r = '0;
  logic [W-2:0] threshold = '0;
  logic hit, acquired;
  always #5 clk = ~clk;

  threshold_detect #(.W(W)) dut (.clk, .rst, .r, .r_valid, .threshold, .hit, .acquired);

  bit exp_hit, exp_acq;
  int nhits = 0;
  longint mag;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    exp_acq = 0;
    @(negedge clk);
    checks++;
    if (acquired || hit) begin failures++; $display("FAIL flags set after reset"); end
    for (int c = 0; c < 2000; c++) begin
      r_valid   = ($urandom_range(0, 1) == 1);
      threshold = (W-1)'($urandom_range(0, 300000));
      case ($urandom_range(0, 9))
        0: r = signed'(W'(1 << (W - 1)));     // most negative
        1: r = (c % 2) ? W'(threshold) : -W'(threshold);
        default: r = W'($urandom_range(0, 2 * 300000) - 300000);
      endcase
      mag = (r < 0) ? -longint'(r) : longint'(r);
      exp_hit = r_valid && (mag >= longint'(threshold));
      if (c >= 1000) exp_acq = exp_acq || exp_hit;
      if (c == 1000) begin
        rst = 1; @(negedge clk); rst = 0;
        checks++;
        if (acquired) begin failures++; $display("FAIL acquired not cleared by reset"); end
      end
      @(negedge clk);
      checks++;
      if (hit != exp_hit) begin
        failures++;
        $display("FAIL c=%0d r=%0d thr=%0d valid=%0b hit=%0b", c, r, threshold, r_valid, hit);
      end
      if (hit) nhits++;
      if (c >= 1000) begin
        checks++;
        if (acquired != exp_acq) begin failures++; $display("FAIL acquired c=%0d", c); end
      end
    end
    checks++;
    if (nhits == 0) begin failures++; $display("FAIL no hit seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
