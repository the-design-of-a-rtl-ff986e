// tb_tdmmf_top: end-to-end test of both filter schemes at full size (255-chip
// code, 12-bit samples, 128 and 64 taps). Each channel receives noise, then
// the code with a random offset and data-sign flips; every output and every
// detector decision is checked against a direct correlation. The test
// requires each mechanism to occur: outputs during noise only, positive and
// negative correlation peaks above the threshold, and outputs below it.
module tb_tdmmf_top;
  import tdmmf_pkg::*;
  localparam int N = 255, DW = 12, OW = out_w(DW, N);

  logic b_clk = 0, a_clk = 0;
  always #5 b_clk = ~b_clk;    // two clocks per sample
  always #3 a_clk = ~a_clk;    // four clocks per sample, a different rate

  logic b_rst, a_rst;
  logic [N-1:0] b_code, a_code;
  logic signed [DW-1:0] b_din, a_din;
  logic b_din_ready, a_din_ready, b_r_valid, a_r_valid;
  logic b_hit, a_hit, b_acq, a_acq;
  logic [OW-2:0] b_thr, a_thr;
  logic signed [OW-1:0] b_r, a_r;

  tdmmf_top dut (
    .b_clk, .b_rst, .b_pn_code(b_code), .b_din, .b_din_ready, .b_threshold(b_thr),
    .b_r_out(b_r), .b_r_valid, .b_hit, .b_acquired(b_acq),
    .a_clk, .a_rst, .a_pn_code(a_code), .a_din, .a_din_ready, .a_threshold(a_thr),
    .a_r_out(a_r), .a_r_valid, .a_hit, .a_acquired(a_acq));

  int bc, bf, bp, bn, bb, bz, ac, af, ap, an, ab, az;
  bit bd, ad;

  acq_scenario #(.NSEG(2), .OUT_W(OW)) u_b (
    .clk(b_clk), .rst(b_rst), .code(b_code), .din(b_din), .din_ready(b_din_ready),
    .threshold(b_thr), .r_out(b_r), .r_valid(b_r_valid), .hit(b_hit), .acquired(b_acq),
    .checks(bc), .failures(bf), .n_pos_peaks(bp), .n_neg_peaks(bn), .n_below(bb),
    .n_noise_outputs(bz), .done(bd));

  acq_scenario #(.NSEG(4), .OUT_W(OW)) u_a (
    .clk(a_clk), .rst(a_rst), .code(a_code), .din(a_din), .din_ready(a_din_ready),
    .threshold(a_thr), .r_out(a_r), .r_valid(a_r_valid), .hit(a_hit), .acquired(a_acq),
    .checks(ac), .failures(af), .n_pos_peaks(ap), .n_neg_peaks(an), .n_below(ab),
    .n_noise_outputs(az), .done(ad));

  int checks, failures;

  task automatic need(input int count, input string what);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    wait (bd && ad);
    checks = bc + ac;
    failures = bf + af;
    need(bz, "basic: outputs on noise only");
    need(bp, "basic: positive peaks detected");
    need(bn, "basic: negative peaks detected");
    need(bb, "basic: outputs below threshold");
    need(az, "advanced: outputs on noise only");
    need(ap, "advanced: positive peaks detected");
    need(an, "advanced: negative peaks detected");
    need(ab, "advanced: outputs below threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge b_clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bc + ac, bf + af + 1);
    $finish;
  end
endmodule
