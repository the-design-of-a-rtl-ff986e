// acq_scenario: drives one filter-plus-detector channel of tdmmf_top through
// a PN acquisition and checks it.
//
// The local code is a 255-chip m-sequence from the 8-stage LFSR with
// feedback polynomial x^8 + x^6 + x^5 + x^4 + 1. The channel first receives
// noise only, then the code repeated with a random chip offset, amplitude
// AMP, uniform noise of +-NOISE and a data sign that flips every two code
// periods, so peaks of both signs appear. Every filter output is compared
// with a direct correlation of the recorded samples, every hit with
// |R| >= threshold on that output, and acquired with the first hit. The
// counts of peaks of each sign, of outputs below the threshold and of
// outputs during noise are reported so the caller can require each.
module acq_scenario #(
  parameter int PN_LEN  = 255,
  parameter int DATA_W  = 12,
  parameter int NSEG    = 2,
  parameter int OUT_W   = 20,
  parameter int AMP     = 400,
  parameter int NOISE   = 300,
  parameter int NOISE_SAMPLES  = 400,
  parameter int SIGNAL_SAMPLES = 2000
) (
  input  logic                     clk,
  output logic                     rst,
  output logic [PN_LEN-1:0]        code,
  output logic signed [DATA_W-1:0] din,
  input  logic                     din_ready,
  output logic [OUT_W-2:0]         threshold,
  input  logic signed [OUT_W-1:0]  r_out,
  input  logic                     r_valid,
  input  logic                     hit,
  input  logic                     acquired,
  output int                       checks,
  output int                       failures,
  output int                       n_pos_peaks,
  output int                       n_neg_peaks,
  output int                       n_below,
  output int                       n_noise_outputs,
  output bit                       done
);
  localparam int FILL = 256;   // NSEG * ceil(255 / NSEG) for NSEG = 2 and 4

  int hist [$];
  int k_last, offset, sign, first_hit_seen;
  int first_hit_k = -1;
  bit took, pending_hit;

  function automatic int reference(input int k);
    int acc = 0;
    for (int m = 1; m <= PN_LEN; m++)
      acc += code[m-1] ? -hist[k - FILL + m] : hist[k - FILL + m];
    return acc;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL nseg=%0d %s", NSEG, what); end
  endtask

  function automatic int noise();
    return int'($urandom_range(0, 2 * NOISE)) - NOISE;
  endfunction

  initial begin
    logic [7:0] lfsr;
    int ref_r, mag, n;
    checks = 0; failures = 0; done = 0;
    n_pos_peaks = 0; n_neg_peaks = 0; n_below = 0; n_noise_outputs = 0;
    rst = 1; din = '0;
    threshold = (OUT_W-1)'(PN_LEN * AMP / 2);
    lfsr = 8'h01;
    for (int i = 0; i < PN_LEN; i++) begin
      code[i] = lfsr[0];
      lfsr = {lfsr[0] ^ lfsr[2] ^ lfsr[3] ^ lfsr[4], lfsr[7:1]};
    end
    check(lfsr == 8'h01, "LFSR period is 255");
    offset = $urandom_range(0, PN_LEN - 1);
    sign = 1;
    hist = {0};
    k_last = -1; took = 0; pending_hit = 0; first_hit_seen = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    n = 0;
    while (n < NOISE_SAMPLES + SIGNAL_SAMPLES) begin
      @(negedge clk);
      // Detector output for the filter output one clock earlier.
      check(hit == pending_hit, $sformatf("hit=%0b expected %0b at k=%0d", hit, pending_hit, k_last));
      if (hit) first_hit_seen = 1;
      check(acquired == bit'(first_hit_seen), "acquired follows the first hit");
      pending_hit = 0;
      // Filter output of the sample edge just passed.
      if (took && r_valid) begin
        ref_r = reference(k_last);
        check(int'(r_out) == ref_r, $sformatf("k=%0d r_out=%0d expected %0d", k_last, r_out, ref_r));
        mag = (ref_r < 0) ? -ref_r : ref_r;
        pending_hit = (mag >= int'(threshold));
        if (pending_hit && first_hit_k < 0) begin
          // Not on noise, and no later than the first window that holds
          // one whole aligned code period (chip C_1 on the first signal
          // sample carrying chip 0); a partly filled window may get there
          // earlier.
          first_hit_k = k_last;
          check(k_last > NOISE_SAMPLES &&
                k_last <= NOISE_SAMPLES + (PN_LEN - offset) % PN_LEN + PN_LEN + 1,
                $sformatf("first peak at sample %0d, offset %0d", k_last, offset));
        end
        if (k_last < NOISE_SAMPLES) n_noise_outputs++;
        if (pending_hit && ref_r > 0) n_pos_peaks++;
        else if (pending_hit) n_neg_peaks++;
        else n_below++;
      end else if (took) begin
        check(k_last < FILL, $sformatf("no valid output at k=%0d", k_last));
      end
      took = din_ready;
      if (din_ready) begin
        int s, chip_idx;
        if (n < NOISE_SAMPLES) begin
          s = noise();
        end else begin
          chip_idx = (n - NOISE_SAMPLES + offset) % PN_LEN;
          sign = (((n - NOISE_SAMPLES + offset) / PN_LEN) % 4 < 2) ? 1 : -1;
          s = sign * (code[chip_idx] ? -AMP : AMP) + noise();
        end
        din = DATA_W'(s);
        k_last = hist.size() - 1;
        hist.push_back(s);
        n++;
      end
    end
    // Let the last output and hit come out.
    repeat (2 * NSEG) @(negedge clk);
    done = 1;
  end
endmodule
