// tdmmf_check: drives one TDM matched filter with a random local code and
// random samples and checks it against a direct correlation.
//
// Samples are offered on the clock edge where din_ready is high; the
// checker records them as d_1, d_2, ... and, at every output, compares
// r_out with sum_{m=1..PN_LEN} C_m d_{k-NSEG*TAPS+m}, where d_k is the last
// sample taken before that edge. It also checks that din_ready comes every
// NSEG clocks, that r_valid pulses exactly on those edges once NSEG*TAPS
// samples have been taken and never before, and it restarts the filter
// with a reset half way to check that the fill is redone.
module tdmmf_check #(
  parameter int PN_LEN  = 255,
  parameter int DATA_W  = 12,
  parameter int NSEG    = 2,
  parameter int SAMPLES = 1200
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  import tdmmf_pkg::*;
  localparam int TAPS  = seg_taps(PN_LEN, NSEG);
  localparam int OUT_W = out_w(DATA_W, PN_LEN);
  localparam int FILL  = NSEG * TAPS;

  logic rst = 1;
  logic [PN_LEN-1:0] code;
  logic signed [DATA_W-1:0] din = '0;
  logic din_ready, r_valid;
  logic signed [OUT_W-1:0] r_out;

  tdmmf #(.PN_LEN(PN_LEN), .DATA_W(DATA_W), .NSEG(NSEG)) dut (
    .clk, .rst, .pn_code(code), .din, .din_ready, .r_out, .r_valid);

  int hist [$];        // hist[j] = d_j, hist[0] unused
  int k_last;          // samples taken before the last sample edge
  int since_ready;     // clocks since the last din_ready
  int nvalid;

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

  task automatic run(input int nsamples);
    bit took;
    hist = {0};
    k_last = -1;
    since_ready = 0;
    took = 0;
    while (hist.size() <= nsamples) begin
      @(negedge clk);
      // Outputs of the edge just passed.
      if (took) begin
        check(r_valid == (k_last >= FILL),
              $sformatf("r_valid=%0b after %0d samples", r_valid, k_last));
        if (r_valid) begin
          nvalid++;
          check(int'(r_out) == reference(k_last),
                $sformatf("k=%0d r_out=%0d expected %0d", k_last, r_out, reference(k_last)));
        end
      end else begin
        check(!r_valid, "r_valid outside a sample edge");
      end
      // Input for the next edge.
      since_ready++;
      took = din_ready;
      if (din_ready) begin
        if (hist.size() > 1)
          check(since_ready == NSEG, $sformatf("din_ready period %0d", since_ready));
        since_ready = 0;
        din = DATA_W'($urandom);
        k_last = hist.size() - 1;
        hist.push_back(int'(din));
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; nvalid = 0;
    for (int w = 0; w < PN_LEN; w++) code[w] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    run(SAMPLES / 2);
    // Restart: the filter must refill before its output is valid again.
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int w = 0; w < PN_LEN; w++) code[w] = 1'($urandom);
    run(SAMPLES);
    check(nvalid > SAMPLES / 2, $sformatf("only %0d valid outputs", nvalid));
    done = 1;
  end
endmodule
