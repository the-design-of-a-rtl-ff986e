// threshold_detect: acquisition decision on the matched filter output.
//
// The correlation peaks when the incoming chips line up with the local code.
// Each valid filter output is compared with a threshold; the magnitude |R|
// is used so that a peak of either sign (data-inverted code) is found.
//
// Interface and timing: r is sampled when r_valid is high; hit pulses one
// clock later when |r| >= threshold, and acquired stays high from the first
// hit until reset. Reset is synchronous and active high. The comparison
// with a threshold is the usual acquisition rule; the magnitude, the
// register and the sticky flag are this design's choices.
module threshold_detect #(
  parameter int unsigned W = 20
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] r,
  input  logic                r_valid,
  input  logic [W-2:0]        threshold,
  output logic                hit,
  output logic                acquired
);

  // |r| needs W bits for the most negative value.
  logic [W-1:0] mag;

  assign mag = r[W-1] ? W'(-r) : W'(r);

  always_ff @(posedge clk) begin
    if (rst) begin
      hit      <= 1'b0;
      acquired <= 1'b0;
    end else begin
      hit <= r_valid && (mag >= W'(threshold));
      if (r_valid && (mag >= W'(threshold))) acquired <= 1'b1;
    end
  end

endmodule
