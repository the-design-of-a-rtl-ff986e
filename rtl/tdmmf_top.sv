// tdmmf_top: the two time-division-multiplexed matched filter schemes side
// by side, each followed by a threshold detector for PN acquisition.
//
// The basic scheme (prefix b_) splits the PN_LEN-chip code into two segments:
// 128 taps, clock at twice the sample rate, one 128-word FIFO. The advanced
// scheme (prefix a_) splits it into four: 64 taps, clock at four times the
// sample rate, FIFOs of 192, 128 and 64 words. The two are independent,
// each with its own clock, reset, sample input, local code and threshold,
// because they need different clock rates.
//
// Per scheme: din is taken when din_ready is high (every NSEG clocks);
// r_out/r_valid are the filter output (see tdmmf); hit pulses one clock
// after a valid output whose magnitude reaches threshold, and acquired is
// sticky until reset.
module tdmmf_top
  import tdmmf_pkg::*;
#(
  parameter int unsigned PN_LEN = 255,
  parameter int unsigned DATA_W = 12,
  localparam int unsigned OUT_W = out_w(DATA_W, PN_LEN)
) (
  // Basic scheme, two segments.
  input  logic                     b_clk,
  input  logic                     b_rst,
  input  logic [PN_LEN-1:0]        b_pn_code,
  input  logic signed [DATA_W-1:0] b_din,
  output logic                     b_din_ready,
  input  logic [OUT_W-2:0]         b_threshold,
  output logic signed [OUT_W-1:0]  b_r_out,
  output logic                     b_r_valid,
  output logic                     b_hit,
  output logic                     b_acquired,
  // Advanced scheme, four segments.
  input  logic                     a_clk,
  input  logic                     a_rst,
  input  logic [PN_LEN-1:0]        a_pn_code,
  input  logic signed [DATA_W-1:0] a_din,
  output logic                     a_din_ready,
  input  logic [OUT_W-2:0]         a_threshold,
  output logic signed [OUT_W-1:0]  a_r_out,
  output logic                     a_r_valid,
  output logic                     a_hit,
  output logic                     a_acquired
);

  tdmmf #(.PN_LEN(PN_LEN), .DATA_W(DATA_W), .NSEG(2)) u_basic (
    .clk      (b_clk),
    .rst      (b_rst),
    .pn_code  (b_pn_code),
    .din      (b_din),
    .din_ready(b_din_ready),
    .r_out    (b_r_out),
    .r_valid  (b_r_valid)
  );

  threshold_detect #(.W(OUT_W)) u_basic_det (
    .clk      (b_clk),
    .rst      (b_rst),
    .r        (b_r_out),
    .r_valid  (b_r_valid),
    .threshold(b_threshold),
    .hit      (b_hit),
    .acquired (b_acquired)
  );

  tdmmf #(.PN_LEN(PN_LEN), .DATA_W(DATA_W), .NSEG(4)) u_adv (
    .clk      (a_clk),
    .rst      (a_rst),
    .pn_code  (a_pn_code),
    .din      (a_din),
    .din_ready(a_din_ready),
    .r_out    (a_r_out),
    .r_valid  (a_r_valid)
  );

  threshold_detect #(.W(OUT_W)) u_adv_det (
    .clk      (a_clk),
    .rst      (a_rst),
    .r        (a_r_out),
    .r_valid  (a_r_valid),
    .threshold(a_threshold),
    .hit      (a_hit),
    .acquired (a_acquired)
  );

endmodule
