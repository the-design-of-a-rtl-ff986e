// tdmmf: time-division-multiplexed matched filter (TDMMF) for PN code
// acquisition.
//
// A plain parallel matched filter correlates the last PN_LEN samples with
// the local code every sample, needing PN_LEN multipliers and a PN_LEN-deep
// sample register. This filter keeps only TAPS = ceil(PN_LEN/NSEG) samples and
// TAPS multipliers and runs NSEG times faster than the sample rate. In clock
// s of a sample period (s = 0..NSEG-1) it correlates the stored samples with
// code segment s (chips s*TAPS+1 .. s*TAPS+TAPS, 0 past the end of the code).
// Segment s < NSEG-1 is pushed into a FIFO of depth (NSEG-1-s)*TAPS while
// the word pushed that many samples earlier pops into the FIFO's register.
// In the last clock, the last segment's correlation is added to those
// registers: this is the full correlation over PN_LEN samples, delayed.
// NSEG = 2 is the basic scheme (128 taps, one 128-deep FIFO of 19-bit words),
// NSEG = 4 the advanced one (64 taps, FIFOs of 192, 128 and 64 words of 18
// bits), both for a 255-chip code and 12-bit samples.
//
// Interface and timing:
//   din is taken on the clock edge where din_ready is high, once every NSEG
//   clocks (no back-pressure). On that same edge r_out is loaded with the
//   correlation of the samples taken before it: if d_k is the last of them,
//     r_out = sum_{m=1..PN_LEN} C_m * d_{k-NSEG*TAPS+m},
//   where C_m is +1 for pn_code[m-1] = 0 and -1 for 1. With 255 chips the
//   newest sample d_k meets the zero padding tap and is not used yet.
//   r_valid pulses for one clock with each update once NSEG*TAPS samples have
//   been taken since reset; r_out then holds for NSEG clocks.
//   Reset is synchronous and active high.
// The segmenting, tap coefficients, FIFO depths and word widths follow the
// published schemes. The registered final sum, the sample handshake, the
// output width and the valid flag are this design's choices.
module tdmmf
  import tdmmf_pkg::*;
#(
  parameter int unsigned PN_LEN = 255,
  parameter int unsigned DATA_W = 12,
  parameter int unsigned NSEG   = 2,
  localparam int unsigned TAPS  = seg_taps(PN_LEN, NSEG),
  localparam int unsigned SUM_W = seg_sum_w(DATA_W, TAPS),
  localparam int unsigned OUT_W = out_w(DATA_W, PN_LEN),
  localparam int unsigned PW    = (NSEG > 1) ? $clog2(NSEG) : 1,
  localparam int unsigned FILL  = NSEG * TAPS,
  localparam int unsigned CW    = $clog2(FILL + 1)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [PN_LEN-1:0]        pn_code,
  input  logic signed [DATA_W-1:0] din,
  output logic                     din_ready,
  output logic signed [OUT_W-1:0]  r_out,
  output logic                     r_valid
);

  // Segment select.
  logic [PW-1:0] phase;
  logic          last;

  phase_counter #(.NSEG(NSEG)) u_phase (
    .clk  (clk),
    .rst  (rst),
    .phase(phase),
    .last (last)
  );

  assign din_ready = last;

  // Sample register, shifted once per sample period.
  logic signed [DATA_W-1:0] taps [TAPS];

  input_shift_reg #(.TAPS(TAPS), .DATA_W(DATA_W)) u_sr (
    .clk  (clk),
    .rst  (rst),
    .shift(last),
    .din  (din),
    .taps (taps)
  );

  // Coefficients of the current segment, multipliers and adder.
  coef_t                   coef [TAPS];
  logic signed [SUM_W-1:0] seg_sum;

  coef_mux #(.PN_LEN(PN_LEN), .NSEG(NSEG), .TAPS(TAPS)) u_coef (
    .pn_code(pn_code),
    .phase  (phase),
    .coef   (coef)
  );

  correlator #(.TAPS(TAPS), .DATA_W(DATA_W), .SUM_W(SUM_W)) u_corr (
    .taps(taps),
    .coef(coef),
    .sum (seg_sum)
  );

  // Segment FIFOs: segment s is pushed in clock s and delayed by
  // (NSEG-1-s)*TAPS samples; its register is the FIFO's output.
  logic signed [SUM_W-1:0] seg_reg [NSEG];

  for (genvar s = 0; s < NSEG - 1; s++) begin : g_fifo
    logic [SUM_W-1:0] pop;
    seg_fifo #(.DEPTH((NSEG - 1 - s) * TAPS), .WIDTH(SUM_W)) u_fifo (
      .clk (clk),
      .rst (rst),
      .push(phase == PW'(s)),
      .din (seg_sum),
      .dout(pop)
    );
    assign seg_reg[s] = signed'(pop);
  end
  // The last segment bypasses the FIFOs and is added directly.
  assign seg_reg[NSEG-1] = seg_sum;

  // Final sum.
  logic signed [OUT_W-1:0] total;

  always_comb begin
    total = '0;
    for (int s = 0; s < NSEG; s++) total = total + OUT_W'(seg_reg[s]);
  end

  // Samples taken since reset, saturating once every FIFO word is real.
  logic [CW-1:0] filled;

  always_ff @(posedge clk) begin
    if (rst) begin
      filled  <= '0;
      r_out   <= '0;
      r_valid <= 1'b0;
    end else begin
      r_valid <= 1'b0;
      if (last) begin
        r_out   <= total;
        r_valid <= (filled == CW'(FILL));
        if (filled != CW'(FILL)) filled <= filled + CW'(1);
      end
    end
  end

endmodule
