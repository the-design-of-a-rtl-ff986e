// phase_counter: the segment-select accumulator of the TDM matched filter.
//
// The filter reuses one bank of multipliers for NSEG segments of the PN
// code, one segment per clock, so the clock runs NSEG times faster than the
// samples arrive. This counter adds 1 every clock and its value selects the
// segment: a 1-bit accumulator for the two-segment filter, a 2-bit one for
// the four-segment filter, as in the published schemes. For an NSEG that is
// not a power of two it wraps at NSEG-1 (an extension of this design).
//
// Interface: phase is the current segment (0 after reset), last is high in
// the final clock of each sample period. Reset is synchronous and active
// high (the polarity is this design's choice).
module phase_counter #(
  parameter int unsigned NSEG = 2,
  localparam int unsigned PW  = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output logic [PW-1:0] phase,
  output logic          last
);

  assign last = (phase == PW'(NSEG - 1));

  always_ff @(posedge clk) begin
    if (rst)       phase <= '0;
    else if (last) phase <= '0;
    else           phase <= phase + PW'(1);
  end

endmodule
