// coef_mux: the per-tap coefficient multiplexers of the TDM matched filter.
//
// The PN code C_1..C_PN_LEN is cut into NSEG segments of TAPS chips. In
// segment s, tap t (t = 0 holds the oldest sample) is multiplied by
// C_{s*TAPS+t+1}; a tap whose index passes the end of the code gets 0.
// For 255 chips and two segments this gives C_1/C_129 on the oldest tap and
// C_128/0 on the newest, for four segments C_1/C_65/C_129/C_193 and
// C_64/C_128/C_192/0.
//
// Interface: pn_code bit m-1 is chip C_m (0 -> +1, 1 -> -1); phase selects
// the segment; coef is purely combinational. Loading the code from a port
// rather than from constants is this design's choice.
module coef_mux
  import tdmmf_pkg::*;
#(
  parameter int unsigned PN_LEN = 255,
  parameter int unsigned NSEG   = 2,
  parameter int unsigned TAPS   = 128,
  localparam int unsigned PW    = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic [PN_LEN-1:0] pn_code,
  input  logic [PW-1:0]     phase,
  output coef_t             coef [TAPS]
);

  // Every input of every multiplexer, fixed at elaboration.
  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    coef_t choice [NSEG];
    for (genvar s = 0; s < NSEG; s++) begin : g_seg
      localparam int unsigned IDX = s * TAPS + t;   // chip C_{IDX+1}
      if (IDX < PN_LEN) begin : g_chip
        assign choice[s] = chip_to_coef(pn_code[IDX]);
      end else begin : g_pad
        assign choice[s] = COEF_ZERO;
      end
    end
    always_comb begin
      coef[t] = COEF_ZERO;
      for (int s = 0; s < NSEG; s++)
        if (phase == PW'(s)) coef[t] = choice[s];
    end
  end

endmodule
