// correlator: the shared multipliers and adder of the TDM matched filter.
//
// Each stored sample is multiplied by its tap coefficient. The coefficients
// are +1, -1 or 0, so a multiplier is a pass, a negation or a zero. The
// TAPS products are then added into one segment correlation. Both stages are
// combinational; the filter registers the result in the FIFOs and output
// register that follow.
//
// SUM_W defaults to DATA_W + log2(TAPS), 19 bits for 128 taps of 12-bit
// samples. That holds every sum except the one where all samples are the
// most negative value and all coefficients are -1.
module correlator
  import tdmmf_pkg::*;
#(
  parameter int unsigned TAPS   = 128,
  parameter int unsigned DATA_W = 12,
  parameter int unsigned SUM_W  = DATA_W + $clog2(TAPS)
) (
  input  logic signed [DATA_W-1:0] taps [TAPS],
  input  coef_t                    coef [TAPS],
  output logic signed [SUM_W-1:0]  sum
);

  logic signed [SUM_W-1:0] prod [TAPS];

  // Multipliers.
  always_comb begin
    for (int t = 0; t < TAPS; t++) begin
      unique case (coef[t])
        COEF_POS: prod[t] = SUM_W'(taps[t]);
        COEF_NEG: prod[t] = -SUM_W'(taps[t]);
        default:  prod[t] = '0;
      endcase
    end
  end

  // Adder.
  always_comb begin
    sum = '0;
    for (int t = 0; t < TAPS; t++) sum = sum + prod[t];
  end

endmodule
