// input_shift_reg: the input sample register of the TDM matched filter.
//
// Holds the last TAPS incoming samples. When shift is high the newest sample
// din enters at the top (taps[TAPS-1]) and every sample moves one place
// towards taps[0], which is the oldest sample. In the filter, shift is
// strobed once every NSEG clocks, so the contents stay still while the
// NSEG segment correlations are computed on them.
//
// Timing: din appears on taps[TAPS-1] one clock after shift. Reset clears
// the register (synchronous, active high; a choice of this design).
module input_shift_reg #(
  parameter int unsigned TAPS   = 128,
  parameter int unsigned DATA_W = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     shift,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] taps [TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < TAPS; t++) taps[t] <= '0;
    end else if (shift) begin
      for (int t = 0; t < TAPS - 1; t++) taps[t] <= taps[t+1];
      taps[TAPS-1] <= din;
    end
  end

endmodule
