// tb_correlator: drives random 12-bit samples and random +1/-1/0
// coefficients into the 128-tap multiply-and-sum and compares the sum with
// an integer dot product; includes all-extreme patterns that reach the
// largest magnitude the 19-bit sum can hold.
module tb_correlator;
  import tdmmf_pkg::*;
  localparam int TAPS = 128, DW = 12, SW = 19;
  int checks = 0, failures = 0;

  logic signed [DW-1:0] taps [TAPS];
  coef_t                coef [TAPS];
  logic signed [SW-1:0] sum;

  correlator #(.TAPS(TAPS), .DATA_W(DW), .SUM_W(SW)) dut (.taps, .coef, .sum);

  task automatic check_now(input string what);
    int ref_sum = 0;
    for (int t = 0; t < TAPS; t++)
      case (coef[t])
        COEF_POS: ref_sum += int'(taps[t]);
        COEF_NEG: ref_sum -= int'(taps[t]);
        default: ;
      endcase
    #1;
    checks++;
    if (int'(sum) != ref_sum) begin
      failures++;
      $display("FAIL %s: sum %0d expected %0d", what, sum, ref_sum);
    end
  endtask

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int t = 0; t < TAPS; t++) begin
        taps[t] = DW'($urandom);
        case ($urandom_range(0, 2))
          0: coef[t] = COEF_POS;
          1: coef[t] = COEF_NEG;
          default: coef[t] = COEF_ZERO;
        endcase
      end
      check_now($sformatf("random %0d", r));
    end
    // Largest positive and negative sums that fit.
    for (int t = 0; t < TAPS; t++) begin taps[t] = 12'sd2047; coef[t] = COEF_POS; end
    check_now("all +2047 * +1");
    for (int t = 0; t < TAPS; t++) begin taps[t] = -12'sd2048; coef[t] = COEF_POS; end
    check_now("all -2048 * +1");
    for (int t = 0; t < TAPS; t++) begin taps[t] = 12'sd2047; coef[t] = COEF_NEG; end
    check_now("all +2047 * -1");
    for (int t = 0; t < TAPS; t++) begin taps[t] = 12'sd100; coef[t] = COEF_ZERO; end
    check_now("all zero coefficients");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
