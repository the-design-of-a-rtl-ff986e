// tb_coef_mux: for random 255-chip codes, checks every tap coefficient of
// the two-segment (128 taps) and four-segment (64 taps) multiplexers in
// every phase against the rule: tap t in segment s takes chip s*TAPS+t+1,
// chip 0 -> +1, chip 1 -> -1, and 0 past the end of the code.
module tb_coef_mux;
  import tdmmf_pkg::*;
  localparam int N = 255;
  int checks = 0, failures = 0;

  logic [N-1:0] code;
  logic [0:0]   ph2;
  logic [1:0]   ph4;
  coef_t c2 [128];
  coef_t c4 [64];

  coef_mux #(.PN_LEN(N), .NSEG(2), .TAPS(128)) u2 (.pn_code(code), .phase(ph2), .coef(c2));
  coef_mux #(.PN_LEN(N), .NSEG(4), .TAPS(64))  u4 (.pn_code(code), .phase(ph4), .coef(c4));

  function automatic coef_t expect_coef(input logic [N-1:0] cd, input int idx);
    if (idx >= N) return COEF_ZERO;
    return cd[idx] ? COEF_NEG : COEF_POS;
  endfunction

  initial begin
    for (int r = 0; r < 6; r++) begin
      for (int w = 0; w < N; w++) code[w] = 1'($urandom);
      for (int s = 0; s < 2; s++) begin
        ph2 = 1'(s); #1;
        for (int t = 0; t < 128; t++) begin
          checks++;
          if (c2[t] != expect_coef(code, s * 128 + t)) begin
            failures++;
            $display("FAIL nseg2 s=%0d t=%0d", s, t);
          end
        end
      end
      for (int s = 0; s < 4; s++) begin
        ph4 = 2'(s); #1;
        for (int t = 0; t < 64; t++) begin
          checks++;
          if (c4[t] != expect_coef(code, s * 64 + t)) begin
            failures++;
            $display("FAIL nseg4 s=%0d t=%0d", s, t);
          end
        end
      end
    end
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
