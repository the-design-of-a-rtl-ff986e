// tb_input_shift_reg: drives random samples with random shift enables into a
// 16-tap register and compares every tap with a queue model of the last 16
// samples taken (oldest at tap 0). Also checks that reset clears it.
module tb_input_shift_reg;
  localparam int TAPS = 16, DW = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shift = 0;
  logic signed [DW-1:0] din = '0;
  logic signed [DW-1:0] taps [TAPS];
  always #5 clk = ~clk;

  input_shift_reg #(.TAPS(TAPS), .DATA_W(DW)) dut (.clk, .rst, .shift, .din, .taps);

  int model [$];
  initial begin
    for (int t = 0; t < TAPS; t++) model.push_back(0);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 300; c++) begin
      shift = ($urandom_range(0, 2) != 0);
      din   = DW'($urandom);
      @(negedge clk);
      if (shift) begin
        void'(model.pop_front());
        model.push_back(int'(din));
      end
      for (int t = 0; t < TAPS; t++) begin
        checks++;
        if (int'(taps[t]) != model[t]) begin
          failures++;
          $display("FAIL c=%0d tap %0d = %0d, expected %0d", c, t, taps[t], model[t]);
        end
      end
    end
    shift = 0; rst = 1; @(negedge clk); rst = 0;
    for (int t = 0; t < TAPS; t++) begin
      checks++;
      if (taps[t] != 0) begin failures++; $display("FAIL tap %0d not cleared", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
