// tb_seg_fifo: pushes random words at random moments into a 5-deep and a
// 128-deep segment FIFO and checks that after each push the output register
// holds the word pushed exactly DEPTH pushes before, and that it holds still
// between pushes.
module tb_seg_fifo;
  localparam int W = 19;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, push = 0;
  logic [W-1:0] din = '0;
  logic [W-1:0] q5, q128;
  always #5 clk = ~clk;

  seg_fifo #(.DEPTH(5),   .WIDTH(W)) u5   (.clk, .rst, .push, .din, .dout(q5));
  seg_fifo #(.DEPTH(128), .WIDTH(W)) u128 (.clk, .rst, .push, .din, .dout(q128));

  logic [W-1:0] hist [$];
  int npush = 0;
  logic [W-1:0] prev5, prev128;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 2000; c++) begin
      push = ($urandom_range(0, 3) == 0);
      din  = W'($urandom);
      prev5 = q5; prev128 = q128;
      @(negedge clk);
      if (push) begin
        hist.push_back(din);
        npush++;
        if (npush > 5) begin
          checks++;
          if (q5 != hist[npush - 1 - 5]) begin
            failures++;
            $display("FAIL depth 5 push %0d: %h expected %h", npush, q5, hist[npush - 1 - 5]);
          end
        end
        if (npush > 128) begin
          checks++;
          if (q128 != hist[npush - 1 - 128]) begin
            failures++;
            $display("FAIL depth 128 push %0d: %h expected %h", npush, q128, hist[npush - 1 - 128]);
          end
        end
      end else begin
        checks++;
        if (q5 != prev5 || q128 != prev128) begin
          failures++;
          $display("FAIL output changed without a push at cycle %0d", c);
        end
      end
    end
    if (npush < 300) begin failures++; $display("FAIL too few pushes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
