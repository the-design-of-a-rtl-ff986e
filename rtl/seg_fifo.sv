// seg_fifo: a segment FIFO of the TDM matched filter and the register
// behind it.
//
// The filter pushes one partial correlation per sample period and pops one
// at the same moment, so the FIFO always holds DEPTH words and acts as a
// delay line: the word popped is the one pushed DEPTH pushes earlier. It is
// built as a RAM with a single circular pointer, read before write at the
// same address. The popped word is loaded into dout, the register that
// follows each FIFO in the filter (Reg), and held until the next push.
//
// Timing: on a push clock edge, dout gets the word pushed DEPTH pushes
// before and din is stored. The RAM is not cleared by reset; the first
// DEPTH pops return stale words and the filter masks them with its valid
// flag. Reset clears the pointer and dout (synchronous, active high).
module seg_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 19,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  // RAM: registered read of the oldest word, write of the newest.
  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr  <= '0;
      dout <= '0;
    end else if (push) begin
      dout <= mem[ptr];
      ptr  <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + AW'(1);
    end
  end

endmodule
