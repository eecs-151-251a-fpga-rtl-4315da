// synchronizer: two flip-flops in series per bit, bringing asynchronous
// inputs (the board's push buttons) into the clock domain of `clk`.
//
// Interface: async_signal[WIDTH] in, sync_signal[WIDTH] out.
// Timing: sync_signal follows async_signal two rising edges later.
// The block and its place at the head of the button chain come from the
// lab's overview diagram; the two-stage depth is the usual choice and this
// design's own. The flops start at 0 (FPGA power-up value), since this block
// runs before any reset exists.
module synchronizer #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] async_signal,
  output logic [WIDTH-1:0] sync_signal
);

  logic [WIDTH-1:0] meta = '0;
  logic [WIDTH-1:0] sync = '0;

  always_ff @(posedge clk) begin
    meta <= async_signal;
    sync <= meta;
  end

  assign sync_signal = sync;

endmodule
