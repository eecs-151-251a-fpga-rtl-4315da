// uart: full-duplex UART made of a uart_transmitter and a uart_receiver
// sharing CLOCK_FREQ and BAUD_RATE.
//
// The receive pin passes through two flip-flops before the receiver, which
// brings the asynchronous line into the clock domain; the transmitter's output
// is registered inside it. Both pins idle high (the synchroniser flops start
// high so that no false start bit is seen after power-up).
// Interface: data_in / data_in_valid / data_in_ready to send a byte,
// data_out / data_out_valid / data_out_ready for a received byte, as in the
// lab's overview diagram. Timing: 10 bit periods of CLOCK_FREQ / BAUD_RATE
// cycles per byte each way, plus two cycles of input synchronisation.
module uart #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,

  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,

  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready,

  input  logic       serial_in,
  output logic       serial_out
);

  logic serial_in_meta = 1'b1;
  logic serial_in_sync = 1'b1;

  always_ff @(posedge clk) begin
    serial_in_meta <= serial_in;
    serial_in_sync <= serial_in_meta;
  end

  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_tx (
    .clk          (clk),
    .reset        (reset),
    .data_in      (data_in),
    .data_in_valid(data_in_valid),
    .data_in_ready(data_in_ready),
    .serial_out   (serial_out)
  );

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_rx (
    .clk           (clk),
    .reset         (reset),
    .data_out      (data_out),
    .data_out_valid(data_out_valid),
    .data_out_ready(data_out_ready),
    .serial_in     (serial_in_sync)
  );

endmodule
