// uart_receiver: receives 8N1 serial frames at BAUD_RATE and offers each
// byte on a ready/valid output.
//
// The idle line is high. A low level starts a frame; the receiver then samples
// the line in the middle of every bit period (CLOCK_FREQ / BAUD_RATE cycles
// long), shifting the eight data bits in LSB first, and checks the stop bit in
// the middle of its period. A frame whose stop bit reads high sets
// data_out_valid with the byte on data_out; a framing error drops the byte.
// data_out_valid stays high until data_out_ready takes the byte. A byte that
// arrives while the previous one is still waiting replaces it (no buffering
// here; the receive FIFO behind this block is the buffer).
//
// serial_in must already be synchronous to clk (see uart). The lab names the
// block, its ports and the 115200 baud rate; the sampling scheme is this
// design's own.
module uart_receiver #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,

  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready,

  input  logic       serial_in
);

  localparam int unsigned SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned SAMPLE_TIME      = SYMBOL_EDGE_TIME / 2;
  localparam int unsigned CW               = $clog2(SYMBOL_EDGE_TIME + 1);

  logic [7:0]    shift;
  logic [3:0]    bit_idx;   // 0 = start bit, 1..8 = data, 9 = stop
  logic [CW-1:0] clk_cnt;
  logic          active;
  logic          sample_now;

  // First sample half a bit after the falling edge, then one per bit period.
  assign sample_now = (bit_idx == 4'd0) ? (clk_cnt == CW'(SAMPLE_TIME - 1))
                                        : (clk_cnt == CW'(SYMBOL_EDGE_TIME - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      active         <= 1'b0;
      bit_idx        <= 4'd0;
      clk_cnt        <= '0;
      shift          <= '0;
      data_out       <= '0;
      data_out_valid <= 1'b0;
    end else begin
      if (data_out_valid && data_out_ready) data_out_valid <= 1'b0;

      if (!active) begin
        clk_cnt <= '0;
        bit_idx <= 4'd0;
        if (!serial_in) active <= 1'b1;
      end else if (sample_now) begin
        clk_cnt <= '0;
        if (bit_idx == 4'd0) begin
          // Start bit must still be low at mid-bit, otherwise it was a glitch.
          if (serial_in) active <= 1'b0;
          else           bit_idx <= 4'd1;
        end else if (bit_idx != 4'd9) begin
          shift   <= {serial_in, shift[7:1]};
          bit_idx <= bit_idx + 4'd1;
        end else begin
          active <= 1'b0;
          if (serial_in) begin
            data_out       <= shift;
            data_out_valid <= 1'b1;
          end
        end
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end

endmodule
