// uart_transmitter: sends bytes as 8N1 serial frames (one low start bit,
// eight data bits LSB first, one high stop bit) at BAUD_RATE.
//
// A byte is taken from data_in when data_in_valid and data_in_ready are both
// high on a rising edge. data_in_ready is high only while the line is idle,
// so one byte is taken per frame. The frame's ten bits are held in a shift
// register and each lasts CLOCK_FREQ / BAUD_RATE clock cycles (1085 at the
// defaults). serial_out is registered and idles high; it goes low for the
// start bit on the cycle after the handshake.
//
// The lab gives the block's name, its ready/valid port names and the 115200
// baud rate; the 125 MHz clock is the Pynq-Z1 board clock and, like the
// rest of the insides, this design's assumption.
module uart_transmitter #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,

  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,

  output logic       serial_out
);

  localparam int unsigned SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned CW               = $clog2(SYMBOL_EDGE_TIME + 1);

  logic [9:0]    shift;     // {stop, data[7:0], start}, sent LSB first
  logic [3:0]    bits_left; // bits of the current frame still to send
  logic [CW-1:0] clk_cnt;
  logic          busy;

  assign busy          = (bits_left != 4'd0);
  assign data_in_ready = !busy;

  always_ff @(posedge clk) begin
    if (reset) begin
      shift      <= '1;
      bits_left  <= 4'd0;
      clk_cnt    <= '0;
      serial_out <= 1'b1;
    end else if (!busy) begin
      serial_out <= 1'b1;
      if (data_in_valid) begin
        shift      <= {1'b1, data_in, 1'b0};
        bits_left  <= 4'd10;
        clk_cnt    <= '0;
        serial_out <= 1'b0;           // start bit
      end
    end else if (clk_cnt == CW'(SYMBOL_EDGE_TIME - 1)) begin
      clk_cnt    <= '0;
      bits_left  <= bits_left - 4'd1;
      shift      <= {1'b1, shift[9:1]};
      serial_out <= (bits_left == 4'd1) ? 1'b1 : shift[1];
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end

endmodule
