// debouncer: removes contact bounce from synchronised push buttons.
//
// A free-running counter produces a sample tick every SAMPLE_CNT_MAX clock
// cycles. On each tick, every button that reads high increments its own
// saturating counter; a button that reads low at any cycle clears its counter
// at once. The debounced output of a bit is high while its counter has reached
// PULSE_CNT_MAX, i.e. after the button has been seen high on PULSE_CNT_MAX
// consecutive ticks with no low reading in between.
//
// Interface: glitchy_signal[WIDTH] in, debounced_signal[WIDTH] out.
// Timing: a clean press shows on the output between PULSE_CNT_MAX and
// PULSE_CNT_MAX+1 tick periods after it starts, plus one cycle; a release
// shows on the next cycle. The lab only names this block; the sampling scheme
// and its defaults (a tick every 62500 cycles, 0.5 ms at 125 MHz, and 200 ticks,
// 100 ms) are this design's choice. Registers start at 0 (FPGA power-up).
module debouncer #(
  parameter int unsigned WIDTH          = 1,
  parameter int unsigned SAMPLE_CNT_MAX = 62500,
  parameter int unsigned PULSE_CNT_MAX  = 200
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] glitchy_signal,
  output logic [WIDTH-1:0] debounced_signal
);

  localparam int unsigned SW = $clog2(SAMPLE_CNT_MAX + 1);
  localparam int unsigned PW = $clog2(PULSE_CNT_MAX + 1);

  logic [SW-1:0] sample_cnt = '0;
  logic          tick;

  always_ff @(posedge clk) begin
    if (sample_cnt == SW'(SAMPLE_CNT_MAX - 1)) sample_cnt <= '0;
    else                                       sample_cnt <= sample_cnt + 1'b1;
  end

  assign tick = (sample_cnt == SW'(SAMPLE_CNT_MAX - 1));

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic [PW-1:0] sat_cnt = '0;

    always_ff @(posedge clk) begin
      if (!glitchy_signal[i])                        sat_cnt <= '0;
      else if (tick && sat_cnt != PW'(PULSE_CNT_MAX)) sat_cnt <= sat_cnt + 1'b1;
    end

    assign debounced_signal[i] = (sat_cnt == PW'(PULSE_CNT_MAX));
  end

endmodule
