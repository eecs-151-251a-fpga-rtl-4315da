// tone_generator: square-wave generator for one note.
//
// A counter runs while output_enable is high and tone_switch_period is
// non-zero; each time it has counted tone_switch_period clock cycles the
// output toggles, so the wave has a period of 2 * tone_switch_period cycles,
// a frequency of CLOCK_FREQ / (2 * tone_switch_period). With output_enable
// low or a zero period the counter is cleared and the output held low, so a
// silent generator never oscillates.
//
// Interface: output_enable, tone_switch_period[PERIOD_W], square_wave_out.
// Timing: after enabling, the first toggle (to high) happens
// tone_switch_period cycles later. The lab names the block and the meaning of
// tone_switch_period; the counter is this design's own.
module tone_generator #(
  parameter int unsigned PERIOD_W = 24
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                output_enable,
  input  logic [PERIOD_W-1:0] tone_switch_period,
  output logic                square_wave_out
);

  logic [PERIOD_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !output_enable || tone_switch_period == '0) begin
      cnt             <= '0;
      square_wave_out <= 1'b0;
    end else if (cnt >= tone_switch_period - 1'b1) begin
      cnt             <= '0;
      square_wave_out <= !square_wave_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
