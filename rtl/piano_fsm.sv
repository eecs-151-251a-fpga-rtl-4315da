// piano_fsm: the UART piano's control logic.
//
// Each character that arrives in the UART receive FIFO is played as one note:
//   IDLE   waits for the receive FIFO to be non-empty and pops it (rd_en);
//   FETCH  captures the popped character (the FIFO's dout is registered, so it
//          is valid the cycle after rd_en);
//   ECHO   writes the character unchanged into the UART transmit FIFO,
//          waiting for as long as that FIFO is full;
//   PLAY   enables a tone_generator with the character's tone_switch_period
//          from piano_scale_rom for note_length clock cycles, then returns to
//          IDLE.
// note_length starts at NOTE_LENGTH_DEFAULT (1/5 s) and each pulse on
// note_length_up / note_length_down changes it by NOTE_LENGTH_STEP, within
// [NOTE_LENGTH_STEP, NOTE_LENGTH_MAX].
//
// Audio. audio_pwm is the generator's square wave, low whenever nothing plays.
// The same wave goes to the I2S controller as PCM: the largest two's-complement
// value of PCM_W bits while the wave is high, the smallest while it is low, and
// the constant 0 when no note plays. The sample is offered to both channels at
// all times (pcm_data_valid = 2'b11), so the I2S controller takes the current
// value of the wave once per frame for each channel and thereby samples it at
// the frame rate. Because the sample is always valid, pcm_data_ready is not
// needed here; the port is kept so the FSM shows the full handshake.
//
// From the lab: the echo, the ROM lookup, playing for note_length, the 1/5 s
// default changed by a fixed step with buttons, waiting on a full FIFO, a
// constant sample when idle, a silent audio_pwm when idle, and max/min PCM for
// the square wave's two levels. The state sequence, the step (1/20 s), the
// limits and echoing before playing are this design's own choices.
module piano_fsm #(
  parameter int unsigned CLOCK_FREQ          = 125_000_000,
  parameter int unsigned PCM_W               = piano_pkg::PCM_W,
  parameter int unsigned NOTE_LENGTH_DEFAULT = CLOCK_FREQ / 5,
  parameter int unsigned NOTE_LENGTH_STEP    = CLOCK_FREQ / 20,
  parameter int unsigned NOTE_LENGTH_MAX     = 2 * CLOCK_FREQ
) (
  input  logic                clk,
  input  logic                rst,

  // UART receive FIFO read side
  input  piano_pkg::char_t    ua_rx_dout,
  input  logic                ua_rx_empty,
  output logic                ua_rx_rd_en,

  // UART transmit FIFO write side
  output piano_pkg::char_t    ua_tx_din,
  output logic                ua_tx_wr_en,
  input  logic                ua_tx_full,

  // I2S sample port
  output logic [PCM_W-1:0]    pcm_data,
  output logic [1:0]          pcm_data_valid,
  input  logic [1:0]          pcm_data_ready,

  // note_length buttons (one-cycle pulses)
  input  logic                note_length_up,
  input  logic                note_length_down,

  output logic                audio_pwm,
  output logic                playing,
  output logic [31:0]         note_length
);

  import piano_pkg::*;

  typedef enum logic [1:0] {IDLE, FETCH, ECHO, PLAY} state_t;

  state_t           state;
  char_t            key;
  period_t          period;
  logic [31:0]      note_cnt;
  logic             square;

  localparam logic [PCM_W-1:0] PCM_HIGH = PCM_W'(pcm_max(PCM_W));
  localparam logic [PCM_W-1:0] PCM_LOW  = PCM_W'(pcm_min(PCM_W));

  piano_scale_rom #(.CLOCK_FREQ(CLOCK_FREQ)) u_rom (
    .address(key),
    .data   (period)
  );

  tone_generator #(.PERIOD_W(PERIOD_W)) u_tone (
    .clk               (clk),
    .rst               (rst),
    .output_enable     (state == PLAY),
    .tone_switch_period(period),
    .square_wave_out   (square)
  );

  assign ua_rx_rd_en = (state == IDLE) && !ua_rx_empty;
  assign ua_tx_din   = key;
  assign ua_tx_wr_en = (state == ECHO) && !ua_tx_full;
  assign playing     = (state == PLAY);
  assign audio_pwm   = playing && square;

  assign pcm_data       = !playing ? '0 : (square ? PCM_HIGH : PCM_LOW);
  assign pcm_data_valid = 2'b11;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      key      <= '0;
      note_cnt <= '0;
    end else begin
      case (state)
        IDLE:  if (!ua_rx_empty) state <= FETCH;
        FETCH: begin
          key   <= ua_rx_dout;
          state <= ECHO;
        end
        ECHO:  if (!ua_tx_full) begin
          note_cnt <= '0;
          state    <= PLAY;
        end
        PLAY: begin
          if (note_cnt + 1 >= note_length) state <= IDLE;
          else                             note_cnt <= note_cnt + 1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      note_length <= NOTE_LENGTH_DEFAULT;
    end else if (note_length_up && !note_length_down) begin
      note_length <= (note_length > NOTE_LENGTH_MAX - NOTE_LENGTH_STEP)
                     ? NOTE_LENGTH_MAX : note_length + NOTE_LENGTH_STEP;
    end else if (note_length_down && !note_length_up) begin
      note_length <= (note_length < 2 * NOTE_LENGTH_STEP)
                     ? NOTE_LENGTH_STEP : note_length - NOTE_LENGTH_STEP;
    end
  end

  // The assertions hold from the first reset on (power-up contents are
  // arbitrary until then).
  logic was_reset = 1'b0;
  always_ff @(posedge clk) if (rst) was_reset <= 1'b1;

  a_no_tx_overflow: assert property (@(posedge clk) disable iff (rst || !was_reset) ua_tx_wr_en |-> !ua_tx_full);
  a_no_rx_underflow: assert property (@(posedge clk) disable iff (rst || !was_reset) ua_rx_rd_en |-> !ua_rx_empty);

endmodule
