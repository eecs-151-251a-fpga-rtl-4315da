// z1top: the UART piano on a Pynq-Z1 board.
//
// Characters typed into a serial terminal arrive on FPGA_SERIAL_RX. The uart
// receiver hands each byte over ready/valid to an 8-deep synchronous fifo; the
// bridge between the two is wr_en = valid & !full, ready = !full, so a full
// receive FIFO holds the byte back in the receiver. The piano_fsm pops
// characters from that FIFO, echoes each one into a 256-deep first-word
// fall-through FIFO (fifo_fwft) whose head feeds the uart transmitter directly
// (valid = FIFO valid, rd_en = transmitter ready & valid), and plays the
// character's note for note_length. The note goes out as PCM through the
// i2s_controller (MCLK, SCLK, LRCK, SDIN) and as a square wave on AUD_PWM.
//
// Buttons pass through a button_parser (synchronise, debounce, edge detect).
// BUTTONS[0] is RESET: its press pulse resets every block behind the button
// parser. BUTTONS[1] lengthens and BUTTONS[2] shortens note_length by one
// step; BUTTONS[3] has no function. SWITCHES[1], the last switch, enables
// AUD_PWM and the board's audio amplifier (AUD_SD); SWITCHES[0] has no
// function here. LEDS[0] is lit while a note plays, LEDS[1] while the receive
// FIFO is empty, LEDS[2] while it is full, LEDS[3] while the transmit FIFO is
// full, LEDS[4] while the transmit FIFO is empty; LEDS[5] is off.
// LEDS[5] (constant 0) and AUD_SD (a copy of SWITCHES[1]) are the two outputs
// that carry no logic of their own.
//
// The blocks and their wiring follow the lab's overview diagram. Pin names,
// the button and LED assignments and the parameter plumbing (which lets a
// simulation shrink clock rate, baud rate, debounce time and note length) are
// this design's own.
module z1top #(
  parameter int unsigned CLOCK_FREQ          = 125_000_000,
  parameter int unsigned BAUD_RATE           = 115_200,
  parameter int unsigned B_SAMPLE_CNT_MAX    = 62500,
  parameter int unsigned B_PULSE_CNT_MAX     = 200,
  parameter int unsigned NOTE_LENGTH_DEFAULT = CLOCK_FREQ / 5,
  parameter int unsigned NOTE_LENGTH_STEP    = CLOCK_FREQ / 20,
  parameter int unsigned RX_FIFO_DEPTH       = 8,
  parameter int unsigned TX_FIFO_DEPTH       = 256,
  parameter int unsigned MCLK_HALF           = 5
) (
  input  logic       CLK_125MHZ_FPGA,
  input  logic [3:0] BUTTONS,
  input  logic [1:0] SWITCHES,
  output logic [5:0] LEDS,

  input  logic       FPGA_SERIAL_RX,
  output logic       FPGA_SERIAL_TX,

  output logic       AUD_PWM,
  output logic       AUD_SD,

  output logic       MCLK,
  output logic       SCLK,
  output logic       LRCK,
  output logic       SDIN
);

  import piano_pkg::*;

  logic clk;
  logic [3:0] buttons_pressed;
  logic rst;

  assign clk = CLK_125MHZ_FPGA;

  button_parser #(
    .WIDTH         (4),
    .SAMPLE_CNT_MAX(B_SAMPLE_CNT_MAX),
    .PULSE_CNT_MAX (B_PULSE_CNT_MAX)
  ) u_buttons (
    .clk      (clk),
    .in       (BUTTONS),
    .out_pulse(buttons_pressed)
  );

  assign rst = buttons_pressed[0];

  // ---------------------------------------------------------------- UART
  char_t ua_tx_data;
  logic  ua_tx_valid, ua_tx_ready;
  char_t ua_rx_data;
  logic  ua_rx_valid, ua_rx_ready;

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_uart (
    .clk           (clk),
    .reset         (rst),
    .data_in       (ua_tx_data),
    .data_in_valid (ua_tx_valid),
    .data_in_ready (ua_tx_ready),
    .data_out      (ua_rx_data),
    .data_out_valid(ua_rx_valid),
    .data_out_ready(ua_rx_ready),
    .serial_in     (FPGA_SERIAL_RX),
    .serial_out    (FPGA_SERIAL_TX)
  );

  // ------------------------------------------------- receive FIFO + bridge
  logic  rx_fifo_wr_en, rx_fifo_full;
  logic  rx_fifo_rd_en, rx_fifo_empty;
  char_t rx_fifo_dout;

  assign rx_fifo_wr_en = ua_rx_valid && !rx_fifo_full;
  assign ua_rx_ready   = !rx_fifo_full;

  fifo #(.data_width(CHAR_W), .fifo_depth(RX_FIFO_DEPTH)) u_rx_fifo (
    .clk  (clk),
    .rst  (rst),
    .wr_en(rx_fifo_wr_en),
    .din  (ua_rx_data),
    .full (rx_fifo_full),
    .rd_en(rx_fifo_rd_en),
    .dout (rx_fifo_dout),
    .empty(rx_fifo_empty)
  );

  // ------------------------------------------------ transmit FIFO + bridge
  char_t tx_fifo_din;
  logic  tx_fifo_wr_en, tx_fifo_full;
  logic  tx_fifo_rd_en, tx_fifo_empty, tx_fifo_valid;

  assign ua_tx_valid   = tx_fifo_valid;
  assign tx_fifo_rd_en = tx_fifo_valid && ua_tx_ready;

  fifo_fwft #(.DATA_WIDTH(CHAR_W), .DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
    .clk  (clk),
    .srst (rst),
    .din  (tx_fifo_din),
    .wr_en(tx_fifo_wr_en),
    .full (tx_fifo_full),
    .dout (ua_tx_data),
    .rd_en(tx_fifo_rd_en),
    .empty(tx_fifo_empty),
    .valid(tx_fifo_valid)
  );

  // ------------------------------------------------------------ piano FSM
  logic [PCM_W-1:0] pcm_data;
  logic [1:0]       pcm_valid, pcm_ready;
  logic             audio_pwm, playing;
  logic [31:0]      note_length;

  piano_fsm #(
    .CLOCK_FREQ         (CLOCK_FREQ),
    .PCM_W              (PCM_W),
    .NOTE_LENGTH_DEFAULT(NOTE_LENGTH_DEFAULT),
    .NOTE_LENGTH_STEP   (NOTE_LENGTH_STEP)
  ) u_piano (
    .clk             (clk),
    .rst             (rst),
    .ua_rx_dout      (rx_fifo_dout),
    .ua_rx_empty     (rx_fifo_empty),
    .ua_rx_rd_en     (rx_fifo_rd_en),
    .ua_tx_din       (tx_fifo_din),
    .ua_tx_wr_en     (tx_fifo_wr_en),
    .ua_tx_full      (tx_fifo_full),
    .pcm_data        (pcm_data),
    .pcm_data_valid  (pcm_valid),
    .pcm_data_ready  (pcm_ready),
    .note_length_up  (buttons_pressed[1]),
    .note_length_down(buttons_pressed[2]),
    .audio_pwm       (audio_pwm),
    .playing         (playing),
    .note_length     (note_length)
  );

  // ------------------------------------------------------- I2S controller
  i2s_controller #(
    .BIT_DEPTH(PCM_W),
    .MCLK_HALF(MCLK_HALF)
  ) u_i2s (
    .clk           (clk),
    .rst           (rst),
    .pcm_data      (pcm_data),
    .pcm_data_valid(pcm_valid),
    .pcm_data_ready(pcm_ready),
    .mclk          (MCLK),
    .sclk          (SCLK),
    .lrck          (LRCK),
    .sdin          (SDIN)
  );

  assign AUD_PWM = audio_pwm && SWITCHES[1];
  assign AUD_SD  = SWITCHES[1];
  assign LEDS    = {1'b0, tx_fifo_empty, tx_fifo_full, rx_fifo_full, rx_fifo_empty, playing};

endmodule
