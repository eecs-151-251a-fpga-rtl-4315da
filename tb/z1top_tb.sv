// z1top_tb: end-to-end test of the UART piano at reduced clock, baud rate,
// debounce time and note length.
//
// The test talks to the board pins only. It types characters on
// FPGA_SERIAL_RX with its own 8N1 serialiser, decodes FPGA_SERIAL_TX with its
// own deserialiser, decodes the I2S lines on SCLK rising edges, and times
// AUD_PWM and the "playing" LED. It checks that:
//   - a press of BUTTONS[0] resets the design;
//   - every character is echoed unchanged and in order;
//   - each note lasts note_length cycles and AUD_PWM toggles at the note's
//     half period, worked out here from the key's MIDI number;
//   - the I2S words are 0x7FFFF / 0x80000 while a note plays and 0 when idle;
//   - ten characters typed during one note fill the receive FIFO (the full
//     LED lights) and all are still played and echoed afterwards;
//   - BUTTONS[1] / BUTTONS[2] lengthen / shorten the notes by one step;
//   - SWITCHES[1] gates AUD_PWM.
// Each of these mechanisms is counted, and one that never happened fails.
module z1top_tb;
  localparam int CLOCK_FREQ = 1_000_000;
  localparam int BAUD_RATE  = 62_500;
  localparam int BIT        = CLOCK_FREQ / BAUD_RATE;
  localparam int NL_DEF     = 20_000;
  localparam int NL_STEP    = 5_000;
  localparam int S_CNT      = 4;
  localparam int P_CNT      = 3;

  logic       clk = 0;
  logic [3:0] BUTTONS = '0;
  logic [1:0] SWITCHES = 2'b10;
  logic [5:0] LEDS;
  logic       FPGA_SERIAL_RX = 1'b1;
  logic       FPGA_SERIAL_TX;
  logic       AUD_PWM, AUD_SD;
  logic       MCLK, SCLK, LRCK, SDIN;

  int         checks = 0, failures = 0;
  int         cyc = 0;
  logic [7:0] echoed [$];
  bit         decode_on = 0;

  // Mechanism counters.
  int n_reset = 0, n_echo = 0, n_notes = 0, n_rx_full = 0, n_len_up = 0, n_len_down = 0;
  int n_pcm_high = 0, n_pcm_low = 0, n_pcm_zero = 0, n_pwm_gated = 0, n_bad_pcm = 0;

  z1top #(
    .CLOCK_FREQ         (CLOCK_FREQ),
    .BAUD_RATE          (BAUD_RATE),
    .B_SAMPLE_CNT_MAX   (S_CNT),
    .B_PULSE_CNT_MAX    (P_CNT),
    .NOTE_LENGTH_DEFAULT(NL_DEF),
    .NOTE_LENGTH_STEP   (NL_STEP),
    .MCLK_HALF          (1)
  ) dut (
    .CLK_125MHZ_FPGA(clk), .BUTTONS, .SWITCHES, .LEDS,
    .FPGA_SERIAL_RX, .FPGA_SERIAL_TX, .AUD_PWM, .AUD_SD,
    .MCLK, .SCLK, .LRCK, .SDIN
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int midi_of(logic [7:0] c);
    string low  = "zsxdcvgbhnjm,";
    string high = "q2w3er5t6y7ui";
    for (int i = 0; i < low.len(); i++)  if (c == low[i])  return 48 + i;
    for (int i = 0; i < high.len(); i++) if (c == high[i]) return 60 + i;
    return -1;
  endfunction

  function automatic int half_period(logic [7:0] c);
    int  m;
    real f;
    m = midi_of(c);
    if (m < 0) return 0;
    f = 440.0 * (2.0 ** ((m - 69) / 12.0));
    return $rtoi(CLOCK_FREQ / (2.0 * f) + 0.5);
  endfunction

  task automatic type_char(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      FPGA_SERIAL_RX = f[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  task automatic press(int b);
    @(negedge clk) BUTTONS[b] = 1;
    repeat ((P_CNT + 2) * S_CNT + 10) @(negedge clk);
    BUTTONS[b] = 0;
    repeat (2 * S_CNT) @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Echo decoder.
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge FPGA_SERIAL_TX);
      repeat (BIT / 2) @(posedge clk);
      if (decode_on && !FPGA_SERIAL_TX) begin
        for (int i = 0; i < 8; i++) begin
          repeat (BIT) @(posedge clk);
          b[i] = FPGA_SERIAL_TX;
        end
        repeat (BIT) @(posedge clk);
        check(FPGA_SERIAL_TX == 1, "echo stop bit");
        echoed.push_back(b);
        n_echo++;
      end
    end
  end

  // I2S decoder: 20-bit words, MSB in the second SCLK period of a slot.
  initial begin
    logic        l_prev;
    int          pos;
    logic [19:0] w;
    l_prev = 1; pos = 0; w = '0;
    forever begin
      @(posedge SCLK);
      if (LRCK != l_prev) pos = 0;
      else                pos++;
      l_prev = LRCK;
      if (pos >= 1 && pos <= 20) w = {w[18:0], SDIN};
      if (decode_on && pos == 20) begin
        case (w)
          20'h7FFFF: n_pcm_high++;
          20'h80000: n_pcm_low++;
          20'h00000: n_pcm_zero++;
          default:   n_bad_pcm++;
        endcase
      end
    end
  end

  // Full receive FIFO (LEDS[2]) and AUD_PWM gating.
  always @(posedge clk) begin
    if (decode_on && LEDS[2]) n_rx_full++;
    if (decode_on && !SWITCHES[1]) begin
      if (AUD_PWM) begin
        failures++;
        $display("FAIL: AUD_PWM active with the switch off");
      end
      if (LEDS[0]) n_pwm_gated++;
    end
  end

  // Time one note on the playing LED and AUD_PWM.
  task automatic measure(logic [7:0] c, int nl);
    int   start, toggles, last_t, hp, bad;
    logic prev;
    hp = half_period(c);
    wait (LEDS[0]);
    @(posedge clk); #1;
    start = cyc; toggles = 0; last_t = -1; bad = 0; prev = AUD_PWM;
    while (LEDS[0]) begin
      @(posedge clk); #1;
      if (LEDS[0] && AUD_PWM != prev) begin
        if (last_t >= 0 && cyc - last_t != hp) bad++;
        last_t = cyc; toggles++;
        prev = AUD_PWM;
      end
    end
    n_notes++;
    check(cyc - start >= nl - 1 && cyc - start <= nl,
          $sformatf("'%c' lasted %0d cycles, want %0d", c, cyc - start, nl));
    if (SWITCHES[1] && hp != 0) begin
      check(toggles >= nl / hp - 2, $sformatf("'%c' %0d toggles", c, toggles));
      check(bad == 0, $sformatf("'%c' %0d toggle intervals differ from %0d", c, bad, hp));
    end
  endtask

  initial begin
    string burst;
    int    e0;
    repeat (20) @(posedge clk);
    press(0);
    n_reset++;
    repeat (50) @(posedge clk);
    check(LEDS[1] && !LEDS[0] && LEDS[4], "after reset: receive FIFO empty, nothing playing, transmit FIFO empty");
    decode_on = 1;
    repeat (1000) @(posedge clk);

    // One note.
    fork
      type_char("q");
      measure("q", NL_DEF);
    join
    repeat (20 * BIT) @(posedge clk);
    check(echoed.size() == 1 && echoed[0] == "q", "echo of 'q'");
    check(n_pcm_high > 0 && n_pcm_low > 0, "square wave on I2S");
    check(n_pcm_zero > 0, "zeros on I2S when idle");

    // Ten characters typed during one note: the receive FIFO fills up.
    burst = "zxcvbnm,qw";
    e0 = echoed.size();
    fork
      for (int i = 0; i < burst.len(); i++) type_char(burst[i]);
      for (int i = 0; i < burst.len(); i++) measure(burst[i], NL_DEF);
    join
    repeat (20 * BIT) @(posedge clk);
    check(echoed.size() == e0 + burst.len(), $sformatf("%0d echoes for the burst", echoed.size() - e0));
    for (int i = 0; i < burst.len() && e0 + i < echoed.size(); i++)
      check(echoed[e0 + i] == burst[i], $sformatf("burst echo %0d: %c", i, echoed[e0 + i]));
    check(n_rx_full > 0, "receive FIFO filled up");

    // Longer notes, then shorter ones.
    press(1);
    fork
      type_char("e");
      measure("e", NL_DEF + NL_STEP);
    join
    n_len_up++;
    press(2);
    press(2);
    fork
      type_char("A");
      measure("A", NL_DEF - NL_STEP);
    join
    n_len_down++;

    // Switch off: AUD_PWM stays quiet, I2S keeps playing.
    SWITCHES[1] = 0;
    fork
      type_char("y");
      measure("y", NL_DEF - NL_STEP);
    join
    SWITCHES[1] = 1;
    repeat (20 * BIT) @(posedge clk);
    check(echoed.size() == e0 + burst.len() + 3 && echoed[echoed.size() - 1] == "y", "all echoes arrived");
    check(n_bad_pcm == 0, $sformatf("%0d I2S words that are neither max, min nor 0", n_bad_pcm));

    $display("mechanisms: reset=%0d echo=%0d notes=%0d rx_full_cycles=%0d len_up=%0d len_down=%0d pcm_high=%0d pcm_low=%0d pcm_zero=%0d pwm_gated=%0d",
             n_reset, n_echo, n_notes, n_rx_full, n_len_up, n_len_down, n_pcm_high, n_pcm_low, n_pcm_zero, n_pwm_gated);
    check(n_reset > 0 && n_echo > 0 && n_notes > 0 && n_rx_full > 0 && n_len_up > 0 && n_len_down > 0 &&
          n_pcm_high > 0 && n_pcm_low > 0 && n_pcm_zero > 0 && n_pwm_gated > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
