// piano_fsm_tb: drives the piano FSM from a model of the receive FIFO and a
// transmit FIFO whose full flag the test controls.
//
// For every character it checks: the echo (same byte, in order, never written
// while full, held back while full), the note duration (playing high for
// exactly note_length cycles), the pitch (audio_pwm toggles every
// CLOCK_FREQ / (2 f) cycles, f computed here from the note's MIDI number),
// the PCM samples (max value while the wave is high, min while low, 0 when
// idle, valid on both channels), silence for unmapped keys and while idle, and
// note_length changes from the up/down pulses including the lower limit.
module piano_fsm_tb;
  localparam int CLOCK_FREQ = 200_000;
  localparam int NL_DEF     = CLOCK_FREQ / 5;
  localparam int NL_STEP    = CLOCK_FREQ / 20;
  localparam int PCM_W      = 20;

  logic             clk = 0;
  logic             rst;
  logic [7:0]       ua_rx_dout;
  logic             ua_rx_empty, ua_rx_rd_en;
  logic [7:0]       ua_tx_din;
  logic             ua_tx_wr_en, ua_tx_full;
  logic [PCM_W-1:0] pcm_data;
  logic [1:0]       pcm_data_valid, pcm_data_ready;
  logic             note_length_up, note_length_down;
  logic             audio_pwm, playing;
  logic [31:0]      note_length;

  int               checks = 0, failures = 0;
  logic [7:0]       rxq [$];
  logic [7:0]       echoed [$];
  int               cyc = 0;
  int               full_stalls = 0;
  bit               pending = 0;

  piano_fsm #(.CLOCK_FREQ(CLOCK_FREQ), .PCM_W(PCM_W)) dut (.*);

  always #5 clk = ~clk;

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

  // Receive FIFO model: registered dout, like the design's fifo.
  // The test pushes into rxq at any time; the model moves entries into its
  // own storage on clock edges so that every output changes only there.
  logic [7:0] fifo_q [$];
  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      ua_rx_dout  <= '0;
      ua_rx_empty <= 1'b1;
    end else begin
      if (ua_rx_rd_en && fifo_q.size() != 0) ua_rx_dout <= fifo_q.pop_front();
      while (rxq.size() != 0) fifo_q.push_back(rxq.pop_front());
      ua_rx_empty <= (fifo_q.size() == 0);
    end
  end

  // Transmit FIFO model: capture writes, count stalls.
  always @(posedge clk) begin
    if (!rst) begin
      if (ua_tx_wr_en) begin
        check(!ua_tx_full, "no write while the transmit FIFO is full");
        echoed.push_back(ua_tx_din);
      end
      // A character popped but not yet echoed, with the FIFO full: a stall.
      if (pending && ua_tx_full) full_stalls++;
      if (ua_rx_rd_en) pending = 1;
      if (ua_tx_wr_en) pending = 0;
    end
  end

  // PCM follows the wave; nothing oscillates when idle.
  always @(posedge clk) begin
    if (!rst) begin
      if (pcm_data_valid != 2'b11) begin
        failures++; $display("FAIL: pcm valid not 11");
      end
      if (!playing && (audio_pwm || pcm_data != '0)) begin
        failures++; $display("FAIL: sound while idle at %0t", $time);
      end
      if (playing && pcm_data != (audio_pwm ? 20'h7FFFF : 20'h80000)) begin
        failures++; $display("FAIL: pcm %h with wave %b", pcm_data, audio_pwm);
      end
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Play one queued character and measure it.
  task automatic play_and_measure(logic [7:0] c, int nl);
    int start, toggles, last_t, hp, bad;
    logic prev;
    hp = half_period(c);
    wait (playing);
    @(posedge clk); #1;
    start = cyc; toggles = 0; last_t = -1; bad = 0; prev = audio_pwm;
    while (playing) begin
      @(posedge clk); #1;
      if (playing && audio_pwm != prev) begin
        if (last_t >= 0 && cyc - last_t != hp) bad++;
        last_t = cyc; toggles++;
        prev = audio_pwm;
      end
    end
    check(cyc - start == nl - 1 || cyc - start == nl,
          $sformatf("'%c' played %0d cycles, note_length %0d", c, cyc - start, nl));
    if (hp == 0) check(toggles == 0, "unmapped key is silent");
    else begin
      check(toggles >= nl / hp - 2 && toggles <= nl / hp + 1,
            $sformatf("'%c' %0d toggles, half period %0d", c, toggles, hp));
      check(bad == 0, $sformatf("'%c' %0d toggle intervals differ from %0d", c, bad, hp));
    end
  endtask

  initial begin
    string keys;
    rst = 1; ua_tx_full = 0; note_length_up = 0; note_length_down = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(note_length == NL_DEF, "note_length defaults to 1/5 s");
    repeat (50) @(posedge clk);
    check(!playing && !audio_pwm, "idle after reset");

    // Three keys queued at once.
    keys = "qnA";
    for (int i = 0; i < keys.len(); i++) rxq.push_back(keys[i]);
    for (int i = 0; i < keys.len(); i++) play_and_measure(keys[i], NL_DEF);
    @(posedge clk);
    check(echoed.size() == 3 && echoed[0] == "q" && echoed[1] == "n" && echoed[2] == "A", "echo of q n A");

    // Transmit FIFO full: the echo waits, the note waits behind it.
    #1 ua_tx_full = 1;
    rxq.push_back("i");
    repeat (500) @(posedge clk);
    check(!playing && echoed.size() == 3, "held while the transmit FIFO is full");
    #1 ua_tx_full = 0;
    play_and_measure("i", NL_DEF);
    check(echoed.size() == 4 && echoed[3] == "i", "echo after full clears");
    check(full_stalls >= 450, $sformatf("stalled %0d cycles on a full FIFO", full_stalls));

    // Longer notes.
    @(negedge clk) note_length_up = 1;
    @(negedge clk) note_length_up = 0;
    @(negedge clk) note_length_up = 1;
    @(negedge clk) note_length_up = 0;
    check(note_length == NL_DEF + 2 * NL_STEP, "two steps up");
    rxq.push_back("z");
    play_and_measure("z", NL_DEF + 2 * NL_STEP);

    // Shorter, down to the lower limit.
    for (int k = 0; k < 10; k++) begin
      @(negedge clk) note_length_down = 1;
      @(negedge clk) note_length_down = 0;
    end
    check(note_length == NL_STEP, "note_length stops at one step");
    rxq.push_back("7");
    play_and_measure("7", NL_STEP);

    repeat (100) @(posedge clk);
    check(echoed.size() == 6 && echoed[4] == "z" && echoed[5] == "7", "all echoes in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
