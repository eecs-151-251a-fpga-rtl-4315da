// z1top_full_tb: one complete piano operation with every parameter of z1top
// at its default (125 MHz clock, 115200 baud, 100 ms debounce, 1/5 s notes).
//
// Presses RESET long enough to pass the debouncer, types the key 'n' (A3,
// 220 Hz) on the serial input, and checks that 'n' is echoed on the serial
// output, that the note lasts 1/5 s (25,000,000 cycles), that AUD_PWM toggles
// every 125e6 / (2 * 220) = 284091 cycles, and that the I2S words during the
// note are the largest and smallest 20-bit values and 0 afterwards.
module z1top_full_tb;
  localparam int CLOCK_FREQ = 125_000_000;
  localparam int BIT        = CLOCK_FREQ / 115_200;
  localparam int NOTE       = CLOCK_FREQ / 5;
  localparam int HALF       = 284091;

  logic       clk = 0;
  logic [3:0] BUTTONS = '0;
  logic [1:0] SWITCHES = 2'b10;
  logic [5:0] LEDS;
  logic       FPGA_SERIAL_RX = 1'b1;
  logic       FPGA_SERIAL_TX;
  logic       AUD_PWM, AUD_SD;
  logic       MCLK, SCLK, LRCK, SDIN;

  int         checks = 0, failures = 0;
  longint     cyc = 0;
  logic [7:0] echoed [$];
  bit         decode_on = 0;
  int         n_high = 0, n_low = 0, n_zero = 0, n_bad = 0;

  z1top dut (
    .CLK_125MHZ_FPGA(clk), .BUTTONS, .SWITCHES, .LEDS,
    .FPGA_SERIAL_RX, .FPGA_SERIAL_TX, .AUD_PWM, .AUD_SD,
    .MCLK, .SCLK, .LRCK, .SDIN
  );

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #500000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      end
    end
  end

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
          20'h7FFFF: n_high++;
          20'h80000: n_low++;
          20'h00000: n_zero++;
          default:   n_bad++;
        endcase
      end
    end
  end

  task automatic type_char(logic [7:0] c);
    logic [9:0] f;
    f = {1'b1, c, 1'b0};
    for (int i = 0; i < 10; i++) begin
      FPGA_SERIAL_RX = f[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  task automatic measure();
    longint start, last_t;
    int     toggles, bad;
    logic   prev;
    wait (LEDS[0]);
    @(posedge clk); #1;
    start = cyc; toggles = 0; last_t = -1; bad = 0; prev = AUD_PWM;
    while (LEDS[0]) begin
      @(posedge clk); #1;
      if (LEDS[0] && AUD_PWM != prev) begin
        if (last_t >= 0 && cyc - last_t != HALF) bad++;
        last_t = cyc; toggles++;
        prev = AUD_PWM;
      end
    end
    check(cyc - start >= NOTE - 1 && cyc - start <= NOTE, $sformatf("note lasted %0d cycles", cyc - start));
    check(toggles >= NOTE / HALF - 2 && toggles <= NOTE / HALF + 1, $sformatf("%0d toggles", toggles));
    check(bad == 0, $sformatf("%0d toggle intervals differ from %0d", bad, HALF));
  endtask

  initial begin
    repeat (10) @(posedge clk);
    // Hold RESET for 110 ms: longer than the 100 ms debounce window.
    @(negedge clk) BUTTONS[0] = 1;
    repeat (CLOCK_FREQ / 1000 * 110) @(negedge clk);
    BUTTONS[0] = 0;
    repeat (100) @(posedge clk);
    check(LEDS[1] && !LEDS[0], "reset: receive FIFO empty, nothing playing");
    decode_on = 1;
    fork
      type_char("n");
      measure();
    join
    repeat (20 * BIT) @(posedge clk);
    check(echoed.size() == 1 && echoed[0] == "n", "'n' echoed");
    check(n_high > 0 && n_low > 0 && n_zero > 0 && n_bad == 0,
          $sformatf("I2S words: high %0d low %0d zero %0d other %0d", n_high, n_low, n_zero, n_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
