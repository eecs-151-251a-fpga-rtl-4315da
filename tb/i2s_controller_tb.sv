// i2s_controller_tb: decodes the I2S lines independently and checks them
// against the samples the controller accepted.
//
// The source changes pcm_data to a random value every cycle. A monitor on the
// system clock records, per channel, the value taken at each valid/ready
// handshake and snapshots it when that channel's slot begins. A decoder on
// SCLK rising edges assembles each slot: the bit in the first SCLK period after
// an LRCK change must be 0, the next BIT_DEPTH bits (MSB first) must equal the
// snapshot. Also checked: MCLK, SCLK and LRCK periods in system cycles, one
// handshake per channel per frame while valid is held high, and that a channel
// whose valid is withheld repeats its last sample.
module i2s_controller_tb;
  localparam int BD   = 20;
  localparam int MH   = 2;
  localparam int SLOT = 32;
  localparam int FRAME_CYC = 2 * SLOT * 4 * 2 * MH;  // system cycles per LRCK period

  logic          clk = 0;
  logic          rst;
  logic [BD-1:0] pcm_data;
  logic [1:0]    pcm_data_valid, pcm_data_ready;
  logic          mclk, sclk, lrck, sdin;
  int            checks = 0, failures = 0;

  logic [BD-1:0] last [2];
  logic [BD-1:0] expect_word [2];
  int            hs_count [2];
  logic          prev_lrck;
  int            slots_checked = 0, repeats = 0;
  bit            run = 0;
  int            cyc = 0;

  i2s_controller #(.BIT_DEPTH(BD), .MCLK_HALF(MH), .MCLK_PER_SCLK(4), .SLOT_BITS(SLOT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Handshakes and slot-start snapshots, on the system clock.
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      for (int c = 0; c < 2; c++)
        if (pcm_data_valid[c] && pcm_data_ready[c]) begin
          last[c] = pcm_data;
          hs_count[c]++;
        end
      if (lrck != prev_lrck) begin
        if (run) check(hs_count[lrck] <= 1, "at most one sample per channel per frame");
        if (run && pcm_data_valid[lrck]) check(hs_count[lrck] == 1, "one sample per frame while valid");
        if (run && hs_count[lrck] == 0) repeats++;
        expect_word[lrck] = last[lrck];
        hs_count[lrck]    = 0;
      end
    end
    prev_lrck = lrck;
  end

  // Source: new random data every cycle.
  always @(negedge clk) pcm_data <= BD'($urandom);

  // Decoder on SCLK rising edges.
  initial begin
    logic          l_prev;
    int            pos;
    logic [BD-1:0] word;
    l_prev = 1'b1;
    pos    = 0;
    word   = '0;
    forever begin
      @(posedge sclk);
      if (lrck != l_prev) pos = 0;
      else                pos++;
      l_prev = lrck;
      if (run) begin
        if (pos == 0) check(sdin == 0, "first bit period after LRCK change is empty");
        else if (pos <= BD) word = {word[BD-2:0], sdin};
        if (pos == BD) begin
          check(word == expect_word[lrck],
                $sformatf("ch%0d slot got %h want %h", lrck, word, expect_word[lrck]));
          slots_checked++;
        end
        if (pos > BD) check(sdin == 0, "pad bits are 0");
      end
    end
  end

  // Clock periods.
  initial begin
    int t0, t1;
    wait (run);
    @(posedge mclk); t0 = cyc; @(posedge mclk); t1 = cyc;
    check(t1 - t0 == 2 * MH, $sformatf("MCLK period %0d", t1 - t0));
    @(posedge sclk); t0 = cyc; @(posedge sclk); t1 = cyc;
    check(t1 - t0 == 8 * MH, $sformatf("SCLK period %0d", t1 - t0));
    @(posedge lrck); t0 = cyc; @(posedge lrck); t1 = cyc;
    check(t1 - t0 == FRAME_CYC, $sformatf("LRCK period %0d", t1 - t0));
  end

  initial begin
    rst = 1; pcm_data_valid = 2'b00;
    last[0] = '0; last[1] = '0; expect_word[0] = '0; expect_word[1] = '0;
    hs_count[0] = 0; hs_count[1] = 0; prev_lrck = 1;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    // Let one frame go by with nothing valid: zeros go out.
    repeat (FRAME_CYC) @(posedge clk);
    #1 run = 1; pcm_data_valid = 2'b11;
    repeat (8 * FRAME_CYC) @(posedge clk);
    // Withhold the right channel: it must repeat its last sample.
    #1 pcm_data_valid = 2'b01;
    repeat (4 * FRAME_CYC) @(posedge clk);
    #1 pcm_data_valid = 2'b11;
    repeat (3 * FRAME_CYC) @(posedge clk);
    checks++;
    if (slots_checked < 25 || repeats < 3) begin
      failures++;
      $display("FAIL: too few slots (%0d) or repeats (%0d)", slots_checked, repeats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
