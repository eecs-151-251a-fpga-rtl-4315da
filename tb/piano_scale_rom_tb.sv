// piano_scale_rom_tb: checks all 256 entries of the scale ROM.
//
// The expected period of each key is worked out here from the note's
// frequency, A4 = 440 Hz equal temperament, f = 440 * 2^((m - 69) / 12) with
// m the MIDI note number, as CLOCK_FREQ / (2 f) rounded. Keys outside the two
// keyboard rows must read 0. Also checks that the notes rise along each row.
module piano_scale_rom_tb;
  localparam int CLOCK_FREQ = 125_000_000;
  logic [7:0]  address;
  logic [23:0] data;
  int          checks = 0, failures = 0;

  piano_scale_rom #(.CLOCK_FREQ(CLOCK_FREQ)) dut (.*);

  // MIDI note of each key: bottom row from C3 (48), top row from C4 (60).
  function automatic int midi_of(logic [7:0] c);
    string low  = "zsxdcvgbhnjm,";
    string high = "q2w3er5t6y7ui";
    for (int i = 0; i < low.len(); i++)  if (c == low[i])  return 48 + i;
    for (int i = 0; i < high.len(); i++) if (c == high[i]) return 60 + i;
    return -1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int    m, want, prev;
    real   f;
    string row;
    for (int a = 0; a < 256; a++) begin
      address = 8'(a);
      #1;
      m = midi_of(8'(a));
      if (m < 0) want = 0;
      else begin
        f    = 440.0 * (2.0 ** ((m - 69) / 12.0));
        want = $rtoi(CLOCK_FREQ / (2.0 * f) + 0.5);
      end
      checks++;
      if (data > want + 1 || data + 1 < want) begin
        failures++;
        $display("FAIL: key %0d (%c): got %0d want %0d", a, a, data, want);
      end
    end
    // Spot value: 'n' is A3 = 220 Hz, 125e6 / 440 = 284091.
    address = "n"; #1;
    checks++;
    if (data != 284091) begin failures++; $display("FAIL: A3 got %0d", data); end
    row = "q2w3er5t6y7ui";
    prev = 1 << 30;
    for (int i = 0; i < row.len(); i++) begin
      address = row[i]; #1;
      checks++;
      if (data >= prev) begin failures++; $display("FAIL: pitch does not rise at %c", row[i]); end
      prev = data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
